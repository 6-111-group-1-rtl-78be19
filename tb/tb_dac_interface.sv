// Checks the D/A interface: chunks pushed onto the five stacks play out one
// sample per 300-clock frame in their original order; before the first
// chunk and when the stacks run dry the previous sample repeats with
// underrun high; a chunk is refused while any stack is full.
module tb_dac_interface;
  import codec_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, sclk, sync, dout, underrun;
  chunk_t samples;
  logic [23:0] word;
  int count;

  dac_interface dut (.*);
  ad5063_model u_dac (.sclk, .sync, .din(dout), .word, .count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collect played samples, tagged with the underrun flag of their frame.
  int played [$];
  bit under [$];
  int c_last = 0;
  bit ur_frame;
  always @(posedge sync) begin
    @(negedge clk);
    ur_frame = underrun;
  end
  always @(posedge clk) if (count != c_last) begin
    c_last = count;
    played.push_back(int'(shortint'(word[15:0])));
    under.push_back(ur_frame);
  end

  int next_v = 1;
  task automatic push_chunk(output bit taken);
    for (int k = 0; k < 5; k++) samples[k] = sample_t'(next_v * 7 + k);
    @(negedge clk);
    valid_in = 1;
    @(posedge clk);
    taken = ack_in;
    @(negedge clk);
    valid_in = 0;
    if (taken) next_v++;
  endtask

  initial begin
    bit ok;
    int idx, expect_n, underruns;
    valid_in = 0; samples = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (700) @(posedge clk);  // two frames with nothing to play
    for (int i = 0; i < 4; i++) begin push_chunk(ok); check(ok, "chunk taken"); end
    push_chunk(ok);
    check(!ok, "fifth chunk refused: stacks full");
    wait (played.size() >= 25);
    // Expected: leading underruns (value 0), then 20 samples in order, then
    // underruns repeating the last sample.
    idx = 0;
    while (idx < played.size() && under[idx]) begin
      check(played[idx] == 0, "idle output is zero");
      idx++;
    end
    check(idx >= 2, "underrun before the first chunk");
    expect_n = 0;
    for (int c = 1; c <= 4; c++)
      for (int k = 0; k < 5; k++) begin
        check(!under[idx] && played[idx] == c * 7 + k,
              $sformatf("sample %0d = %0d expected %0d", idx, played[idx], c * 7 + k));
        idx++;
      end
    underruns = 0;
    while (idx < played.size()) begin
      check(under[idx] && played[idx] == 4 * 7 + 4, "repeat last sample on underrun");
      idx++;
      underruns++;
    end
    check(underruns >= 1, "underrun after the stacks ran dry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
