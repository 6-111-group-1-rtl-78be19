// Checks the compressor against the reference codec model on random chunks
// of several amplitudes plus corner cases (flat signal, full-scale swings,
// the recursion example where an early quantisation error must not carry
// into later samples). Also checks the 13-cycle latency from ack_in to
// valid_out, that busy covers the work, and that an unread result is held.
module tb_compressor;
  import codec_pkg::*;
  import codec_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, busy, valid_out, ack_out;
  chunk_t chunk;
  comp_word_t data_out;

  compressor dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input shortint n [5], input bit hold = 0);
    logic [39:0] exp_w;
    int t0, t;
    exp_w = compress(n);
    for (int k = 0; k < 5; k++) chunk[k] = n[k];
    valid_in <= 1;
    do @(posedge clk); while (!ack_in);
    t0 = 0;
    valid_in <= 0;
    t = 0;
    do begin @(posedge clk); t++; check(busy || valid_out, "busy while working"); end while (!valid_out);
    check(t == 13, $sformatf("latency %0d", t));
    check(data_out == exp_w, $sformatf("word %h expected %h (%0d %0d %0d %0d %0d)",
          data_out, exp_w, n[0], n[1], n[2], n[3], n[4]));
    if (hold) begin
      repeat (20) @(posedge clk);
      check(valid_out && data_out == exp_w, "result held until ack");
    end
    ack_out <= 1;
    @(posedge clk);
    ack_out <= 0;
    @(posedge clk);
    check(!valid_out, "valid_out cleared by ack");
  endtask

  initial begin
    shortint n [5];
    valid_in = 0; ack_out = 0; chunk = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    n = '{100, 110, 124, -314, -300}; run(n, 1);
    n = '{0, 0, 0, 0, 0}; run(n);
    n = '{-32768, 32767, -32768, 32767, 0}; run(n);
    n = '{5, 6, 7, 8, 9}; run(n);
    n = '{1000, 1010, 1024, 1030, 1020}; run(n);
    for (int i = 0; i < 400; i++) begin
      int amp, base;
      amp = 1 << ($urandom % 16);
      base = int'($urandom % 65536) - 32768;
      for (int k = 0; k < 5; k++) n[k] = shortint'(base + int'($urandom % amp) - amp / 2);
      run(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
