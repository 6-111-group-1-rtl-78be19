// Checks the chunk module: consecutive samples come out five at a time in
// order (N1 oldest) under random acknowledge delays; with no acknowledge the
// stacks fill and `sample` drops with no overflow; a sample pushed anyway
// into a full stack sets the sticky overflow flag.
module tb_chunker;
  import codec_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic enable, word_ready, chunk_ready, chunk_ack, sample, sclk, convst;
  logic frame_tick, sclk_tick, overflow;
  logic [31:0] word;
  chunk_t chunk;

  chunker dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, got = 0;
  bit  ack_on = 1;
  // Consumer: acknowledge after a random delay, check sample order.
  initial begin
    chunk_ack = 0;
    forever begin
      @(posedge clk);
      chunk_ack <= 0;
      if (!rst && chunk_ready && !chunk_ack && ack_on && ($urandom % 4 == 0)) begin
        for (int k = 0; k < 5; k++)
          check(chunk[k] == sample_t'(got + k), $sformatf("chunk[%0d]=%h expected %0d", k, chunk[k], got + k));
        got += 5;
        chunk_ack <= 1;
      end
    end
  end

  // Stimulus changes on falling edges, away from the sampling edge.
  task automatic push(input int v);
    word = {16'hABCD, 16'(v)};  // upper half is ignored
    word_ready = 1;
    @(negedge clk);
    word_ready = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    enable = 1; word_ready = 0; word = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(sample, "sample enabled");
    @(negedge clk);
    while (sent < 100) begin
      if (sample) begin push(sent); sent++; end
      else @(negedge clk);
    end
    repeat (200) @(posedge clk);
    check(got == 100, $sformatf("got %0d samples", got));
    // Stop acknowledging: 5 in the output register + 4 per stack.
    ack_on = 0;
    repeat (10) @(negedge clk);
    while (sample) begin push(sent); sent++; end
    // 5 in the output register; sampling stops once stack 0 holds 4, when
    // stacks 1-4 hold 3 each: 5 + 16 samples.
    check(sent - got == 21, $sformatf("held %0d samples before sample dropped", sent - got));
    check(!overflow, "no overflow while sample respected");
    enable = 0;
    @(negedge clk);
    check(!sample, "enable low stops sampling");
    for (int i = 0; i < 4; i++) begin push(sent); sent++; end
    check(!overflow, "stacks 1-4 still had room");
    push(sent);
    check(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
