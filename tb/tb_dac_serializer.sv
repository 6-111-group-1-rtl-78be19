// Checks the D/A serializer against the AD5063 input model: every frame
// delivers 24 bits, eight zero configuration bits then the sample MSB first;
// sync rises once per frame, 300 clocks apart; load pulses at the frame
// start; the last data bit is out 25 sclk periods after the frame start.
module tb_dac_serializer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sclk, sclk_tick, convst, frame_tick, load, sync, dout, busy;
  logic [7:0] sclk_index;
  logic [15:0] sample;
  logic [23:0] word;
  int count;

  sample_clock_divider u_div (.*);
  dac_serializer dut (.*);
  ad5063_model u_dac (.sclk, .sync, .din(dout), .word, .count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, t_sync = -1, t_busy_end = 0;
  logic sync_q = 0, busy_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && sync && !sync_q) begin
      if (t_sync >= 0) begin
        checks++;
        if (cyc - t_sync != 300) begin failures++; $display("FAIL sync period %0d", cyc - t_sync); end
      end
      t_sync = cyc;
    end
    if (!busy && busy_q) t_busy_end = cyc;
    sync_q <= sync;
    busy_q <= busy;
  end

  initial begin
    logic [15:0] v;
    int c0;
    sample = 16'hBEEF;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 10; f++) begin
      @(negedge clk iff frame_tick);
      check(load, "load at frame start");
      v = sample;
      c0 = count;
      @(negedge clk);
      sample = 16'($urandom);
      wait (count == c0 + 1);
      check(word == {8'h00, v}, $sformatf("frame %0d word %h expected %h", f, word, v));
      repeat (30) @(posedge clk);
      check(t_busy_end - t_sync == 125, $sformatf("busy for %0d clocks", t_busy_end - t_sync));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
