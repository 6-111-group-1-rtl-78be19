// Checks the 90 kHz frame / 5.4 MHz sclk generator: 300 clocks per frame,
// 5 per sclk period, sclk high 2 of 5 clocks, convst high for half a frame,
// a frame tick coinciding with an sclk tick and sclk_index counting 0..59.
module tb_sample_clock_divider;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sclk, sclk_tick, convst, frame_tick;
  logic [7:0] sclk_index;

  sample_clock_divider dut (.*);

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

  initial begin
    int last_f, last_s, cyc, frames, sclk_hi, conv_hi, max_idx;
    repeat (3) @(posedge clk);
    rst = 0;
    last_f = -1; last_s = -1; cyc = 0; frames = 0; sclk_hi = 0; conv_hi = 0; max_idx = 0;
    while (frames < 5) begin
      @(posedge clk);
      cyc++;
      if (sclk_tick) begin
        if (last_s >= 0) check(cyc - last_s == 5, "sclk period 5");
        last_s = cyc;
      end
      if (frame_tick) begin
        check(sclk_tick, "frame tick on sclk tick");
        check(sclk_index == 0, "index 0 at frame start");
        check(convst, "convst high at frame start");
        if (last_f >= 0) begin
          check(cyc - last_f == 300, $sformatf("frame period %0d", cyc - last_f));
          check(conv_hi == 150, $sformatf("convst high %0d", conv_hi));
          check(sclk_hi == 120, $sformatf("sclk high %0d", sclk_hi));
          check(max_idx == 59, "index reaches 59");
          frames++;
        end
        last_f = cyc; conv_hi = 0; sclk_hi = 0; max_idx = 0;
      end
      if (last_f >= 0) begin
        conv_hi += convst;
        sclk_hi += sclk;
        if (int'(sclk_index) > max_idx) max_idx = sclk_index;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
