// Checks the AD7656 sampling interface against the converter model: the
// word read equals the sample converted at convst, CS stays high for 20 sclk
// periods after the frame start, stays low for 32 sclk periods, and
// word_ready arrives 260 clocks (52 sclk periods) after the frame tick. With `sample` low no read takes place.
module tb_adc_sampler;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sclk, sclk_tick, convst, frame_tick, sample, sdata, cs_n, word_ready;
  logic [7:0] sclk_index;
  logic [31:0] word;
  logic [15:0] value;

  sample_clock_divider u_div (.*);
  adc_sampler dut (.*);
  ad7656_model u_adc (.convst, .sclk, .cs_n, .value, .sdata);

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

  int cyc = 0, t_frame = 0, t_csfall = 0, t_csrise = 0;
  logic cs_q = 1;
  always @(posedge clk) begin
    cyc++;
    if (frame_tick) t_frame = cyc;
    if (!cs_n && cs_q) t_csfall = cyc;
    if (cs_n && !cs_q) t_csrise = cyc;
    cs_q <= cs_n;
  end

  initial begin
    logic [15:0] expect_v;
    sample = 1;
    value = 16'h1234;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 8; f++) begin
      @(posedge clk iff frame_tick);
      // value is latched by the model at this frame's convst edge
      expect_v = value;
      @(posedge clk iff word_ready);
      check(word == {16'b0, expect_v}, $sformatf("word %h expected %h", word, expect_v));
      check(cyc - t_frame == 260, $sformatf("latency %0d", cyc - t_frame));
      check(t_csfall - t_frame == 101, $sformatf("cs high after convst %0d clocks", t_csfall - t_frame));
      value = 16'($urandom);
      if (f == 3) value = 16'h8001;
    end
    // Disabled: no chip-select activity for two frames.
    @(posedge clk iff frame_tick);
    sample = 0;
    begin
      int falls;
      falls = t_csfall;
      repeat (600) @(posedge clk);
      check(t_csfall == falls, "no read while sample is low");
    end
    check(t_csrise - t_csfall == 160, $sformatf("cs low %0d clocks", t_csrise - t_csfall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
