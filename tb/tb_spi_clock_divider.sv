// Checks the radio clock divider: period 4 input clocks, 50 % duty.
module tb_spi_clock_divider;
  logic clk = 0, rst = 1, clk_out;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  spi_clock_divider dut (.*);
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic prev;
    int last, hi, cyc;
    repeat (2) @(posedge clk);
    rst = 0;
    prev = clk_out; last = -1; hi = 0; cyc = 0;
    repeat (64) begin
      @(posedge clk); #1;
      cyc++;
      hi += clk_out;
      if (clk_out && !prev) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 4) begin failures++; $display("FAIL period %0d", cyc - last); end
        end
        last = cyc;
      end
      prev = clk_out;
    end
    checks++;
    if (hi != 32) begin failures++; $display("FAIL duty %0d", hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
