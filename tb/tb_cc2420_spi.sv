// Checks the SPI master against the CC2420 port model: a register write
// reaches the register, a register read returns it on SO (bits captured one
// clock after their SI bit), a strobe is logged, CSn is high between
// transactions and done arrives nbits+2 clocks after start.
module tb_cc2420_spi;
  import cc2420_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  spi_req_t req;
  spi_rsp_t rsp;
  logic sclk, csn, si, so;

  cc2420_spi dut (.*);
  cc2420_model u_chip (.sclk, .csn, .si, .so);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [MAX_BITS-1:0] bits, input int n);
    int t;
    @(negedge clk);
    req.start = 1; req.bits = bits; req.nbits = 8'(n);
    @(negedge clk);
    req.start = 0;
    t = 1;
    while (!rsp.done) begin @(negedge clk); t++; end
    check(t == n + 2, $sformatf("done after %0d clocks for %0d bits", t, n));
    check(csn, "CSn high after the transaction");
  endtask

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    xfer({8'h11, 16'h0AF2, 120'b0}, 24);
    check(u_chip.regs[6'h11] == 16'h0AF2, "register written");
    xfer({8'h51, 16'h0000, 120'b0}, 24);
    check(rsp.rx[15:0] == 16'h0AF2, $sformatf("register read back %h", rsp.rx[15:0]));
    check(rsp.rx[23:16] == 8'h40, "status byte");
    xfer({8'h01, 136'b0}, 8);
    check(u_chip.strobes.size() == 1 && u_chip.strobes[0] == 8'h01, "strobe seen");
    check(u_chip.ntxn == 3, "three transactions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
