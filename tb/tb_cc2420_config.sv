// Checks the configuration FSM with an SPI master and the CC2420 model:
// reset_chipn pulses low for one clock; the SXOSCON strobe comes first; the
// oscillator wait lasts WAITLONG clocks; the five registers hold the
// configured values (FSCTRL for channel 26 = 0x4000 | 432); PANID and
// SHORTADDR sit LSB first at 0x168 and 0x16A; the read-back outputs match;
// configured rises and stays high. WAITLONG is shortened for speed.
module tb_cc2420_config;
  import cc2420_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  spi_req_t spi_req;
  spi_rsp_t spi_rsp;
  logic sclk, csn, si, so, reset_chipn, configured;
  logic [15:0] panid_rb, shortaddr_rb;
  localparam int WL = 500;

  cc2420_config #(.WAITLONG(WL)) dut (
    .clk, .rst, .channel(8'd26), .panid(16'h2420), .shortaddr(16'h1234),
    .reset_chipn, .configured, .panid_rb, .shortaddr_rb, .spi_req, .spi_rsp
  );
  cc2420_spi u_spi (.clk, .rst, .req(spi_req), .rsp(spi_rsp), .sclk, .csn, .si, .so);
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

  // Clock of every CSn rise and fall.
  int cyc = 0, resets = 0;
  int rises [$], falls [$];
  logic csn_q = 1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && !reset_chipn) resets++;
    if (!rst && !csn && csn_q) falls.push_back(cyc);
    if (!rst && csn && !csn_q) rises.push_back(cyc);
    csn_q <= csn;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (configured);
    check(resets == 1, $sformatf("reset_chipn low %0d clocks", resets));
    check(u_chip.strobes.size() == 1 && u_chip.strobes[0] == 8'h01, "SXOSCON strobed");
    check(falls[1] - rises[0] >= WL, $sformatf("oscillator wait %0d", falls[1] - rises[0]));
    check(u_chip.regs[6'h11] == 16'h0AF2, "MDMCTRL0");
    check(u_chip.regs[6'h12] == 16'h0500, "MDMCTRL1");
    check(u_chip.regs[6'h1C] == 16'h007F, "IOCFG0");
    check(u_chip.regs[6'h19] == 16'h01C4, "SECCTRL0");
    check(u_chip.regs[6'h18] == 16'h41B0, $sformatf("FSCTRL %h", u_chip.regs[6'h18]));
    check(u_chip.ram[9'h168] == 8'h20 && u_chip.ram[9'h169] == 8'h24, "PANID in RAM");
    check(u_chip.ram[9'h16A] == 8'h34 && u_chip.ram[9'h16B] == 8'h12, "SHORTADDR in RAM");
    check(panid_rb == 16'h2420, $sformatf("PANID read back %h", panid_rb));
    check(shortaddr_rb == 16'h1234, $sformatf("SHORTADDR read back %h", shortaddr_rb));
    check(u_chip.ntxn == 6, $sformatf("%0d transactions", u_chip.ntxn));
    repeat (50) @(posedge clk);
    check(configured && csn, "stays configured and idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
