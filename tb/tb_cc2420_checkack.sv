// Checks the ACK checker with an SPI master and the CC2420 model: a proper
// ACK frame (length 5, FCF 0x0002, matching sequence number, CRC-OK set) in
// the RX FIFO gives success; a wrong sequence number, a failed CRC, a wrong
// length or a wrong frame control each give done without success; every
// check reads the FIFO with the 0x7F command.
module tb_cc2420_checkack;
  import cc2420_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  spi_req_t spi_req;
  spi_rsp_t spi_rsp;
  logic sclk, csn, si, so, start, done, success;
  logic [7:0] seq;

  cc2420_checkack dut (.*);
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

  task automatic try(input logic [7:0] b [6], input logic [7:0] s, input bit expect_ok, input string what);
    bit got;
    for (int i = 0; i < 6; i++) u_chip.rxfifo.push_back(b[i]);
    seq = s;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    got = 0;
    while (!done) begin @(negedge clk); end
    got = success;
    check(got == expect_ok, $sformatf("%s: success=%0d", what, got));
    check(u_chip.rxfifo.size() == 0, "frame consumed");
  endtask

  initial begin
    logic [7:0] f [6];
    start = 0; seq = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    f = '{8'd5, 8'h02, 8'h00, 8'h17, 8'h00, 8'h80}; try(f, 8'h17, 1, "good ACK");
    f = '{8'd5, 8'h02, 8'h00, 8'h16, 8'h00, 8'h80}; try(f, 8'h17, 0, "wrong sequence");
    f = '{8'd5, 8'h02, 8'h00, 8'h17, 8'h00, 8'h7F}; try(f, 8'h17, 0, "CRC failed");
    f = '{8'd6, 8'h02, 8'h00, 8'h17, 8'h00, 8'h80}; try(f, 8'h17, 0, "wrong length");
    f = '{8'd5, 8'h41, 8'h88, 8'h17, 8'h00, 8'h80}; try(f, 8'h17, 0, "not an ACK");
    f = '{8'd5, 8'h02, 8'h00, 8'hA0, 8'h12, 8'hC5}; try(f, 8'hA0, 1, "good ACK 2");
    check(u_chip.ntxn == 6, "one read per check");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
