// Checks the receive FSM with an SPI master and the CC2420 model: SRXON is
// strobed first; a 17-byte frame in the RX FIFO with FIFO and FIFOP high is
// read with one 0x7F transaction and its payload, sequence number, source
// address and CRC flag appear with packet_valid; FIFOP without FIFO
// (overflow) makes the FSM strobe SFLUSHRX twice and count a flush.
module tb_cc2420_receive;
  import cc2420_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  spi_req_t spi_req;
  spi_rsp_t spi_rsp;
  logic sclk, csn, si, so, fifo, fifop, crc_ok, packet_valid;
  logic [39:0] payload;
  logic [7:0] seq;
  logic [15:0] src_addr, flushes;

  cc2420_receive dut (.clk, .rst, .enable(1'b1), .fifo, .fifop, .payload, .seq, .src_addr,
                      .crc_ok, .packet_valid, .flushes, .spi_req, .spi_rsp);
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

  int packets = 0;
  always @(negedge clk) if (packet_valid) packets++;

  task automatic frame(input logic [7:0] s, input logic [39:0] p, input logic [15:0] src, input bit crc);
    logic [7:0] b [17];
    b = '{8'd16, 8'h61, 8'h88, s, 8'h20, 8'h24, 8'h02, 8'h00, src[7:0], src[15:8],
          p[39:32], p[31:24], p[23:16], p[15:8], p[7:0], 8'h00, {crc, 7'h55}};
    for (int i = 0; i < 17; i++) u_chip.rxfifo.push_back(b[i]);
    @(negedge clk);
    fifo = 1; fifop = 1;
    wait (u_chip.rxfifo.size() == 0);
    @(negedge clk);
    fifo = 0; fifop = 0;
    wait (packet_valid);
    check(payload == p, $sformatf("payload %h", payload));
    check(seq == s, "sequence number");
    check(src_addr == src, $sformatf("source %h", src_addr));
    check(crc_ok == crc, "CRC flag");
    @(negedge clk);
  endtask

  initial begin
    fifo = 0; fifop = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (30) @(negedge clk);
    check(u_chip.strobes.size() == 1 && u_chip.strobes[0] == 8'h03, "SRXON first");
    frame(8'h05, 40'h01_0203_0405, 16'h0001, 1);
    frame(8'h06, 40'hFF_EEDD_CCBB, 16'hBEEF, 0);
    repeat (2) @(posedge clk);
    check(packets == 2, $sformatf("%0d packets", packets));
    // Overflow
    @(negedge clk);
    fifop = 1;
    repeat (2) @(negedge clk);
    fifop = 0;
    repeat (40) @(negedge clk);
    check(flushes == 1, "one flush");
    check(u_chip.strobes.size() == 3 && u_chip.strobes[1] == 8'h08 && u_chip.strobes[2] == 8'h08,
          "SFLUSHRX strobed twice");
    check(packets == 2, "no packet from an overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
