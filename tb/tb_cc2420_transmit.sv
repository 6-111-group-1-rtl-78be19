// Checks the transmit FSM with an SPI master and the CC2420 model:
// nothing starts while SFD or FIFO is high; then SFLUSHTX, SRXON and STXON
// are strobed and the 15-byte frame (LENGTH 16, FCF 0x8861 LSB first,
// sequence number, PANID, addresses, payload) lands in the TX FIFO; with no
// FIFOP for ACK_WAIT clocks STXON is strobed again and retries counts it;
// a good ACK then gives tx_success and the next frame carries seq + 1. A
// bad ACK is treated like a timeout. ACK_WAIT is shortened for speed.
module tb_cc2420_transmit;
  import cc2420_pkg::*;
  logic clk = 0, rst = 1;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  spi_req_t spi_req;
  spi_rsp_t spi_rsp;
  logic sclk, csn, si, so, sfd, fifo, fifop, payload_valid, ack_payload, tx_success;
  logic [39:0] payload;
  logic [15:0] retries;
  logic [7:0] seq;
  localparam int AW = 300;

  cc2420_transmit #(.ACK_WAIT(AW)) dut (
    .clk, .rst, .enable(1'b1), .payload, .payload_valid, .panid(16'h2420),
    .dest_addr(16'h0002), .my_addr(16'h0001), .sfd, .fifo, .fifop,
    .ack_payload, .tx_success, .retries, .seq, .spi_req, .spi_rsp
  );
  cc2420_spi u_spi (.clk, .rst, .req(spi_req), .rsp(spi_rsp), .sclk, .csn, .si, .so);
  cc2420_model u_chip (.sclk, .csn, .si, .so);

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

  int successes = 0;
  always @(negedge clk) if (tx_success) successes++;

  task automatic expect_frame(input logic [7:0] s, input logic [39:0] p);
    logic [7:0] e [15];
    e = '{8'd16, 8'h61, 8'h88, s, 8'h20, 8'h24, 8'h02, 8'h00, 8'h01, 8'h00,
          p[39:32], p[31:24], p[23:16], p[15:8], p[7:0]};
    check(u_chip.txfifo.size() == 15, $sformatf("TX FIFO holds %0d bytes", u_chip.txfifo.size()));
    for (int i = 0; i < 15 && i < u_chip.txfifo.size(); i++)
      check(u_chip.txfifo[i] == e[i], $sformatf("frame byte %0d = %h expected %h", i, u_chip.txfifo[i], e[i]));
  endtask

  task automatic give_ack(input logic [7:0] s, input bit good);
    u_chip.rxfifo.push_back(8'd5);
    u_chip.rxfifo.push_back(8'h02);
    u_chip.rxfifo.push_back(8'h00);
    u_chip.rxfifo.push_back(s);
    u_chip.rxfifo.push_back(8'h00);
    u_chip.rxfifo.push_back(good ? 8'h80 : 8'h00);
    @(negedge clk);
    fifop = 1;
    wait (u_chip.rxfifo.size() == 0);
    @(negedge clk);
    fifop = 0;
  endtask

  initial begin
    int n;
    sfd = 1; fifo = 0; fifop = 0; payload_valid = 0; payload = 40'h11_2233_4455;
    repeat (3) @(posedge clk);
    rst = 0;
    payload_valid = 1;
    repeat (20) @(negedge clk);
    check(u_chip.ntxn == 0 && !ack_payload, "waits while SFD is high");
    sfd = 0;
    wait (ack_payload);
    @(negedge clk);
    payload_valid = 0;
    // strobes: SFLUSHTX, SRXON, STXON
    wait (u_chip.txfifo.size() == 15);
    repeat (5) @(negedge clk);
    check(u_chip.strobes.size() == 3 && u_chip.strobes[0] == 8'h09 && u_chip.strobes[1] == 8'h03
          && u_chip.strobes[2] == 8'h04, "SFLUSHTX, SRXON, STXON");
    expect_frame(8'h00, 40'h11_2233_4455);
    // No ACK: after the wait, STXON again.
    n = u_chip.strobes.size();
    repeat (AW + 40) @(negedge clk);
    check(u_chip.strobes.size() == n + 1 && u_chip.strobes[n] == 8'h04, "retransmit strobe");
    check(retries == 1, $sformatf("retries %0d", retries));
    check(u_chip.txfifo.size() == 15, "frame not rewritten on retransmit");
    // Bad ACK: retransmit again.
    give_ack(8'h00, 0);
    repeat (30) @(negedge clk);
    check(retries == 2, "bad ACK counted as a retry");
    check(successes == 0, "no success yet");
    give_ack(8'h00, 1);
    repeat (40) @(negedge clk);
    check(successes == 1, "success after good ACK");
    check(seq == 8'h01, "sequence number advanced");
    // Second payload.
    u_chip.txfifo.delete();
    payload = 40'hCA_FEBA_BE00;
    payload_valid = 1;
    wait (ack_payload);
    @(negedge clk);
    payload_valid = 0;
    wait (u_chip.txfifo.size() == 15);
    repeat (5) @(negedge clk);
    expect_frame(8'h01, 40'hCA_FEBA_BE00);
    give_ack(8'h01, 1);
    repeat (40) @(negedge clk);
    check(successes == 2, "second success");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
