// Checks the receive buffer: a packet is registered once (ack_in pulses
// once even though valid_in stays high for many cycles), its sixteen words
// come out lowest first, one per rising edge of request_data_out, with
// valid_out low between words; packets are refused while fewer than 16
// slots are free; ten packets fill all 160 slots (buffer_full).
module tb_rx_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, valid_out, request_data_out, buffer_full;
  logic [799:0] data_in;
  logic [49:0] data_out;

  rx_buffer dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [49:0] wv(input int n);
    return {18'h15555, 32'(n)};
  endfunction

  int acks = 0;
  always @(posedge clk) if (ack_in) acks++;

  // Hold valid_in for `hold` cycles; report whether the packet was taken.
  task automatic send(input int pkt_no, input int hold, output bit taken);
    int a0;
    for (int k = 0; k < 16; k++) data_in[50*k +: 50] = wv(pkt_no * 16 + k);
    a0 = acks;
    @(negedge clk);
    valid_in = 1;
    repeat (hold) @(negedge clk);
    valid_in = 0;
    repeat (20) @(negedge clk);
    taken = (acks - a0 == 1);
    check(acks - a0 <= 1, "packet registered at most once");
  endtask

  task automatic read(input int n);
    @(negedge clk);
    check(valid_out, $sformatf("word %0d valid", n));
    check(data_out == wv(n), $sformatf("word %0d = %h", n, data_out));
    request_data_out = 1;
    @(negedge clk);
    check(!valid_out, "valid_out drops after request");
    repeat (3) @(negedge clk);
    request_data_out = 0;
    @(negedge clk);
  endtask

  initial begin
    bit ok;
    valid_in = 0; request_data_out = 0; data_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    send(0, 30, ok);
    check(ok, "packet 0 taken");
    send(1, 3, ok);
    check(ok, "packet 1 taken");
    for (int n = 0; n < 20; n++) read(n);
    // 12 words left (one on the output, 11 stored): 149 free, room for 9.
    for (int p = 2; p < 11; p++) begin send(p, 2, ok); check(ok, $sformatf("packet %0d taken", p)); end
    send(11, 2, ok);
    check(!ok, "refused with fewer than 16 free slots");
    // 155 stored; reading 11 more leaves 144 stored and exactly 16 free.
    for (int n = 20; n < 31; n++) read(n);
    send(11, 2, ok);
    check(ok, "taken after reading 16");
    check(buffer_full, "all 160 slots used");
    for (int n = 31; n < 192; n++) read(n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
