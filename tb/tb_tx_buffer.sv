// Checks the transmit buffer: sixteen words make one packet (first word in
// bits 49:0); no packet is shown before the sixteenth word; each rising edge
// of done_transmit consumes one packet and valid_out drops in between; ten
// packets fill the FIFO (buffer_full) and the sixteenth word of an eleventh
// is held off until a slot frees; the pointer wrap keeps packet order.
module tb_tx_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, valid_out, done_transmit, buffer_full;
  logic [49:0] data_in;
  logic [799:0] data_out;

  tx_buffer dut (.*);

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
    return {18'h2AAAA, 32'(n)};
  endfunction

  // Offer word n; return 1 if it was taken within `limit` cycles.
  task automatic put(input int n, input int limit, output bit taken);
    int t;
    @(negedge clk);
    data_in = wv(n);
    valid_in = 1;
    taken = 0;
    for (t = 0; t < limit && !taken; t++) begin
      @(posedge clk);
      taken = ack_in;
      @(negedge clk);
    end
    valid_in = 0;
    @(negedge clk);
  endtask

  task automatic take(input int pkt_no);
    logic [799:0] e;
    for (int k = 0; k < 16; k++) e[50*k +: 50] = wv(pkt_no * 16 + k);
    @(negedge clk);
    check(valid_out, $sformatf("packet %0d valid", pkt_no));
    check(data_out == e, $sformatf("packet %0d contents", pkt_no));
    done_transmit = 1;
    @(negedge clk);
    done_transmit = 0;
    check(!valid_out, "valid_out drops after done_transmit");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    bit ok;
    int n;
    valid_in = 0; done_transmit = 0; data_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    n = 0;
    for (int k = 0; k < 15; k++) begin put(n, 10, ok); n++; check(ok, "word taken"); end
    repeat (5) @(negedge clk);
    check(!valid_out, "no packet before 16 words");
    put(n, 10, ok); n++;
    repeat (3) @(negedge clk);
    check(valid_out, "packet after 16 words");
    take(0);
    check(!valid_out, "FIFO empty again");
    // Fill all ten slots.
    for (int k = 0; k < 160; k++) begin put(n, 10, ok); n++; end
    repeat (3) @(negedge clk);
    // One packet is on the output, nine wait in the FIFO: not yet full.
    check(!buffer_full, "nine stored + one shown is not full");
    for (int k = 0; k < 16; k++) begin put(n, 10, ok); n++; end
    check(buffer_full, "buffer_full with ten stored");
    for (int k = 0; k < 15; k++) begin put(n, 10, ok); n++; end
    put(n, 20, ok);
    check(!ok, "16th word held off while full");
    take(1);
    put(n, 20, ok); n++;
    check(ok, "16th word taken once a slot freed");
    for (int p = 2; p <= 12; p++) take(p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
