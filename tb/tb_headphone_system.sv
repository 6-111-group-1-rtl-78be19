// End-to-end test of the headphone system at its default parameters.
//
// Audio: an AD7656 model is fed a noisy sine with occasional large jumps.
// Every sample the sampler reads is checked against the value the model
// converted and kept as sent. Each group of five sent samples is put through
// the reference codec (compress, then decompress). An AD5063 model receives
// what the DAC side plays. Every word played outside an underrun frame must be
// the next reference sample, in order. Words played in underrun frames repeat
// the previous sample and are only counted.
//
// Radio: each node has a CC2420 model. The test waits for both nodes to be
// configured and checks the PANID and short address they wrote to the chip's
// RAM. It then offers one payload to the transmitting node. When the frame
// lands in that chip's TX FIFO, the test copies it, with two FCS bytes, into
// the receiving chip's RX FIFO and raises FIFO/FIFOP. That node must report
// the same payload, sequence number and source address. No ACK is given at
// first, so the transmitter must time out and strobe STXON again. A good
// ACK then ends the exchange with tx_success.
//
// Mechanisms counted, each of which must happen at least once: samples
// read, chunks compressed, ECC words built, packets moved between the
// buffers, decoder leading-one restorations, backpressure from the DAC
// stacks, DAC underrun frames, radio configuration on both nodes, a
// retransmission after the ACK timeout, a received frame and a successful
// ACK. Overflow of the chunker and the full flags of the two buffers cannot
// occur in a healthy stream. Their block testbenches exercise them; here
// they are checked to stay low.
module tb_headphone_system;
  import codec_ref_pkg::*;
  logic clk = 0, rst = 1, clkdiv_rst = 1, radio_rst = 1;
  always #18.5 clk = ~clk;   // 27 MHz
  int checks = 0, failures = 0;

  logic enable;
  logic adc_convst, adc_sclk, adc_cs_n, adc_sdata;
  logic dac_sclk, dac_sync, dac_dout, dac_underrun;
  logic chunk_overflow, tx_buffer_full, rx_buffer_full, compressor_busy;
  logic radio_clk, txr_resetn, txr_sclk, txr_csn, txr_si, txr_so, txr_sfd, txr_fifo, txr_fifop;
  logic tx_payload_valid, tx_payload_ack, tx_success, txr_configured;
  logic [39:0] tx_payload, rx_payload;
  logic [15:0] tx_retries, rx_src_addr, rx_flushes;
  logic rxr_resetn, rxr_sclk, rxr_csn, rxr_si, rxr_so, rxr_fifo, rxr_fifop;
  logic [7:0] rx_seq;
  logic rx_crc_ok, rx_packet_valid, rxr_configured;
  logic [15:0] txr_panid_rb, txr_addr_rb, rxr_panid_rb, rxr_addr_rb;
  logic [7:0] tx_seq;
  logic [15:0] adc_value;
  logic [23:0] dac_word;
  int dac_count;

  localparam logic [7:0]  CHANNEL = 8'd15;
  localparam logic [15:0] PANID = 16'h2420, TX_ADDR = 16'h0001, RX_ADDR = 16'h0002;

  headphone_system dut (
    .clk, .rst, .enable,
    .adc_convst, .adc_sclk, .adc_cs_n, .adc_sdata,
    .dac_sclk, .dac_sync, .dac_dout, .dac_underrun,
    .chunk_overflow, .tx_buffer_full, .rx_buffer_full, .compressor_busy,
    .clkdiv_rst, .radio_rst, .radio_clk, .channel(CHANNEL), .panid(PANID),
    .tx_node_addr(TX_ADDR), .rx_node_addr(RX_ADDR),
    .txr_resetn, .txr_sclk, .txr_csn, .txr_si, .txr_so, .txr_sfd, .txr_fifo, .txr_fifop,
    .tx_payload, .tx_payload_valid, .tx_payload_ack, .tx_success, .tx_retries, .txr_configured,
    .txr_panid_rb, .txr_addr_rb, .tx_seq,
    .rxr_resetn, .rxr_sclk, .rxr_csn, .rxr_si, .rxr_so, .rxr_fifo, .rxr_fifop,
    .rx_payload, .rx_seq, .rx_src_addr, .rx_crc_ok, .rx_packet_valid, .rx_flushes, .rxr_configured,
    .rxr_panid_rb, .rxr_addr_rb
  );

  ad7656_model u_adc (.convst(adc_convst), .sclk(adc_sclk), .cs_n(adc_cs_n), .value(adc_value), .sdata(adc_sdata));
  ad5063_model u_dac (.sclk(dac_sclk), .sync(dac_sync), .din(dac_dout), .word(dac_word), .count(dac_count));
  cc2420_model u_txchip (.sclk(txr_sclk), .csn(txr_csn), .si(txr_si), .so(txr_so));
  cc2420_model u_rxchip (.sclk(rxr_sclk), .csn(rxr_csn), .si(rxr_si), .so(rxr_so));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- audio source ----------------
  int n_wave = 0;
  function automatic logic [15:0] wave(input int n);
    real s;
    int v;
    s = $sin(6.2831853 * n / 37.0);
    v = $rtoi(9000.0 * s) + int'($urandom_range(0, 63)) - 32;
    if (n % 53 == 17) v = v + 20000;   // a jump the 4-bit codes cannot follow
    if (v > 32767) v = 32767;
    return 16'(v);
  endfunction

  initial adc_value = 16'h0000;
  always @(negedge adc_convst) begin
    adc_value = wave(n_wave);
    n_wave++;
  end

  // ---------------- reference model of the codec ----------------
  shortint sent [$];
  shortint expected [$];
  int n_read = 0, n_played = 0, n_underrun = 0;
  always @(negedge clk) if (!rst && dut.word_ready) begin
    check(dut.word[15:0] == u_adc.held, $sformatf("ADC word %h, converted %h", dut.word[15:0], u_adc.held));
    sent.push_back(shortint'(dut.word[15:0]));
    n_read++;
    if (sent.size() == 5) begin
      shortint c [5];
      shortint d [5];
      logic [39:0] w;
      for (int i = 0; i < 5; i++) c[i] = sent.pop_front();
      w = compress(c);
      decompress(w, d);
      for (int i = 0; i < 5; i++) expected.push_back(d[i]);
    end
  end

  int last_dac = 0;
  always @(negedge clk) if (dac_count != last_dac) begin
    last_dac = dac_count;
    if (dac_underrun) n_underrun++;
    else if (expected.size() == 0) check(0, "DAC played a sample that was never sent");
    else begin
      shortint e;
      e = expected.pop_front();
      check(dac_word == {8'h00, e},
            $sformatf("DAC sample %0d: %h expected %h", n_played, dac_word[15:0], e));
      n_played++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_chunks = 0, n_ecc = 0, n_packets = 0, n_restore = 0, n_stall = 0;
  int n_overflow = 0, n_txfull = 0, n_rxfull = 0, n_retx = 0, n_rxpkt = 0, n_success = 0;
  logic [15:0] last_retries = 0;
  always @(negedge clk) if (!rst) begin
    if (dut.chunk_ready && dut.chunk_ack) n_chunks++;
    if (dut.ew_valid && dut.ew_ack) n_ecc++;
    if (dut.pkt_ack) n_packets++;
    if (dut.rw_ack && dut.rw[49:46] != 4'd0) n_restore++;
    if (dut.dchunk_valid && !dut.dchunk_ack) n_stall++;
    if (chunk_overflow) n_overflow++;
    if (tx_buffer_full) n_txfull++;
    if (rx_buffer_full) n_rxfull++;
  end
  always @(posedge radio_clk) if (!radio_rst) begin
    if (tx_retries != last_retries) n_retx++;
    last_retries <= tx_retries;
  end
  always @(negedge radio_clk) if (!radio_rst) begin
    if (rx_packet_valid) n_rxpkt++;
    if (tx_success) n_success++;
  end

  // ---------------- radio link ----------------
  localparam logic [39:0] PAYLOAD = 40'h5A_1234_C3E7;

  initial begin
    logic [7:0] f [$];
    enable = 0; txr_sfd = 0; txr_fifo = 0; txr_fifop = 0; rxr_fifo = 0; rxr_fifop = 0;
    tx_payload = PAYLOAD; tx_payload_valid = 0;
    repeat (4) @(negedge clk);
    rst = 0; clkdiv_rst = 0;
    repeat (40) @(negedge clk);
    radio_rst = 0;
    enable = 1;
    wait (txr_configured && rxr_configured);
    check(u_txchip.ram[9'h168] == PANID[7:0] && u_txchip.ram[9'h169] == PANID[15:8], "TX node PANID in RAM");
    check(u_txchip.ram[9'h16A] == TX_ADDR[7:0] && u_txchip.ram[9'h16B] == TX_ADDR[15:8], "TX node address in RAM");
    check(u_rxchip.ram[9'h16A] == RX_ADDR[7:0] && u_rxchip.ram[9'h16B] == RX_ADDR[15:8], "RX node address in RAM");
    check(txr_panid_rb == PANID && txr_addr_rb == TX_ADDR, "TX node read-back");
    check(rxr_panid_rb == PANID && rxr_addr_rb == RX_ADDR, "RX node read-back");
    check(u_txchip.regs[8'h18] == 16'h4000 + 16'd357 + 16'd5 * (16'(CHANNEL) - 16'd11), "FSCTRL channel");
    // offer a payload
    @(negedge radio_clk);
    tx_payload_valid = 1;
    wait (tx_payload_ack);
    @(negedge radio_clk);
    tx_payload_valid = 0;
    wait (u_txchip.txfifo.size() == 15);
    repeat (8) @(negedge radio_clk);
    // over the air to the other node, with two FCS bytes (CRC good)
    f = u_txchip.txfifo;
    f.push_back(8'h00);
    f.push_back(8'hD5);
    foreach (f[i]) u_rxchip.rxfifo.push_back(f[i]);
    @(negedge radio_clk);
    rxr_fifo = 1; rxr_fifop = 1;
    wait (u_rxchip.rxfifo.size() == 0);
    @(negedge radio_clk);
    rxr_fifo = 0; rxr_fifop = 0;
    wait (rx_packet_valid);
    @(negedge radio_clk);
    check(rx_payload == PAYLOAD, $sformatf("received payload %h", rx_payload));
    check(rx_src_addr == TX_ADDR, $sformatf("received source %h", rx_src_addr));
    check(rx_seq == 8'h00, "received sequence number");
    check(rx_crc_ok, "received CRC flag");
    // no ACK yet: the transmitter must time out and strobe STXON again
    wait (tx_retries != 0);
    repeat (20) @(negedge radio_clk);
    // ACK frame for sequence 0
    u_txchip.rxfifo.push_back(8'd5);
    u_txchip.rxfifo.push_back(8'h02);
    u_txchip.rxfifo.push_back(8'h00);
    u_txchip.rxfifo.push_back(8'h00);
    u_txchip.rxfifo.push_back(8'h00);
    u_txchip.rxfifo.push_back(8'h80);
    @(negedge radio_clk);
    txr_fifop = 1;
    wait (u_txchip.rxfifo.size() == 0);
    @(negedge radio_clk);
    txr_fifop = 0;
    wait (tx_success);
    repeat (10) @(negedge radio_clk);
    // let the audio stream run on for a while
    wait (n_played >= 200);
    repeat (1000) @(negedge clk);
    $display("samples read %0d, played %0d, underrun frames %0d, chunks %0d, ECC words %0d, packets %0d",
             n_read, n_played, n_underrun, n_chunks, n_ecc, n_packets);
    $display("leading-one restorations %0d, DAC backpressure cycles %0d, retransmissions %0d, frames received %0d, ACKs %0d",
             n_restore, n_stall, n_retx, n_rxpkt, n_success);
    check(n_read > 0, "samples were read");
    check(n_chunks > 0, "chunks were compressed");
    check(n_ecc > 0, "ECC words were built");
    check(n_packets > 0, "packets were moved");
    check(n_restore > 0, "decoder restored leading ones");
    check(n_stall > 0, "DAC stacks applied backpressure");
    check(n_underrun > 0, "DAC underrun happened");
    check(n_played >= 200, "samples played");
    check(n_retx > 0, "retransmission after ACK timeout");
    check(n_rxpkt == 1, "one frame received");
    check(n_success == 1, "one successful ACK");
    check(tx_seq == 8'h01, "sequence number advanced after the ACK");
    check(n_overflow == 0 && n_txfull == 0 && n_rxfull == 0, "no overflow or full buffer in a healthy stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
