// Wireless headphone / speaker set: top level.
//
// Audio path (27 MHz clock `clk`): the AD7656 is read at 90 kHz by
// adc_sampler; chunker groups five samples; compressor halves them to a
// 40-bit word; ecc_encoder adds ten protection bits; tx_buffer packs sixteen
// words into an 800-bit packet. The radio never carried these packets, so
// the transmit buffer's packets go straight to the receive side over wires:
// rx_buffer splits them again, ecc_decoder restores the protected bits,
// decompressor rebuilds five samples and dac_interface plays them through
// the AD5063 at 90 kHz. Every stage hands data on with valid held until a
// one-cycle acknowledge (the buffers: a rising edge of their read request).
//
// Radio controllers (radio clock, 27 MHz / 4 from spi_clock_divider): a
// transmitting node (cc2420_config then cc2420_transmit, sharing one
// cc2420_spi) and a receiving node (cc2420_config then cc2420_receive).
// They send and receive the 5-byte test payload on their own ports and are
// not part of the audio path. Each node also brings out the PANID and short
// address it read back from the radio's RAM after configuring it. Each node's SPI master belongs to its
// configuration FSM until `configured` rises, then to its data FSM.
// radio_rst resets the radio FSMs and must be held for at least a few radio
// clocks; clkdiv_rst resets the radio clock divider alone.
module headphone_system
  import codec_pkg::*;
  import cc2420_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // audio path
  input  logic        enable,
  output logic        adc_convst,
  output logic        adc_sclk,
  output logic        adc_cs_n,
  input  logic        adc_sdata,
  output logic        dac_sclk,
  output logic        dac_sync,
  output logic        dac_dout,
  output logic        dac_underrun,
  output logic        chunk_overflow,
  output logic        tx_buffer_full,
  output logic        rx_buffer_full,
  output logic        compressor_busy,
  // radio clock and reset
  input  logic        clkdiv_rst,
  input  logic        radio_rst,
  output logic        radio_clk,
  input  logic [7:0]  channel,
  input  logic [15:0] panid,
  input  logic [15:0] tx_node_addr,
  input  logic [15:0] rx_node_addr,
  // transmitting radio node
  output logic        txr_resetn,
  output logic        txr_sclk,
  output logic        txr_csn,
  output logic        txr_si,
  input  logic        txr_so,
  input  logic        txr_sfd,
  input  logic        txr_fifo,
  input  logic        txr_fifop,
  input  logic [39:0] tx_payload,
  input  logic        tx_payload_valid,
  output logic        tx_payload_ack,
  output logic        tx_success,
  output logic [15:0] tx_retries,
  output logic        txr_configured,
  output logic [15:0] txr_panid_rb,
  output logic [15:0] txr_addr_rb,
  output logic [7:0]  tx_seq,
  // receiving radio node
  output logic        rxr_resetn,
  output logic        rxr_sclk,
  output logic        rxr_csn,
  output logic        rxr_si,
  input  logic        rxr_so,
  input  logic        rxr_fifo,
  input  logic        rxr_fifop,
  output logic [39:0] rx_payload,
  output logic [7:0]  rx_seq,
  output logic [15:0] rx_src_addr,
  output logic        rx_crc_ok,
  output logic        rx_packet_valid,
  output logic [15:0] rx_flushes,
  output logic        rxr_configured,
  output logic [15:0] rxr_panid_rb,
  output logic [15:0] rxr_addr_rb
);
  // ---------------- transmit side of the audio path ----------------
  logic        sample, frame_tick, sclk_tick, word_ready;
  logic [31:0] word;
  chunk_t      chunk;
  logic        chunk_ready, chunk_ack;
  comp_word_t  cw;
  logic        cw_valid, cw_ack;
  ecc_word_t   ew;
  logic        ew_valid, ew_ack;
  logic [PACKET_W-1:0] pkt;
  logic        pkt_valid, pkt_ack;

  adc_sampler u_sampler (
    .clk, .rst, .sample, .frame_tick, .sclk_tick, .sdata(adc_sdata),
    .cs_n(adc_cs_n), .word, .word_ready
  );

  chunker u_chunker (
    .clk, .rst, .enable, .word, .word_ready, .chunk, .chunk_ready, .chunk_ack,
    .sample, .sclk(adc_sclk), .convst(adc_convst), .frame_tick, .sclk_tick,
    .overflow(chunk_overflow)
  );

  compressor u_comp (
    .clk, .rst, .valid_in(chunk_ready), .chunk, .ack_in(chunk_ack),
    .busy(compressor_busy), .data_out(cw), .valid_out(cw_valid), .ack_out(cw_ack)
  );

  ecc_encoder u_ecc_in (
    .clk, .rst, .valid_in(cw_valid), .data_in(cw), .ack_in(cw_ack),
    .data_out(ew), .valid_out(ew_valid), .ack_out(ew_ack)
  );

  tx_buffer u_txbuf (
    .clk, .rst, .valid_in(ew_valid), .data_in(ew), .ack_in(ew_ack),
    .data_out(pkt), .valid_out(pkt_valid), .done_transmit(pkt_ack),
    .buffer_full(tx_buffer_full)
  );

  // ---------------- receive side of the audio path ----------------
  logic [ECC_W-1:0] rw;
  logic        rw_valid, rw_ack;
  comp_word_t  dw;
  logic        dw_valid, dw_ack;
  chunk_t      dchunk;
  logic        dchunk_valid, dchunk_ack;

  rx_buffer u_rxbuf (
    .clk, .rst, .valid_in(pkt_valid), .data_in(pkt), .ack_in(pkt_ack),
    .data_out(rw), .valid_out(rw_valid), .request_data_out(rw_ack),
    .buffer_full(rx_buffer_full)
  );

  ecc_decoder u_ecc_out (
    .clk, .rst, .valid_in(rw_valid), .data_in(rw), .ack_in(rw_ack),
    .data_out(dw), .valid_out(dw_valid), .valid_read(dw_ack)
  );

  decompressor u_decomp (
    .clk, .rst, .valid_in(dw_valid), .data_in(dw), .ack_in(dw_ack),
    .samples(dchunk), .valid_out(dchunk_valid), .ack_out(dchunk_ack)
  );

  dac_interface u_dac (
    .clk, .rst, .valid_in(dchunk_valid), .samples(dchunk), .ack_in(dchunk_ack),
    .sclk(dac_sclk), .sync(dac_sync), .dout(dac_dout), .underrun(dac_underrun)
  );

  // ---------------- radio controllers ----------------
  spi_clock_divider #(.DIV_BITS(2)) u_rclk (.clk, .rst(clkdiv_rst), .clk_out(radio_clk));

  // transmitting node
  spi_req_t t_req, t_cfg_req, t_tx_req;
  spi_rsp_t t_rsp;

  cc2420_config u_txr_cfg (
    .clk(radio_clk), .rst(radio_rst), .channel, .panid, .shortaddr(tx_node_addr),
    .reset_chipn(txr_resetn), .configured(txr_configured),
    .panid_rb(txr_panid_rb), .shortaddr_rb(txr_addr_rb), .spi_req(t_cfg_req), .spi_rsp(t_rsp)
  );

  cc2420_transmit u_txr (
    .clk(radio_clk), .rst(radio_rst), .enable(txr_configured),
    .payload(tx_payload), .payload_valid(tx_payload_valid),
    .panid, .dest_addr(rx_node_addr), .my_addr(tx_node_addr),
    .sfd(txr_sfd), .fifo(txr_fifo), .fifop(txr_fifop),
    .ack_payload(tx_payload_ack), .tx_success, .retries(tx_retries), .seq(tx_seq),
    .spi_req(t_tx_req), .spi_rsp(t_rsp)
  );

  assign t_req = txr_configured ? t_tx_req : t_cfg_req;

  cc2420_spi u_txr_spi (
    .clk(radio_clk), .rst(radio_rst), .req(t_req), .rsp(t_rsp),
    .sclk(txr_sclk), .csn(txr_csn), .si(txr_si), .so(txr_so)
  );

  // receiving node
  spi_req_t r_req, r_cfg_req, r_rx_req;
  spi_rsp_t r_rsp;

  cc2420_config u_rxr_cfg (
    .clk(radio_clk), .rst(radio_rst), .channel, .panid, .shortaddr(rx_node_addr),
    .reset_chipn(rxr_resetn), .configured(rxr_configured),
    .panid_rb(rxr_panid_rb), .shortaddr_rb(rxr_addr_rb), .spi_req(r_cfg_req), .spi_rsp(r_rsp)
  );

  cc2420_receive u_rxr (
    .clk(radio_clk), .rst(radio_rst), .enable(rxr_configured),
    .fifo(rxr_fifo), .fifop(rxr_fifop),
    .payload(rx_payload), .seq(rx_seq), .src_addr(rx_src_addr), .crc_ok(rx_crc_ok),
    .packet_valid(rx_packet_valid), .flushes(rx_flushes),
    .spi_req(r_rx_req), .spi_rsp(r_rsp)
  );

  assign r_req = rxr_configured ? r_rx_req : r_cfg_req;

  cc2420_spi u_rxr_spi (
    .clk(radio_clk), .rst(radio_rst), .req(r_req), .rsp(r_rsp),
    .sclk(rxr_sclk), .csn(rxr_csn), .si(rxr_si), .so(rxr_so)
  );
endmodule
