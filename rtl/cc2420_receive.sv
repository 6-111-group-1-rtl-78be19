// Receive FSM for the CC2420 radio (ReceiveFSM).
//
//   RECON       strobe SRXON to turn the receiver on;
//   WAIT        a frame has arrived when both FIFO and FIFOP are high. FIFOP
//               high with FIFO low means the RX FIFO overflowed;
//   PARSEPACKET read the RXFIFO (command 0x7F) in one transaction: the 17
//               bytes of a frame with a 5-byte payload (length, frame
//               control, sequence number, PANID, destination, source,
//               payload, 2 FCS bytes) and present payload, sequence number,
//               source address and the CRC-OK flag (bit 7 of the last byte)
//               with a one-cycle packet_valid;
//   FLUSH       on overflow, strobe SFLUSHRX twice in one transaction and
//               count it in `flushes`.
// After a frame or a flush the FSM returns to WAIT. The parser is fixed to
// the 5-byte test payload, as in the design description; reading with
// 0x7F (read bit set) rather than 0x3E is this design's reading of it.
module cc2420_receive
  import cc2420_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        fifo,
  input  logic        fifop,
  output logic [39:0] payload,
  output logic [7:0]  seq,
  output logic [15:0] src_addr,
  output logic        crc_ok,
  output logic        packet_valid,
  output logic [15:0] flushes,
  output spi_req_t    spi_req,
  input  spi_rsp_t    spi_rsp
);
  typedef enum logic [1:0] {S_RECON, S_WAIT, S_PARSE, S_FLUSH} state_t;
  state_t state;
  logic   issued;
  logic [135:0] f;  // the 17 frame bytes, first byte in f[135:128]
  assign f = spi_rsp.rx[135:0];

  // Transaction issued in each SPI state and the state that follows it.
  logic                spi_state;
  logic [MAX_BITS-1:0] run_bits;
  logic [7:0]          run_n;
  state_t              run_next;
  always_comb begin
    spi_state = 1'b1;
    run_bits = '0;
    run_n = '0;
    run_next = state;
    unique case (state)
      S_RECON: begin
        run_bits = {CMD_SRXON, 136'b0};
        run_n = 8'd8;
        run_next = S_WAIT;
        spi_state = enable;
      end
      S_FLUSH: begin
        run_bits = {CMD_SFLUSHRX, CMD_SFLUSHRX, 128'b0};
        run_n = 8'd16;
        run_next = S_WAIT;
      end
      S_PARSE: begin
        run_bits = {CMD_RXFIFO_RD, 136'b0};
        run_n = 8'd144;
        run_next = S_WAIT;
      end
      default: spi_state = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RECON;
      issued <= 1'b0;
      payload <= '0;
      seq <= '0;
      src_addr <= '0;
      crc_ok <= 1'b0;
      packet_valid <= 1'b0;
      flushes <= '0;
      spi_req <= '0;
    end else begin
      spi_req.start <= 1'b0;
      if (spi_state) begin
        if (!issued) begin
          spi_req.start <= 1'b1;
          spi_req.bits <= run_bits;
          spi_req.nbits <= run_n;
          issued <= 1'b1;
        end else if (spi_rsp.done) begin
          issued <= 1'b0;
          state <= run_next;
        end
      end
      packet_valid <= 1'b0;
      unique case (state)
        S_RECON: ;  // SPI transaction, issued above
        S_WAIT: begin
          if (fifop && fifo) state <= S_PARSE;
          else if (fifop) begin
            flushes <= flushes + 1'b1;
            state <= S_FLUSH;
          end
        end
        S_PARSE: begin
          if (issued && spi_rsp.done) begin
            seq <= f[111:104];
            src_addr <= {f[63:56], f[71:64]};
            payload <= f[55:16];
            crc_ok <= f[7];
            packet_valid <= 1'b1;
          end
        end
        S_FLUSH: ;  // SPI transaction, issued above
        default: state <= S_RECON;
      endcase
    end
  end
endmodule
