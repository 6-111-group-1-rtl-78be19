// Transmit FSM for the CC2420 radio (TransmitAggressiveFSM).
//
// Sends one 5-byte payload per request and retries until it is
// acknowledged. Stages:
//   WAITBUSY    wait for payload_valid while neither SFD nor FIFO shows a
//               transfer in progress; latch the payload (ack_payload pulse);
//   RECMODEON   strobe SFLUSHTX then SRXON in one transaction, so the TX FIFO
//               is empty and the receiver is on to hear the ACK;
//   STROBETX    strobe STXON ("aggressive": no clear-channel check);
//   WRITEPACKET WRITE_TXFIFO (0x3E) followed by the frame: LENGTH = 16
//               (payload + 11), frame control 0x8861 (data, ACK requested),
//               sequence number, PANID, destination and own short address
//               (all LSB first) and the payload, MSB byte first. The radio
//               appends the 2-byte FCS itself;
//   WAITACK     up to ACK_WAIT (6760) clocks for FIFOP, which signals a
//               received frame;
//   RETX        on timeout, strobe STXON again: the frame still in the TX
//               FIFO is resent without being rewritten (retries counts it);
//   CHECKACK    run cc2420_checkack; success pulses tx_success and advances
//               the sequence number, failure is handled like a timeout.
// While CHECKACK runs, the ACK checker owns the SPI request port.
// The stage order (STXON before the FIFO write) follows the design
// description; a one-byte sequence number is this design's reading of it,
// the one that makes LENGTH = payload + 11 hold.
module cc2420_transmit
  import cc2420_pkg::*;
#(
  parameter int unsigned ACK_WAIT = 6760
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [39:0] payload,
  input  logic        payload_valid,
  input  logic [15:0] panid,
  input  logic [15:0] dest_addr,
  input  logic [15:0] my_addr,
  input  logic        sfd,
  input  logic        fifo,
  input  logic        fifop,
  output logic        ack_payload,
  output logic        tx_success,
  output logic [15:0] retries,
  output logic [7:0]  seq,
  output spi_req_t    spi_req,
  input  spi_rsp_t    spi_rsp
);
  typedef enum logic [2:0] {
    S_WAITBUSY, S_RECMODEON, S_STROBETX, S_WRITEPACKET, S_WAITACK, S_RETX, S_CHECKACK
  } state_t;
  state_t state;
  logic [39:0] pl;
  logic [15:0] wcnt;
  logic        issued;
  spi_req_t    own_req, chk_req;
  logic        chk_start, chk_done, chk_success;

  cc2420_checkack u_check (
    .clk, .rst, .start(chk_start), .seq, .done(chk_done), .success(chk_success),
    .spi_req(chk_req), .spi_rsp
  );

  assign spi_req = (state == S_CHECKACK) ? chk_req : own_req;

  logic [127:0] frame;
  assign frame = {CMD_TXFIFO_WR, 8'd16, FCF_DATA_ACKREQ[7:0], FCF_DATA_ACKREQ[15:8], seq,
                  panid[7:0], panid[15:8], dest_addr[7:0], dest_addr[15:8],
                  my_addr[7:0], my_addr[15:8], pl};

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
      S_RECMODEON: begin
        run_bits = {CMD_SFLUSHTX, CMD_SRXON, 128'b0};
        run_n = 8'd16;
        run_next = S_STROBETX;
      end
      S_STROBETX: begin
        run_bits = {CMD_STXON, 136'b0};
        run_n = 8'd8;
        run_next = S_WRITEPACKET;
      end
      S_WRITEPACKET: begin
        run_bits = {frame, 16'b0};
        run_n = 8'd128;
        run_next = S_WAITACK;
      end
      S_RETX: begin
        run_bits = {CMD_STXON, 136'b0};
        run_n = 8'd8;
        run_next = S_WAITACK;
      end
      default: spi_state = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAITBUSY;
      pl <= '0;
      wcnt <= '0;
      issued <= 1'b0;
      seq <= '0;
      retries <= '0;
      ack_payload <= 1'b0;
      tx_success <= 1'b0;
      chk_start <= 1'b0;
      own_req <= '0;
    end else begin
      own_req.start <= 1'b0;
      if (spi_state) begin
        if (!issued) begin
          own_req.start <= 1'b1;
          own_req.bits <= run_bits;
          own_req.nbits <= run_n;
          issued <= 1'b1;
        end else if (spi_rsp.done) begin
          issued <= 1'b0;
          wcnt <= '0;
          state <= run_next;
        end
      end
      ack_payload <= 1'b0;
      tx_success <= 1'b0;
      chk_start <= 1'b0;
      unique case (state)
        S_WAITBUSY: if (enable && payload_valid && !sfd && !fifo && !ack_payload) begin
          pl <= payload;
          ack_payload <= 1'b1;
          state <= S_RECMODEON;
        end
        S_RECMODEON:   ;  // SPI transaction, issued above
        S_STROBETX:    ;  // SPI transaction, issued above
        S_WRITEPACKET: ;  // SPI transaction, issued above
        S_WAITACK: begin
          if (fifop) begin
            chk_start <= 1'b1;
            state <= S_CHECKACK;
          end else if (int'(wcnt) == ACK_WAIT - 1) begin
            wcnt <= '0;
            retries <= retries + 1'b1;
            state <= S_RETX;
          end else wcnt <= wcnt + 1'b1;
        end
        S_RETX:        ;  // SPI transaction, issued above
        S_CHECKACK: if (chk_done) begin
          if (chk_success) begin
            tx_success <= 1'b1;
            seq <= seq + 1'b1;
            state <= S_WAITBUSY;
          end else begin
            retries <= retries + 1'b1;
            state <= S_RETX;
          end
        end
        default: state <= S_WAITBUSY;
      endcase
    end
  end
endmodule
