// ACK-frame checker for the transmitter (CheckAck).
//
// On `start` it reads the radio's RXFIFO with one transaction: the 0x7F
// command (register 0x3F, read bit set) followed by the six bytes of an
// IEEE 802.15.4 acknowledgement frame: length, frame control (two bytes,
// LSB first), sequence number and the two FCS bytes, whose last byte
// carries the radio's CRC-OK flag in bit 7. `done` pulses once the bytes are
// in, together with `success` if the length is 5, the frame control is
// 0x0002, the sequence number equals `seq` and the CRC passed.
module cc2420_checkack
  import cc2420_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  logic [7:0] seq,
  output logic     done,
  output logic     success,
  output spi_req_t spi_req,
  input  spi_rsp_t spi_rsp
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_CHECK} state_t;
  state_t state;
  logic [47:0] frame;

  logic [7:0]  len, rseq, fcs_hi;
  logic [15:0] fcf;
  assign len    = frame[47:40];
  assign fcf    = {frame[31:24], frame[39:32]};
  assign rseq   = frame[23:16];
  assign fcs_hi = frame[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      frame <= '0;
      done <= 1'b0;
      success <= 1'b0;
      spi_req <= '0;
    end else begin
      spi_req.start <= 1'b0;
      done <= 1'b0;
      success <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          spi_req.start <= 1'b1;
          spi_req.bits <= {CMD_RXFIFO_RD, 136'b0};
          spi_req.nbits <= 8'd56;
          state <= S_READ;
        end
        S_READ: if (spi_rsp.done) begin
          frame <= spi_rsp.rx[47:0];
          state <= S_CHECK;
        end
        S_CHECK: begin
          done <= 1'b1;
          success <= (len == 8'd5) && (fcf == FCF_ACK) && (rseq == seq) && fcs_hi[7];
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
