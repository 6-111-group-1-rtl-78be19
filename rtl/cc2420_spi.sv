// SPI master for the CC2420 radio.
//
// The module runs on the radio clock (at most 10 MHz) and drives
// SCLK = ~clk, so SI and CSn, which are registered on the rising clock edge,
// are set up half a period before the radio samples them on SCLK's rising
// edge, with no glitches. A request (cc2420_pkg::spi_req_t) names a
// transaction of nbits bits, sent MSB first from the top of req.bits with
// CSn low throughout; several register accesses, or a command and its data
// bytes, can share one transaction. SO is sampled one clock after the SI bit
// it answers and shifted into rsp.rx. After the last bit CSn goes high and
// stays high at least one clock, which also ends a RAM access; rsp.done
// pulses then. Timing: done comes nbits+2 clocks after start.
module cc2420_spi
  import cc2420_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  spi_req_t req,
  output spi_rsp_t rsp,
  output logic     sclk,
  output logic     csn,
  output logic     si,
  input  logic     so
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_TAIL} state_t;
  state_t state;
  logic [MAX_BITS-1:0] sh;
  logic [7:0] cnt;
  logic       cap;  // an SI bit went out last cycle: its SO bit is valid now

  assign sclk = ~clk;
  assign rsp.busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sh <= '0;
      cnt <= '0;
      cap <= 1'b0;
      csn <= 1'b1;
      si <= 1'b0;
      rsp.done <= 1'b0;
      rsp.rx <= '0;
    end else begin
      rsp.done <= 1'b0;
      if (cap) rsp.rx <= {rsp.rx[MAX_BITS-2:0], so};
      unique case (state)
        S_IDLE: begin
          cap <= 1'b0;
          if (req.start && req.nbits != '0) begin
            sh <= req.bits;
            cnt <= req.nbits;
            state <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          csn <= 1'b0;
          si <= sh[MAX_BITS-1];
          sh <= {sh[MAX_BITS-2:0], 1'b0};
          cap <= 1'b1;
          cnt <= cnt - 1'b1;
          if (cnt == 8'd1) state <= S_TAIL;
        end
        S_TAIL: begin
          csn <= 1'b1;
          si <= 1'b0;
          cap <= 1'b0;
          rsp.done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
