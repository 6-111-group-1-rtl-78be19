// Error-protection decoder ("error_correction_output"): 50 -> 40 bits.
//
// The same correction is applied whether or not the word was damaged. For
// each recorded position p, the field is shifted left until bit p is the
// MSB, the MSB is set, and the field is shifted back: every bit above p is
// cleared and bit p is forced to one. N1 is treated first for second1 and
// then for first1, which leaves N1 with exactly the two recorded leading
// ones and zeros between and above them; shift_val is treated for shift1.
// A recorded position of 0 leaves its field alone (this design's choice):
// the encoder writes 0 when a field has no such one, and forcing bit 0 would
// corrupt a zero or one-bit N1. Error-free words therefore pass unchanged.
//
// FSM: WAIT -> SECOND -> FIRST -> SHIFT -> DONE, one shift/set/shift step per
// state. The result is held with valid_out until the decompressor pulses
// valid_read (its valid_decompressing); only then does the FSM return to
// WAIT. Latency: 5 cycles from ack_in to valid_out.
module ecc_decoder
  import codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  ecc_word_t  data_in,
  output logic       ack_in,
  output comp_word_t data_out,
  output logic       valid_out,
  input  logic       valid_read
);
  typedef enum logic [2:0] {S_WAIT, S_SECOND, S_FIRST, S_SHIFT, S_DONE, S_HOLD} state_t;
  state_t    state;
  ecc_word_t w;

  // Clear bits above p and set bit p, via shift-left / set MSB / shift-right.
  function automatic logic [15:0] force_lead(input logic [15:0] v, input logic [3:0] p);
    logic [15:0] t;
    if (p == '0) return v;
    t = v << (4'd15 - p);
    t[15] = 1'b1;
    return t >> (4'd15 - p);
  endfunction

  assign ack_in = (state == S_WAIT) && valid_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT;
      w <= '0;
      data_out <= '0;
      valid_out <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT: if (valid_in) begin
          w <= data_in;
          state <= S_SECOND;
        end
        S_SECOND: begin
          w.data.n1 <= force_lead(w.data.n1, w.second1);
          state <= S_FIRST;
        end
        S_FIRST: begin
          w.data.n1 <= force_lead(w.data.n1, w.first1);
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          w.data.shift_val <= 4'(force_lead({12'b0, w.data.shift_val}, {2'b0, w.shift1}));
          state <= S_DONE;
        end
        S_DONE: begin
          data_out <= w.data;
          valid_out <= 1'b1;
          state <= S_HOLD;
        end
        S_HOLD: if (valid_read) begin
          valid_out <= 1'b0;
          state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Handshake rule: presented data stays unchanged until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    valid_out && !valid_read |=> valid_out && $stable(data_out));
endmodule
