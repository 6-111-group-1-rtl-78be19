// Error-protection encoder ("error_correction_input"): 40 -> 50 bits.
//
// Only the least tolerant fields are protected: N1, the reference sample
// every other sample is rebuilt from, and shift_val, which scales every
// difference. The encoder records the position of the leading one of N1
// (first1), of the next one below it (second1) and of the leading one of
// shift_val (shift1, two bits). A field with no such one records 0.
// Layout (codec_pkg::ecc_word_t): first1[49:46], second1[45:42],
// shift1[41:40], original word[39:0]; that placement is this design's own.
//
// FSM: WAIT (one-cycle ack_in on capture) -> FIRST (leading ones of N1 and
// shift_val) -> SECOND (next one of N1) -> DONE. data_out is held with
// valid_out until the consumer pulses ack_out. Latency: 4 cycles.
module ecc_encoder
  import codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  comp_word_t data_in,
  output logic       ack_in,
  output ecc_word_t  data_out,
  output logic       valid_out,
  input  logic       ack_out
);
  typedef enum logic [1:0] {S_WAIT, S_FIRST, S_SECOND, S_DONE} state_t;
  state_t     state;
  comp_word_t word;
  logic [3:0] first1, second1;
  logic [1:0] shift1;

  assign ack_in = (state == S_WAIT) && valid_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT;
      word <= '0;
      first1 <= '0;
      second1 <= '0;
      shift1 <= '0;
      data_out <= '0;
      valid_out <= 1'b0;
    end else begin
      if (ack_out) valid_out <= 1'b0;
      unique case (state)
        S_WAIT: if (valid_in) begin
          word <= data_in;
          state <= S_FIRST;
        end
        S_FIRST: begin
          first1 <= lead_one16(word.n1);
          shift1 <= 2'(lead_one16({12'b0, word.shift_val}));
          state <= S_SECOND;
        end
        S_SECOND: begin
          // Clear the leading one and look again.
          logic [15:0] rest;
          rest = word.n1 & ~(16'd1 << first1);
          second1 <= (word.n1 == '0) ? 4'd0 : lead_one16(rest);
          state <= S_DONE;
        end
        S_DONE: if (!valid_out || ack_out) begin
          data_out.first1 <= first1;
          data_out.second1 <= second1;
          data_out.shift1 <= shift1;
          data_out.data <= word;
          valid_out <= 1'b1;
          state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Handshake rule: presented data stays unchanged until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    valid_out && !ack_out |=> valid_out && $stable(data_out));
endmodule
