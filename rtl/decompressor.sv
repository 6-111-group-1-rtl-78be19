// Decompressor: one 40-bit compressed word -> five signed 16-bit samples.
//
// N1 is taken verbatim. Each 4-bit difference code is first scaled by
// shift_val (its MSB placed at bit shift_val, codec_pkg::scale_code), then
// N2..N5 are rebuilt in turn by adding the scaled difference to the previous
// sample, or subtracting it when the sign bit is 1. Arithmetic wraps at 16
// bits, matching the compressor's own reconstruction.
//
// FSM: WAIT -> SHIFT1 -> N2 -> N3 -> N4 -> N5 -> DONE. ack_in (the
// valid_decompressing pulse) is high in the cycle the word is registered.
// The five samples are held with valid_out until the consumer pulses
// ack_out; a new word is accepted only once the previous result is gone.
// Latency: 7 cycles from ack_in to valid_out.
module decompressor
  import codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  comp_word_t data_in,
  output logic       ack_in,
  output chunk_t     samples,
  output logic       valid_out,
  input  logic       ack_out
);
  typedef enum logic [2:0] {S_WAIT, S_SHIFT1, S_BUILD, S_DONE} state_t;
  state_t     state;
  comp_word_t w;
  logic [15:0] delta [CHUNK_N-1];
  chunk_t     n;
  logic [1:0] k;

  assign ack_in = (state == S_WAIT) && valid_in && (!valid_out || ack_out);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT;
      w <= '0;
      n <= '0;
      k <= '0;
      samples <= '0;
      valid_out <= 1'b0;
      for (int i = 0; i < CHUNK_N-1; i++) delta[i] <= '0;
    end else begin
      if (ack_out) valid_out <= 1'b0;
      unique case (state)
        S_WAIT: if (ack_in) begin
          w <= data_in;
          state <= S_SHIFT1;
        end
        S_SHIFT1: begin
          for (int i = 0; i < CHUNK_N-1; i++) delta[i] <= scale_code(w.d[i].code, w.shift_val);
          n[0] <= w.n1;
          k <= '0;
          state <= S_BUILD;
        end
        S_BUILD: begin
          if (w.d[k].sign) n[k+1] <= n[k] - sample_t'(delta[k]);
          else             n[k+1] <= n[k] + sample_t'(delta[k]);
          k <= k + 1'b1;
          if (k == 2'd3) state <= S_DONE;
        end
        S_DONE: if (!valid_out || ack_out) begin
          samples <= n;
          valid_out <= 1'b1;
          state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Handshake rule: presented data stays unchanged until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    valid_out && !ack_out |=> valid_out && $stable(samples));
endmodule
