// Lossy 2:1 compressor: five signed 16-bit samples -> one 40-bit word.
//
// Word layout (codec_pkg::comp_word_t): N1 verbatim in bits 15:0, shift_val
// in 19:16, then four {4-bit code, sign} pairs for the differences N2-N1 ..
// N5-N4. shift_val is the position of the leading one of the largest exact
// difference magnitude, and a code c stands for c * 2^(shift_val-3), i.e.
// the code's MSB sits at bit shift_val; all four codes share it. The sign bit
// is 1 for a negative difference.
//
// Each code is chosen against the sample the decompressor will rebuild,
// not against the previous input sample: after code k is fixed the FSM
// recomputes the running reconstruction and takes the next difference from
// it, so quantisation errors do not accumulate. Choosing the nearest code
// (ties up, saturating at 15) and wrapping the reconstruction at 16 bits are
// this design's own choices; decompressor.sv uses the same arithmetic.
//
// FSM: WAIT -> DIFF -> MAX_DIFF -> MAX1 -> (QUANT -> RECAL) x4 -> DONE.
// A chunk is taken with a one-cycle ack_in in WAIT; busy is high from then
// until the result is written. data_out is held with valid_out until the
// consumer pulses ack_out; a finished word waits in DONE while the previous
// one is still unread. Latency: 13 cycles from ack_in to valid_out.
module compressor
  import codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  chunk_t     chunk,
  output logic       ack_in,
  output logic       busy,
  output comp_word_t data_out,
  output logic       valid_out,
  input  logic       ack_out
);
  typedef enum logic [2:0] {
    S_WAIT, S_DIFF, S_MAX_DIFF, S_MAX1, S_QUANT, S_RECAL, S_DONE
  } state_t;
  state_t state;

  sample_t      n [CHUNK_N];
  logic [15:0]  mag [CHUNK_N-1];   // exact first-pass magnitudes
  logic [15:0]  max_mag;
  logic [3:0]   shift_val;
  logic [1:0]   k;
  sample_t      recon;             // decompressor's view of sample k
  diff_code_t   codes [CHUNK_N-1];

  // Difference of the next input against the reconstruction (18 bits).
  logic signed [17:0] cur_diff;
  logic        [16:0] cur_mag;
  logic        [21:0] num, q;
  logic        [3:0]  cur_code;
  assign cur_diff = 18'(n[k+1]) - 18'(recon);
  assign cur_mag  = cur_diff[17] ? 17'(-cur_diff) : 17'(cur_diff);
  assign num      = (22'(cur_mag) << 3) + ((22'd1 << shift_val) >> 1);
  assign q        = num >> shift_val;
  assign cur_code = (q > 22'd15) ? 4'd15 : q[3:0];

  assign ack_in = (state == S_WAIT) && valid_in;
  assign busy   = (state != S_WAIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT;
      valid_out <= 1'b0;
      data_out <= '0;
      k <= '0;
      max_mag <= '0;
      shift_val <= '0;
      recon <= '0;
      for (int i = 0; i < CHUNK_N; i++) n[i] <= '0;
      for (int i = 0; i < CHUNK_N-1; i++) begin
        mag[i] <= '0;
        codes[i] <= '0;
      end
    end else begin
      if (ack_out) valid_out <= 1'b0;
      unique case (state)
        S_WAIT: if (valid_in) begin
          for (int i = 0; i < CHUNK_N; i++) n[i] <= chunk[i];
          state <= S_DIFF;
        end
        S_DIFF: begin
          for (int i = 0; i < CHUNK_N-1; i++) begin
            logic signed [16:0] d;
            d = 17'(n[i+1]) - 17'(n[i]);
            mag[i] <= d[16] ? 16'(-d) : 16'(d);
          end
          state <= S_MAX_DIFF;
        end
        S_MAX_DIFF: begin
          logic [15:0] m;
          m = mag[0];
          for (int i = 1; i < CHUNK_N-1; i++) if (mag[i] > m) m = mag[i];
          max_mag <= m;
          state <= S_MAX1;
        end
        S_MAX1: begin
          shift_val <= lead_one16(max_mag);
          recon <= n[0];
          k <= '0;
          state <= S_QUANT;
        end
        S_QUANT: begin
          codes[k].code <= cur_code;
          codes[k].sign <= cur_diff[17];
          state <= S_RECAL;
        end
        S_RECAL: begin
          // Rebuild sample k+1 exactly as the decompressor will.
          if (codes[k].sign) recon <= recon - sample_t'(scale_code(codes[k].code, shift_val));
          else               recon <= recon + sample_t'(scale_code(codes[k].code, shift_val));
          if (k == 2'd3) state <= S_DONE;
          else begin
            k <= k + 1'b1;
            state <= S_QUANT;
          end
        end
        S_DONE: if (!valid_out || ack_out) begin
          data_out.n1 <= n[0];
          data_out.shift_val <= shift_val;
          for (int i = 0; i < CHUNK_N-1; i++) data_out.d[i] <= codes[i];
          valid_out <= 1'b1;
          state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Handshake rule: a presented word stays unchanged until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    valid_out && !ack_out |=> valid_out && $stable(data_out));
endmodule
