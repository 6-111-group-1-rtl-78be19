// AD7656 sampling interface (the "sampling module").
//
// At each frame start (convst rising) and while `sample` is high, chip
// select stays high for CS_DELAY (20) sclk periods, long enough for the
// converter to finish, instead of waiting for its busy output: busy has no
// fixed relation to sclk and could make the MSB be missed. CS then goes low
// and WORD_BITS (32) bits are shifted in MSB first, one per sclk rising
// edge (sclk_tick). The word is presented with a one-cycle word_ready and CS
// returns high. The 32-bit width is the two-channel layout; with one channel
// fitted, word[31:16] reads zero and word[15:0] is the sample.
// Timing: word_ready comes CS_DELAY+WORD_BITS sclk periods after frame_tick.
module adc_sampler #(
  parameter int unsigned CS_DELAY  = 20,
  parameter int unsigned WORD_BITS = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sample,
  input  logic                 frame_tick,
  input  logic                 sclk_tick,
  input  logic                 sdata,
  output logic                 cs_n,
  output logic [WORD_BITS-1:0] word,
  output logic                 word_ready
);
  typedef enum logic [1:0] {S_IDLE, S_CONVERT, S_READ} state_t;
  state_t state;
  logic [7:0] i;  // sclk periods waited, then bits read
  logic [WORD_BITS-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      i <= '0;
      cs_n <= 1'b1;
      shreg <= '0;
      word <= '0;
      word_ready <= 1'b0;
    end else begin
      word_ready <= 1'b0;
      unique case (state)
        S_IDLE: if (frame_tick && sample) begin
          state <= S_CONVERT;
          i <= 8'd1;  // the frame_tick cycle is also the first sclk edge
        end
        S_CONVERT: if (sclk_tick) begin
          if (int'(i) == CS_DELAY) begin
            cs_n <= 1'b0;
            i <= '0;
            state <= S_READ;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_READ: if (sclk_tick) begin
          shreg <= {shreg[WORD_BITS-2:0], sdata};
          if (int'(i) == WORD_BITS - 1) begin
            word <= {shreg[WORD_BITS-2:0], sdata};
            word_ready <= 1'b1;
            cs_n <= 1'b1;
            state <= S_IDLE;
          end
          i <= i + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
