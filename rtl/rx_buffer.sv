// Receive-side buffer ("buffer_nivedita"): 800-bit packets -> 50-bit words.
//
// Parsing FSM with three states. WAIT: when valid_in is high and at least
// WORDS slots are free (own choice), the packet is registered and ack_in
// pulses for one cycle. ACKIN: waits for valid_in to fall; the sender may
// run on a slower clock and hold valid_in for many cycles, and this state
// keeps the same packet from being taken twice. STORE: writes the sixteen
// words into the FIFO, one per cycle, bits 49:0 first.
//
// The FIFO has SLOTS (160) entries of WORD_W bits, the same storage as ten
// 800-bit packets; each packet also acts as a cushion of fifteen words
// against gaps in the incoming stream. Output works as in tx_buffer: the
// oldest word is held on data_out with valid_out; a rising edge of
// request_data_out consumes it, valid_out drops for at least a cycle and the
// next word is loaded while valid_out is low.
module rx_buffer #(
  parameter int unsigned WORD_W = 50,
  parameter int unsigned WORDS  = 16,
  parameter int unsigned SLOTS  = 160
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid_in,
  input  logic [WORD_W*WORDS-1:0]  data_in,
  output logic                     ack_in,
  output logic [WORD_W-1:0]        data_out,
  output logic                     valid_out,
  input  logic                     request_data_out,
  output logic                     buffer_full
);
  localparam int unsigned PW = WORD_W * WORDS;
  localparam int unsigned AW = $clog2(SLOTS);

  typedef enum logic [1:0] {S_WAIT, S_ACKIN, S_STORE} state_t;
  state_t state;

  logic [PW-1:0] packet;
  logic [$clog2(WORDS)-1:0] widx;
  logic [WORD_W-1:0] mem [SLOTS];
  logic [AW-1:0] in_ptr, out_ptr;
  logic [AW:0]   count;
  logic          rq_q, wr, rd;

  assign buffer_full = (count == (AW+1)'(SLOTS));
  assign ack_in = (state == S_WAIT) && valid_in && (int'(count) + WORDS <= SLOTS);
  assign wr     = (state == S_STORE);
  assign rd     = !valid_out && (count != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT;
      packet <= '0;
      widx <= '0;
      in_ptr <= '0;
      out_ptr <= '0;
      count <= '0;
      rq_q <= 1'b0;
      valid_out <= 1'b0;
      data_out <= '0;
    end else begin
      rq_q <= request_data_out;
      unique case (state)
        S_WAIT: if (ack_in) begin
          packet <= data_in;
          widx <= '0;
          state <= S_ACKIN;
        end
        S_ACKIN: if (!valid_in) state <= S_STORE;
        S_STORE: begin
          widx <= widx + 1'b1;
          if (int'(widx) == WORDS - 1) state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
      if (wr) in_ptr <= (int'(in_ptr) == SLOTS - 1) ? '0 : in_ptr + 1'b1;
      if (rd) begin
        data_out <= mem[out_ptr];
        valid_out <= 1'b1;
        out_ptr <= (int'(out_ptr) == SLOTS - 1) ? '0 : out_ptr + 1'b1;
      end else if (request_data_out && !rq_q) begin
        valid_out <= 1'b0;
      end
      count <= count + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  always_ff @(posedge clk) if (wr) mem[in_ptr] <= packet[int'(widx)*WORD_W +: WORD_W];
endmodule
