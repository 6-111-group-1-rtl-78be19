// Transmit-side buffer ("buffer_aditi"): 50-bit words -> 800-bit packets.
//
// Packing: an FSM takes sixteen protected words, the first into bits 49:0
// of the packet register, the next into 99:50 and so on. Each word is
// acknowledged with a one-cycle ack_in; the ACKIN state then waits for
// valid_in to fall so a slow producer is never read twice. With the
// sixteenth word the packet is written into a SLOTS-deep circular FIFO at
// in_ptr. If the FIFO is full, the sixteenth word is not acknowledged until
// a slot frees (own choice).
//
// Output: the oldest packet is shown on data_out with valid_out high. A
// rising edge of done_transmit means the packet has been consumed: valid_out
// drops for at least one cycle, and while valid_out is low the buffer loads
// the next packet every cycle it has one. So a consumer that only watches
// the level of valid_out sees each packet as a separate pulse. Pointers run
// 0..SLOTS-1 and wrap. buffer_full is high while all slots hold packets.
module tx_buffer #(
  parameter int unsigned WORD_W = 50,
  parameter int unsigned WORDS  = 16,
  parameter int unsigned SLOTS  = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid_in,
  input  logic [WORD_W-1:0]        data_in,
  output logic                     ack_in,
  output logic [WORD_W*WORDS-1:0]  data_out,
  output logic                     valid_out,
  input  logic                     done_transmit,
  output logic                     buffer_full
);
  localparam int unsigned PW = WORD_W * WORDS;
  localparam int unsigned AW = $clog2(SLOTS);

  typedef enum logic {S_WAIT, S_ACKIN} state_t;
  state_t state;

  logic [PW-1:0] packet;
  logic [$clog2(WORDS)-1:0] widx;
  logic [PW-1:0] mem [SLOTS];
  logic [AW-1:0] in_ptr, out_ptr;
  logic [AW:0]   count;
  logic          dt_q;
  logic          wr, rd, last;

  assign buffer_full = (count == (AW+1)'(SLOTS));
  assign last   = (int'(widx) == WORDS - 1);
  assign ack_in = (state == S_WAIT) && valid_in && (!last || !buffer_full);
  assign wr     = ack_in && last;
  assign rd     = !valid_out && (count != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT;
      packet <= '0;
      widx <= '0;
      in_ptr <= '0;
      out_ptr <= '0;
      count <= '0;
      dt_q <= 1'b0;
      valid_out <= 1'b0;
      data_out <= '0;
    end else begin
      dt_q <= done_transmit;
      unique case (state)
        S_WAIT: if (ack_in) begin
          packet[int'(widx)*WORD_W +: WORD_W] <= data_in;
          widx <= last ? '0 : widx + 1'b1;
          state <= S_ACKIN;
        end
        S_ACKIN: if (!valid_in) state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
      if (wr) in_ptr <= (int'(in_ptr) == SLOTS - 1) ? '0 : in_ptr + 1'b1;
      if (rd) begin
        data_out <= mem[out_ptr];
        valid_out <= 1'b1;
        out_ptr <= (int'(out_ptr) == SLOTS - 1) ? '0 : out_ptr + 1'b1;
      end else if (done_transmit && !dt_q) begin
        valid_out <= 1'b0;
      end
      count <= count + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  // The sixteenth word goes straight into the stored packet.
  always_ff @(posedge clk) begin
    if (wr) begin
      logic [PW-1:0] full_pkt;
      full_pkt = packet;
      full_pkt[PW-1 -: WORD_W] = data_in;
      mem[in_ptr] <= full_pkt;
    end
  end
endmodule
