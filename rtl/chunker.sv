// Chunk module: turns the stream of A/D samples into chunks of five.
//
// Sample k of the stream is pushed onto stack (k mod 5); once every stack
// holds a sample, one is popped from each, so the chunk holds five
// consecutive samples with chunk[0] (N1) the oldest. The chunk is held with
// chunk_ready high until the compressor pulses chunk_ack for one cycle.
// The module also houses the divider that makes convst and sclk, and it
// drives `sample`, the enable of the sampling module: sampling stops while
// `enable` is low or any stack is full, so no sample is lost. overflow is a
// sticky flag for a sample that arrived at a full stack anyway.
// Stack depth and the ready/ack handshake are this design's own choices.
module chunker #(
  parameter int unsigned N           = 5,
  parameter int unsigned STACK_DEPTH = 4,
  parameter int unsigned FRAME_DIV   = 300,
  parameter int unsigned SCLK_DIV    = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic [31:0]         word,
  input  logic                word_ready,
  output codec_pkg::chunk_t    chunk,
  output logic                chunk_ready,
  input  logic                chunk_ack,
  output logic                sample,
  output logic                sclk,
  output logic                convst,
  output logic                frame_tick,
  output logic                sclk_tick,
  output logic                overflow
);
  logic [N-1:0] empty, full, push, pop;
  codec_pkg::sample_t dout [N];
  logic [$clog2(N)-1:0] wsel;
  logic [7:0] sclk_index;

  sample_clock_divider #(.FRAME_DIV(FRAME_DIV), .SCLK_DIV(SCLK_DIV)) u_div (
    .clk, .rst, .sclk, .sclk_tick, .convst, .frame_tick, .sclk_index
  );

  // Pop a complete set whenever the output register is free.
  logic take;
  assign take = (empty == '0) && (!chunk_ready || chunk_ack);

  for (genvar k = 0; k < N; k++) begin : g_stack
    assign push[k] = word_ready && (int'(wsel) == k);
    assign pop[k]  = take;
    sample_stack #(.DEPTH(STACK_DEPTH)) u_stack (
      .clk, .rst, .push(push[k]), .din(word[15:0]), .pop(pop[k]),
      .dout(dout[k]), .empty(empty[k]), .full(full[k])
    );
  end

  assign sample = enable && (full == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      wsel <= '0;
      chunk_ready <= 1'b0;
      overflow <= 1'b0;
      for (int k = 0; k < N; k++) chunk[k] <= '0;
    end else begin
      if (word_ready) begin
        wsel <= (int'(wsel) == N - 1) ? '0 : wsel + 1'b1;
        if (full[wsel]) overflow <= 1'b1;
      end
      if (take) begin
        chunk_ready <= 1'b1;
        for (int k = 0; k < N; k++) chunk[k] <= dout[k];
      end else if (chunk_ack) begin
        chunk_ready <= 1'b0;
      end
    end
  end

  // Handshake rule: presented data stays unchanged until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    chunk_ready && !chunk_ack |=> chunk_ready && $stable(chunk));
endmodule
