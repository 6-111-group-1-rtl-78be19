// D/A interface: decompressed chunks in, one serial sample per 90 kHz frame out.
//
// A chunk of five samples is taken (one-cycle ack_in) only when all five
// stacks have room: N1 goes onto stack 0, N2 onto stack 1 and so on. A
// round-robin pointer names the stack to pop next, so samples leave in
// their original time order. At every frame start the serializer takes the
// sample at the head of that stack and the pointer advances. If that stack is
// empty the previous sample is sent again and underrun is high for the frame
// (own choice; the stream simply pauses). The module has its own
// sample_clock_divider (27 MHz / 300 frames, 5.4 MHz sclk), so the D/A side
// runs independently of the A/D side. Stack depth is an own choice.
module dac_interface #(
  parameter int unsigned N           = 5,
  parameter int unsigned STACK_DEPTH = 4,
  parameter int unsigned FRAME_DIV   = 300,
  parameter int unsigned SCLK_DIV    = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_in,
  input  codec_pkg::chunk_t samples,
  output logic              ack_in,
  output logic              sclk,
  output logic              sync,
  output logic              dout,
  output logic              underrun
);
  logic frame_tick, sclk_tick, convst, load, busy;
  logic [7:0] sclk_index;
  logic [N-1:0] empty, full, pop;
  codec_pkg::sample_t head [N];
  codec_pkg::sample_t last, cur;
  logic [$clog2(N)-1:0] rsel;

  sample_clock_divider #(.FRAME_DIV(FRAME_DIV), .SCLK_DIV(SCLK_DIV)) u_div (
    .clk, .rst, .sclk, .sclk_tick, .convst, .frame_tick, .sclk_index
  );

  assign ack_in = valid_in && (full == '0);

  for (genvar k = 0; k < N; k++) begin : g_stack
    assign pop[k] = load && (int'(rsel) == k);
    sample_stack #(.DEPTH(STACK_DEPTH)) u_stack (
      .clk, .rst, .push(ack_in), .din(samples[k]), .pop(pop[k]),
      .dout(head[k]), .empty(empty[k]), .full(full[k])
    );
  end

  assign cur = empty[rsel] ? last : head[rsel];

  dac_serializer #(.CFG_BITS(8), .SAMPLE_W(16)) u_ser (
    .clk, .rst, .frame_tick, .sclk_tick, .sample(cur), .load, .sync, .dout, .busy
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rsel <= '0;
      last <= '0;
      underrun <= 1'b0;
    end else if (load) begin
      last <= cur;
      underrun <= empty[rsel];
      if (!empty[rsel]) rsel <= (int'(rsel) == N - 1) ? '0 : rsel + 1'b1;
    end
  end
endmodule
