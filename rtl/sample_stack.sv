// Small synchronous FIFO ("stack" in the converter interfaces) holding
// signed 16-bit samples. push and pop may happen in the same cycle; a push
// when full or a pop when empty is ignored. dout shows the oldest entry
// combinationally from the storage array. DEPTH must be a power of two.
module sample_stack #(
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      push,
  input  codec_pkg::sample_t        din,
  input  logic                      pop,
  output codec_pkg::sample_t        dout,
  output logic                      empty,
  output logic                      full
);
  localparam int unsigned AW = $clog2(DEPTH);
  codec_pkg::sample_t mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   count;
  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd <= '0;
      wr <= '0;
      count <= '0;
    end else begin
      if (do_push) wr <= wr + 1'b1;
      if (do_pop)  rd <= rd + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wr] <= din;
endmodule
