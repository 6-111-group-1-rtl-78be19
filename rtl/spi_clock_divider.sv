// Radio-side clock: the 27 MHz clock divided by 2^DIV_BITS with a registered
// counter whose MSB is the output (27/4 = 6.75 MHz at DIV_BITS = 2, below
// the 10 MHz limit of the radio's serial port). It has its own reset so the
// radio clock keeps running independently of the logic it clocks.
module spi_clock_divider #(
  parameter int unsigned DIV_BITS = 2
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out
);
  logic [DIV_BITS-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end
  assign clk_out = cnt[DIV_BITS-1];
endmodule
