// Sample-rate and serial-clock generator for the converter interfaces.
//
// The 27 MHz system clock is divided by SCLK_DIV (5) to give the 5.4 MHz
// serial clock sclk, and by FRAME_DIV (300) to give the 90 kHz conversion
// frame, i.e. 60 sclk periods per sample as in the design description.
// convst rises at the start of each frame and stays high for the first half.
// sclk is high for the first two of every five clock cycles (own choice).
// sclk_tick / frame_tick are one-cycle pulses in the cycle where sclk /
// convst rise; downstream logic uses them as clock enables, so everything
// stays in the single 27 MHz domain. sclk_index counts sclk periods within
// the frame. All outputs are registered; reset starts a new frame.
module sample_clock_divider #(
  parameter int unsigned FRAME_DIV = 300,
  parameter int unsigned SCLK_DIV  = 5
) (
  input  logic       clk,
  input  logic       rst,
  output logic       sclk,
  output logic       sclk_tick,
  output logic       convst,
  output logic       frame_tick,
  output logic [7:0] sclk_index
);
  localparam int unsigned SCLK_PER_FRAME = FRAME_DIV / SCLK_DIV;

  logic [$clog2(SCLK_DIV)-1:0]       sdiv;
  logic [$clog2(SCLK_PER_FRAME)-1:0] scnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sdiv <= '0;
      scnt <= '0;
      sclk <= 1'b0;
      sclk_tick <= 1'b0;
      convst <= 1'b0;
      frame_tick <= 1'b0;
      sclk_index <= '0;
    end else begin
      sclk_tick  <= (sdiv == '0);
      frame_tick <= (sdiv == '0) && (scnt == '0);
      sclk       <= (int'(sdiv) < 2);
      convst     <= (int'(scnt) < SCLK_PER_FRAME / 2);
      sclk_index <= 8'(scnt);
      if (int'(sdiv) == SCLK_DIV - 1) begin
        sdiv <= '0;
        scnt <= (int'(scnt) == SCLK_PER_FRAME - 1) ? '0 : scnt + 1'b1;
      end else begin
        sdiv <= sdiv + 1'b1;
      end
    end
  end
endmodule
