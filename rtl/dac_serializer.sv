// Serializer for the AD5063 D/A converter.
//
// At a frame start (frame_tick) the next sample is stored behind eight
// configuration bits, which are all zero in the mode used here, and `load`
// pulses so the caller can advance to the next sample. sync goes high for
// the first sclk period of the frame to start the conversion; then the 24
// bits are shifted out on dout MSB first, one per sclk period: the index
// counts down from 23 to 0 and the serializer idles until the next frame.
// dout changes in the cycle after an sclk rising edge (sclk_tick), so it is
// stable at the following sclk falling edge, where the converter takes it.
// sync width and data edge are this design's own choices.
module dac_serializer #(
  parameter int unsigned CFG_BITS = 8,
  parameter int unsigned SAMPLE_W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                frame_tick,
  input  logic                sclk_tick,
  input  logic [SAMPLE_W-1:0] sample,
  output logic                load,
  output logic                sync,
  output logic                dout,
  output logic                busy
);
  localparam int unsigned NB = CFG_BITS + SAMPLE_W;
  logic [NB-1:0] shreg;
  logic [$clog2(NB+1)-1:0] idx;  // bits still to send

  assign load = frame_tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      idx <= '0;
      sync <= 1'b0;
      dout <= 1'b0;
      busy <= 1'b0;
    end else if (frame_tick) begin
      shreg <= {{CFG_BITS{1'b0}}, sample};
      idx <= ($clog2(NB+1))'(NB);
      sync <= 1'b1;
      busy <= 1'b1;
    end else if (sclk_tick && busy) begin
      sync <= 1'b0;
      if (idx != '0) begin
        dout <= shreg[NB-1];
        shreg <= {shreg[NB-2:0], 1'b0};
        idx <= idx - 1'b1;
      end else begin
        dout <= 1'b0;
        busy <= 1'b0;
      end
    end
  end
endmodule
