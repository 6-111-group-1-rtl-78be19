// Behavioural model of the AD7656 serial interface, for simulation only.
// On a convst rising edge it takes `value` as the converted sample. When
// cs_n falls it puts the first bit on sdata; each bit is valid at an sclk
// rising edge and is replaced at the sclk falling edge that follows that
// rising edge, MSB first. Only one channel is fitted: the first
// 16 bits are zero and the sample follows in the next 16.
module ad7656_model (
  input  logic        convst,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic [15:0] value,
  output logic        sdata
);
  logic [15:0] held = '0;
  logic [31:0] sh = '0;
  initial sdata = 1'b0;
  always @(posedge convst) held = value;
  logic seen_rise = 1'b0;
  always @(negedge cs_n) begin
    sh = {16'b0, held};
    sdata = sh[31];
    seen_rise = 1'b0;
  end
  always @(posedge sclk) if (!cs_n) seen_rise = 1'b1;
  always @(negedge sclk) if (!cs_n && seen_rise) begin
    sh = {sh[30:0], 1'b0};
    sdata = sh[31];
    seen_rise = 1'b0;
  end
endmodule
