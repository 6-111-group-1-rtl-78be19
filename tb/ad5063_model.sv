// Behavioural model of the AD5063 serial input, for simulation only.
// A rising edge of sync starts a frame; the following 24 sclk falling edges
// (with sync low) shift din in MSB first. After the 24th bit `word` holds
// the eight configuration bits and the 16-bit sample and `count` increments.
module ad5063_model (
  input  logic        sclk,
  input  logic        sync,
  input  logic        din,
  output logic [23:0] word,
  output int          count
);
  logic [23:0] sh = '0;
  int nb = 24;
  initial begin
    word = '0;
    count = 0;
  end
  always @(posedge sync) nb = 0;
  always @(negedge sclk) if (!sync && nb < 24) begin
    sh = {sh[22:0], din};
    nb++;
    if (nb == 24) begin
      word = sh;
      count++;
    end
  end
endmodule
