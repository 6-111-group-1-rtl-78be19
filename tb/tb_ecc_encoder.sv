// Checks the protection encoder: the ten added bits equal the leading-one
// positions computed by the reference model (including N1 = 0, N1 with a
// single one, negative N1 and shift_val = 0), the 40 data bits pass
// unchanged, and the latency is 4 cycles from ack_in to valid_out.
module tb_ecc_encoder;
  import codec_pkg::*;
  import codec_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, valid_out, ack_out;
  comp_word_t data_in;
  ecc_word_t data_out;

  ecc_encoder dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [39:0] w);
    int t;
    data_in = w;
    valid_in <= 1;
    do @(posedge clk); while (!ack_in);
    valid_in <= 0;
    t = 0;
    do begin @(posedge clk); t++; end while (!valid_out);
    check(t == 4, $sformatf("latency %0d", t));
    check(data_out == {ecc_fields(w), w}, $sformatf("out %h for %h", data_out, w));
    ack_out <= 1;
    @(posedge clk);
    ack_out <= 0;
  endtask

  initial begin
    valid_in = 0; ack_out = 0; data_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(40'h0);
    run(40'h00_0001_1101);
    run(40'h12_3450_1000);
    run(40'hFF_FFF8_8000);
    run(40'hAB_CDE0_0003);
    for (int i = 0; i < 300; i++) run({$urandom, $urandom} & 40'hFF_FFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
