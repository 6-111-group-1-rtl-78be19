// Checks the protection decoder: encoded words (reference fields) come back
// unchanged; bits flipped above the recorded leading ones of N1 and
// shift_val, or between N1's first and second one, are repaired; cleared
// leading ones are restored; valid_out is held until valid_read; latency 5.
module tb_ecc_decoder;
  import codec_pkg::*;
  import codec_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, valid_out, valid_read;
  ecc_word_t data_in;
  comp_word_t data_out;

  ecc_decoder dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [49:0] w, input logic [39:0] expect_w);
    int t;
    data_in = w;
    valid_in <= 1;
    do @(posedge clk); while (!ack_in);
    valid_in <= 0;
    t = 0;
    do begin @(posedge clk); t++; end while (!valid_out);
    check(t == 5, $sformatf("latency %0d", t));
    check(data_out == expect_w, $sformatf("out %h expected %h", data_out, expect_w));
    repeat ($urandom % 4) @(posedge clk);
    check(valid_out, "held until valid_read");
    valid_read <= 1;
    @(posedge clk);
    valid_read <= 0;
    @(posedge clk);
    check(!valid_out, "released by valid_read");
  endtask

  initial begin
    logic [39:0] w;
    logic [9:0] f;
    valid_in = 0; valid_read = 0; data_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      logic [15:0] n1, bad;
      logic [3:0] sv, badsv;
      int p1, p2, ps;
      w = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      if (i % 7 == 0) w[15:0] = 16'h0;
      if (i % 11 == 0) w[15:0] = 16'h0400;
      f = ecc_fields(w);
      run({f, w}, w);  // error-free word passes unchanged
      // Damage the protected region and expect the original back.
      n1 = w[15:0]; sv = w[19:16];
      p1 = f[9:6]; p2 = f[5:2]; ps = f[1:0];
      bad = n1; badsv = sv;
      if (p1 > 0 && p1 < 15) bad[p1 + 1 + ($urandom % (15 - p1))] = 1'b1;  // above first one
      if (p1 > 0) bad[p1] = 1'b0;                                         // lose first one
      if (p2 > 0 && p1 - p2 > 1) bad[p2 + 1] = 1'b1;                      // between the ones
      if (ps > 0 && ps < 3) badsv[3] = 1'b1;
      if (ps > 0) badsv[ps] = 1'b0;
      run({f, w[39:20], badsv, bad}, w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
