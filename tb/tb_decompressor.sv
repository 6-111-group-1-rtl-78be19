// Checks the decompressor against the reference model on compressed words
// made by the reference compressor and on random 40-bit words, the 7-cycle
// latency, and that a chunk whose differences fit the codes is recovered
// exactly (the -314 example).
module tb_decompressor;
  import codec_pkg::*;
  import codec_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid_in, ack_in, valid_out, ack_out;
  comp_word_t data_in;
  chunk_t samples;

  decompressor dut (.*);

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

  task automatic run(input logic [39:0] w, output shortint got [5]);
    shortint e [5];
    int t;
    decompress(w, e);
    data_in = w;
    valid_in <= 1;
    do @(posedge clk); while (!ack_in);
    valid_in <= 0;
    t = 0;
    do begin @(posedge clk); t++; end while (!valid_out);
    check(t == 7, $sformatf("latency %0d", t));
    for (int k = 0; k < 5; k++) begin
      got[k] = samples[k];
      check(samples[k] == e[k], $sformatf("N%0d=%0d expected %0d (word %h)", k + 1, samples[k], e[k], w));
    end
    ack_out <= 1;
    @(posedge clk);
    ack_out <= 0;
  endtask

  initial begin
    shortint n [5], g [5];
    valid_in = 0; ack_out = 0; data_in = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    n = '{100, 108, 116, -314, -310};
    run(compress(n), g);
    // Differences 8, 8, -430, 4 share shift_val 8 (step 32). Because each
    // code is chosen against the reconstruction, N4 lands within half a
    // step of -314 even though N2 and N3 were off.
    check(g[3] >= -330 && g[3] <= -298, $sformatf("N4=%0d not within 16 of -314", g[3]));
    n = '{-200, -200, -200, -200, -200};
    run(compress(n), g);
    check(g == n, "flat chunk exact");
    for (int i = 0; i < 300; i++) run({$urandom, $urandom} & 40'hFF_FFFF_FFFF, g);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
