// tb_mul_lane -- self-checking test of one multiplier lane.
//
// Drives random words a_t, word indices t and operands B into mul_lane at its
// default size (GF(2^131), 32-bit words), with the full word length and with
// the shortened last-word length of the multiplier adjuster. Checks the
// reduced partial product against (a_t * x^(tW) * B) mod f(x) from the
// reference package, and the latency nbits + (t*W + nbits - 1) cycles.
module tb_mul_lane;
  import gf_ref_pkg::*;

  localparam int M  = 131;
  localparam int W  = 32;
  localparam int NW = (M + W - 1) / W;
  localparam logic [M:0] F = (M+1)'(1) << M | (M+1)'('h10D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [$clog2(NW)-1:0] idx = '0;
  logic [W-1:0] aw = '0;
  logic [$clog2(W+1)-1:0] nb = '0;
  logic [M-1:0] b = '0, p;
  logic busy, done;

  mul_lane dut (.clk, .rst_n, .start, .word_idx(idx), .a_word(aw), .nbits(nb),
                .b, .busy, .done, .p);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int t, input logic [W-1:0] a_word, input int nbits,
                     input logic [M-1:0] bv);
    fe_t exp_v, aa;
    int cyc, exp_cyc;
    @(negedge clk);
    idx = ($clog2(NW))'(t); aw = a_word; nb = ($clog2(W+1))'(nbits); b = bv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    // only the scanned bits of the word take part
    aa = '0;
    for (int j = 0; j < nbits; j++) aa[t*W + j] = a_word[j];
    exp_v = gmul(aa, fe_t'(bv), fe_t'(F), M);
    exp_cyc = nbits + ((t*W + nbits - 1) > 0 ? (t*W + nbits - 1) : 0);
    checks += 2;
    if (p !== exp_v[M-1:0]) begin
      failures++;
      $display("FAIL value t=%0d nbits=%0d", t, nbits);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL latency t=%0d nbits=%0d got %0d exp %0d", t, nbits, cyc, exp_cyc);
    end
  endtask

  initial begin
    fe_t r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // edge cases: a_t = 1 (B shifted only), B = 1, all ones
    run(0, 32'h1, W, M'(1));
    run(NW-1, 32'h7, M % W, {M{1'b1}});
    run(2, 32'hFFFF_FFFF, W, {M{1'b1}});
    for (int n = 0; n < 60; n++) begin
      automatic int t = $urandom_range(NW-1, 0);
      automatic int nbits = (t == NW-1 && ($urandom & 1)) ? (M % W) : W;
      automatic logic [W-1:0] a_word = $urandom;
      if (t == NW-1 && nbits == W) a_word = a_word & W'((1 << (M % W)) - 1);
      r = rand_fe(M);
      run(t, a_word, nbits, r[M-1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
