// tb_ecc_full -- full-size run of the scalar multiplier.
//
// ecc_mc_top with every parameter at its default: GF(2^131), 32-bit words,
// four lanes, 131-bit scalar, adjuster and dummies on. One random point on a
// random curve and one random 131-bit scalar (top bit set, so all 130
// doublings run); the result is checked against the reference double-and-add
// and the number of point doublings and additions against the key. Prints
// the cycle count of the whole multiplication.
module tb_ecc_full;
  import gf_ref_pkg::*;

  localparam int M = 131;
  localparam logic [M:0] F = (M+1)'(1) << M | (M+1)'('h10D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [M-1:0] d = '0, px = '0, py = '0, ca = '0, cc = '0;
  logic busy, done, s_inf;
  logic [M-1:0] sx, sy, sz;
  logic [3:0] lane_busy;
  logic step_pd, step_pa, fop_fire, fop_mul, fop_dummy;

  ecc_mc_top dut (
    .clk, .rst_n, .start, .adj_en(1'b1), .dummy_en(1'b1), .d, .px, .py,
    .curve_a(ca), .curve_c(cc), .busy, .done, .sx, .sy, .sz, .s_inf, .lane_busy,
    .step_pd, .step_pa, .fop_fire, .fop_mul, .fop_dummy);

  int checks = 0, failures = 0, cyc = 0, n_pd = 0, n_pa = 0;
  always @(negedge clk) begin
    cyc++;
    if (step_pd) n_pd++;
    if (step_pa) n_pa++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apoint_t pp, e, g;
    fe_t a, b, c;
    int t0, ones;
    pp.x = rand_fe(M); pp.y = rand_fe(M); pp.inf = 1'b0;
    a = fe_t'(1);
    b = rand_fe(M);
    d = b[M-1:0];
    b = curve_b(pp.x, pp.y, a, fe_t'(F), M);
    c = groot4(b, fe_t'(F), M);
    d[M-1] = 1'b1;
    ones = $countones(d);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    px = pp.x[M-1:0]; py = pp.y[M-1:0]; ca = a[M-1:0]; cc = c[M-1:0];
    start = 1'b1; t0 = cyc;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    $display("131-bit scalar multiplication: %0d cycles, %0d doublings, %0d additions",
             cyc - t0, n_pd, n_pa);
    e = pmul(fe_t'(d), M, pp, a, fe_t'(F), M);
    g = to_affine(fe_t'(sx), fe_t'(sy), fe_t'(sz), fe_t'(F), M);
    g.inf = s_inf;
    checks++;
    if (g.inf !== e.inf || g.x !== e.x || g.y !== e.y) begin
      failures++; $display("FAIL result");
    end
    checks++;
    if (n_pd != M - 1 || n_pa != ones - 1) begin
      failures++; $display("FAIL step counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
