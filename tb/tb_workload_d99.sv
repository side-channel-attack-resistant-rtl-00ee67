// tb_workload_d99 -- the key sweep d = 1..99 over GF(2^131) on four lanes.
//
// Runs every scalar 1..99 (7-bit keys) in the three configurations compared
// in the evaluation: unprotected baseline (no dummies, no adjuster), dummies
// only, and dummies with the multiplier adjuster. Checks every result
// against the reference double-and-add, prints total cycles per
// configuration and the overhead relative to the baseline, and checks that
// dummies cost time and that the adjuster recovers some of it. The run
// time still grows with the number of one bits: the dummies make each point
// step look alike, they do not hide how many steps there are.
module tb_workload_d99;
  import gf_ref_pkg::*;

  localparam int M = 131;
  localparam int K = 7;
  localparam logic [M:0] F = (M+1)'(1) << M | (M+1)'('h10D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, adj_en = 0, dummy_en = 0;
  logic [K-1:0] d = '0;
  logic [M-1:0] px = '0, py = '0, ca = '0, cc = '0;
  logic busy, done, s_inf;
  logic [M-1:0] sx, sy, sz;
  logic [3:0] lane_busy;
  logic step_pd, step_pa, fop_fire, fop_mul, fop_dummy;

  ecc_mc_top #(.K_BITS(K)) dut (
    .clk, .rst_n, .start, .adj_en, .dummy_en, .d, .px, .py,
    .curve_a(ca), .curve_c(cc), .busy, .done, .sx, .sy, .sz, .s_inf, .lane_busy,
    .step_pd, .step_pa, .fop_fire, .fop_mul, .fop_dummy);

  int checks = 0, failures = 0, cyc = 0;
  always @(negedge clk) cyc++;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apoint_t pp, e, g;
    fe_t a, b, c;
    longint total [3];
    int t0, t, tmin, tmax;
    pp.x = rand_fe(M); pp.y = rand_fe(M); pp.inf = 1'b0;
    a = fe_t'(1);
    b = curve_b(pp.x, pp.y, a, fe_t'(F), M);
    c = groot4(b, fe_t'(F), M);
    px = pp.x[M-1:0]; py = pp.y[M-1:0]; ca = a[M-1:0]; cc = c[M-1:0];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 3; mode++) begin
      total[mode] = 0; tmin = 0; tmax = 0;
      for (int dv = 1; dv <= 99; dv++) begin
        @(negedge clk);
        d = K'(dv); dummy_en = (mode != 0); adj_en = (mode == 2);
        start = 1'b1; t0 = cyc;
        @(negedge clk); start = 1'b0;
        while (!done) @(negedge clk);
        t = cyc - t0;
        total[mode] += t;
        if (dv == 1 || t < tmin) tmin = t;
        if (t > tmax) tmax = t;
        e = pmul(fe_t'(dv), K, pp, a, fe_t'(F), M);
        g = to_affine(fe_t'(sx), fe_t'(sy), fe_t'(sz), fe_t'(F), M);
        g.inf = s_inf;
        checks++;
        if (g.inf !== e.inf || g.x !== e.x || g.y !== e.y) begin
          failures++; $display("FAIL d=%0d mode=%0d", dv, mode);
        end
      end
      $display("mode %0d (%s): %0d cycles for d=1..99, per key %0d..%0d", mode,
               mode == 0 ? "baseline" : mode == 1 ? "dummies" : "dummies+adjuster",
               total[mode], tmin, tmax);
    end
    $display("dummies cost %0d per mille over the baseline; adding the adjuster saves %0d per mille of the dummies-only time",
             (total[1] - total[0]) * 1000 / total[0], (total[1] - total[2]) * 1000 / total[1]);
    checks += 2;
    if (!(total[1] > total[0])) begin failures++; $display("FAIL dummies free"); end
    if (!(total[2] < total[1])) begin failures++; $display("FAIL adjuster no gain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
