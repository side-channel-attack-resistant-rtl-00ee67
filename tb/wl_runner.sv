// wl_runner -- runs a small key set on one configuration of the multiplier.
//
// Instantiates ecc_mc_top for field size M, P lanes and reduction polynomial
// F, with 7-bit keys. On a random curve through a random point it runs the
// keys of KEYS in the three configurations (baseline, dummies, dummies +
// adjuster), checks each Jacobian result against the reference affine
// multiple (X = x*Z^2, Y = y*Z^3, so no inversion is needed), and checks
// that with the dummies on every point step takes the same number of
// cycles. It prints the total cycles per configuration, then raises fin.
// checks and failures are its running counts.
module wl_runner #(
  parameter int unsigned M = 131,
  parameter int unsigned P = 4,
  parameter logic [M:0]  F = (M+1)'(1) << M | (M+1)'('h10D)
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures
);
  import gf_ref_pkg::*;

  localparam int K = 7;
  localparam int NKEYS = 6;
  localparam int KEYS [NKEYS] = '{1, 7, 50, 64, 85, 99};

  logic start = 0, adj_en = 0, dummy_en = 0;
  logic [K-1:0] d = '0;
  logic [M-1:0] px = '0, py = '0, ca = '0, cc = '0;
  logic busy, done, s_inf;
  logic [M-1:0] sx, sy, sz;
  logic [P-1:0] lane_busy;
  logic step_pd, step_pa, fop_fire, fop_mul, fop_dummy;

  ecc_mc_top #(.M(M), .P(P), .K_BITS(K), .F_POLY(F)) dut (
    .clk, .rst_n, .start, .adj_en, .dummy_en, .d, .px, .py,
    .curve_a(ca), .curve_c(cc), .busy, .done, .sx, .sy, .sz, .s_inf, .lane_busy,
    .step_pd, .step_pa, .fop_fire, .fop_mul, .fop_dummy);

  int cyc = 0, last_step = -1, step_len = -1;
  bit uneven = 0;
  always @(negedge clk) begin
    cyc++;
    if (step_pd || step_pa) begin
      if (last_step >= 0) begin
        if (step_len < 0) step_len = cyc - last_step;
        else if (cyc - last_step != step_len) uneven = 1;
      end
      last_step = cyc;
    end
  end

  initial begin
    apoint_t pp, e;
    fe_t a, b, c, z2, fz;
    longint total [3];
    int t0;
    fin = 0; checks = 0; failures = 0;
    fz = fe_t'(F);
    pp.x = rand_fe(M); pp.y = rand_fe(M); pp.inf = 1'b0;
    a = fe_t'(1);
    b = curve_b(pp.x, pp.y, a, fz, M);
    c = groot4(b, fz, M);
    px = pp.x[M-1:0]; py = pp.y[M-1:0]; ca = a[M-1:0]; cc = c[M-1:0];
    for (int m = 0; m < 3; m++) total[m] = 0;
    @(posedge rst_n);
    for (int k = 0; k < NKEYS; k++) begin
      e = pmul(fe_t'(KEYS[k]), K, pp, a, fz, M);
      for (int mode = 0; mode < 3; mode++) begin
        @(negedge clk);
        d = K'(KEYS[k]); dummy_en = (mode != 0); adj_en = (mode == 2);
        start = 1'b1; t0 = cyc;
        last_step = -1; step_len = -1; uneven = 0;
        @(negedge clk); start = 1'b0;
        while (!done) @(negedge clk);
        total[mode] += cyc - t0;
        z2 = gmul(fe_t'(sz), fe_t'(sz), fz, M);
        checks++;
        if (s_inf || sz == '0 || fe_t'(sx) !== gmul(e.x, z2, fz, M) ||
            fe_t'(sy) !== gmul(e.y, gmul(z2, fe_t'(sz), fz, M), fz, M)) begin
          failures++; $display("FAIL GF(2^%0d) %0d lanes d=%0d mode %0d", M, P, KEYS[k], mode);
        end
        if (mode != 0) begin
          checks++;
          if (uneven) begin
            failures++; $display("FAIL GF(2^%0d) %0d lanes d=%0d: uneven point steps", M, P, KEYS[k]);
          end
        end
      end
    end
    $display("GF(2^%0d) %0d lanes, %0d keys: baseline %0d, dummies %0d (+%0d per mille), dummies+adjuster %0d (%0d per mille of baseline)",
             M, P, NKEYS, total[0], total[1], (total[1] - total[0]) * 1000 / total[0],
             total[2], total[2] * 1000 / total[0]);
    checks += 2;
    if (!(total[1] > total[0])) begin failures++; $display("FAIL dummies free"); end
    if (!(total[2] < total[1])) begin failures++; $display("FAIL adjuster no gain"); end
    fin = 1;
  end
endmodule
