// tb_ecc_mc_top -- end-to-end test of the scalar multiplier.
//
// GF(2^131), 32-bit words, 4 lanes (the defaults) with 8-bit scalars to keep
// the run short. For random curves through a random point P, computes d*P
// for corner and random d in all four modes (adjuster on/off x dummies
// on/off) and checks the Jacobian result, converted to affine, against the
// reference right-to-left double-and-add. It counts how often each mechanism
// of the design happened and fails any that never did: point doubling, point
// addition, dummy operations, idle lanes beside a busy lane, a shortened
// (adjusted) last-word round, start from the point at infinity, a result at
// infinity and both mode switches. With the dummies on it checks that every
// point step takes the same number of cycles, and that the adjuster and
// the dummies change the run time in the expected direction.
module tb_ecc_mc_top;
  import gf_ref_pkg::*;

  localparam int M = 131;
  localparam int K = 8;
  localparam logic [M:0] F = (M+1)'(1) << M | (M+1)'('h10D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, adj_en = 1, dummy_en = 1;
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

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pd = 0, n_pa = 0, n_dummy = 0, n_idle = 0, n_adjround = 0, n_inf_start = 0,
      n_inf_result = 0, n_mode_dummy_off = 0, n_mode_adj_off = 0;

  // step timing
  int cyc = 0, last_step = -1, step_len = -1;
  bit step_uneven;
  always @(negedge clk) begin
    cyc++;
    if (step_pd) n_pd++;
    if (step_pa) n_pa++;
    if (fop_dummy) n_dummy++;
    if (lane_busy[0] && lane_busy != 4'hF) n_idle++;
    // only lane 0 busy for a few cycles: the 3-bit last word with the adjuster
    if (step_pd || step_pa) begin
      if (last_step >= 0) begin
        if (step_len < 0) step_len = cyc - last_step;
        else if (cyc - last_step != step_len) step_uneven = 1;
      end
      last_step = cyc;
    end
  end
  // an adjusted round: lane 0 busy alone on the 3-bit last word, which is
  // shorter than the 191 cycles a full 32-bit last word would take
  int solo = 0;
  always @(negedge clk)
    if (lane_busy == 4'b0001) solo++;
    else begin
      if (solo > 0 && solo < 150) n_adjround++;
      solo = 0;
    end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  apoint_t pp;
  fe_t a, c;

  task automatic new_curve();
    fe_t b;
    pp.x = rand_fe(M); pp.y = rand_fe(M); pp.inf = 1'b0;
    a = rand_fe(M) & fe_t'(3);            // a in {0,1,x,x+1}
    b = curve_b(pp.x, pp.y, a, fe_t'(F), M);
    c = groot4(b, fe_t'(F), M);
  endtask

  task automatic run(input logic [K-1:0] dv, input bit adj, input bit dm, output int t);
    apoint_t e, g;
    int t0;
    @(negedge clk);
    d = dv; px = pp.x[M-1:0]; py = pp.y[M-1:0]; ca = a[M-1:0]; cc = c[M-1:0];
    adj_en = adj; dummy_en = dm; start = 1;
    last_step = -1; step_len = -1; step_uneven = 0;
    t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t = cyc - t0;
    if (!dv[K-1]) n_inf_start++;
    if (!dm) n_mode_dummy_off++;
    if (!adj) n_mode_adj_off++;
    e = pmul(fe_t'(dv), K, pp, a, fe_t'(F), M);
    g = to_affine(fe_t'(sx), fe_t'(sy), fe_t'(sz), fe_t'(F), M);
    if (s_inf) begin g.inf = 1'b1; g.x = '0; g.y = '0; n_inf_result++; end
    checks++;
    if (g.inf !== e.inf || g.x !== e.x || g.y !== e.y) begin
      failures++; $display("FAIL d=%0d adj=%0b dummy=%0b", dv, adj, dm);
    end
    if (dm) begin
      checks++;
      if (step_uneven) begin failures++; $display("FAIL uneven point steps d=%0d", dv); end
    end
  endtask

  initial begin
    int t11, t01, t10, t00, t;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    new_curve();
    run(8'd0, 1, 1, t);
    run(8'd1, 1, 1, t);
    run(8'd99, 1, 1, t11);
    run(8'd99, 0, 1, t01);
    run(8'd99, 1, 0, t10);
    run(8'd99, 0, 0, t00);
    run(8'd255, 1, 1, t);
    run(8'd128, 1, 1, t);
    for (int n = 0; n < 3; n++) begin
      new_curve();
      run(8'($urandom), 1, 1, t);
      run(8'($urandom), n[0], !n[0], t);
    end
    $display("d=99 cycles: adjuster+dummies %0d, dummies only %0d, adjuster only %0d, neither %0d",
             t11, t01, t10, t00);
    checks += 2;
    if (!(t11 < t01 && t10 < t00)) begin failures++; $display("FAIL adjuster not faster"); end
    if (!(t10 < t11 && t00 < t01)) begin failures++; $display("FAIL dummies free"); end
    $display("mechanisms: PD %0d PA %0d dummy-ops %0d idle-lane-cycles %0d adjusted-rounds %0d inf-start %0d inf-result %0d dummy-off-runs %0d adj-off-runs %0d",
             n_pd, n_pa, n_dummy, n_idle, n_adjround, n_inf_start, n_inf_result,
             n_mode_dummy_off, n_mode_adj_off);
    checks += 9;
    if (n_pd == 0)             begin failures++; $display("FAIL no doubling"); end
    if (n_pa == 0)             begin failures++; $display("FAIL no addition"); end
    if (n_dummy == 0)          begin failures++; $display("FAIL no dummy op"); end
    if (n_idle == 0)           begin failures++; $display("FAIL no idle lane"); end
    if (n_adjround == 0)       begin failures++; $display("FAIL no adjusted round"); end
    if (n_inf_start == 0)      begin failures++; $display("FAIL no start at infinity"); end
    if (n_inf_result == 0)     begin failures++; $display("FAIL no result at infinity"); end
    if (n_mode_dummy_off == 0) begin failures++; $display("FAIL no dummy-off run"); end
    if (n_mode_adj_off == 0)   begin failures++; $display("FAIL no adjuster-off run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
