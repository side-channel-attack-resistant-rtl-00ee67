// tb_gf_mul -- self-checking test of the word-parallel field multiplier.
//
// Four instances: the default GF(2^131) with 32-bit words on 4 lanes, and
// GF(2^163) on 2 lanes, GF(2^233) on 8 lanes and GF(2^193) on 1 lane. Random
// and corner operands are multiplied with the multiplier adjuster on and off;
// each product is checked against the reference multiplication, and the
// cycle count against sum over rounds of (2 + longest lane latency). The
// test also checks that lanes without a word stay idle, and that the
// adjuster makes the default multiplier faster.
module tb_gf_mul;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int idle_lane_cycles = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected latency from the edge that samples start to done
  function automatic int exp_cycles(input int m, input int w, input int p, input bit adj);
    int nw = (m + w - 1) / w;
    int nr = (nw + p - 1) / p;
    int lastb = (m % w == 0) ? w : m % w;
    int tot = 0;
    for (int r = 0; r < nr; r++) begin
      int mx = 0;
      for (int k = 0; k < p; k++) begin
        int t = r * p + k;
        int nb, l;
        if (t >= nw) continue;
        nb = (adj && t == nw - 1) ? lastb : w;
        l = nb + ((t * w + nb - 1) > 0 ? t * w + nb - 1 : 0);
        if (l > mx) mx = l;
      end
      tot += 2 + mx;
    end
    return tot;
  endfunction

  // ---------------- default instance: GF(2^131), W=32, P=4 ----------------
  localparam logic [131:0] F131 = 132'(1) << 131 | 132'h10D;
  logic s0 = 0, a0 = 1, bz0, d0;
  logic [130:0] x0 = '0, y0 = '0, c0;
  logic [3:0] lb0;
  gf_mul dut0 (.clk, .rst_n, .start(s0), .adj_en(a0), .a(x0), .b(y0),
               .busy(bz0), .done(d0), .c(c0), .lane_busy(lb0));

  // other sizes
  localparam logic [163:0] F163 = 164'(1) << 163 | 164'hC9;      // x^163+x^7+x^6+x^3+1
  localparam logic [233:0] F233 = 234'(1) << 233 | 234'(1) << 74 | 234'h1;
  localparam logic [193:0] F193 = 194'(1) << 193 | 194'(1) << 15 | 194'h1;
  logic s1 = 0, a1 = 1, bz1, d1; logic [162:0] x1 = '0, y1 = '0, c1; logic [1:0] lb1;
  logic s2 = 0, a2 = 1, bz2, d2; logic [232:0] x2 = '0, y2 = '0, c2; logic [7:0] lb2;
  logic s3 = 0, a3 = 1, bz3, d3; logic [192:0] x3 = '0, y3 = '0, c3; logic [0:0] lb3;
  gf_mul #(.M(163), .W(32), .P(2), .F_POLY(F163)) dut1 (.clk, .rst_n, .start(s1), .adj_en(a1),
           .a(x1), .b(y1), .busy(bz1), .done(d1), .c(c1), .lane_busy(lb1));
  gf_mul #(.M(233), .W(32), .P(8), .F_POLY(F233)) dut2 (.clk, .rst_n, .start(s2), .adj_en(a2),
           .a(x2), .b(y2), .busy(bz2), .done(d2), .c(c2), .lane_busy(lb2));
  gf_mul #(.M(193), .W(32), .P(1), .F_POLY(F193)) dut3 (.clk, .rst_n, .start(s3), .adj_en(a3),
           .a(x3), .b(y3), .busy(bz3), .done(d3), .c(c3), .lane_busy(lb3));

  // In the second round of the default multiplier only lane 0 has a word.
  always @(negedge clk) if (bz0 && lb0[0] && !lb0[1] && !lb0[3]) idle_lane_cycles++;

  task automatic check(input string nm, input fe_t got, input fe_t exp_v,
                       input int cyc, input int exp_cyc);
    checks += 2;
    if (got !== exp_v) begin failures++; $display("FAIL %s value", nm); end
    if (cyc != exp_cyc) begin
      failures++; $display("FAIL %s cycles got %0d exp %0d", nm, cyc, exp_cyc);
    end
  endtask

  int cyc_adj0, cyc_adj1;

  task automatic t131(input fe_t a, input fe_t b, input bit adj);
    int cyc = 0;
    @(negedge clk); x0 = a[130:0]; y0 = b[130:0]; a0 = adj; s0 = 1;
    @(negedge clk); s0 = 0;
    while (!d0) begin @(negedge clk); cyc++; end
    check("gf131", fe_t'(c0), gmul(a, b, fe_t'(F131), 131), cyc, exp_cycles(131, 32, 4, adj));
    if (adj) cyc_adj1 = cyc; else cyc_adj0 = cyc;
  endtask
  task automatic t163(input fe_t a, input fe_t b, input bit adj);
    int cyc = 0;
    @(negedge clk); x1 = a[162:0]; y1 = b[162:0]; a1 = adj; s1 = 1;
    @(negedge clk); s1 = 0;
    while (!d1) begin @(negedge clk); cyc++; end
    check("gf163", fe_t'(c1), gmul(a, b, fe_t'(F163), 163), cyc, exp_cycles(163, 32, 2, adj));
  endtask
  task automatic t233(input fe_t a, input fe_t b, input bit adj);
    int cyc = 0;
    @(negedge clk); x2 = a[232:0]; y2 = b[232:0]; a2 = adj; s2 = 1;
    @(negedge clk); s2 = 0;
    while (!d2) begin @(negedge clk); cyc++; end
    check("gf233", fe_t'(c2), gmul(a, b, fe_t'(F233), 233), cyc, exp_cycles(233, 32, 8, adj));
  endtask
  task automatic t193(input fe_t a, input fe_t b, input bit adj);
    int cyc = 0;
    @(negedge clk); x3 = a[192:0]; y3 = b[192:0]; a3 = adj; s3 = 1;
    @(negedge clk); s3 = 0;
    while (!d3) begin @(negedge clk); cyc++; end
    check("gf193", fe_t'(c3), gmul(a, b, fe_t'(F193), 193), cyc, exp_cycles(193, 32, 1, adj));
  endtask

  initial begin
    fe_t ones;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    ones = '0;
    for (int i = 0; i < 131; i++) ones[i] = 1'b1;
    t131(fe_t'(1), ones, 1'b1);
    t131(ones, ones, 1'b0);
    t131(fe_t'(1) << 130, fe_t'(1) << 130, 1'b1);   // x^260 reduced
    for (int n = 0; n < 12; n++) begin
      t131(rand_fe(131), rand_fe(131), n[0]);
      t163(rand_fe(163), rand_fe(163), n[0]);
      t233(rand_fe(233), rand_fe(233), n[0]);
      if (n < 4) t193(rand_fe(193), rand_fe(193), n[0]);
    end
    // the adjuster shortens the last round: 3-bit instead of 32-bit scan
    checks++;
    if (!(cyc_adj1 < cyc_adj0)) begin
      failures++; $display("FAIL adjuster gives no speed-up %0d vs %0d", cyc_adj1, cyc_adj0);
    end
    checks++;
    if (idle_lane_cycles == 0) begin failures++; $display("FAIL never saw idle lanes"); end
    $display("gf131 quad-core cycles: adjuster on %0d, off %0d; idle-lane cycles %0d",
             cyc_adj1, cyc_adj0, idle_lane_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
