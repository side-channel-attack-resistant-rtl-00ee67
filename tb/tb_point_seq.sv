// tb_point_seq -- self-checking test of the point-operation sequencer.
//
// point_seq runs over a real fe_regfile and gf_mul at the default size
// (GF(2^131), 4 lanes). For random curves y^2 + xy = x^3 + a x^2 + b through a
// random point P, with S = kP held in Jacobian form with a random Z, the test
// runs the doubling and the addition programs and checks the new point,
// converted to affine, against the reference affine doubling and addition.
// It also checks the operation counts (14 MUL + 7 ADD each with dummies;
// doubling 12 MUL + 4 ADD without), that doubling and addition take the same
// number of cycles when the dummies are on, and the commit and load-P copies.
module tb_point_seq;
  import gf_ref_pkg::*;
  import ecc_pkg::*;

  localparam int M = 131;
  localparam logic [M:0] F = (M+1)'(1) << M | (M+1)'('h10D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, dummy_en = 1, busy, done;
  prog_e prog = PRG_PD;
  reg_idx_t ra, rb, wa, rc = R_SX;
  logic we;
  logic [M-1:0] rda, rdb, rdc, wd;
  logic mul_start, mul_done;
  logic [M-1:0] mul_c;
  logic op_fire, op_mul, op_dummy;

  // testbench preload port
  logic tb_we = 0; reg_idx_t tb_wa = R_PX; logic [M-1:0] tb_wd = '0;

  point_seq dut (.clk, .rst_n, .start, .prog, .dummy_en, .busy, .done,
                 .ra, .rb, .rdata_a(rda), .rdata_b(rdb), .we, .wa, .wd,
                 .mul_start, .mul_done, .mul_c,
                 .op_fire, .op_mul, .op_dummy);
  fe_regfile u_rf (.clk, .rst_n, .we(we | tb_we), .waddr(tb_we ? tb_wa : wa),
                   .wdata(tb_we ? tb_wd : wd), .raddr_a(ra), .raddr_b(rb), .raddr_c(rc),
                   .rdata_a(rda), .rdata_b(rdb), .rdata_c(rdc));
  gf_mul u_mul (.clk, .rst_n, .start(mul_start), .adj_en(1'b1), .a(rda), .b(rdb),
                .busy(), .done(mul_done), .c(mul_c), .lane_busy());

  int checks = 0, failures = 0;
  int n_mul, n_add, n_dum;

  always @(negedge clk) if (op_fire) begin
    if (op_mul) n_mul++; else n_add++;
    if (op_dummy) n_dum++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input reg_idx_t a, input fe_t v);
    @(negedge clk); tb_we = 1; tb_wa = a; tb_wd = v[M-1:0];
    @(negedge clk); tb_we = 0;
  endtask

  function automatic fe_t rd(input reg_idx_t a);
    return fe_t'(u_rf.mem[a]);
  endfunction

  task automatic run(input prog_e p, input bit dm, output int cyc);
    n_mul = 0; n_add = 0; n_dum = 0; cyc = 0;
    @(negedge clk); prog = p; dummy_en = dm; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic expect_cnt(input string nm, input int em, input int ea, input int ed);
    checks++;
    if (n_mul != em || n_add != ea || n_dum != ed) begin
      failures++;
      $display("FAIL %s counts mul %0d add %0d dummy %0d", nm, n_mul, n_add, n_dum);
    end
  endtask

  task automatic expect_pt(input string nm, input apoint_t e);
    apoint_t g = to_affine(rd(R_NX), rd(R_NY), rd(R_NZ), fe_t'(F), M);
    checks++;
    if (g.inf !== e.inf || g.x !== e.x || g.y !== e.y) begin
      failures++; $display("FAIL %s point", nm);
    end
  endtask

  initial begin
    fe_t a, b, c, z, z2;
    apoint_t pp, s;
    int cyc_pd, cyc_pa, cyc_pd0, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3; n++) begin
      pp.x = rand_fe(M); pp.y = rand_fe(M); pp.inf = 1'b0;
      a = (n == 0) ? fe_t'(1) : rand_fe(M);
      b = curve_b(pp.x, pp.y, a, fe_t'(F), M);
      c = groot4(b, fe_t'(F), M);
      s = pmul(fe_t'(n + 2), 3, pp, a, fe_t'(F), M);    // S = (n+2)P
      z = rand_fe(M); z2 = gsqr(z, fe_t'(F), M);
      wr(R_PX, pp.x); wr(R_PY, pp.y); wr(R_ONE, fe_t'(1)); wr(R_CA, a); wr(R_CC, c);
      wr(R_SX, gmul(s.x, z2, fe_t'(F), M));
      wr(R_SY, gmul(s.y, gmul(z2, z, fe_t'(F), M), fe_t'(F), M));
      wr(R_SZ, z);
      // doubling, dummies on
      run(PRG_PD, 1'b1, cyc_pd);
      expect_cnt("PD", 14, 7, 5);
      expect_pt("PD", pdbl(s, a, fe_t'(F), M));
      // doubling, dummies off (same S still in place)
      run(PRG_PD, 1'b0, cyc_pd0);
      expect_cnt("PD-nodummy", 12, 4, 0);
      expect_pt("PD-nodummy", pdbl(s, a, fe_t'(F), M));
      // addition S + P
      run(PRG_PA, 1'b1, cyc_pa);
      expect_cnt("PA", 14, 7, 0);
      expect_pt("PA", padd(s, pp, a, fe_t'(F), M));
      checks += 2;
      if (cyc_pd != cyc_pa) begin
        failures++; $display("FAIL PD %0d and PA %0d cycles differ", cyc_pd, cyc_pa);
      end
      if (!(cyc_pd0 < cyc_pd)) begin failures++; $display("FAIL dummies cost nothing"); end
      $display("cycles: PD %0d, PA %0d, PD without dummies %0d", cyc_pd, cyc_pa, cyc_pd0);
      // commit and load-P
      run(PRG_COMMIT, 1'b1, cyc);
      checks++;
      if (rd(R_SX) != rd(R_NX) || rd(R_SY) != rd(R_NY) || rd(R_SZ) != rd(R_NZ)) begin
        failures++; $display("FAIL commit");
      end
      run(PRG_LOADP, 1'b1, cyc);
      checks++;
      if (rd(R_SX) != pp.x || rd(R_SY) != pp.y || rd(R_SZ) != fe_t'(1)) begin
        failures++; $display("FAIL loadp");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
