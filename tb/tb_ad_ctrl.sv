// tb_ad_ctrl -- self-checking test of the add-and-double controller.
//
// The point sequencer and register file are replaced by a small model that
// tracks S as the integer k of S = kP (0 standing for the point at infinity):
// PD sets N = 2k, PA sets N = k + 1, COMMIT sets k = N, LOADP sets k = 1, and
// the model answers after a random delay. For random and corner scalars d the
// controller must end with k = d read back through port C, flag infinity
// exactly when d = 0, issue one doubling per key bit below the MSB and one
// addition per further set bit, and load P, a, c and 1 into their registers.
module tb_ad_ctrl;
  import ecc_pkg::*;

  localparam int M = 131;
  localparam int K = 131;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, inf;
  logic [K-1:0] d = '0;
  logic [M-1:0] px = '0, py = '0, ca = '0, cc = '0, sx, sy, sz;
  logic seq_start, seq_done = 0;
  prog_e seq_prog;
  logic rf_we; reg_idx_t rf_wa, rf_rc; logic [M-1:0] rf_wd, rf_rdc;
  logic step_pd, step_pa;

  ad_ctrl dut (.clk, .rst_n, .start, .d, .px, .py, .ca, .cc, .busy, .done,
               .sx, .sy, .sz, .inf, .seq_start, .seq_prog, .seq_done,
               .rf_we, .rf_wa, .rf_wd, .rf_rc, .rf_rdc, .step_pd, .step_pa);

  // model state
  logic [M-1:0] regs [32];
  logic [K-1:0] sk, nk;
  int n_pd, n_pa;
  int checks = 0, failures = 0;

  // read port C: SX holds k, SY holds k+7, SZ holds 1 while S is a point
  always_comb begin
    if (rf_rc == R_SX)      rf_rdc = M'(sk);
    else if (rf_rc == R_SY) rf_rdc = M'(sk) + M'(7);
    else                    rf_rdc = (sk == '0) ? '0 : M'(1);
  end

  always @(posedge clk) if (rf_we) regs[rf_wa] <= rf_wd;

  // sequencer model
  initial begin
    forever begin
      @(negedge clk);
      seq_done = 0;
      if (seq_start) begin
        automatic prog_e p = seq_prog;
        if (p == PRG_PD) n_pd++;
        if (p == PRG_PA) n_pa++;
        repeat ($urandom_range(4, 1)) @(posedge clk);
        unique case (p)
          PRG_PD:     nk = sk << 1;
          PRG_PA:     nk = sk + 1'b1;
          PRG_COMMIT: sk = nk;
          default:    sk = K'(1);
        endcase
        @(negedge clk); seq_done = 1;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic run(input logic [K-1:0] dv);
    int top, ones;
    sk = '0; nk = '0; n_pd = 0; n_pa = 0;
    @(negedge clk);
    d = dv; px = rnd(); py = rnd(); ca = rnd(); cc = rnd(); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    // expected numbers of point operations
    top = -1; ones = 0;
    for (int i = 0; i < K; i++) if (dv[i]) begin top = i; ones++; end
    checks += 4;
    if (sx !== M'(dv)) begin failures++; $display("FAIL result k for d=%0h", dv); end
    if (dv != '0 && (sy !== M'(dv) + M'(7) || sz !== M'(1))) begin
      failures++; $display("FAIL result y/z");
    end
    if (inf !== (dv == '0)) begin failures++; $display("FAIL inf flag"); end
    if (n_pd != K - 1 || n_pa != ((ones > 0 && dv[K-1]) ? ones - 1 : ones)) begin
      failures++; $display("FAIL counts pd %0d pa %0d", n_pd, n_pa);
    end
    checks++;
    if (regs[R_PX] !== px || regs[R_PY] !== py || regs[R_CA] !== ca ||
        regs[R_CC] !== cc || regs[R_ONE] !== M'(1)) begin
      failures++; $display("FAIL operand load");
    end
  endtask

  initial begin
    logic [K-1:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run('0);
    run(K'(1));
    run(K'(99));
    run({1'b1, {(K-1){1'b0}}});
    run({K{1'b1}});
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < K; i += 32) r[i +: 32] = $urandom;
      run(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
