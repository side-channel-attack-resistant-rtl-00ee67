// gfm_runner -- exercises one size of the parallel field multiplier.
//
// Instantiates gf_mul for field size M, P lanes and reduction polynomial F,
// and multiplies random operands (plus 1*1 and all-ones*all-ones) with the
// adjuster off and on. Each product is compared with the reference
// multiplication, and the latency (from the edge that samples start to done)
// with the round formula: the sum over rounds of 2 plus the latency
// n + (t*W + n - 1) of the slowest lane, n = bits scanned, t = word index.
// From lane_busy it counts how many times each lane is started per product:
// the most is the number of rounds, and the lanes started once less are the
// lanes idle in the last round. Both are compared with the expected values
// given as EXP_ROUNDS and EXP_IDLE. Raises fin when done; checks and
// failures are its running counts.
module gfm_runner #(
  parameter int unsigned M          = 131,
  parameter int unsigned P          = 4,
  parameter logic [M:0]  F          = (M+1)'(1) << M | (M+1)'('h10D),
  parameter int unsigned EXP_ROUNDS = 2,
  parameter int unsigned EXP_IDLE   = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures
);
  import gf_ref_pkg::*;

  localparam int W = 32;

  logic start = 0, adj_en = 0, busy, done;
  logic [M-1:0] a = '0, b = '0, c;
  logic [P-1:0] lane_busy, lb_q = '0;
  int starts [P];

  gf_mul #(.M(M), .W(W), .P(P), .F_POLY(F)) dut (
    .clk, .rst_n, .start, .adj_en, .a, .b, .busy, .done, .c, .lane_busy);

  always @(negedge clk) begin
    for (int k = 0; k < P; k++)
      if (lane_busy[k] && !lb_q[k]) starts[k]++;
    lb_q <= lane_busy;
  end

  function automatic int exp_cycles(input bit adj);
    int nw = (M + W - 1) / W;
    int nr = (nw + P - 1) / P;
    int lastb = (M % W == 0) ? W : M % W;
    int tot = 0;
    for (int r = 0; r < nr; r++) begin
      int mx = 0;
      for (int k = 0; k < P; k++) begin
        int t = r * P + k;
        int nb, l;
        if (t >= nw) continue;
        nb = (adj && t == nw - 1) ? lastb : W;
        l = nb + t * W + nb - 1;
        if (l > mx) mx = l;
      end
      tot += 2 + mx;
    end
    return tot;
  endfunction

  initial begin
    fe_t x, y, fz;
    int cyc, mx, idle;
    fin = 0; checks = 0; failures = 0;
    fz = fe_t'(F);
    @(posedge rst_n);
    for (int n = 0; n < 8; n++) begin
      if (n == 0) begin x = fe_t'(1); y = fe_t'(1); end
      else if (n == 1) begin x = (fe_t'(1) << M) - 1; y = x; end
      else begin x = rand_fe(M); y = rand_fe(M); end
      for (int adj = 0; adj < 2; adj++) begin
        @(negedge clk);
        a = x[M-1:0]; b = y[M-1:0]; adj_en = adj[0]; start = 1;
        for (int k = 0; k < P; k++) starts[k] = 0;
        cyc = 0;
        @(negedge clk); start = 0;
        while (!done) begin @(negedge clk); cyc++; end
        checks += 2;
        if (fe_t'(c) !== gmul(x, y, fz, M)) begin
          failures++; $display("FAIL GF(2^%0d) %0d lanes: wrong product", M, P);
        end
        if (cyc != exp_cycles(adj[0])) begin
          failures++; $display("FAIL GF(2^%0d) %0d lanes: %0d cycles, expected %0d", M, P, cyc, exp_cycles(adj[0]));
        end
        mx = 0; idle = 0;
        for (int k = 0; k < P; k++) if (starts[k] > mx) mx = starts[k];
        for (int k = 0; k < P; k++) if (starts[k] < mx) idle++;
        checks++;
        if (mx != EXP_ROUNDS || idle != EXP_IDLE) begin
          failures++;
          $display("FAIL GF(2^%0d) %0d lanes: %0d rounds, %0d idle, expected %0d, %0d",
                   M, P, mx, idle, EXP_ROUNDS, EXP_IDLE);
        end
      end
    end
    $display("GF(2^%0d) on %0d lanes: %0d rounds, %0d lanes idle in the last round, %0d cycles per product with the adjuster, %0d without",
             M, P, EXP_ROUNDS, EXP_IDLE, exp_cycles(1), exp_cycles(0));
    fin = 1;
  end
endmodule
