// ecc_mc_top -- side-channel balanced elliptic-curve scalar multiplier with a
// P-lane word-parallel field multiplier.
//
// Computes S = d*P on a binary curve y^2 + xy = x^3 + a x^2 + b over
// GF(2^M) (polynomial basis, reduction polynomial F_POLY), S returned in
// Jacobian coordinates (x, y) = (X/Z^2, Y/Z^3), P given in affine form.
//
//   ad_ctrl     add-and-double over the key bits, MSB first
//   point_seq   runs the field-operation programs of one point operation:
//               mixed Jacobian addition, or the rearranged doubling with
//               five dummy operations so both have 14 MUL + 7 ADD
//   fe_regfile  field-element registers
//   gf_mul      word-parallel multiplier: ceil(M/W) words over P lanes in
//               rounds, reduced partial products XORed; multiplier adjuster
//               shortens the last (partial) word
//
// Mode inputs (sampled at start of each operation): adj_en turns the
// multiplier adjuster on, dummy_en the dummy operations. Both set is the
// document's proposed configuration; both clear is its unprotected baseline.
// curve_c must be the fourth root of the curve's b.
//
// Interface: pulse start while idle with d, px, py, curve_a, curve_c valid;
// done pulses when sx, sy, sz and s_inf (S is the point at infinity) are
// valid. lane_busy shows which multiplier lanes are working each cycle.
// The partition into these blocks follows the document's software structure
// (scalar loop, point routines, poly_mul threads); the interface is this
// design's own.
// The busy outputs of the sequencer and the multiplier are left open: the
// controller waits for their done pulses instead. The assertions use rst_n
// both in their disable condition and, through the blocks, as an
// asynchronous reset, which the linter reports as a mixed-use reset net;
// the assertions are simulation checks only.
module ecc_mc_top
  import ecc_pkg::*;
#(
  parameter int unsigned M      = 131,
  parameter int unsigned W      = 32,
  parameter int unsigned P      = 4,
  parameter int unsigned K_BITS = 131,
  parameter logic [M:0]  F_POLY = (M+1)'(1) << M | (M+1)'('h10D)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              adj_en,
  input  logic              dummy_en,
  input  logic [K_BITS-1:0] d,
  input  logic [M-1:0]      px,
  input  logic [M-1:0]      py,
  input  logic [M-1:0]      curve_a,
  input  logic [M-1:0]      curve_c,
  output logic              busy,
  output logic              done,
  output logic [M-1:0]      sx,
  output logic [M-1:0]      sy,
  output logic [M-1:0]      sz,
  output logic              s_inf,
  output logic [P-1:0]      lane_busy,
  // activity, one-cycle strobes
  output logic              step_pd,     // a point doubling starts
  output logic              step_pa,     // a point addition starts
  output logic              fop_fire,    // a field MUL or ADD is issued
  output logic              fop_mul,     // ... and it is a multiplication
  output logic              fop_dummy    // ... and it is a dummy operation
);

  // controller <-> sequencer
  logic     seq_start, seq_done;
  prog_e    seq_prog;
  logic     op_fire, op_mul, op_dummy;

  // register file ports
  logic     c_we, s_we;
  reg_idx_t c_wa, s_wa, ra, rb, rc;
  logic [M-1:0] c_wd, s_wd, rda, rdb, rdc;

  // multiplier
  logic         mul_start, mul_done;
  logic [M-1:0] mul_c;

  logic adj_q, dummy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adj_q   <= 1'b1;
      dummy_q <= 1'b1;
    end else if (start && !busy) begin
      adj_q   <= adj_en;
      dummy_q <= dummy_en;
    end
  end

  ad_ctrl #(.M(M), .K_BITS(K_BITS)) u_ctrl (
    .clk, .rst_n, .start,
    .d, .px, .py, .ca(curve_a), .cc(curve_c),
    .busy, .done, .sx, .sy, .sz, .inf(s_inf),
    .seq_start, .seq_prog, .seq_done,
    .rf_we(c_we), .rf_wa(c_wa), .rf_wd(c_wd), .rf_rc(rc), .rf_rdc(rdc),
    .step_pd, .step_pa
  );

  point_seq #(.M(M)) u_seq (
    .clk, .rst_n,
    .start(seq_start), .prog(seq_prog), .dummy_en(dummy_q),
    .busy(), .done(seq_done),
    .ra, .rb, .rdata_a(rda), .rdata_b(rdb),
    .we(s_we), .wa(s_wa), .wd(s_wd),
    .mul_start, .mul_done, .mul_c,
    .op_fire, .op_mul, .op_dummy
  );

  fe_regfile #(.M(M), .DEPTH(RF_DEPTH)) u_rf (
    .clk, .rst_n,
    .we(c_we | s_we),
    .waddr(c_we ? c_wa : s_wa),
    .wdata(c_we ? c_wd : s_wd),
    .raddr_a(ra), .raddr_b(rb), .raddr_c(rc),
    .rdata_a(rda), .rdata_b(rdb), .rdata_c(rdc)
  );

  gf_mul #(.M(M), .W(W), .P(P), .F_POLY(F_POLY)) u_mul (
    .clk, .rst_n,
    .start(mul_start), .adj_en(adj_q),
    .a(rda), .b(rdb),
    .busy(), .done(mul_done), .c(mul_c),
    .lane_busy
  );

  assign fop_fire  = op_fire;
  assign fop_mul   = op_mul;
  assign fop_dummy = op_fire & op_dummy;

  // The controller writes the register file only while the sequencer is idle.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(c_we && s_we));

endmodule
