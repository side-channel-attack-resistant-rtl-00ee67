// ecc_pkg -- shared types and field-operation programs of the point engine.
//
// The point-operation sequencer (point_seq) executes short programs of field
// operations over the field register file (fe_regfile). This package holds the
// register map, the micro-operation format and the four programs:
//
//   PRG_PA     mixed Jacobian point addition S + P (P affine, Z = 1), 21 ops:
//              14 multiplications and 7 additions, in the operation order of
//              the document's point-addition listing.
//   PRG_PD     Jacobian point doubling of S, rearranged so that its two
//              squarings X^2 and B^2 become products with the affine point's
//              Z = 1, plus the document's five high-level dummy operations
//              (Dummy1 and Dummy5 multiplications, Dummy2..4 additions). It
//              then also has 14 multiplications and 7 additions.
//   PRG_COMMIT copies the new point (NX, NY, NZ) into S.
//   PRG_LOADP  copies P (PX, PY, 1) into S.
//
// The formulas are those of Jacobian coordinates (x, y) = (X/Z^2, Y/Z^3) on
// y^2 + xy = x^3 + a x^2 + b over GF(2^m). The doubling formula uses the
// constant the document calls b; for the formulas to be correct it must be the
// fourth root of the curve's b (c with c^4 = b), held in register CC.
// Register names, the program order and the dummy operands follow the
// document; the register numbering and encoding are this design's own.
package ecc_pkg;

  typedef enum logic [1:0] {
    OP_END = 2'd0,   // end of program
    OP_MUL = 2'd1,   // dst = s1 * s2 mod f(x)  (parallel multiplier)
    OP_ADD = 2'd2,   // dst = s1 + s2           (XOR)
    OP_MOV = 2'd3    // dst = s1
  } op_kind_e;

  typedef enum logic [1:0] {
    PRG_PD     = 2'd0,
    PRG_PA     = 2'd1,
    PRG_COMMIT = 2'd2,
    PRG_LOADP  = 2'd3
  } prog_e;

  localparam int RF_DEPTH = 32;
  typedef logic [$clog2(RF_DEPTH)-1:0] reg_idx_t;

  // Register map of the field register file.
  localparam reg_idx_t R_PX  = 5'd0;   // affine point P, x
  localparam reg_idx_t R_PY  = 5'd1;   // affine point P, y
  localparam reg_idx_t R_ONE = 5'd2;   // constant 1 (Z of the affine point P)
  localparam reg_idx_t R_SX  = 5'd3;   // running point S (Jacobian) X
  localparam reg_idx_t R_SY  = 5'd4;   // S, Y
  localparam reg_idx_t R_SZ  = 5'd5;   // S, Z
  localparam reg_idx_t R_CA  = 5'd6;   // curve constant a
  localparam reg_idx_t R_CC  = 5'd7;   // doubling constant c = b^(1/4)
  localparam reg_idx_t R_NX  = 5'd8;   // result of PA / PD, X3
  localparam reg_idx_t R_NY  = 5'd9;   // Y3
  localparam reg_idx_t R_NZ  = 5'd10;  // Z3
  localparam reg_idx_t R_T0  = 5'd11;  // temporaries T0..T20

  function automatic reg_idx_t tmp(input int i);
    return reg_idx_t'(11 + i);
  endfunction

  typedef struct packed {
    op_kind_e kind;
    logic     dummy;   // a dummy operation of the balanced doubling
    reg_idx_t dst;
    reg_idx_t s1;
    reg_idx_t s2;
  } uop_t;

  function automatic uop_t mk(input op_kind_e k, input reg_idx_t d,
                              input reg_idx_t a, input reg_idx_t b,
                              input logic dm = 1'b0);
    uop_t u;
    u.kind = k; u.dummy = dm; u.dst = d; u.s1 = a; u.s2 = b;
    return u;
  endfunction

  // Program store: micro-operation number pc of program p.
  function automatic uop_t prog_uop(input prog_e p, input logic [4:0] pc);
    uop_t u;
    u = mk(OP_END, R_T0, R_T0, R_T0);
    unique case (p)
      // Mixed Jacobian addition: point 1 = P (Z = 1), point 2 = S.
      PRG_PA: case (pc)
        5'd0:  u = mk(OP_MUL, tmp(0),  R_SZ,  R_SZ);   // A1   = Z2*Z2
        5'd1:  u = mk(OP_MUL, tmp(1),  R_PX,  tmp(0));   // A    = X1*A1
        5'd2:  u = mk(OP_ADD, tmp(2),  tmp(1),  R_SX);   // C    = A + X2
        5'd3:  u = mk(OP_MUL, tmp(3),  tmp(0),  R_SZ);   // D1   = A1*Z2
        5'd4:  u = mk(OP_MUL, tmp(4),  R_PY,  tmp(3));   // D    = Y1*D1
        5'd5:  u = mk(OP_ADD, tmp(5),  tmp(4),  R_SY);   // F    = D + Y2
        5'd6:  u = mk(OP_MUL, tmp(6),  tmp(5),  R_SX);   // H1   = F*X2
        5'd7:  u = mk(OP_MUL, tmp(7),  tmp(2),  R_SY);   // H2   = C*Y2
        5'd8:  u = mk(OP_ADD, tmp(8),  tmp(6),  tmp(7));   // H    = H1 + H2
        5'd9:  u = mk(OP_MUL, R_NZ,  tmp(2),  R_SZ);   // Z3   = C*Z2
        5'd10: u = mk(OP_ADD, tmp(9),  tmp(5),  R_NZ);   // I    = F + Z3
        5'd11: u = mk(OP_MUL, tmp(10), R_NZ,  R_NZ);   // X31  = Z3*Z3
        5'd12: u = mk(OP_MUL, tmp(11), R_CA,  tmp(10));  // X311 = a*X31
        5'd13: u = mk(OP_MUL, tmp(12), tmp(9),  tmp(5));   // X32  = I*F
        5'd14: u = mk(OP_MUL, tmp(13), tmp(2),  tmp(2));   // X33  = C*C
        5'd15: u = mk(OP_MUL, tmp(14), tmp(13), tmp(2));   // X331 = X33*C
        5'd16: u = mk(OP_ADD, tmp(15), tmp(11), tmp(12));  // X34  = X311 + X32
        5'd17: u = mk(OP_ADD, R_NX,  tmp(15), tmp(14));  // X3   = X34 + X331
        5'd18: u = mk(OP_MUL, tmp(16), tmp(9),  R_NX);   // Y31  = I*X3
        5'd19: u = mk(OP_MUL, tmp(17), tmp(8),  tmp(13));  // Y322 = H*X33
        5'd20: u = mk(OP_ADD, R_NY,  tmp(16), tmp(17));  // Y3   = Y31 + Y322
        default: ;
      endcase
      // Balanced Jacobian doubling of S with high-level dummies.
      PRG_PD: case (pc)
        5'd0:  u = mk(OP_MUL, tmp(0),  R_SZ,  R_SZ);        // Z31  = Z2*Z2
        5'd1:  u = mk(OP_MUL, tmp(1),  R_PX,  R_SZ, 1'b1);  // Dummy1 = Px*Z2
        5'd2:  u = mk(OP_MUL, tmp(2),  R_CC,  tmp(0));        // A    = b*Z31
        5'd3:  u = mk(OP_ADD, tmp(3),  R_SX,  tmp(2));        // B    = X2 + A
        5'd4:  u = mk(OP_MUL, tmp(4),  R_SX,  R_ONE);       // D21  = X2*1
        5'd5:  u = mk(OP_ADD, tmp(5),  R_SX,  tmp(1),  1'b1); // Dummy2 = X2 + Dummy1
        5'd6:  u = mk(OP_MUL, tmp(6),  R_SX,  tmp(4));        // D2   = X2*D21
        5'd7:  u = mk(OP_MUL, tmp(7),  R_SZ,  R_SY);        // C    = Z2*Y2
        5'd8:  u = mk(OP_ADD, tmp(8),  tmp(1),  R_PX,  1'b1); // Dummy3 = Dummy1 + Px
        5'd9:  u = mk(OP_MUL, tmp(9),  tmp(3),  R_ONE);       // X311 = B*1
        5'd10: u = mk(OP_ADD, tmp(10), tmp(8),  tmp(5),  1'b1); // Dummy4 = Dummy3 + Dummy2
        5'd11: u = mk(OP_MUL, tmp(11), tmp(6),  tmp(6));        // Y31  = D2*D2
        5'd12: u = mk(OP_MUL, tmp(12), tmp(3),  tmp(9));        // X31  = B*X311
        5'd13: u = mk(OP_MUL, R_NZ,  R_SX,  tmp(0));        // Z3   = X2*Z31
        5'd14: u = mk(OP_MUL, R_NX,  tmp(12), tmp(12));       // X3   = X31*X31
        5'd15: u = mk(OP_MUL, tmp(13), tmp(12), R_NX,  1'b1); // Dummy5 = X31*X3
        5'd16: u = mk(OP_ADD, tmp(14), tmp(6),  R_NZ);        // D1   = D2 + Z3
        5'd17: u = mk(OP_ADD, tmp(15), tmp(14), tmp(7));        // D    = D1 + C
        5'd18: u = mk(OP_MUL, tmp(16), tmp(15), R_NX);        // E    = D*X3
        5'd19: u = mk(OP_MUL, tmp(17), tmp(11), R_NZ);        // Y312 = Y31*Z3
        5'd20: u = mk(OP_ADD, R_NY,  tmp(17), tmp(16));       // Y3   = Y312 + E
        default: ;
      endcase
      PRG_COMMIT: case (pc)
        5'd0: u = mk(OP_MOV, R_SX, R_NX, R_NX);
        5'd1: u = mk(OP_MOV, R_SY, R_NY, R_NY);
        5'd2: u = mk(OP_MOV, R_SZ, R_NZ, R_NZ);
        default: ;
      endcase
      PRG_LOADP: case (pc)
        5'd0: u = mk(OP_MOV, R_SX, R_PX, R_PX);
        5'd1: u = mk(OP_MOV, R_SY, R_PY, R_PY);
        5'd2: u = mk(OP_MOV, R_SZ, R_ONE, R_ONE);
        default: ;
      endcase
      default: ;
    endcase
    return u;
  endfunction

endpackage
