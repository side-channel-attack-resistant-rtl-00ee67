// gf_ref_pkg -- reference arithmetic for the testbenches.
//
// Plain, unoptimised GF(2^m) and elliptic-curve arithmetic written
// independently of the RTL: multiplication by Horner's rule with interleaved
// reduction, inversion by Fermat (a^(2^m - 2)), and affine point addition and
// doubling on y^2 + xy = x^3 + a x^2 + b with the textbook formulas
//   add:    l = (y1 + y2)/(x1 + x2), x3 = l^2 + l + x1 + x2 + a,
//           y3 = l(x1 + x3) + x3 + y1
//   double: l = x1 + y1/x1,          x3 = l^2 + l + a,
//           y3 = l(x1 + x3) + x3 + y1
// Field elements are carried in MAXW-bit vectors together with m and f.
package gf_ref_pkg;

  localparam int MAXW = 600;
  typedef logic [MAXW-1:0] fe_t;

  typedef struct {
    fe_t  x;
    fe_t  y;
    logic inf;
  } apoint_t;

  function automatic fe_t gmul(input fe_t a, input fe_t b, input fe_t f, input int m);
    fe_t r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r = r ^ f;
      if (a[i]) r = r ^ b;
    end
    return r;
  endfunction

  function automatic fe_t gsqr(input fe_t a, input fe_t f, input int m);
    return gmul(a, a, f, m);
  endfunction

  // a^(2^m - 2) = a^2 * a^4 * ... * a^(2^(m-1))
  function automatic fe_t ginv(input fe_t a, input fe_t f, input int m);
    fe_t r = fe_t'(1);
    fe_t s = a;
    for (int i = 1; i < m; i++) begin
      s = gsqr(s, f, m);
      r = gmul(r, s, f, m);
    end
    return r;
  endfunction

  // fourth root: v^(2^(m-2))
  function automatic fe_t groot4(input fe_t v, input fe_t f, input int m);
    fe_t r = v;
    for (int i = 0; i < m - 2; i++) r = gsqr(r, f, m);
    return r;
  endfunction

  // b of the curve through (x, y) for the given a
  function automatic fe_t curve_b(input fe_t x, input fe_t y, input fe_t a,
                                  input fe_t f, input int m);
    fe_t x2 = gsqr(x, f, m);
    return gsqr(y, f, m) ^ gmul(x, y, f, m) ^ gmul(x2, x, f, m) ^ gmul(a, x2, f, m);
  endfunction

  function automatic apoint_t padd(input apoint_t p, input apoint_t q, input fe_t a,
                                   input fe_t f, input int m);
    apoint_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y && p.x != '0) return pdbl(p, a, f, m);
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    l = gmul(p.y ^ q.y, ginv(p.x ^ q.x, f, m), f, m);
    r.x = gsqr(l, f, m) ^ l ^ p.x ^ q.x ^ a;
    r.y = gmul(l, p.x ^ r.x, f, m) ^ r.x ^ p.y;
    r.inf = 1'b0;
    return r;
  endfunction

  function automatic apoint_t pdbl(input apoint_t p, input fe_t a, input fe_t f, input int m);
    apoint_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    l = p.x ^ gmul(p.y, ginv(p.x, f, m), f, m);
    r.x = gsqr(l, f, m) ^ l ^ a;
    r.y = gmul(l, p.x ^ r.x, f, m) ^ r.x ^ p.y;
    r.inf = 1'b0;
    return r;
  endfunction

  // right-to-left double-and-add, a different order from the RTL's loop
  function automatic apoint_t pmul(input fe_t k, input int kbits, input apoint_t p,
                                   input fe_t a, input fe_t f, input int m);
    apoint_t r, q;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    q = p;
    for (int i = 0; i < kbits; i++) begin
      if (k[i]) r = padd(r, q, a, f, m);
      q = pdbl(q, a, f, m);
    end
    return r;
  endfunction

  // Jacobian (X, Y, Z) to affine (X/Z^2, Y/Z^3)
  function automatic apoint_t to_affine(input fe_t X, input fe_t Y, input fe_t Z,
                                        input fe_t f, input int m);
    apoint_t r;
    fe_t zi, zi2;
    if (Z == '0) begin
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    zi  = ginv(Z, f, m);
    zi2 = gsqr(zi, f, m);
    r.x = gmul(X, zi2, f, m);
    r.y = gmul(Y, gmul(zi2, zi, f, m), f, m);
    r.inf = 1'b0;
    return r;
  endfunction

  function automatic fe_t rand_fe(input int m);
    fe_t r = '0;
    for (int i = 0; i < m; i += 32) r[i +: 32] = $urandom;
    for (int i = m; i < MAXW; i++) r[i] = 1'b0;
    return r;
  endfunction

endpackage
