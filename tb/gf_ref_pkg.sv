// gf_ref_pkg: reference arithmetic for the testbenches, written apart from
// the RTL. Field GF(2^191) with f(x) = x^191 + x^9 + 1:
//   multiplication  full 381-bit carry-less product, then reduction
//   inversion       extended Euclidean algorithm on polynomials
// Curve y^2 + xy = x^3 + a x^2 + b, affine coordinates, with the point at
// infinity as a flag; point multiplication by left-to-right double-and-add.
package gf_ref_pkg;
  localparam int NF = 191;
  typedef logic [NF-1:0] fe_t;
  localparam logic [NF:0] F_FULL = (192'(1) << 191) | (192'(1) << 9) | 192'(1);

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  function automatic fe_t fe_reduce(logic [2*NF-2:0] c);
    for (int k = 2*NF-2; k >= NF; k--)
      if (c[k]) c = c ^ ((2*NF-1)'(F_FULL) << (k - NF));
    return c[NF-1:0];
  endfunction

  function automatic fe_t fe_mul(fe_t a, fe_t b);
    logic [2*NF-2:0] c = '0;
    for (int i = 0; i < NF; i++)
      if (b[i]) c = c ^ ((2*NF-1)'(a) << i);
    return fe_reduce(c);
  endfunction

  function automatic fe_t fe_sqr(fe_t a);
    return fe_mul(a, a);
  endfunction

  function automatic int deg(logic [NF:0] p);
    for (int i = NF; i >= 0; i--) if (p[i]) return i;
    return -1;
  endfunction

  // Inverse by the extended Euclidean algorithm; inverse of 0 is 0.
  function automatic fe_t fe_inv(fe_t a);
    logic [NF:0] u, v, g1, g2, t;
    int j;
    if (a == '0) return '0;
    u = {1'b0, a}; v = F_FULL; g1 = 1; g2 = 0;
    while (u != 1) begin
      j = deg(u) - deg(v);
      if (j < 0) begin
        t = u; u = v; v = t;
        t = g1; g1 = g2; g2 = t;
        j = -j;
      end
      u  = u ^ (v << j);
      g1 = g1 ^ (g2 << j);
    end
    return g1[NF-1:0];
  endfunction

  function automatic pt_t pt_dbl(pt_t p, fe_t a);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin r = '0; r.inf = 1'b1; return r; end
    l   = p.x ^ fe_mul(p.y, fe_inv(p.x));
    r.inf = 1'b0;
    r.x = fe_sqr(l) ^ l ^ a;
    r.y = fe_sqr(p.x) ^ fe_mul(l ^ fe_t'(1), r.x);
    return r;
  endfunction

  function automatic pt_t pt_add(pt_t p, pt_t q, fe_t a);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_dbl(p, a);
      r = '0; r.inf = 1'b1; return r;
    end
    l   = fe_mul(p.y ^ q.y, fe_inv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x = fe_sqr(l) ^ l ^ p.x ^ q.x ^ a;
    r.y = fe_mul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pt_mul(logic [NF-1:0] m, pt_t p, fe_t a);
    pt_t r = '0;
    r.inf = 1'b1;
    for (int i = NF-1; i >= 0; i--) begin
      r = pt_dbl(r, a);
      if (m[i]) r = pt_add(r, p, a);
    end
    return r;
  endfunction

  // b such that (x, y) lies on the curve with coefficient a.
  function automatic fe_t curve_b(fe_t x, fe_t y, fe_t a);
    return fe_sqr(y) ^ fe_mul(x, y) ^ fe_mul(fe_sqr(x), x) ^ fe_mul(a, fe_sqr(x));
  endfunction

  function automatic fe_t fe_rand();
    logic [223:0] t;
    for (int k = 0; k < 7; k++) t[k*32 +: 32] = $urandom;
    return t[NF-1:0];
  endfunction
endpackage
