// gf_ref_pkg -- reference arithmetic for the testbenches, written independently
// of the RTL: bit-at-a-time GF(2^m) multiplication (MSB-first Horner with
// reduction), inversion by Fermat (a^(2^m - 2)), and affine point arithmetic
// on y^2 + xy = x^3 + a x^2 + b with plain left-to-right double-and-add.
// Field elements are carried in 256-bit vectors; m and the full reduction
// polynomial (with its x^m term) are arguments.
package gf_ref_pkg;
  typedef logic [255:0] fe_t;

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  function automatic fe_t gmul(input fe_t a, input fe_t b, input fe_t p, input int m);
    fe_t r;
    r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r ^= p;
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic fe_t ginv(input fe_t a, input fe_t p, input int m);
    fe_t r, sq;
    // a^(2^m-2) = prod_{i=1}^{m-1} a^(2^i)
    r  = fe_t'(1);
    sq = a;
    for (int i = 1; i < m; i++) begin
      sq = gmul(sq, sq, p, m);
      r  = gmul(r, sq, p, m);
    end
    return r;
  endfunction

  function automatic fe_t gdiv(input fe_t a, input fe_t b, input fe_t p, input int m);
    return gmul(a, ginv(b, p, m), p, m);
  endfunction

  function automatic pt_t pdbl(input pt_t q, input fe_t ca, input fe_t p, input int m);
    pt_t r;
    fe_t lam;
    if (q.inf || q.x == '0) begin
      r = '0; r.inf = 1'b1; return r;
    end
    lam   = q.x ^ gdiv(q.y, q.x, p, m);
    r.inf = 1'b0;
    r.x   = gmul(lam, lam, p, m) ^ lam ^ ca;
    r.y   = gmul(q.x, q.x, p, m) ^ gmul(lam ^ fe_t'(1), r.x, p, m);
    return r;
  endfunction

  function automatic pt_t padd(input pt_t q, input pt_t s, input fe_t ca, input fe_t p, input int m);
    pt_t r;
    fe_t lam;
    if (q.inf) return s;
    if (s.inf) return q;
    if (q.x == s.x) begin
      if (q.y == s.y) return pdbl(q, ca, p, m);
      r = '0; r.inf = 1'b1; return r;
    end
    lam   = gdiv(q.y ^ s.y, q.x ^ s.x, p, m);
    r.inf = 1'b0;
    r.x   = gmul(lam, lam, p, m) ^ lam ^ q.x ^ s.x ^ ca;
    r.y   = gmul(lam, q.x ^ r.x, p, m) ^ r.x ^ q.y;
    return r;
  endfunction

  // k*P, binary, most significant bit first
  function automatic pt_t pmul(input fe_t k, input pt_t pt, input fe_t ca, input fe_t p, input int m);
    pt_t q;
    q = '0; q.inf = 1'b1;
    for (int i = 255; i >= 0; i--) begin
      q = pdbl(q, ca, p, m);
      if (k[i]) q = padd(q, pt, ca, p, m);
    end
    return q;
  endfunction

  // b chosen so that (x, y) lies on y^2 + xy = x^3 + a x^2 + b
  function automatic fe_t curve_b(input fe_t x, input fe_t y, input fe_t ca, input fe_t p, input int m);
    fe_t x2;
    x2 = gmul(x, x, p, m);
    return gmul(y, y, p, m) ^ gmul(x, y, p, m) ^ gmul(x2, x, p, m) ^ gmul(ca, x2, p, m);
  endfunction

  function automatic fe_t rand_fe(input int m);
    fe_t r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r & ((fe_t'(1) << m) - 1);
  endfunction
endpackage
