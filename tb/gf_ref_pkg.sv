// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. GF(2^233) with f(z) = z^233 + z^74 + 1: multiplication by
// shift-and-add with a reduction after every shift, inversion by Fermat
// (a^(2^233-2) as the product of a^(2^i), i = 1..232), and affine point
// arithmetic on y^2 + xy = x^3 + a*x^2 + b with double-and-add scalar
// multiplication.
package gf_ref_pkg;
  localparam int M = 233;
  localparam int K = 74;
  typedef logic [M-1:0] fe_t;
  typedef struct packed { logic inf; fe_t x; fe_t y; } pt_t;

  function automatic fe_t gmul(fe_t a, fe_t b);
    fe_t r = '0;
    fe_t s = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) r ^= s;
      // s = s*z mod f
      if (s[M-1]) begin
        s = s << 1;
        s[0]  = ~s[0];
        s[K]  = ~s[K];
      end else s = s << 1;
    end
    return r;
  endfunction

  function automatic fe_t gsq(fe_t a);
    return gmul(a, a);
  endfunction

  function automatic fe_t ginv(fe_t a);
    fe_t x = a, r = fe_t'(1);
    for (int i = 1; i < M; i++) begin
      x = gsq(x);
      r = gmul(r, x);
    end
    return r;
  endfunction

  // carry-less product, no reduction
  function automatic logic [2*M-2:0] clmul(fe_t a, fe_t b);
    logic [2*M-2:0] p = '0;
    for (int i = 0; i < M; i++) if (a[i]) p ^= (2*M-1)'(b) << i;
    return p;
  endfunction

  function automatic fe_t rnd();
    fe_t r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  function automatic pt_t pdbl(pt_t p, fe_t ca);
    pt_t q;
    fe_t l;
    if (p.inf || p.x == '0) return '{inf: 1'b1, x: '0, y: '0};
    l = p.x ^ gmul(p.y, ginv(p.x));
    q.inf = 1'b0;
    q.x = gsq(l) ^ l ^ ca;
    q.y = gsq(p.x) ^ gmul(l, q.x) ^ q.x;
    return q;
  endfunction

  function automatic pt_t padd(pt_t p, pt_t q, fe_t ca);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pdbl(p, ca);
      return '{inf: 1'b1, x: '0, y: '0};
    end
    l = gmul(p.y ^ q.y, ginv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x = gsq(l) ^ l ^ p.x ^ q.x ^ ca;
    r.y = gmul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pmul(fe_t d, pt_t p, fe_t ca);
    pt_t q = '{inf: 1'b1, x: '0, y: '0};
    for (int i = M-1; i >= 0; i--) begin
      q = pdbl(q, ca);
      if (d[i]) q = padd(q, p, ca);
    end
    return q;
  endfunction

  // b such that (x, y) lies on y^2 + xy = x^3 + a x^2 + b
  function automatic fe_t curve_b(fe_t x, fe_t y, fe_t ca);
    return gsq(y) ^ gmul(x, y) ^ gmul(gsq(x), x) ^ gmul(ca, gsq(x));
  endfunction
endpackage
