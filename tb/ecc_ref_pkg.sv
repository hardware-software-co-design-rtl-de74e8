// ecc_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: GF(2^n) arithmetic by plain polynomial
// multiplication and reduction, inversion by Fermat (a^(2^n-2)), and
// elliptic-curve arithmetic y^2 + xy = x^3 + a x^2 + b in affine
// coordinates with explicit inversions.  Field elements are held in 256
// bits; n is passed at run time.  The field polynomial is given by its low
// n coefficients (the x^n term is implicit).
package ecc_ref_pkg;

  typedef logic [255:0] fe_t;

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } pt_t;

  function automatic fe_t mask(int n);
    return (fe_t'(1) << n) - 1;
  endfunction

  // Schoolbook product, then reduction bit by bit from the top.
  function automatic fe_t gf_mul(fe_t a, fe_t b, fe_t f, int n);
    logic [511:0] p, fx;
    p = '0;
    for (int i = 0; i < n; i++) if (b[i]) p ^= (512'(a & mask(n)) << i);
    fx = 512'(f & mask(n)) | (512'(1) << n);
    for (int i = 2 * n - 2; i >= n; i--) if (p[i]) p ^= fx << (i - n);
    return fe_t'(p) & mask(n);
  endfunction

  function automatic fe_t gf_sqr(fe_t a, fe_t f, int n);
    return gf_mul(a, a, f, n);
  endfunction

  function automatic fe_t gf_inv(fe_t a, fe_t f, int n);
    fe_t r, t;
    r = fe_t'(1);
    t = a;
    for (int i = 1; i < n; i++) begin
      t = gf_sqr(t, f, n);
      r = gf_mul(r, t, f, n);
    end
    return r;
  endfunction

  function automatic pt_t ec_dbl(pt_t p, fe_t a, fe_t f, int n);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
    l = p.x ^ gf_mul(p.y, gf_inv(p.x, f, n), f, n);
    r.inf = 0;
    r.x = gf_sqr(l, f, n) ^ l ^ a;
    r.y = gf_sqr(p.x, f, n) ^ gf_mul(l ^ fe_t'(1), r.x, f, n);
    return r;
  endfunction

  function automatic pt_t ec_add(pt_t p, pt_t q, fe_t a, fe_t f, int n);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return ec_dbl(p, a, f, n);
      r.inf = 1; r.x = '0; r.y = '0; return r;
    end
    l = gf_mul(p.y ^ q.y, gf_inv(p.x ^ q.x, f, n), f, n);
    r.inf = 0;
    r.x = gf_sqr(l, f, n) ^ l ^ p.x ^ q.x ^ a;
    r.y = gf_mul(l, p.x ^ r.x, f, n) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t ec_neg(pt_t p);
    pt_t r;
    r = p;
    r.y = p.x ^ p.y;
    return r;
  endfunction

  // Right-to-left binary double-and-add.
  function automatic pt_t ec_mul(fe_t k, pt_t p, fe_t a, fe_t f, int n);
    pt_t r, t;
    r.inf = 1; r.x = '0; r.y = '0;
    t = p;
    for (int i = 0; i < 256; i++) begin
      if (k[i]) r = ec_add(r, t, a, f, n);
      t = ec_dbl(t, a, f, n);
    end
    return r;
  endfunction

  // b from a chosen point: b = y^2 + xy + x^3 + a x^2.
  function automatic fe_t curve_b(pt_t p, fe_t a, fe_t f, int n);
    fe_t x2;
    x2 = gf_sqr(p.x, f, n);
    return gf_sqr(p.y, f, n) ^ gf_mul(p.x, p.y, f, n) ^ gf_mul(x2, p.x, f, n)
         ^ gf_mul(a, x2, f, n);
  endfunction

  // Projective (X/Z^2, Y/Z^3) to affine.
  function automatic pt_t to_affine(fe_t X, fe_t Y, fe_t Z, fe_t f, int n);
    pt_t r;
    fe_t zi, zi2;
    if (Z == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
    zi  = gf_inv(Z, f, n);
    zi2 = gf_sqr(zi, f, n);
    r.inf = 0;
    r.x = gf_mul(X, zi2, f, n);
    r.y = gf_mul(Y, gf_mul(zi2, zi, f, n), f, n);
    return r;
  endfunction

  function automatic bit pt_eq(pt_t p, pt_t q);
    if (p.inf || q.inf) return p.inf == q.inf;
    return (p.x == q.x) && (p.y == q.y);
  endfunction

  function automatic fe_t rand_fe(int n);
    fe_t r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom();
    return r & mask(n);
  endfunction

endpackage
