// ec_ref_pkg: behavioural reference arithmetic for the ECC testbenches.
//
// Field elements are held in 192 bits whatever the field size. Prime-field
// operations take the modulus p as an argument; binary-field operations take
// the reduction polynomial f (193 bits) and its degree m. Inversion uses
// Fermat's little theorem (x^(p-2), x^(2^m-2)). The point routines are the
// textbook affine chord-and-tangent formulas, independent of the projective
// formulas in the hardware, and the *_chk routines compare a projective
// result with an affine one without inverting anything.
package ec_ref_pkg;
  typedef logic [191:0] fe_t;
  typedef logic [192:0] poly_t;

  // ---- GF(p)
  function automatic fe_t p_add(fe_t x, fe_t y, fe_t p);
    logic [192:0] s;
    s = {1'b0, x} + {1'b0, y};
    if (s >= {1'b0, p}) s = s - {1'b0, p};
    return s[191:0];
  endfunction
  function automatic fe_t p_sub(fe_t x, fe_t y, fe_t p);
    return (x >= y) ? (x - y) : (x + (p - y));
  endfunction
  function automatic fe_t p_mul(fe_t x, fe_t y, fe_t p);
    logic [383:0] t;
    t = 384'(x) * 384'(y);
    return fe_t'(t % 384'(p));
  endfunction
  function automatic fe_t p_pow(fe_t x, fe_t e, fe_t p);
    fe_t r;
    r = fe_t'(1);
    for (int i = 191; i >= 0; i--) begin
      r = p_mul(r, r, p);
      if (e[i]) r = p_mul(r, x, p);
    end
    return r;
  endfunction
  function automatic fe_t p_inv(fe_t x, fe_t p);
    return p_pow(x, p - fe_t'(2), p);
  endfunction

  // ---- GF(2^m), polynomial basis
  function automatic fe_t b_mul(fe_t x, fe_t y, poly_t f, int m);
    poly_t r;
    r = '0;
    for (int i = 191; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r = r ^ f;
      if (y[i]) r = r ^ poly_t'(x);
    end
    return r[191:0];
  endfunction
  function automatic fe_t b_inv(fe_t x, poly_t f, int m);
    fe_t r;
    r = fe_t'(1);
    for (int i = m - 1; i >= 1; i--) r = b_mul(b_mul(r, r, f, m), x, f, m);
    return b_mul(r, r, f, m);
  endfunction

  // ---- affine points, prime field: y^2 = x^3 + a x + b
  function automatic void p_add_aff(input fe_t x1, y1, x2, y2, p, output fe_t x3, y3);
    fe_t l;
    l  = p_mul(p_sub(y2, y1, p), p_inv(p_sub(x2, x1, p), p), p);
    x3 = p_sub(p_sub(p_mul(l, l, p), x1, p), x2, p);
    y3 = p_sub(p_mul(l, p_sub(x1, x3, p), p), y1, p);
  endfunction
  function automatic void p_dbl_aff(input fe_t x1, y1, a, p, output fe_t x3, y3);
    fe_t l, t;
    t  = p_mul(x1, x1, p);
    t  = p_add(p_add(p_add(t, t, p), t, p), a, p);
    l  = p_mul(t, p_inv(p_add(y1, y1, p), p), p);
    x3 = p_sub(p_sub(p_mul(l, l, p), x1, p), x1, p);
    y3 = p_sub(p_mul(l, p_sub(x1, x3, p), p), y1, p);
  endfunction
  // Jacobian (X,Y,Z) represents (X/Z^2, Y/Z^3).
  function automatic logic p_chk(fe_t X, fe_t Y, fe_t Z, fe_t x, fe_t y, fe_t p);
    fe_t z2;
    z2 = p_mul(Z, Z, p);
    return (Z != '0) && (X == p_mul(x, z2, p)) && (Y == p_mul(y, p_mul(z2, Z, p), p));
  endfunction

  // ---- affine points, binary field: y^2 + xy = x^3 + a x^2 + b
  function automatic void b_add_aff(input fe_t x1, y1, x2, y2, a, input poly_t f, input int m,
                           output fe_t x3, y3);
    fe_t l;
    l  = b_mul(y1 ^ y2, b_inv(x1 ^ x2, f, m), f, m);
    x3 = b_mul(l, l, f, m) ^ l ^ x1 ^ x2 ^ a;
    y3 = b_mul(l, x1 ^ x3, f, m) ^ x3 ^ y1;
  endfunction
  function automatic void b_dbl_aff(input fe_t x1, y1, a, input poly_t f, input int m,
                           output fe_t x3, y3);
    fe_t l;
    l  = x1 ^ b_mul(y1, b_inv(x1, f, m), f, m);
    x3 = b_mul(l, l, f, m) ^ l ^ a;
    y3 = b_mul(x1, x1, f, m) ^ b_mul(l ^ fe_t'(1), x3, f, m);
  endfunction
  // b such that (x, y) lies on the curve with coefficient a.
  function automatic fe_t b_curve_b(fe_t x, fe_t y, fe_t a, poly_t f, int m);
    fe_t x2;
    x2 = b_mul(x, x, f, m);
    return b_mul(y, y, f, m) ^ b_mul(x, y, f, m) ^ b_mul(x2, x, f, m) ^ b_mul(a, x2, f, m);
  endfunction
  // a such that (x1,y1) and (x2,y2) lie on one curve: a = (d1+d2)/(x1+x2)^2
  function automatic fe_t b_curve_a(fe_t x1, y1, x2, y2, poly_t f, int m);
    fe_t d1, d2, s;
    d1 = b_mul(y1, y1, f, m) ^ b_mul(x1, y1, f, m) ^ b_mul(b_mul(x1, x1, f, m), x1, f, m);
    d2 = b_mul(y2, y2, f, m) ^ b_mul(x2, y2, f, m) ^ b_mul(b_mul(x2, x2, f, m), x2, f, m);
    s  = b_mul(x1 ^ x2, x1 ^ x2, f, m);
    return b_mul(d1 ^ d2, b_inv(s, f, m), f, m);
  endfunction
  // Lopez-Dahab (X,Y,Z) represents (X/Z, Y/Z^2).
  function automatic logic b_chk(fe_t X, fe_t Y, fe_t Z, fe_t x, fe_t y, poly_t f, int m);
    return (Z != '0) && (X == b_mul(x, Z, f, m)) && (Y == b_mul(y, b_mul(Z, Z, f, m), f, m));
  endfunction

  // Random reduced elements.
  function automatic fe_t rand_p(fe_t p);
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return fe_t'(r % 256'(p));
  endfunction
  function automatic fe_t rand_b(int m);
    fe_t r;
    for (int i = 0; i < 6; i++) r[i*32 +: 32] = $urandom;
    return r & ((fe_t'(1) << m) - fe_t'(1));
  endfunction

  // One random test case for a point operation: the projective input point
  // (x1,y1,z1), the affine point (x2,y2), curve coefficients a, b and the
  // expected affine result (ex, ey).
  typedef struct {
    fe_t x1, y1, z1, x2, y2, a, b, ex, ey;
  } ec_case_t;

  function automatic ec_case_t make_case(bit prime, bit dbl, fe_t p, poly_t f, int m);
    ec_case_t c;
    fe_t ax, ay, z;
    if (prime) begin
      do ax = rand_p(p); while (ax == '0);
      do ay = rand_p(p); while (ay == '0);
      do c.x2 = rand_p(p); while (c.x2 == ax);
      c.y2 = rand_p(p);
      do z = rand_p(p); while (z == '0);
      c.a  = rand_p(p);
      c.b  = rand_p(p);
      c.x1 = p_mul(ax, p_mul(z, z, p), p);
      c.y1 = p_mul(ay, p_mul(p_mul(z, z, p), z, p), p);
      c.z1 = z;
      if (dbl) p_dbl_aff(ax, ay, c.a, p, c.ex, c.ey);
      else     p_add_aff(ax, ay, c.x2, c.y2, p, c.ex, c.ey);
    end else begin
      do ax = rand_b(m); while (ax == '0);
      ay = rand_b(m);
      do c.x2 = rand_b(m); while (c.x2 == ax);
      c.y2 = rand_b(m);
      do z = rand_b(m); while (z == '0);
      c.a  = dbl ? rand_b(m) : b_curve_a(ax, ay, c.x2, c.y2, f, m);
      c.b  = b_curve_b(ax, ay, c.a, f, m);
      c.x1 = b_mul(ax, z, f, m);
      c.y1 = b_mul(ay, b_mul(z, z, f, m), f, m);
      c.z1 = z;
      if (dbl) b_dbl_aff(ax, ay, c.a, f, m, c.ex, c.ey);
      else     b_add_aff(ax, ay, c.x2, c.y2, c.a, f, m, c.ex, c.ey);
    end
    return c;
  endfunction

  function automatic logic check_case(ec_case_t c, bit prime, fe_t X, fe_t Y, fe_t Z,
                                      fe_t p, poly_t f, int m);
    return prime ? p_chk(X, Y, Z, c.ex, c.ey, p) : b_chk(X, Y, Z, c.ex, c.ey, f, m);
  endfunction
endpackage
