// ecc_ref_pkg: reference arithmetic for the testbenches.
//
// Plain modular arithmetic on 1152-bit integers and affine elliptic-curve
// arithmetic: chord-and-tangent addition in affine coordinates, and
// left-to-right double-and-add in Jacobian coordinates with one Fermat
// inversion at the end. Both are written independently of the
// projective complete formulas the core uses, so that it can serve as the
// expected result of a scalar multiplication.
package ecc_ref_pkg;

  typedef logic [1151:0] big_t;

  function automatic big_t mulm(big_t a, big_t b, big_t p);
    return (a * b) % p;
  endfunction
  function automatic big_t powm(big_t a, big_t e, big_t p);
    big_t r = 1;
    a = a % p;
    for (int i = 0; i < 1152; i++) begin
      if (e[i]) r = mulm(r, a, p);
      a = mulm(a, a, p);
      if ((e >> (i + 1)) == 0) break;
    end
    return r;
  endfunction
  function automatic big_t invm(big_t a, big_t p);
    return powm(a, p - 2, p);
  endfunction
  function automatic big_t subm(big_t a, big_t b, big_t p);
    return (a + p - (b % p)) % p;
  endfunction

  // affine point; inf = point at infinity
  typedef struct { big_t x; big_t y; bit inf; } apt_t;

  function automatic apt_t padd(apt_t P, apt_t Q, big_t a, big_t p);
    apt_t R; big_t l;
    if (P.inf) return Q;
    if (Q.inf) return P;
    if (P.x == Q.x) begin
      if ((P.y + Q.y) % p == 0) begin R.inf = 1; R.x = 0; R.y = 0; return R; end
      l = mulm((3 * mulm(P.x, P.x, p) + a) % p, invm((2 * P.y) % p, p), p);
    end else begin
      l = mulm(subm(Q.y, P.y, p), invm(subm(Q.x, P.x, p), p), p);
    end
    R.inf = 0;
    R.x = subm(subm(mulm(l, l, p), P.x, p), Q.x, p);
    R.y = subm(mulm(l, subm(P.x, R.x, p), p), P.y, p);
    return R;
  endfunction

  // Jacobian point (x = X/Z^2, y = Y/Z^3); inf = point at infinity
  typedef struct { big_t X; big_t Y; big_t Z; bit inf; } jpt_t;

  function automatic big_t addm(big_t a, big_t b, big_t p);
    return (a + b) % p;
  endfunction

  function automatic jpt_t jdbl(jpt_t P, big_t a, big_t p);
    jpt_t R; big_t yy, s, m, zz;
    if (P.inf || P.Y == 0) begin R.inf = 1; R.X = 1; R.Y = 1; R.Z = 0; return R; end
    yy = mulm(P.Y, P.Y, p);
    s  = mulm(4 * P.X, yy, p);
    zz = mulm(P.Z, P.Z, p);
    m  = addm(mulm(3, mulm(P.X, P.X, p), p), mulm(a, mulm(zz, zz, p), p), p);
    R.X = subm(mulm(m, m, p), (2 * s) % p, p);
    R.Y = subm(mulm(m, subm(s, R.X, p), p), mulm(8, mulm(yy, yy, p), p), p);
    R.Z = mulm(2 * P.Y, P.Z, p);
    R.inf = 0;
    return R;
  endfunction

  // Jacobian P plus affine Q
  function automatic jpt_t jadd(jpt_t P, apt_t Q, big_t a, big_t p);
    jpt_t R; big_t zz, u2, s2, h, rr, hh, hhh, v;
    if (P.inf) begin R.X = Q.x; R.Y = Q.y; R.Z = 1; R.inf = 0; return R; end
    zz = mulm(P.Z, P.Z, p);
    u2 = mulm(Q.x, zz, p);
    s2 = mulm(Q.y, mulm(zz, P.Z, p), p);
    h  = subm(u2, P.X, p);
    rr = subm(s2, P.Y, p);
    if (h == 0) begin
      if (rr == 0) return jdbl(P, a, p);
      R.inf = 1; R.X = 1; R.Y = 1; R.Z = 0; return R;
    end
    hh  = mulm(h, h, p);
    hhh = mulm(hh, h, p);
    v   = mulm(P.X, hh, p);
    R.X = subm(subm(mulm(rr, rr, p), hhh, p), (2 * v) % p, p);
    R.Y = subm(mulm(rr, subm(v, R.X, p), p), mulm(P.Y, hhh, p), p);
    R.Z = mulm(P.Z, h, p);
    R.inf = 0;
    return R;
  endfunction

  // k*P by left-to-right double-and-add in Jacobian coordinates, one
  // inversion at the end
  function automatic apt_t smul(big_t k, apt_t P, big_t a, big_t p);
    jpt_t R; apt_t A; big_t zi;
    R.inf = 1; R.X = 1; R.Y = 1; R.Z = 0;
    for (int i = 1087; i >= 0; i--) begin
      R = jdbl(R, a, p);
      if (k[i]) R = jadd(R, P, a, p);
    end
    A.inf = R.inf;
    if (R.inf) begin A.x = 0; A.y = 0; return A; end
    zi  = invm(R.Z, p);
    A.x = mulm(R.X, mulm(zi, zi, p), p);
    A.y = mulm(R.Y, mulm(zi, mulm(zi, zi, p), p), p);
    return A;
  endfunction

  // p' = -p^-1 mod 2^17, by Newton iteration
  function automatic big_t mont_pinv(big_t p);
    big_t x = p;
    for (int i = 0; i < 6; i++) x = (x * (2 - p * x)) & big_t'(17'h1ffff);
    return (big_t'(1 << 17) - x) & big_t'(17'h1ffff);
  endfunction

  // curve through a given point: b = y^2 - x^3 - a*x
  function automatic big_t curve_b(big_t p, big_t a, apt_t P);
    return subm(subm(mulm(P.y, P.y, p), mulm(mulm(P.x, P.x, p), P.x, p), p),
                mulm(a, P.x, p), p);
  endfunction

endpackage
