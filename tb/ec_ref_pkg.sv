// ec_ref_pkg: reference model for the testbenches. Affine short-Weierstrass
// arithmetic over F_p for p below 2^62, written directly from the group law
// (chord and tangent), independent of the projective microcode.
package ec_ref_pkg;
  typedef struct { longint x; longint y; bit inf; } pt_t;

  function automatic longint mulm(longint a, longint b, longint p);
    logic [127:0] t;
    t = 128'(a) * 128'(b);
    return longint'(t % 128'(p));
  endfunction
  function automatic longint powm(longint a, longint e, longint p);
    longint r = 1;
    longint b = a % p;
    while (e > 0) begin
      if (e[0]) r = mulm(r, b, p);
      b = mulm(b, b, p);
      e = e >>> 1;
    end
    return r;
  endfunction
  function automatic longint invm(longint a, longint p);
    return powm(a, p - 2, p);
  endfunction
  function automatic longint subm(longint a, longint b, longint p);
    return ((a - b) % p + p) % p;
  endfunction

  function automatic pt_t padd(pt_t P, pt_t Q, longint a, longint p);
    pt_t R; longint l;
    if (P.inf) return Q;
    if (Q.inf) return P;
    if (P.x == Q.x) begin
      if ((P.y + Q.y) % p == 0) begin R.inf = 1; R.x = 0; R.y = 0; return R; end
      l = mulm((mulm(3, mulm(P.x, P.x, p), p) + a) % p, invm((2 * P.y) % p, p), p);
    end else
      l = mulm(subm(Q.y, P.y, p), invm(subm(Q.x, P.x, p), p), p);
    R.inf = 0;
    R.x = subm(subm(mulm(l, l, p), P.x, p), Q.x, p);
    R.y = subm(mulm(l, subm(P.x, R.x, p), p), P.y, p);
    return R;
  endfunction

  function automatic pt_t smul(longint k, pt_t P, longint a, longint p);
    pt_t R, B;
    R.inf = 1; R.x = 0; R.y = 0; B = P;
    while (k > 0) begin
      if (k[0]) R = padd(R, B, a, p);
      B = padd(B, B, a, p);
      k = k >>> 1;
    end
    return R;
  endfunction

  // first point with x >= x0 on y^2 = x^3 + a x + b
  function automatic pt_t find_point(longint x0, longint a, longint b, longint p);
    pt_t P; longint rhs;
    P.inf = 0;
    for (longint x = x0; x < p; x++) begin
      rhs = (mulm(mulm(x, x, p), x, p) + mulm(a, x, p) + b) % p;
      if (p % 4 == 3) begin
        longint y;
        y = powm(rhs, (p + 1) / 4, p);
        if (mulm(y, y, p) == rhs) begin P.x = x; P.y = y; return P; end
      end else if (powm(rhs, (p - 1) / 2, p) == 1 || rhs == 0) begin
        for (longint y = 0; y < p; y++)
          if (mulm(y, y, p) == rhs) begin P.x = x; P.y = y; return P; end
      end
    end
    P.inf = 1; P.x = 0; P.y = 0;
    return P;
  endfunction
endpackage
