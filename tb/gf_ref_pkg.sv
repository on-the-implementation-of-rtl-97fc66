// gf_ref_pkg: reference arithmetic for the testbenches.
//
// Plain behavioural GF(2^m) arithmetic written independently of the design:
// the product is the full polynomial product reduced from the top down,
// inverses are found by exhaustive search, traces by repeated squaring, and
// normal-basis coordinates by searching all 2^m coordinate vectors. Elements
// are ints whose bit i is the coefficient of alpha^i; p includes its x^m bit.
package gf_ref_pkg;

  function automatic int rmul(int a, int b, int m, int p);
    int prod;
    prod = 0;
    for (int i = 0; i < m; i++)
      if ((b >> i) & 1) prod = prod ^ (a << i);
    for (int i = 2*m - 2; i >= m; i--)
      if ((prod >> i) & 1) prod = prod ^ (p << (i - m));
    return prod;
  endfunction

  function automatic int rpow(int a, int e, int m, int p);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r = rmul(r, a, m, p);
    return r;
  endfunction

  function automatic int rinv(int a, int m, int p);
    for (int x = 1; x < (1 << m); x++)
      if (rmul(a, x, m, p) == 1) return x;
    return 0;
  endfunction

  // Tr(z) = z + z^2 + ... + z^(2^(m-1)), returned as 0 or 1
  function automatic int rtrace(int z, int m, int p);
    int t, s;
    t = 0;
    s = z;
    for (int k = 0; k < m; k++) begin
      t = t ^ s;
      s = rmul(s, s, m, p);
    end
    return t & 1;
  endfunction

  // dual-basis coordinates z'_k = Tr(z * alpha^k), packed with z'_k at bit k
  function automatic int to_dual(int z, int m, int p);
    int r;
    r = 0;
    for (int k = 0; k < m; k++)
      r = r | (rtrace(rmul(z, rpow(2, k, m, p), m, p), m, p) << k);
    return r;
  endfunction

  // normal basis beta^(2^i), beta = alpha^e: coordinates -> standard basis
  function automatic int nb_to_std(int c, int e, int m, int p);
    int r, v;
    r = 0;
    v = rpow(2, e, m, p);
    for (int i = 0; i < m; i++) begin
      if ((c >> i) & 1) r = r ^ v;
      v = rmul(v, v, m, p);
    end
    return r;
  endfunction

  function automatic int std_to_nb(int x, int e, int m, int p);
    for (int c = 0; c < (1 << m); c++)
      if (nb_to_std(c, e, m, p) == x) return c;
    return -1;
  endfunction

endpackage
