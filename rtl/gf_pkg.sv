// gf_pkg: shared constants and elaboration-time helper functions for the
// GF(2^m) operator units.
//
// A field element in standard (polynomial) basis is an m-bit vector whose
// bit i is the coefficient of alpha^i. The field polynomial p(x) is given as
// an (m+1)-bit vector with bit m set, e.g. 5'b10011 = x^4 + x + 1, the
// polynomial used by every GF(2^4) example this design follows.
//
// The functions below are only used to work out constant matrices and masks
// while the design elaborates (squarer, square-root, constant multipliers,
// the normal-basis function f). None of them becomes logic by itself; the
// modules turn the resulting constants into AND/XOR networks.
package gf_pkg;

  // Largest field degree the helpers support.
  localparam int MAXM = 16;

  // Default field of the worked examples: GF(2^4), p(x) = x^4 + x + 1.
  localparam int DEF_M = 4;
  localparam logic [DEF_M:0] DEF_P = 5'b10011;

  typedef logic [MAXM-1:0] elem_t;
  // mat_t[row] is one row of an m x m GF(2) matrix; bit c is column c.
  typedef logic [MAXM-1:0][MAXM-1:0] mat_t;
  // Product-term mask: bit (i*MAXM + j) stands for the term a_i*b_j.
  typedef logic [MAXM*MAXM-1:0] pmask_t;

  // a * x mod p(x)
  function automatic elem_t mulx(elem_t a, int m, logic [MAXM:0] p);
    elem_t r;
    r = a << 1;
    if (a[m-1]) r = r ^ elem_t'(p[MAXM-1:0]);
    r = r & elem_t'((32'h1 << m) - 1);
    return r;
  endfunction

  // a * b mod p(x), shift-and-add
  function automatic elem_t mul(elem_t a, elem_t b, int m, logic [MAXM:0] p);
    elem_t r, t;
    r = '0;
    t = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) r = r ^ t;
      t = mulx(t, m, p);
    end
    return r;
  endfunction

  // a^e mod p(x)
  function automatic elem_t pow(elem_t a, int unsigned e, int m, logic [MAXM:0] p);
    elem_t r;
    r = elem_t'(1);
    for (int unsigned i = 0; i < e; i++) r = mul(r, a, m, p);
    return r;
  endfunction

  // Matrix of the linear map x -> c * x (standard basis).
  function automatic mat_t const_mul_mat(elem_t c, int m, logic [MAXM:0] p);
    mat_t t;
    elem_t col;
    t = '0;
    for (int j = 0; j < m; j++) begin
      col = mul(c, elem_t'(1) << j, m, p);
      for (int k = 0; k < m; k++) t[k][j] = col[k];
    end
    return t;
  endfunction

  // Matrix of x -> x^(2^n) (standard basis); n = 1 is squaring, n = m-1 the square root.
  function automatic mat_t frob_mat(int n, int m, logic [MAXM:0] p);
    mat_t t;
    elem_t col;
    t = '0;
    for (int j = 0; j < m; j++) begin
      col = elem_t'(1) << j;
      for (int s = 0; s < n; s++) col = mul(col, col, m, p);
      for (int k = 0; k < m; k++) t[k][j] = col[k];
    end
    return t;
  endfunction

  // Mask of the terms a_i*b_j that reach output bit k of a standard-basis product.
  function automatic pmask_t std_prod_mask(int k, int m, logic [MAXM:0] p);
    pmask_t msk;
    elem_t xx;
    msk = '0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++) begin
        xx = pow(elem_t'(2), i + j, m, p);
        msk[i*MAXM+j] = xx[k];
      end
    return msk;
  endfunction

  // Inverse of the basis-change matrix whose column i is beta^(2^i),
  // beta = alpha^nb_exp. Row i of the result, ANDed with a standard-basis
  // vector and reduced by XOR, gives normal-basis coordinate i.
  function automatic mat_t nb_coord_mat(int unsigned nb_exp, int m, logic [MAXM:0] p);
    mat_t a, inv;
    elem_t v;
    logic [MAXM-1:0] tmp;
    int piv;
    a = '0;
    inv = '0;
    v = pow(elem_t'(2), nb_exp, m, p);
    for (int i = 0; i < m; i++) begin
      for (int r = 0; r < m; r++) a[r][i] = v[r];
      v = mul(v, v, m, p);
    end
    for (int r = 0; r < m; r++) inv[r][r] = 1'b1;
    // Gauss-Jordan elimination over GF(2)
    for (int c = 0; c < m; c++) begin
      piv = -1;
      for (int r = c; r < m; r++) if (piv < 0 && a[r][c]) piv = r;
      if (piv >= 0) begin
        tmp = a[piv];   a[piv] = a[c];     a[c] = tmp;
        tmp = inv[piv]; inv[piv] = inv[c]; inv[c] = tmp;
        for (int r = 0; r < m; r++)
          if (r != c && a[r][c]) begin
            a[r] = a[r] ^ a[c];
            inv[r] = inv[r] ^ inv[c];
          end
      end
    end
    return inv;
  endfunction

  // Terms a_i*b_j of the Massey-Omura function f, i.e. of the last
  // normal-basis coordinate d_{m-1} of the product A*B.
  function automatic pmask_t nb_f_mask(int unsigned nb_exp, int m, logic [MAXM:0] p);
    pmask_t msk;
    mat_t ci;
    elem_t vi, vj, prod;
    msk = '0;
    ci = nb_coord_mat(nb_exp, m, p);
    vi = pow(elem_t'(2), nb_exp, m, p);
    for (int i = 0; i < m; i++) begin
      vj = pow(elem_t'(2), nb_exp, m, p);
      for (int j = 0; j < m; j++) begin
        prod = mul(vi, vj, m, p);
        msk[i*MAXM+j] = ^(ci[m-1] & prod);
        vj = mul(vj, vj, m, p);
      end
      vi = mul(vi, vi, m, p);
    end
    return msk;
  endfunction

endpackage
