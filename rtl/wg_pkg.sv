// Shared constants and arithmetic of the WG (Welch-Gong) stream cipher over
// GF(2^29).
//
// Field elements are 29-bit vectors in the normal basis {g, g^2, g^4, ...,
// g^(2^28)} of the normal element g ("gamma"): bit i is the coefficient of
// gamma^(2^i). In this basis
//   * squaring is a cyclic rotation: x^(2^r) moves bit i to bit (i+r) mod 29
//     (nb_frob; the thesis draws it as a cyclic right shift ">> r" of the
//     vector written bit 0 first),
//   * the element 1 is all ones, so x + 1 is bitwise inversion,
//   * the trace is the XOR of all bits.
// The field is defined by the primitive polynomial g(x) of the thesis
// (eq. 2.13) and gamma by its polynomial-basis form (eq. 2.14), including the
// term beta^4 (without it the 29 conjugates of gamma are linearly dependent and
// do not form a basis; with it gamma generates an optimal normal basis, which
// is the multiplier type the thesis uses).
//
// Multiplication uses the multiplication matrix LAMBDA, derived from g(x) and
// gamma (compute_lambda): lambda[i][j] is the gamma^(2^0) coordinate
// of gamma^(2^i) * gamma^(2^j), and
//   c_k = XOR over (i,j) with lambda[i][j]=1 of a[(i+k)%29] & b[(j+k)%29].
// For this gamma every row of LAMBDA has at most two ones (57 in all), i.e. an
// optimal normal basis of type II.
package wg_pkg;

  localparam int unsigned M = 29;
  typedef logic [M-1:0] gf_t;

  // g(x) = x^29+x^28+x^24+x^21+x^20+x^19+x^18+x^17+x^14+x^12+x^11+x^10+x^7+x^6+x^4+x+1
  localparam logic [M:0] G_POLY = 30'h313E_5CD3;
  // gamma in the polynomial basis {1, beta, ..., beta^28}
  localparam gf_t GAMMA_PB = 29'h0D93_FCFE;
  // gamma in its own normal basis, the LFSR feedback coefficient
  localparam gf_t GAMMA_NB = 29'd1;

  // x^(2^r) in the normal basis.
  function automatic gf_t nb_frob(input gf_t x, input int unsigned r);
    gf_t y;
    for (int i = 0; i < M; i++) y[(i + r) % M] = x[i];
    return y;
  endfunction

  // Multiplication in the polynomial basis, reduced by g(x); used only to
  // derive LAMBDA (compute_lambda).
  function automatic gf_t pb_mul(input gf_t a, input gf_t b);
    logic [2*M-2:0] p;
    p = '0;
    for (int i = 0; i < M; i++)
      if (b[i]) p = p ^ ((2*M-1)'(a) << i);
    for (int i = 2*M-2; i >= M; i--)
      if (p[i]) p = p ^ ((2*M-1)'(G_POLY) << (i - M));
    return p[M-1:0];
  endfunction

  typedef gf_t lambda_t [M];

  function automatic lambda_t compute_lambda();
    gf_t      conj [M];     // gamma^(2^i) in the polynomial basis
    logic [M:0] rows [M];   // augmented system conj[i] . r = (i == 0)
    gf_t      r;            // dual vector: picks the gamma coordinate
    gf_t      row;
    lambda_t  lam;
    int       piv;
    logic [M:0] tmp;
    conj[0] = GAMMA_PB;
    for (int i = 1; i < M; i++) conj[i] = pb_mul(conj[i-1], conj[i-1]);
    for (int i = 0; i < M; i++) rows[i] = {(i == 0), conj[i]};
    // Gauss-Jordan elimination over GF(2), column c in bit c.
    for (int c = 0; c < M; c++) begin
      piv = -1;
      for (int i = c; i < M; i++)
        if (piv < 0 && rows[i][c]) piv = i;
      if (piv >= 0) begin
        tmp = rows[c]; rows[c] = rows[piv]; rows[piv] = tmp;
        for (int i = 0; i < M; i++)
          if (i != c && rows[i][c]) rows[i] = rows[i] ^ rows[c];
      end
    end
    for (int c = 0; c < M; c++) r[c] = rows[c][M];
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) row[j] = ^(pb_mul(conj[i], conj[j]) & r);
      lam[i] = row;
    end
    return lam;
  endfunction

  // The ones of LAMBDA as (row i, column j) pairs, row by row: row 0 holds
  // one, every other row two. Pair n lies in row pair_i(n) = (n + 1) / 2 and
  // column PAIR_J[n]. Each pair contributes one AND term to every product
  // bit. The table is what compute_lambda() yields for g(x) and gamma above;
  // it is written out because evaluating compute_lambda in every tool run is
  // slow, and the multiplier testbench checks that the two agree.
  localparam int unsigned NPAIRS = 2 * M - 1;
  typedef int unsigned pair_idx_t [NPAIRS];

  localparam pair_idx_t PAIR_J = '{
    1, 0, 21, 6, 21, 13, 18, 11, 27, 17, 20, 2, 22, 13, 25,
    9, 10, 8, 14, 8, 26, 4, 14, 17, 24, 3, 7, 9, 11, 24,
    26, 19, 23, 5, 12, 3, 22, 16, 27, 5, 28, 1, 2, 6, 18,
    16, 25, 12, 15, 7, 23, 10, 15, 4, 19, 20, 28
  };

  function automatic int unsigned pair_i(input int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Full normal-basis product a * b (reference form, used by testbenches).
  function automatic gf_t nb_mul(input gf_t a, input gf_t b);
    gf_t c;
    c = '0;
    for (int k = 0; k < M; k++)
      for (int n = 0; n < NPAIRS; n++)
        c[k] = c[k] ^ (a[(pair_i(n) + k) % M] & b[(PAIR_J[n] + k) % M]);
    return c;
  endfunction

endpackage
