// gf_ref_pkg: reference arithmetic for the GF(D^M) testbenches.
//
// Works on elements packed as the multipliers pack them (coefficient j in
// bits [j*W +: W]) in a 128-bit container. The product is computed the
// schoolbook way, unlike the hardware: the full product of degree 2M-2 is
// formed first, then the coefficients from the top down are cancelled with
// multiples of P(x) = x^M + p(x). Plain integer arithmetic throughout.
package gf_ref_pkg;

  localparam int MAXM = 64;
  typedef logic [127:0] elem_t;

  function automatic int unsigned dw(input int unsigned d);
    return (d <= 2) ? 1 : $clog2(d);
  endfunction

  function automatic int unsigned get_digit(input elem_t e, input int unsigned w,
                                            input int unsigned j);
    return int'((e >> (j * w)) & ((128'd1 << w) - 1));
  endfunction

  function automatic elem_t rand_elem(input int unsigned d, input int unsigned m);
    elem_t e = '0;
    int unsigned w = dw(d);
    for (int unsigned j = 0; j < m; j++)
      e |= elem_t'($urandom_range(d - 1, 0)) << (j * w);
    return e;
  endfunction

  // 1 when the plain product a*b has degree >= m, i.e. needs reduction.
  function automatic bit needs_reduction(input int unsigned d, input int unsigned m,
                                         input elem_t a, input elem_t b);
    int unsigned w = dw(d);
    int unsigned c [2*MAXM];
    for (int k = 0; k < 2*MAXM; k++) c[k] = 0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < m; j++)
        c[i+j] = (c[i+j] + get_digit(a, w, i) * get_digit(b, w, j)) % d;
    for (int unsigned k = m; k < 2*m; k++)
      if (c[k] != 0) return 1'b1;
    return 1'b0;
  endfunction

  function automatic elem_t mulmod(input int unsigned d, input int unsigned m,
                                   input elem_t a, input elem_t b, input elem_t p);
    int unsigned w = dw(d);
    int unsigned c [2*MAXM];
    elem_t r = '0;
    for (int k = 0; k < 2*MAXM; k++) c[k] = 0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < m; j++)
        c[i+j] = (c[i+j] + get_digit(a, w, i) * get_digit(b, w, j)) % d;
    // x^k = x^(k-m) * x^m = -x^(k-m) * p(x)
    for (int k = 2*m - 2; k >= int'(m); k--) begin
      int unsigned t = c[k];
      c[k] = 0;
      for (int unsigned j = 0; j < m; j++)
        c[k-m+j] = (c[k-m+j] + (d - t) * get_digit(p, w, j)) % d;
    end
    for (int unsigned j = 0; j < m; j++)
      r |= elem_t'(c[j]) << (j * w);
    return r;
  endfunction

endpackage
