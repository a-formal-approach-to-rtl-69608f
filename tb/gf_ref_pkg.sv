// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. Field multiplication is done bit-serially (Horner's rule,
// most significant coefficient of b first, reducing after every shift), which
// shares nothing with the parallel partial-product structure under test.
package gf_ref_pkg;

  typedef logic [128:0] rpoly_t;   // bit i = coefficient of beta^i

  // a * b mod ip over GF(2^m); a and b of degree below m, ip with bit m set
  function automatic rpoly_t ref_mul(input int m, input rpoly_t ip,
                                     input rpoly_t a, input rpoly_t b);
    rpoly_t r;
    r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r = r ^ ip;
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  // remainder of a polynomial p of degree below 2m after division by ip
  function automatic rpoly_t ref_reduce(input int m, input rpoly_t ip, input rpoly_t p);
    for (int i = 2 * m - 2; i >= m; i--)
      if (p[i]) p = p ^ (ip << (i - m));
    return p;
  endfunction

  // beta^e mod ip, by repeated multiplication
  function automatic rpoly_t ref_beta_pow(input int m, input rpoly_t ip, input int e);
    rpoly_t r, b;
    r = rpoly_t'(1);
    b = rpoly_t'(2);
    for (int i = 0; i < e; i++) r = ref_mul(m, ip, r, b);
    return r;
  endfunction

  // 1 when the plain carry-less product of a and b reaches degree m or more,
  // that is when the reduction by ip actually has work to do
  function automatic bit needs_reduction(input int m, input rpoly_t a, input rpoly_t b);
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++)
        if (a[i] && b[j] && i + j >= m) return 1'b1;
    return 1'b0;
  endfunction

  // random element of GF(2^m)
  function automatic rpoly_t rand_elem(input int m);
    rpoly_t r;
    r = {$urandom, $urandom, $urandom, $urandom, $urandom};
    return r & ((rpoly_t'(1) << m) - 1);
  endfunction

  // polynomial from a list of exponents packed as a bitmask on the low bits
  function automatic rpoly_t poly_of(input int m, input logic [127:0] low_terms);
    return (rpoly_t'(1) << m) | rpoly_t'(low_terms);
  endfunction

endpackage
