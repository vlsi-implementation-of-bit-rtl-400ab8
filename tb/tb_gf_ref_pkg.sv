// tb_gf_ref_pkg: reference arithmetic for the GF(2^m) testbenches.
//
// Independent of the RTL's algorithm: a product is formed as the full
// carry-less (polynomial) product of degree up to 2m-2 and then reduced by
// long division with Q(x) = x^m + q(x), highest power first. Supports m up
// to MAXM bits.
package tb_gf_ref_pkg;

  localparam int MAXM = 512;
  typedef logic [MAXM-1:0]   elem_t;
  typedef logic [2*MAXM-1:0] wide_t;

  // (a * b) mod (x^m + q), all operands m-bit values in the low bits.
  function automatic elem_t gf_mul(elem_t a, elem_t b, elem_t q, int m);
    wide_t prod = '0;
    wide_t poly;
    for (int i = 0; i < m; i++)
      if (b[i]) prod ^= wide_t'(a) << i;
    poly = (wide_t'(1) << m) | wide_t'(q);
    for (int k = 2 * m - 2; k >= m; k--)
      if (prod[k]) prod ^= poly << (k - m);
    return elem_t'(prod) & ((elem_t'(1) << m) - 1);
  endfunction

  // x^j mod (x^m + q), j < 2m-1.
  function automatic elem_t gf_xpow(int j, elem_t q, int m);
    elem_t r = elem_t'(1);
    for (int k = 0; k < j; k++) r = gf_mul(r, elem_t'(2), q, m);
    return r;
  endfunction

endpackage
