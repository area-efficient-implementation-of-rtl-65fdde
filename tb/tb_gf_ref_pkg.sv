// tb_gf_ref_pkg - reference arithmetic for the testbenches.
//
// Plain bit-serial models, written independently of the RTL structure:
// carry-less multiplication by the schoolbook rule c[i+j] ^= a[i] & b[j],
// reduction by long division, and the AOP ring product computed as a full
// polynomial product folded modulo x^(m+1) + 1.
package tb_gf_ref_pkg;

  localparam int unsigned VMAX = 2048;
  typedef logic [VMAX-1:0] vec_t;

  // Carry-less product of the low n bits of a and b.
  function automatic vec_t clmul(input vec_t a, input vec_t b, input int unsigned n);
    vec_t c = '0;
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = 0; j < n; j++)
        if (a[i] && b[j]) c[i+j] = ~c[i+j];
    return c;
  endfunction

  // v mod f, f of degree m given with its leading bit.
  function automatic vec_t polymod(input vec_t v, input vec_t f, input int unsigned m);
    for (int i = VMAX - 1; i >= int'(m); i--)
      if (v[i]) v = v ^ (f << (i - m));
    return v;
  endfunction

  // a*b mod x^(m+1)+1 for (m+1)-bit operands.
  function automatic vec_t aop_ring_mul(input vec_t a, input vec_t b, input int unsigned m);
    vec_t full = clmul(a, b, m + 1);
    vec_t r = '0;
    for (int unsigned k = 0; k <= 2 * m; k++)
      if (full[k]) r[k % (m + 1)] = ~r[k % (m + 1)];
    return r;
  endfunction

  // Random vector with the low n bits filled.
  function automatic vec_t rand_vec(input int unsigned n);
    vec_t v = '0;
    for (int unsigned i = 0; i < n; i += 32) v[i +: 32] = $urandom();
    for (int unsigned i = n; i < VMAX; i++) v[i] = 1'b0;
    return v;
  endfunction

endpackage
