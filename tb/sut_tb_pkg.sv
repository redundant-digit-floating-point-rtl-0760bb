// sut_tb_pkg: reference arithmetic for the SUT adder testbenches. Every
// function here decodes the formats from their definitions, independently
// of the helper functions the RTL uses:
//   digit    = 8*(n3-1) + 4*p2 + 2*p1 + p0 + (2*u-1)
//   exponent = 32*e7 + sum_k (n[k]-1)*2^k + (n2b-1)
//   number   = sum_i digit_i * 16^(i-6) * 16^exponent
//   IEEE     = (-1)^s * (1 + x/2^23) * 2^(e-127)
package sut_tb_pkg;
  import sut_pkg::*;

  function automatic int dval(sut_digit_t d);
    return 8 * (int'(d.n3) - 1) + 4 * int'(d.p2) + 2 * int'(d.p1) + int'(d.p0)
           + 2 * int'(d.u) - 1;
  endfunction

  function automatic int eval_exp(sut_exp_t e);
    int v;
    v = 32 * int'(e.e7) + int'(e.n2b) - 1;
    for (int k = 0; k < 5; k++) v += (int'(e.n[k]) - 1) * (1 << k);
    return v;
  endfunction

  function automatic real pow2(int k);
    real r;
    r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  // Significand as an integer in units of the least-significant digit.
  function automatic longint sig_int(sut_digit_t [NDIG-1:0] s);
    longint v;
    v = 0;
    for (int i = NDIG - 1; i >= 0; i--) v = v * 16 + longint'(dval(s[i]));
    return v;
  endfunction

  function automatic real num_value(sut_num_t n);
    return real'(sig_int(n.sig)) * pow2(4 * (eval_exp(n.exp) - (NDIG - 1)));
  endfunction

  // One unit in the last digit of a number with exponent e.
  function automatic real ulp_of(sut_exp_t e);
    return pow2(4 * (eval_exp(e) - (NDIG - 1)));
  endfunction

  function automatic real ieee_value(logic [31:0] f);
    real m;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * pow2(int'(f[30:23]) - 127);
    return f[31] ? -m : m;
  endfunction

  function automatic real absr(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // A random normal IEEE single with biased exponent in [lo, hi].
  function automatic logic [31:0] rand_ieee(int lo, int hi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(lo + int'($urandom % (hi - lo + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // A random SUT digit with p0 and u not both 0 when neg_ok is set.
  function automatic sut_digit_t rand_digit(bit neg_ok);
    sut_digit_t d;
    do d = 5'($urandom); while (neg_ok && !d.p0 && !d.u);
    return d;
  endfunction
endpackage
