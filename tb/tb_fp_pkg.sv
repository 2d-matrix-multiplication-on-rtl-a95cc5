// tb_fp_pkg -- helpers shared by the testbenches: conversion of the array's
// floating-point words to and from SystemVerilog reals, random operands and
// the pass/fail bookkeeping.  The conversions are written from the number
// format alone (sign, biased exponent, fraction with hidden one; exponent 0 is
// zero) and share no code with the design.
package tb_fp_pkg;
  import fp3d_pkg::*;

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2real(fp_t x);
    real m;
    if (x.exp == 0) return 0.0;
    m = 1.0 + real'(x.frac) / pow2(FRAC_W);
    m = m * pow2(int'(x.exp) - int'(BIAS));
    return x.sign ? -m : m;
  endfunction

  // Exact word for a small integer (|v| < 2**FRAC_W).
  function automatic fp_t int2fp(int v);
    fp_t r;
    int  mag, p;
    r = '0;
    if (v == 0) return r;
    r.sign = (v < 0);
    mag = (v < 0) ? -v : v;
    p = 0;
    for (int i = 0; i < 31; i++) if (mag >= (1 << i)) p = i;
    r.exp  = EXP_W'(p + int'(BIAS));
    r.frac = FRAC_W'((longint'(mag) - (longint'(1) << p)) << (FRAC_W - p));
    return r;
  endfunction

  // Random normal word with unbiased exponent in [elo, ehi].
  function automatic fp_t rand_fp(int elo, int ehi);
    fp_t r;
    r.sign = 1'($urandom);
    r.exp  = EXP_W'(int'(BIAS) + elo + int'($urandom % unsigned'(ehi - elo + 1)));
    r.frac = FRAC_W'($urandom);
    return r;
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction
endpackage
