// tb_pkg: helpers shared by the testbenches: conversion between real numbers
// and the processor's word format (mantissa m: MW-bit two's complement
// fraction, exponent e: value = m * 2^e), independent of the RTL.
package tb_pkg;
  import arith_pkg::*;

  function automatic real to_real(word_t w);
    real m;
    m = real'(longint'(w.m)) / real'(longint'(1) << (MW - 1));
    return m * (2.0 ** real'(int'(w.e)));
  endfunction

  // Nearest normalized word: |m| in [1/2, 1) for v > 0, m in [-1, -1/2) for v < 0.
  function automatic word_t to_word(real v);
    word_t  w;
    real    a, f;
    int     e;
    longint mi;
    if (v == 0.0) return '0;
    a = (v < 0.0) ? -v : v;
    e = 0;
    while (a >= 1.0) begin a = a / 2.0; e++; end
    while (a < 0.5)  begin a = a * 2.0; e--; end
    // now a in [1/2, 1)
    if (v < 0.0 && a == 0.5) begin a = 1.0; e--; end
    f  = (v < 0.0) ? -a : a;
    mi = longint'(f * real'(longint'(1) << (MW - 1)));
    if (mi > (longint'(1) << (MW - 1)) - 1) mi = (longint'(1) << (MW - 1)) - 1;
    w.m = mi[MW-1:0];
    w.e = e[EW-1:0];
    return w;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // relative closeness with a floor for values near zero
  function automatic bit close(real got, real exp, real tol);
    real d;
    d = absr(got - exp);
    return d <= tol * ((absr(exp) > 1.0e-30) ? absr(exp) : 1.0);
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction
endpackage
