// lis_tb_pkg: helpers shared by the testbenches: conversion of the
// floating-point format to and from real, relative-error comparison, and
// reference models (in real arithmetic) of the polynomial approximations.
package lis_tb_pkg;
  import lis_pkg::*;

  function automatic real fp2r(input fp_t a);
    real v;
    if (a.man == '0) return 0.0;
    v = real'(a.man) / 4194304.0;
    v = v * (2.0 ** real'(int'($signed(a.exp))));
    return a.sign ? -v : v;
  endfunction

  function automatic fp_t r2fp(input real v);
    return fp_from_real(v);
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // true when got is within rel of want (or within abs_tol absolutely)
  function automatic bit close(input real got, input real want, input real rel,
                               input real abs_tol);
    real d;
    d = rabs(got - want);
    return (d <= abs_tol) || (d <= rel * rabs(want));
  endfunction

  // the exponential's nested polynomial, exactly as the hardware evaluates it
  function automatic real exp_model(input real x);
    real q, a;
    q = x + 1.5;
    a = q / 720.0 + 1.0 / 120.0;
    a = a * q + q / 24.0 + 1.0 / 6.0;
    a = ((a * q + 0.5) * q + 1.0) * q + 1.0;
    return a * 0.22313016014842982;
  endfunction

  // the logarithm's polynomial ln(1+x) around x = 0.625
  function automatic real log1p_model(input real x);
    real t, a;
    t = x - 0.625;
    a = 0.2 - 4.0 * t / 39.0;
    a = -1.0 + (32.0 * t / 13.0) * a;
    a = 1.0 / 3.0 + (2.0 * t / 13.0) * a;
    a = -1.0 + (16.0 * t / 13.0) * a;
    return 0.1009 + 8.0 * x / 13.0 + (32.0 * t * t / 169.0) * a;
  endfunction

  // random real in [lo, hi)
  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction
endpackage
