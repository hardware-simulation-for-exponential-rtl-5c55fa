// tb_util_pkg -- helpers shared by the testbenches of the EXP-BET metric
// datapath: conversion of 32-bit float and fixed-point words to real
// numbers, real to fixed-point quantisation, relative error, and random
// float operands. They are written directly from the number formats and do
// not reuse any of the design's arithmetic.
package tb_util_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i > e; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * pow2(int'(f[30:23]) - 127);
    return f[31] ? -m : m;
  endfunction

  function automatic real fx2r(input longint v, input int frac);
    return real'(v) / pow2(frac);
  endfunction

  // Nearest fixed-point code of v with frac fractional bits.
  function automatic longint r2fx(input real v, input int frac);
    real s;
    s = v * pow2(frac);
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  function automatic real rel_err(input real got, input real want);
    real d;
    d = got - want;
    if (d < 0.0) d = -d;
    if (want == 0.0) return d;
    return (want < 0.0) ? d / -want : d / want;
  endfunction

  // Random normal float with unbiased exponent in [emin, emax].
  function automatic logic [31:0] rand_fp(input int emin, input int emax,
                                          input bit allow_neg);
    logic [31:0] f;
    f[31]    = allow_neg ? 1'($urandom) : 1'b0;
    f[30:23] = 8'(emin + 127 + int'($urandom % 32'(emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // BET metric 1/R(t), R(t) = beta*r(t) + (1-beta)*R(t-1).
  function automatic real bet_ref(input real r_now, input real beta, input real r_prev);
    return 1.0 / (beta * r_now + (1.0 - beta) * r_prev);
  endfunction

  // EXP rule metric exp(alpha*D/(1+sqrt(sum_D/N_RT)))*Gamma, alpha = 5/(0.99 tau).
  function automatic real exp_ref(input real tau, input real dhol, input real n_rt,
                                  input real dhol_sum, input real gamma);
    real alpha;
    alpha = 5.0 / (0.99 * tau);
    return $exp(alpha * dhol / (1.0 + $sqrt(dhol_sum / n_rt))) * gamma;
  endfunction

endpackage
