# EXP-BET scheduler metric engine

An LTE base station has to decide, every transmission interval, which user
gets each resource block. EXP-BET handles real-time and non-real-time traffic
at once by ranking them with two different priority metrics:

* **EXP rule** for real-time flows (video, VoIP). A flow whose head-of-line
  packet has waited long compared with the other real-time flows gets an
  exponentially growing priority, scaled by how efficiently the user can use
  the resource block:

  ```
  alpha  = 5 / (0.99 * tau)                 tau   : the flow's delay budget
  avgD   = sum_D / N_RT                      sum_D : head-of-line delays summed over the N_RT real-time flows
  metric = exp( alpha * D_HOL / (1 + sqrt(avgD)) ) * Gamma
  ```

* **BET (Blind Equal Throughput)** for non-real-time flows (web, mail). The
  user whose long-run throughput is lowest is served first:

  ```
  R(t)   = beta * r(t) + (1 - beta) * R(t-1)     r(t): rate achieved now, R: moving average
  metric = 1 / R(t)
  ```

This RTL computes both metrics in hardware, one metric unit of each kind,
fully pipelined so that a new user or flow can be presented every clock. It
is a register-transfer rendering of a dataflow model originally built from
Xilinx System Generator blocks (multipliers, adders, dividers, a square root,
a CORDIC, type converters). The block names used below (`Mult1`, `Divide2`,
`Convert7`, ...) are the names of that model. Choosing the user with the
highest metric is not part of this engine.

## Two number systems

The datapath mixes two kinds of arithmetic, and most of its complexity comes
from passing values between them:

* **Fixed point**, written `Fix_W_F`: signed two's complement, `W` bits in
  all, `F` of them after the binary point. All inputs are fixed point, and
  so are the multipliers and the adders around them.
* **32-bit floating point** (`fp32_t` in `exp_bet_pkg`): 8-bit exponent and
  24-bit significand with hidden bit, the IEEE single layout. The divides,
  the square root, the constant multiply and the final multiply use it,
  because their operands span far too wide a range for one fixed format.
  For example, `alpha` is about 500 while `1/N_RT` is about 0.03.

`fx_to_fp` and `fp_to_fx` are the `Convert` blocks between the two.

| input            | port        | format    | range              |
|------------------|-------------|-----------|--------------------|
| r(t)             | `r_now`     | Fix_16_12 | -8 .. 7.9998       |
| beta             | `beta`      | Fix_16_12 | 0 .. 1 in use      |
| R(t-1)           | `r_prev`    | Fix_16_10 | -32 .. 31.999      |
| tau              | `tau`       | Fix_16_14 | -2 .. 1.99994 s    |
| D_HOL            | `dhol`      | Fix_16_16 | -0.5 .. 0.49998 s  |
| N_RT             | `n_rt`      | Fix_16_10 | integer count here |
| sum of D_HOL     | `dhol_sum`  | Fix_16_14 | -2 .. 1.99994 s    |
| Gamma            | `gamma`     | Fix_16_10 | -32 .. 31.999      |

Both metric outputs are `fp32_t`.

## BET unit (`bet_metric`)

```
beta ─┬─────────────── Mult  (beta*r, Fix_32_24, 3 clk) ──────────┐
r(t) ─┘                                                            ├ AddSub1 (Fix_36_24) ─ Convert ─ Divide 1.0/R (6 clk) ─ metric
1.0 ─ AddSub (1-beta, Fix_19_14) ─ Mult1 ((1-beta)*R(t-1), Fix_35_24, 3 clk) ┘
R(t-1) ────────────────────────────┘
```

Everything before the divider is exact, because each fixed-point stage is
wide enough for the full result. The only rounding is the conversion of R(t)
to float and the divide. Latency is 9 clocks. `r_avg` exposes R(t) three
clocks after the inputs, so that the next average can be fed back.

Note where `beta` goes. In this unit `beta` weights the **new** rate r(t),
and `1-beta` weights the old average. This matches how the original model is
wired, and its published operating point agrees: r = 5, beta = 0.1 and
R(t-1) = 10 give 1/9.5 = 0.1053. The usual textbook statement of the
average is `beta*R(t-1) + (1-beta)*r(t)`, which would give 1/5.5 here. To use
that convention, drive `beta` with `1 - beta`.

## EXP rule unit (`exp_metric`)

This is the long path. It contains three float dividers, a square root and a
CORDIC, and the alignment of its branches is the part to understand before
changing any latency.

```
 branch A:  tau ─Convert2─CMult1(*0.99)─Divide(5/.) 19─Convert3 Fix_32_14─Mult(*D_HOL) 3─Convert6─[+17]─┐
 branch B:  N_RT─Convert1─Divide1(1/.) 19─Convert4 Fix_16_14─Mult1(*sum_D) 3─Convert5─SquareRoot 17─AddSub(+1)─┤
                                                                                                             Divide2 6
   ┌─────────────────────────────────────────────────────────────────────────────────────────────────────────┘
   └─Convert7 Fix_16_13─CORDIC (cosh, sinh) 28─AddSub1 (cosh+sinh = exp)─Convert11─Mult2 (*Gamma) 3─ metric
```

**Latency budget** (clocks): 19 (Divide/Divide1) + 3 (Mult/Mult1) + 17
(SquareRoot) + 6 (Divide2) + 28 (CORDIC) + 3 (Mult2) = **76**.

**Branch alignment.** In the original model the inputs were constants, so
nothing had to line up. Here the inputs stream, so four delay lines keep each
input set together:

* `D_HOL` and `sum_D` are delayed by `DIV_LATENCY` (19) to meet `alpha` and
  `1/N_RT` at `Mult` and `Mult1`.
* Branch A is shorter than branch B by the square root's latency, so its
  result waits `SQRT_LATENCY` (17) more clocks before `Divide2`.
* `Gamma` is delayed by 73 clocks to meet exp() at `Mult2`.

An assertion checks that the two `Divide2` operands are always valid
together. If you change one latency parameter, the delay lines follow it
automatically.

**The Fix_16_14 bottleneck.** `Mult` writes `alpha * D_HOL` in Fix_16_14, so
that product must stay below 2. Because alpha is 5.05/tau, this means D_HOL
must stay below about 0.396·tau. Beyond that the product saturates at 2. The
format is kept from the original model.

## exp() from a hyperbolic CORDIC (`cordic_sinh_cosh`)

exp(x) = cosh(x) + sinh(x). The original model computes it with a CORDIC in
sinh/cosh mode followed by an adder (`AddSub1`), and this design keeps that
split. A hyperbolic CORDIC converges only for |x| < 1.118, but the argument
arrives as Fix_16_13 and can reach ±4. The argument at the published EXP
operating point is already 1.44. The unit therefore works in three steps:

1. **Reduce.** k = round(x / ln 2), r = x − k·ln 2, so |r| ≤ 0.35.
2. **Rotate.** 26 pipelined rotation-mode iterations (shifts 1..24, with 4
   and 13 repeated, as the hyperbolic iteration needs for convergence) take
   X = 1/K, Y = 0, Z = r to X = cosh r and Y = sinh r. The working format
   is Q24 in 40 bits.
3. **Rebuild.** With P = e^r = X + Y and M = e^−r = X − Y:
   cosh x = (P·2^k + M·2^−k)/2 and sinh x = (P·2^k − M·2^−k)/2.

The outputs are Fix_20_14, so cosh 4 = 27.3 fits. The original Fix_16_14 would
clip at 2, so `AddSub1` is widened to Fix_21_14 to match. The arctanh table
and the gain constant in `exp_bet_pkg` are round(atanh(2^−i)·2^24) for
i = 1..7 (from i = 8 on, the value is exactly 2^(24−i)) and
1/∏√(1−2^−2i) over the iteration sequence.

## Floating-point units

`fp_add`, `fp_mult`, `fp_div` and `fp_sqrt` share one approach. Each forms
its result as an exact integer magnitude times a power of two. Any bits it
drops are folded into the least significant bit as a sticky bit:

* the multiplier takes the 48-bit product of the significands;
* the divider takes the quotient of the dividend significand shifted by 40,
  with its remainder as the sticky bit;
* the square root takes a 31-bit restoring root of the significand shifted
  by 36, with its remainder as the sticky bit;
* the adder takes the aligned sum with 30 guard bits.

The package function `fp_pack` then normalises the magnitude and rounds to
nearest-even. Results below the normal range flush to zero, and results
above it become infinity. Divide by zero gives infinity, and the square root
of a negative number gives NaN.

Each unit computes in one combinational stage and then passes the result
through `LATENCY` registers (`pipe_delay`). This gives the same cycle
behaviour as the original pipelined cores. To meet the original 30 ns
(33.333 MHz) target, synthesis has to retime those registers into the
divider and square-root arrays. Without retiming, the dividers are the
critical path.

## Interface and timing

* `exp_bet_top` holds one `bet_metric` and one `exp_metric`. Each has its
  own `*_in_valid` and `*_out_valid`; `clk` and the synchronous active-high
  `rst` are shared.
* Every unit accepts one input set per clock. Its result appears with
  `out_valid` a fixed number of clocks later: 9 for BET and 76 for EXP with
  the defaults. There is no back-pressure.
* Reset clears every pipeline register, data included.

Latency parameters and their defaults: `bet_metric.MULT_LATENCY = 3` and
`DIV_LATENCY = 6`; `exp_metric.DIV_LATENCY = 19`, `DIV2_LATENCY = 6`,
`SQRT_LATENCY = 17` and `MULT_LATENCY = 3`. The generic units (`fx_mult`,
`fx_addsub`, `fx_to_fp`, `fp_to_fx`) also take their formats as parameters.

## How far to trust it, and where it departs from the original

Verified in simulation:

* every arithmetic unit against double-precision references on thousands of
  random operands, with exact results for the fixed-point units and
  1.2e-7 relative (about one unit in the last place) for the float units;
* both metric units against their equations;
* every latency, cycle-exact.

BET metrics agree with the equation to 2.5e-7 relative. EXP metrics agree to
3e-3 relative. The fixed-point stages between the float units limit the EXP
accuracy, mainly `1/N_RT` in Fix_16_14 and the argument in Fix_16_13.

Departures and choices of this design:

* **BET weighting.** `beta` weights r(t), as wired and confirmed by the
  reference output 0.1053 (see above).
* **EXP reference value.** For tau = 0.01, D_HOL = 0.003, N_RT = 10,
  delay input 0.03 and Gamma = 3, this unit returns 12.635. Evaluating the
  equation on those values gives 12.64. The original hardware reported
  10.16, which the equation does not produce, and its Fix_16_14 CORDIC output
  could not hold exp(1.44) = 4.2. This design follows the equation.
* **The fourth EXP input is a sum.** It is labelled "average D_HOL" in the
  original, but the datapath multiplies it by 1/N_RT, so it must carry the
  sum of the head-of-line delays.
* **Widened exp() stage**, range reduction in the CORDIC, alignment delays
  for streaming inputs, and constants held as float localparams instead of
  being converted each clock.
* **Rounding and overflow rules.** Fixed-point blocks truncate and saturate.
  Float-to-fixed conversion rounds to nearest and saturates. Float units
  round to nearest-even.
* **Reset and valid strobes** are additions of this design.

Not included: the host-side gateways that convert between software doubles
and the fixed-point ports, the Ethernet co-simulation link, and the final
selection of the highest-metric user.

## Files

| file | role |
|------|------|
| `rtl/exp_bet_pkg.sv` | `fp32_t`, CORDIC constants, `fp_pack` rounding |
| `rtl/exp_bet_top.sv` | top: BET and EXP units side by side |
| `rtl/bet_metric.sv`, `rtl/exp_metric.sv` | the two metric datapaths |
| `rtl/fx_mult.sv`, `rtl/fx_addsub.sv` | fixed-point multiply, add/subtract |
| `rtl/fp_add.sv`, `rtl/fp_mult.sv`, `rtl/fp_div.sv`, `rtl/fp_sqrt.sv` | float units |
| `rtl/fx_to_fp.sv`, `rtl/fp_to_fx.sv` | conversions |
| `rtl/cordic_sinh_cosh.sv` | cosh/sinh by hyperbolic CORDIC |
| `rtl/pipe_delay.sv` | latency / alignment register chain |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_exp_bet_top` runs the whole engine at default parameters |
| `tb/tb_table5_cosim.sv` | the two reference operating points, inputs held constant for 300 clocks |
| `tb/tb_util_pkg.sv` | float/fixed to real helpers and the two reference equations |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/exp_bet_pkg.sv tb/tb_util_pkg.sv tb/tb_exp_bet_top.sv \
  --top-module tb_exp_bet_top -o sim
./obj_dir/sim
```

Replace `tb_exp_bet_top` with any other `tb_<module>` to test a single
unit. Each testbench prints `TB_RESULT checks=N failures=M` and stops
itself through a watchdog if results stop arriving. The top-level testbench
also reports the BET and EXP values at the reference operating points and
counts back-to-back results, clocks in which both units deliver, and input
gaps.
