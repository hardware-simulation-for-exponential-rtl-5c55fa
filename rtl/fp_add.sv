// fp_add -- 32-bit floating-point adder or subtractor (the "AddSub" block on
// XFloat_8_24 signals).
//
// y = a + b (SUB = 0) or a - b (SUB = 1). The operand of larger magnitude
// is taken as the reference; the other significand is shifted right by the
// exponent difference with 30 guard bits, the bits shifted out beyond them
// folded into a sticky bit. The aligned significands are added or
// subtracted according to the signs, and exp_bet_pkg::fp_pack normalises
// and rounds to nearest-even. An exact zero result is +0. Infinity and NaN
// operands are not treated specially (the metric datapath never forms
// them).
//
// Timing: LATENCY register stages after the adder (0 in the block
// diagrams), one sum per clock.
module fp_add
  import exp_bet_pkg::*;
#(
  parameter bit SUB = 1'b0,
  parameter int LATENCY = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  fp32_t       bb, lg, sm;
  int          d;
  logic [63:0] mb, ms, ms_sh, mag;
  logic        sticky;
  fp32_t       y_comb;

  always_comb begin
    bb      = b;
    bb.sign = b.sign ^ SUB;
    if ({a.exp, a.man} >= {bb.exp, bb.man}) begin
      lg = a;  sm = bb;
    end else begin
      lg = bb; sm = a;
    end
    mb = fp_is_zero(lg)   ? 64'd0 : 64'(fp_sig(lg))   << 30;
    ms = fp_is_zero(sm) ? 64'd0 : 64'(fp_sig(sm)) << 30;
    d  = int'(lg.exp) - int'(sm.exp);
    if (d >= 60) begin
      ms_sh  = 64'd0;
      sticky = ms != 64'd0;
    end else begin
      ms_sh  = ms >> d;
      sticky = (ms & ((64'd1 << d) - 64'd1)) != 64'd0;
    end
    ms_sh = ms_sh | 64'(sticky);
    mag   = (lg.sign == sm.sign) ? mb + ms_sh : mb - ms_sh;
    if (mag == 64'd0)
      y_comb = FP_ZERO;
    else
      y_comb = fp_pack(lg.sign, int'(lg.exp) - FP_BIAS - 23 - 30, mag);
  end

  pipe_delay #(.W(33), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
