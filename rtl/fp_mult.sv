// fp_mult -- 32-bit floating-point multiplier (the "Mult" block on
// XFloat_8_24 signals and, with a constant on one input, the "CMult"
// block).
//
// The two 24-bit significands are multiplied exactly (48 bits), the
// exponents are added, and exp_bet_pkg::fp_pack normalises and rounds the
// product to nearest-even. A zero (or subnormal) operand gives a signed
// zero; overflow gives infinity.
//
// Timing: LATENCY register stages after the multiplier (3 on Mult2 of the
// EXP rule diagram, none shown on CMult1), one product per clock.
module fp_mult
  import exp_bet_pkg::*;
#(
  parameter int LATENCY = 3
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  logic [47:0] prod;
  fp32_t       y_comb;

  always_comb begin
    prod = fp_sig(a) * fp_sig(b);
    if (fp_is_zero(a) || fp_is_zero(b))
      y_comb = '{sign: a.sign ^ b.sign, exp: 8'd0, man: 23'd0};
    else
      y_comb = fp_pack(a.sign ^ b.sign,
                       int'(a.exp) + int'(b.exp) - 2 * FP_BIAS - 46, 64'(prod));
  end

  pipe_delay #(.W(33), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
