// fp_div -- 32-bit floating-point divider (the "Divide" block).
//
// y = a / b. The dividend significand is shifted left by 40 bits and
// divided by the divisor significand, giving a quotient of at least 40
// significant bits; a non-zero remainder is kept as a sticky bit, so that
// exp_bet_pkg::fp_pack rounds the quotient to nearest-even exactly.
// x / 0 gives infinity (NaN for 0 / 0); 0 / x gives zero.
//
// Timing: the quotient is formed in one combinational stage and registered
// LATENCY times (19 on Divide and Divide1 of the EXP rule diagram and in
// the latency table, 6 on Divide2 and on the BET divider). A synthesis tool
// that retimes registers can move those stages into the divider array; one
// division is accepted every clock.
module fp_div
  import exp_bet_pkg::*;
#(
  parameter int LATENCY = 19
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  logic [63:0] num, q, rem;
  fp32_t       y_comb;

  always_comb begin
    num = 64'(fp_sig(a)) << 40;
    q   = num / 64'(fp_sig(b));
    rem = num % 64'(fp_sig(b));
    if (fp_is_zero(b))
      y_comb = fp_is_zero(a) ? FP_NAN : fp_inf(a.sign ^ b.sign);
    else if (fp_is_zero(a))
      y_comb = '{sign: a.sign ^ b.sign, exp: 8'd0, man: 23'd0};
    else
      y_comb = fp_pack(a.sign ^ b.sign, int'(a.exp) - int'(b.exp) - 41,
                       {q[62:0], rem != 64'd0});
  end

  pipe_delay #(.W(33), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
