// fp_sqrt -- 32-bit floating-point square root (the "SquareRoot" block).
//
// With the input written as sig * 2**E (sig the 24-bit significand, E even
// after moving one bit into sig when needed), the result is
// isqrt(sig * 2**36) * 2**((E - 36) / 2). The integer square root is found
// bit by bit (restoring method, 31 result bits); a non-zero remainder is
// kept as a sticky bit so that exp_bet_pkg::fp_pack rounds to nearest-even
// exactly. sqrt(+-0) = +-0, a negative input gives NaN, infinity gives
// infinity.
//
// Timing: one combinational stage registered LATENCY times (17 in the EXP
// rule diagram and in the latency table), one root per clock.
module fp_sqrt
  import exp_bet_pkg::*;
#(
  parameter int LATENCY = 17
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  output logic  out_valid,
  output fp32_t y
);
  int          e;
  logic [63:0] rad, rem, root, trial;
  fp32_t       y_comb;

  always_comb begin
    e   = int'(a.exp) - FP_BIAS - 23;
    rad = 64'(fp_sig(a));
    if (e % 2 != 0) begin
      rad = rad << 1;
      e   = e - 1;
    end
    rad  = rad << 36;                 // radicand < 2**62
    rem  = 64'd0;
    root = 64'd0;
    for (int i = 30; i >= 0; i--) begin
      rem   = (rem << 2) | ((rad >> (2 * i)) & 64'd3);
      trial = (root << 2) | 64'd1;
      root  = root << 1;
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | 64'd1;
      end
    end
    if (fp_is_zero(a))
      y_comb = '{sign: a.sign, exp: 8'd0, man: 23'd0};
    else if (a.sign)
      y_comb = FP_NAN;
    else if (a.exp == 8'hFF)
      y_comb = a;
    else
      y_comb = fp_pack(1'b0, (e - 36) / 2 - 1, {root[62:0], rem != 64'd0});
  end

  pipe_delay #(.W(33), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
