// exp_bet_pkg -- types, constants and the shared rounding routine of the
// EXP-BET scheduler metric datapath.
//
// Two number systems meet in this design. The scheduler inputs and the
// multiplier/adder stages use signed two's-complement fixed point, written
// Fix_W_F (W bits in all, F of them after the binary point). The divide,
// square root and constant-multiply stages work in 32-bit floating point
// with an 8-bit exponent and a 24-bit significand (hidden bit included),
// which is the IEEE 754 single format; that is what fp32_t holds.
//
// fp_pack() is the one place where a floating-point result is formed: every
// arithmetic unit first works out an exact integer magnitude MAG and a
// power of two E2 such that the true result is MAG * 2**E2 (with any bits it
// dropped ORed into MAG's least significant bit as a sticky bit), and
// fp_pack() normalises, rounds to nearest-even and encodes it. Numbers
// below the normal range are flushed to zero and numbers above it become
// infinity. The rounding mode and the flush-to-zero rule are choices of
// this implementation.
package exp_bet_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam int FP_BIAS = 127;
  localparam fp32_t FP_ZERO = '{sign: 1'b0, exp: 8'd0, man: 23'd0};
  localparam fp32_t FP_ONE  = '{sign: 1'b0, exp: 8'd127, man: 23'd0};
  localparam fp32_t FP_NAN  = '{sign: 1'b0, exp: 8'hFF, man: 23'h400000};

  // Hyperbolic CORDIC constants, 24 fractional bits (CORDIC_F).
  // CORDIC_ATANH[i] = round(atanh(2**-i) * 2**24) for i = 1..7; for i >= 8
  // that value equals 2**(24-i) exactly, so it is not tabulated.
  localparam int CORDIC_F = 24;
  localparam logic [31:0] CORDIC_ATANH [1:7] = '{
    32'd9215828, 32'd4285116, 32'd2108178, 32'd1049945,
    32'd524459,  32'd262165,  32'd131075
  };
  // 1/K, K = prod sqrt(1 - 2**(-2i)) over the iteration sequence
  // i = 1..24 with i = 4 and i = 13 taken twice (26 iterations).
  localparam logic [31:0] CORDIC_INV_GAIN = 32'd20258439;  // 1.20749707
  localparam logic [31:0] LN2_Q24         = 32'd11629080;  // ln 2
  localparam logic [31:0] INV_LN2_Q24     = 32'd24204406;  // 1/ln 2

  function automatic fp32_t fp_inf(input logic sign);
    return '{sign: sign, exp: 8'hFF, man: 23'd0};
  endfunction

  function automatic logic fp_is_zero(input fp32_t a);
    return a.exp == 8'd0;  // subnormals count as zero
  endfunction

  // 24-bit significand with the hidden bit restored.
  function automatic logic [23:0] fp_sig(input fp32_t a);
    return {1'b1, a.man};
  endfunction

  // Position of the most significant set bit of v (0 when v == 0).
  function automatic int msb_pos(input logic [63:0] v);
    int p;
    p = 0;
    for (int i = 0; i < 64; i++)
      if (v[i]) p = i;
    return p;
  endfunction

  // Encode sign * mag * 2**e2 as fp32 with round-to-nearest-even.
  function automatic fp32_t fp_pack(input logic sign, input int e2,
                                    input logic [63:0] mag);
    int          p, sh, biased;
    logic [63:0] m;
    logic [25:0] m26;     // [25] hidden, [24:2] fraction, [1] round, [0] sticky
    logic        sticky;
    logic [24:0] rounded;
    fp32_t       r;
    if (mag == 64'd0) return '{sign: sign, exp: 8'd0, man: 23'd0};
    p      = msb_pos(mag);
    biased = p + e2 + FP_BIAS;
    if (p >= 25) begin
      sh     = p - 25;
      m      = mag >> sh;
      sticky = (mag & ((64'd1 << sh) - 64'd1)) != 64'd0;
    end else begin
      m      = mag << (25 - p);
      sticky = 1'b0;
    end
    m26     = m[25:0];
    sticky  = sticky | m26[0];
    rounded = {1'b0, m26[25:2]};
    if (m26[1] && (sticky || m26[2])) rounded = rounded + 25'd1;
    if (rounded[24]) begin          // rounding carried into a new bit
      rounded = rounded >> 1;
      biased  = biased + 1;
    end
    if (biased >= 255) return fp_inf(sign);
    if (biased <= 0)   return '{sign: sign, exp: 8'd0, man: 23'd0};
    r.sign = sign;
    r.exp  = 8'(biased);
    r.man  = rounded[22:0];
    return r;
  endfunction

endpackage
