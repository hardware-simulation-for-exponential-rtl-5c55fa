// fp_to_fx -- 32-bit float to signed fixed point (a "Convert" block from
// XFloat_8_24 to Fix_OUT_W_OUT_F).
//
// The significand (hidden bit restored) is shifted so that OUT_F bits lie
// after the binary point, rounded to nearest (ties away from zero), negated
// for negative inputs and clamped to the OUT_W-bit range. Zero and
// subnormal inputs give 0; infinities and NaN clamp to the largest value of
// their sign.
//
// Timing: LATENCY register stages after the conversion (0 in the block
// diagrams), one conversion per clock. The rounding and clamping rules are
// this design's choices.
module fp_to_fx
  import exp_bet_pkg::*;
#(
  parameter int OUT_W = 16,
  parameter int OUT_F = 14,
  parameter int LATENCY = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  fp32_t                   x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);
  localparam int CW = OUT_W + 2;                     // magnitude + guard
  localparam logic [CW-1:0] MAXMAG = (CW'(1) << (OUT_W - 1)) - CW'(1);
  localparam logic [CW-1:0] MINMAG = (CW'(1) << (OUT_W - 1));

  int                     sh;
  logic [63:0]            sig, mag64;
  logic [CW-1:0]          mag;
  logic                   ovf;
  logic signed [OUT_W-1:0] y_comb;

  always_comb begin
    sig   = 64'(fp_sig(x));
    // value = sig * 2**(exp - 150); scaled by 2**OUT_F
    sh    = int'(x.exp) - 150 + OUT_F;
    ovf   = 1'b0;
    mag64 = 64'd0;
    if (x.exp == 8'hFF) begin
      ovf = 1'b1;
    end else if (x.exp != 8'd0) begin
      if (sh >= 0) begin
        if (sh > 40) ovf = 1'b1;
        else         mag64 = sig << sh;
      end else if (sh >= -40) begin
        mag64 = (sig + (64'd1 << (-sh - 1))) >> (-sh);
      end
    end
    if (mag64 > 64'(x.sign ? MINMAG : MAXMAG)) ovf = 1'b1;
    mag = ovf ? (x.sign ? MINMAG : MAXMAG) : mag64[CW-1:0];
    y_comb = x.sign ? OUT_W'(-mag) : OUT_W'(mag);
  end

  pipe_delay #(.W(OUT_W + 1), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
