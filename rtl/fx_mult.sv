// fx_mult -- signed fixed-point multiplier (the "Mult" block).
//
// y = a * b, where a is Fix_A_W_A_F, b is Fix_B_W_B_F and y is
// Fix_P_W_P_F (two's complement, W bits in all, F after the binary point).
// The full product has A_F + B_F fractional bits; it is brought to P_F
// fractional bits by truncation (dropping low bits, i.e. rounding toward
// minus infinity) or by appending zeros, and clamped to the range of P_W
// bits. When P_W/P_F cover the full product (as for Fix_16_12 x Fix_16_12 ->
// Fix_32_24) the result is exact.
//
// Timing: the product is registered LATENCY times (3 in the block diagrams
// and in the latency table), one result per clock; out_valid follows
// in_valid by the same LATENCY cycles. Truncation and saturation are this
// design's choices: the block diagrams give only the formats.
module fx_mult #(
  parameter int A_W = 16, parameter int A_F = 12,
  parameter int B_W = 16, parameter int B_F = 12,
  parameter int P_W = 32, parameter int P_F = 24,
  parameter int LATENCY = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic                  out_valid,
  output logic signed [P_W-1:0] y
);
  localparam int FULL_F = A_F + B_F;
  localparam int RSH    = (FULL_F > P_F) ? FULL_F - P_F : 0;
  localparam int LSH    = (P_F > FULL_F) ? P_F - FULL_F : 0;
  localparam int CW     = A_W + B_W + LSH + P_W + 1;   // wide enough for any case
  localparam logic signed [CW-1:0] PMAX = (CW'(1) <<< (P_W - 1)) - CW'(1);
  localparam logic signed [CW-1:0] PMIN = -(CW'(1) <<< (P_W - 1));

  logic signed [CW-1:0]  prod, scaled;
  logic signed [P_W-1:0] y_comb;

  always_comb begin
    prod   = CW'(a) * CW'(b);
    scaled = (prod <<< LSH) >>> RSH;
    if (scaled > PMAX)      y_comb = PMAX[P_W-1:0];
    else if (scaled < PMIN) y_comb = PMIN[P_W-1:0];
    else                    y_comb = scaled[P_W-1:0];
  end

  pipe_delay #(.W(P_W + 1), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
