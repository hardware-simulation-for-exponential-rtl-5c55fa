// fx_addsub -- signed fixed-point adder or subtractor (the "AddSub" block on
// fixed-point signals).
//
// y = a + b (SUB = 0) or y = a - b (SUB = 1). The operands' binary points
// are aligned to the larger of A_F and B_F, the exact sum is formed, then
// brought to S_F fractional bits (truncating low bits if S_F is smaller)
// and clamped to S_W bits. With the full-precision formats of the block
// diagrams (for example Fix_16_14 - Fix_16_12 -> Fix_19_14) nothing is
// lost.
//
// Timing: LATENCY register stages after the adder (0 in the block diagrams:
// the AddSub blocks carry no z^-N), one result per clock. Truncation and
// saturation are this design's choices.
module fx_addsub #(
  parameter int A_W = 16, parameter int A_F = 14,
  parameter int B_W = 16, parameter int B_F = 12,
  parameter int S_W = 19, parameter int S_F = 14,
  parameter bit SUB = 1'b1,
  parameter int LATENCY = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic                  out_valid,
  output logic signed [S_W-1:0] y
);
  localparam int F   = (A_F > B_F) ? A_F : B_F;
  localparam int RSH = (F > S_F) ? F - S_F : 0;
  localparam int LSH = (S_F > F) ? S_F - F : 0;
  localparam int CW  = A_W + B_W + F + LSH + S_W + 2;
  localparam logic signed [CW-1:0] SMAX = (CW'(1) <<< (S_W - 1)) - CW'(1);
  localparam logic signed [CW-1:0] SMIN = -(CW'(1) <<< (S_W - 1));

  logic signed [CW-1:0]  a_al, b_al, sum, scaled;
  logic signed [S_W-1:0] y_comb;

  always_comb begin
    a_al   = CW'(a) <<< (F - A_F);
    b_al   = CW'(b) <<< (F - B_F);
    sum    = SUB ? a_al - b_al : a_al + b_al;
    scaled = (sum <<< LSH) >>> RSH;
    if (scaled > SMAX)      y_comb = SMAX[S_W-1:0];
    else if (scaled < SMIN) y_comb = SMIN[S_W-1:0];
    else                    y_comb = scaled[S_W-1:0];
  end

  pipe_delay #(.W(S_W + 1), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
