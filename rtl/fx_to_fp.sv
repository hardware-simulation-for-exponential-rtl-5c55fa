// fx_to_fp -- signed fixed-point to 32-bit float (a "Convert" block whose
// output type is XFloat_8_24).
//
// The input is Fix_IN_W_IN_F. Its magnitude is taken, and the value
// |x| * 2**-IN_F is normalised and rounded to nearest-even by
// exp_bet_pkg::fp_pack; inputs of up to 24 significant bits convert
// exactly. Zero gives +0.
//
// Timing: LATENCY register stages after the conversion (0 in the block
// diagrams), one conversion per clock.
module fx_to_fp
  import exp_bet_pkg::*;
#(
  parameter int IN_W = 16,
  parameter int IN_F = 12,
  parameter int LATENCY = 0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output fp32_t                  y
);
  logic [IN_W:0] mag;
  fp32_t         y_comb;

  always_comb begin
    mag    = x[IN_W-1] ? (IN_W+1)'(-(IN_W+1)'(x)) : (IN_W+1)'(x);
    y_comb = fp_pack(x[IN_W-1], -IN_F, 64'(mag));
  end

  pipe_delay #(.W(33), .LATENCY(LATENCY)) u_dly (
    .clk, .rst, .d({in_valid, y_comb}), .q({out_valid, y}));
endmodule
