// bet_metric -- Blind Equal Throughput (BET) scheduling metric of one user.
//
// The BET rule serves the user whose long-run throughput is lowest. Its
// metric is 1 / R(t), where R(t) is an exponential moving average of the
// rate the user achieved. This unit evaluates
//     R(t)   = beta * r(t) + (1 - beta) * R(t-1)
//     metric = 1 / R(t)
// with the fixed-point multipliers and adders and the floating-point
// divider of the block diagram:
//     Mult    beta (Fix_16_12) * r(t) (Fix_16_12)      -> Fix_32_24, z^-3
//     AddSub  1 (Fix_16_14) - beta (Fix_16_12)         -> Fix_19_14
//     Mult1   (1 - beta) * R(t-1) (Fix_16_10)          -> Fix_35_24, z^-3
//     AddSub1 sum of the two products                  -> Fix_36_24
//     Convert Fix_36_24 -> 32-bit float
//     Divide  1.0 / R(t)                               -> float, z^-6
// The weight beta multiplies the new rate, as the block diagram wires it and
// as its reference output (inputs r = 5, beta = 0.1, R(t-1) = 10 give
// 1/9.5 = 0.1053) confirms; the textbook form of the average puts beta on
// R(t-1) instead.
//
// Interface: one beta port feeds both the multiplier and the subtractor
// (the diagram has a gateway for each, driven by the same value). Inputs
// are sampled when in_valid is high; the metric appears LATENCY cycles
// later with out_valid. A new user can be presented every clock.
//
// Timing: LATENCY = MULT_LATENCY + DIV_LATENCY = 9 cycles with the default
// latencies of the diagram. R(t) = 0 gives +infinity.
module bet_metric
  import exp_bet_pkg::*;
#(
  parameter int MULT_LATENCY = 3,
  parameter int DIV_LATENCY  = 6
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [15:0] r_now,    // r_i(t),   Fix_16_12
  input  logic signed [15:0] beta,     // beta,     Fix_16_12
  input  logic signed [15:0] r_prev,   // R_i(t-1), Fix_16_10
  output logic               out_valid,
  output fp32_t              metric,   // 1 / R_i(t)
  output logic signed [35:0] r_avg     // R_i(t), Fix_36_24, MULT_LATENCY after in_valid
);
  localparam logic signed [15:0] ONE_Q14 = 16'sd16384;   // Constant5: 1, Fix_16_14

  logic               v_m0, v_sub, v_m1, v_sum, v_cv;
  logic signed [31:0] p_beta_r;
  logic signed [18:0] one_minus_beta;
  logic signed [34:0] p_avg;
  fp32_t              r_avg_fp;

  fx_mult #(.A_W(16), .A_F(12), .B_W(16), .B_F(12), .P_W(32), .P_F(24),
            .LATENCY(MULT_LATENCY)) u_mult (
    .clk, .rst, .in_valid, .a(beta), .b(r_now), .out_valid(v_m0), .y(p_beta_r));

  fx_addsub #(.A_W(16), .A_F(14), .B_W(16), .B_F(12), .S_W(19), .S_F(14),
              .SUB(1'b1), .LATENCY(0)) u_addsub (
    .clk, .rst, .in_valid, .a(ONE_Q14), .b(beta), .out_valid(v_sub), .y(one_minus_beta));

  fx_mult #(.A_W(19), .A_F(14), .B_W(16), .B_F(10), .P_W(35), .P_F(24),
            .LATENCY(MULT_LATENCY)) u_mult1 (
    .clk, .rst, .in_valid(v_sub), .a(one_minus_beta), .b(r_prev),
    .out_valid(v_m1), .y(p_avg));

  fx_addsub #(.A_W(32), .A_F(24), .B_W(35), .B_F(24), .S_W(36), .S_F(24),
              .SUB(1'b0), .LATENCY(0)) u_addsub1 (
    .clk, .rst, .in_valid(v_m1), .a(p_beta_r), .b(p_avg), .out_valid(v_sum), .y(r_avg));

  fx_to_fp #(.IN_W(36), .IN_F(24), .LATENCY(0)) u_convert (
    .clk, .rst, .in_valid(v_sum), .x(r_avg), .out_valid(v_cv), .y(r_avg_fp));

  fp_div #(.LATENCY(DIV_LATENCY)) u_divide (
    .clk, .rst, .in_valid(v_cv), .a(FP_ONE), .b(r_avg_fp), .out_valid, .y(metric));

  // Both products of AddSub1 must belong to the same input set.
  a_aligned: assert property (@(posedge clk) disable iff (rst) v_m0 == v_m1)
    else $error("bet_metric: product pipelines out of step");
endmodule
