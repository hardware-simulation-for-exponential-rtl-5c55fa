// exp_metric -- EXP rule scheduling metric of one real-time flow.
//
// The EXP rule favours real-time flows whose head-of-line packet has waited
// long relative to the other real-time flows, weighted by the spectral
// efficiency the user would get on the resource block:
//     alpha  = 5 / (0.99 * tau)
//     avgD   = (1 / N_RT) * sum_D
//     metric = exp(alpha * D_HOL / (1 + sqrt(avgD))) * Gamma
// tau is the flow's delay budget, D_HOL the delay of its head-of-line
// packet, N_RT the number of active real-time flows, sum_D the sum of the
// head-of-line delays over those flows and Gamma the spectral efficiency.
//
// Datapath (block names and formats of the block diagram):
//   Convert2  tau Fix_16_14 -> float;  CMult1 * 0.99
//   Divide    5.0 / (0.99 tau) = alpha             float, z^-19
//   Convert3  alpha -> Fix_32_14
//   Mult      alpha * D_HOL (Fix_16_16)            -> Fix_16_14, z^-3
//   Convert6  -> float
//   Convert1  N_RT Fix_16_10 -> float
//   Divide1   1.0 / N_RT                           float, z^-19
//   Convert4  -> Fix_16_14
//   Mult1     (1/N_RT) * sum_D (Fix_16_14)         -> Fix_32_28, z^-3
//   Convert5  -> float;  SquareRoot                z^-17
//   AddSub    sqrt(avgD) + 1.0                     float
//   Divide2   alpha D_HOL / (1 + sqrt(avgD))       float, z^-6
//   Convert7  -> Fix_16_13 (the exponent argument)
//   CORDIC    cosh and sinh of the argument; AddSub1 adds them = exp()
//   Convert11 -> float;  Convert12 Gamma Fix_16_10 -> float
//   Mult2     exp() * Gamma                        float, z^-3
// The constants 5, 1 and 1 (Constant, Constant1, Constant2) are held as
// floating-point localparams instead of being converted every cycle.
//
// This design's additions: so that a new input set can enter every clock,
// D_HOL, sum_D and Gamma are delayed to meet the operand they are combined
// with, and the alpha*D_HOL path gets SQRT_LATENCY extra stages to meet the
// square-root path at Divide2. The CORDIC output is wider than the
// diagram's Fix_16_14 (see cordic_sinh_cosh), so AddSub1 is Fix_21_14.
//
// Interface: inputs are sampled when in_valid is high; the metric appears
// with out_valid LATENCY cycles later (76 with the default latencies:
// 19 + 3 + 17 + 6 + 28 + 3).
module exp_metric
  import exp_bet_pkg::*;
#(
  parameter int DIV_LATENCY  = 19,
  parameter int DIV2_LATENCY = 6,
  parameter int SQRT_LATENCY = 17,
  parameter int MULT_LATENCY = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [15:0] tau,      // tau_i,  Fix_16_14 (s)
  input  logic signed [15:0] dhol,     // D_HOL,i, Fix_16_16 (s)
  input  logic signed [15:0] n_rt,     // N_RT,   Fix_16_10
  input  logic signed [15:0] dhol_sum, // sum of D_HOL over RT flows, Fix_16_14
  input  logic signed [15:0] gamma,    // Gamma_k^i, Fix_16_10
  output logic               out_valid,
  output fp32_t              metric,
  output logic signed [15:0] exp_arg   // Convert7 output, Fix_16_13
);
  localparam int CORDIC_LATENCY = 28;
  localparam int LAT_TO_ARG     = DIV_LATENCY + MULT_LATENCY + SQRT_LATENCY + DIV2_LATENCY;
  localparam fp32_t FP_FIVE     = 32'h40A0_0000;
  localparam fp32_t FP_0P99     = 32'h3F7D_70A4;   // 0.99 rounded to single

  // ---- alpha * D_HOL -----------------------------------------------------
  logic               v_c2, v_cm, v_div, v_mult, v_ad;
  fp32_t              tau_fp, tau99, alpha_fp, ad_fp, ad_fp_d;
  logic signed [31:0] alpha_fx;
  logic signed [15:0] dhol_d, ad_fx;

  fx_to_fp #(.IN_W(16), .IN_F(14)) u_convert2 (
    .clk, .rst, .in_valid, .x(tau), .out_valid(v_c2), .y(tau_fp));
  fp_mult #(.LATENCY(0)) u_cmult1 (
    .clk, .rst, .in_valid(v_c2), .a(tau_fp), .b(FP_0P99), .out_valid(v_cm), .y(tau99));
  fp_div #(.LATENCY(DIV_LATENCY)) u_divide (
    .clk, .rst, .in_valid(v_cm), .a(FP_FIVE), .b(tau99), .out_valid(v_div), .y(alpha_fp));
  fp_to_fx #(.OUT_W(32), .OUT_F(14)) u_convert3 (
    .clk, .rst, .in_valid(v_div), .x(alpha_fp), .out_valid(), .y(alpha_fx));
  pipe_delay #(.W(16), .LATENCY(DIV_LATENCY)) u_dly_dhol (
    .clk, .rst, .d(dhol), .q(dhol_d));
  fx_mult #(.A_W(32), .A_F(14), .B_W(16), .B_F(16), .P_W(16), .P_F(14),
            .LATENCY(MULT_LATENCY)) u_mult (
    .clk, .rst, .in_valid(v_div), .a(alpha_fx), .b(dhol_d), .out_valid(v_mult), .y(ad_fx));
  fx_to_fp #(.IN_W(16), .IN_F(14)) u_convert6 (
    .clk, .rst, .in_valid(v_mult), .x(ad_fx), .out_valid(), .y(ad_fp));
  pipe_delay #(.W(33), .LATENCY(SQRT_LATENCY)) u_dly_ad (
    .clk, .rst, .d({v_mult, ad_fp}), .q({v_ad, ad_fp_d}));

  // ---- 1 + sqrt(sum_D / N_RT) --------------------------------------------
  logic               v_c1, v_div1, v_mult1, v_sq, v_den;
  fp32_t              nrt_fp, inv_n_fp, avg_fp, sq_fp, den_fp;
  logic signed [15:0] inv_n_fx, dsum_d;
  logic signed [31:0] avg_fx;

  fx_to_fp #(.IN_W(16), .IN_F(10)) u_convert1 (
    .clk, .rst, .in_valid, .x(n_rt), .out_valid(v_c1), .y(nrt_fp));
  fp_div #(.LATENCY(DIV_LATENCY)) u_divide1 (
    .clk, .rst, .in_valid(v_c1), .a(FP_ONE), .b(nrt_fp), .out_valid(v_div1), .y(inv_n_fp));
  fp_to_fx #(.OUT_W(16), .OUT_F(14)) u_convert4 (
    .clk, .rst, .in_valid(v_div1), .x(inv_n_fp), .out_valid(), .y(inv_n_fx));
  pipe_delay #(.W(16), .LATENCY(DIV_LATENCY)) u_dly_dsum (
    .clk, .rst, .d(dhol_sum), .q(dsum_d));
  fx_mult #(.A_W(16), .A_F(14), .B_W(16), .B_F(14), .P_W(32), .P_F(28),
            .LATENCY(MULT_LATENCY)) u_mult1 (
    .clk, .rst, .in_valid(v_div1), .a(inv_n_fx), .b(dsum_d), .out_valid(v_mult1), .y(avg_fx));
  fx_to_fp #(.IN_W(32), .IN_F(28)) u_convert5 (
    .clk, .rst, .in_valid(v_mult1), .x(avg_fx), .out_valid(), .y(avg_fp));
  fp_sqrt #(.LATENCY(SQRT_LATENCY)) u_sqrt (
    .clk, .rst, .in_valid(v_mult1), .a(avg_fp), .out_valid(v_sq), .y(sq_fp));
  fp_add #(.SUB(1'b0)) u_addsub (
    .clk, .rst, .in_valid(v_sq), .a(sq_fp), .b(FP_ONE), .out_valid(v_den), .y(den_fp));

  // ---- exp(argument) * Gamma ---------------------------------------------
  logic               v_div2, v_arg, v_cor, v_exp, v_e, v_g;
  fp32_t              arg_fp, exp_fp, gamma_fp;
  logic signed [19:0] ch, sh;
  logic signed [20:0] exp_fx;
  logic signed [15:0] gamma_d;

  fp_div #(.LATENCY(DIV2_LATENCY)) u_divide2 (
    .clk, .rst, .in_valid(v_den), .a(ad_fp_d), .b(den_fp), .out_valid(v_div2), .y(arg_fp));
  fp_to_fx #(.OUT_W(16), .OUT_F(13)) u_convert7 (
    .clk, .rst, .in_valid(v_div2), .x(arg_fp), .out_valid(v_arg), .y(exp_arg));
  cordic_sinh_cosh #(.IN_W(16), .IN_F(13), .OUT_W(20), .OUT_F(14)) u_cordic (
    .clk, .rst, .in_valid(v_arg), .phase_in(exp_arg), .out_valid(v_cor), .x_out(ch), .y_out(sh));
  fx_addsub #(.A_W(20), .A_F(14), .B_W(20), .B_F(14), .S_W(21), .S_F(14),
              .SUB(1'b0)) u_addsub1 (
    .clk, .rst, .in_valid(v_cor), .a(ch), .b(sh), .out_valid(v_exp), .y(exp_fx));
  fx_to_fp #(.IN_W(21), .IN_F(14)) u_convert11 (
    .clk, .rst, .in_valid(v_exp), .x(exp_fx), .out_valid(v_e), .y(exp_fp));
  pipe_delay #(.W(16), .LATENCY(LAT_TO_ARG + CORDIC_LATENCY)) u_dly_gamma (
    .clk, .rst, .d(gamma), .q(gamma_d));
  fx_to_fp #(.IN_W(16), .IN_F(10)) u_convert12 (
    .clk, .rst, .in_valid(v_e), .x(gamma_d), .out_valid(v_g), .y(gamma_fp));
  fp_mult #(.LATENCY(MULT_LATENCY)) u_mult2 (
    .clk, .rst, .in_valid(v_g), .a(exp_fp), .b(gamma_fp), .out_valid, .y(metric));

  // The two operands of Divide2 must belong to the same input set.
  a_aligned: assert property (@(posedge clk) disable iff (rst) v_ad == v_den)
    else $error("exp_metric: Divide2 operands out of step");
endmodule
