// exp_bet_top -- EXP-BET scheduler metric engine.
//
// An LTE downlink scheduler that serves real-time and non-real-time
// traffic together ranks real-time flows by the EXP rule and
// non-real-time flows by Blind Equal Throughput (BET). This top holds one
// metric unit of each kind side by side; each has its own inputs, valid
// strobe and 32-bit floating-point metric output, and both run from one
// clock (33.333 MHz, 30 ns, is the rate the original FPGA build closed
// timing at) with a synchronous active-high reset. Choosing which flow is
// served from the metrics happens outside this block.
//
// Latencies with the defaults: BET metric 9 cycles, EXP metric 76 cycles;
// each unit accepts a new input set every clock.
module exp_bet_top
  import exp_bet_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // BET (non-real-time flow)
  input  logic               bet_in_valid,
  input  logic signed [15:0] bet_r_now,      // Fix_16_12
  input  logic signed [15:0] bet_beta,       // Fix_16_12
  input  logic signed [15:0] bet_r_prev,     // Fix_16_10
  output logic               bet_out_valid,
  output fp32_t              bet_metric_out,
  // EXP rule (real-time flow)
  input  logic               exp_in_valid,
  input  logic signed [15:0] exp_tau,        // Fix_16_14
  input  logic signed [15:0] exp_dhol,       // Fix_16_16
  input  logic signed [15:0] exp_n_rt,       // Fix_16_10
  input  logic signed [15:0] exp_dhol_sum,   // Fix_16_14
  input  logic signed [15:0] exp_gamma,      // Fix_16_10
  output logic               exp_out_valid,
  output fp32_t              exp_metric_out
);
  bet_metric u_bet (
    .clk, .rst, .in_valid(bet_in_valid), .r_now(bet_r_now), .beta(bet_beta),
    .r_prev(bet_r_prev), .out_valid(bet_out_valid), .metric(bet_metric_out), .r_avg());

  exp_metric u_exp (
    .clk, .rst, .in_valid(exp_in_valid), .tau(exp_tau), .dhol(exp_dhol),
    .n_rt(exp_n_rt), .dhol_sum(exp_dhol_sum), .gamma(exp_gamma),
    .out_valid(exp_out_valid), .metric(exp_metric_out), .exp_arg());
endmodule
