// tb_table5_cosim -- the reference operating points of the engine, driven
// the way the original hardware co-simulation drove them: constant inputs
// held on every clock.
//
//   BET:      r(t) = 5, beta = 0.1, R(t-1) = 10       -> 0.1053 (1/9.5)
//   EXP rule: tau = 0.01, D_HOL = 0.003, N_RT = 10,
//             delay sum 0.03, Gamma = 3               -> equation value
//
// Both inputs are held valid for 300 clocks. After each unit's latency
// every output must be valid and identical to the first one. The BET
// output must match 0.1053 to the four displayed digits, and the EXP
// output must match exp(alpha D / (1 + sqrt(sum / N_RT))) * Gamma within
// 3e-3 relative. The EXP value is also printed next to 10.16, the figure
// the original hardware reported for the same inputs and which the
// equation does not reproduce.
module tb_table5_cosim;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;
  localparam int HOLD = 300;

  logic clk = 1'b0, rst = 1'b1;
  logic bet_in_valid = 1'b0, exp_in_valid = 1'b0;
  logic signed [15:0] bet_r_now, bet_beta, bet_r_prev;
  logic signed [15:0] exp_tau, exp_dhol, exp_n_rt, exp_dhol_sum, exp_gamma;
  logic bet_out_valid, exp_out_valid;
  fp32_t bet_metric_out, exp_metric_out;
  int checks = 0, failures = 0, n_bet = 0, n_exp = 0;
  fp32_t bet_first, exp_first;
  real exp_want;

  always #5 clk = ~clk;

  exp_bet_top dut (.*);

  initial begin : watchdog
    repeat (HOLD + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bet_r_now    = 16'(r2fx(5.0, 12));
    bet_beta     = 16'(r2fx(0.1, 12));
    bet_r_prev   = 16'(r2fx(10.0, 10));
    exp_tau      = 16'(r2fx(0.01, 14));
    exp_dhol     = 16'(r2fx(0.003, 16));
    exp_n_rt     = 16'(r2fx(10.0, 10));
    exp_dhol_sum = 16'(r2fx(0.03, 14));
    exp_gamma    = 16'(r2fx(3.0, 10));
    exp_want = exp_ref(fx2r(exp_tau, 14), fx2r(exp_dhol, 16), fx2r(exp_n_rt, 10),
                       fx2r(exp_dhol_sum, 14), fx2r(exp_gamma, 10));
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    bet_in_valid = 1'b1; exp_in_valid = 1'b1;
    repeat (HOLD) @(posedge clk);
    #1 bet_in_valid = 1'b0; exp_in_valid = 1'b0;
    repeat (100) @(posedge clk);
    $display("BET  metric %f (reference 0.1053)", fp2r(bet_first));
    $display("EXP  metric %f (equation %f; the original hardware reported 10.16)",
             fp2r(exp_first), exp_want);
    checks += 4;
    if (n_bet != HOLD) begin failures++; $display("BET results: %0d", n_bet); end
    if (n_exp != HOLD) begin failures++; $display("EXP results: %0d", n_exp); end
    if (fp2r(bet_first) < 0.10525 || fp2r(bet_first) >= 0.10535) failures++;
    if (rel_err(fp2r(exp_first), exp_want) > 3.0e-3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && bet_out_valid) begin
      if (n_bet == 0) bet_first = bet_metric_out;
      checks++;
      if (bet_metric_out != bet_first) failures++;
      n_bet++;
    end
    if (!rst && exp_out_valid) begin
      if (n_exp == 0) exp_first = exp_metric_out;
      checks++;
      if (exp_metric_out != exp_first) failures++;
      n_exp++;
    end
  end
endmodule
