// tb_exp_bet_top -- end-to-end testbench of exp_bet_top at its default
// parameters.
//
// Runs the two metric units together the way a scheduler would use them:
//  1. the reference operating points of both units (BET: r = 5, beta = 0.1,
//     R(t-1) = 10; EXP rule: tau = 0.01, D_HOL = 0.003, N_RT = 10, delay
//     sum 0.03, Gamma = 3), presented in the same clock;
//  2. a burst of random non-real-time users and real-time flows, one of
//     each per clock with gaps now and then, so that both pipelines are
//     full and results leave both units in the same clocks.
// Every metric is compared with the equation evaluated in double precision
// (2.5e-7 relative for BET, 3e-3 for the EXP rule) and must arrive after
// the pipeline latency (9 and 76 clocks). The testbench counts how often
// each behaviour occurred - a result on back-to-back clocks, results from
// both units in one clock, an input gap - and fails if any never did.
module tb_exp_bet_top;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;
  localparam int BET_LAT = 9;
  localparam int EXP_LAT = 76;
  localparam int N       = 1500;

  logic clk = 1'b0, rst = 1'b1;
  logic bet_in_valid = 1'b0, exp_in_valid = 1'b0;
  logic signed [15:0] bet_r_now = '0, bet_beta = '0, bet_r_prev = '0;
  logic signed [15:0] exp_tau = '0, exp_dhol = '0, exp_n_rt = '0, exp_dhol_sum = '0, exp_gamma = '0;
  logic bet_out_valid, exp_out_valid;
  fp32_t bet_metric_out, exp_metric_out;

  int checks = 0, failures = 0, cycle = 0;
  int n_bet = 0, n_exp = 0, n_b2b = 0, n_both = 0, n_gap = 0;
  real bw_q[$], ew_q[$];
  int bt_q[$], et_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  exp_bet_top dut (.*);

  initial begin : watchdog
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_bet(input real rn, input real bt, input real rp);
    bet_in_valid = 1'b1;
    bet_r_now = 16'(r2fx(rn, 12)); bet_beta = 16'(r2fx(bt, 12)); bet_r_prev = 16'(r2fx(rp, 10));
    bw_q.push_back(bet_ref(fx2r(bet_r_now, 12), fx2r(bet_beta, 12), fx2r(bet_r_prev, 10)));
    bt_q.push_back(cycle);
  endtask

  task automatic set_exp(input real t, input real d, input int n, input real s, input real g);
    exp_in_valid = 1'b1;
    exp_tau = 16'(r2fx(t, 14)); exp_dhol = 16'(r2fx(d, 16)); exp_n_rt = 16'(r2fx(real'(n), 10));
    exp_dhol_sum = 16'(r2fx(s, 14)); exp_gamma = 16'(r2fx(g, 10));
    ew_q.push_back(exp_ref(fx2r(exp_tau, 14), fx2r(exp_dhol, 16), fx2r(exp_n_rt, 10),
                           fx2r(exp_dhol_sum, 14), fx2r(exp_gamma, 10)));
    et_q.push_back(cycle);
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  initial begin : stimulus
    real t;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    set_bet(5.0, 0.1, 10.0);
    set_exp(0.01, 0.003, 10, 0.03, 3.0);
    for (int i = 0; i < N; i++) begin
      @(posedge clk); #1;
      bet_in_valid = 1'b0; exp_in_valid = 1'b0;
      if ($urandom % 16 == 0) begin
        n_gap++;
      end else begin
        set_bet(urand(0.01, 7.9), urand(0.0, 1.0), urand(0.05, 31.0));
        t = urand(0.005, 0.5);
        set_exp(t, urand(0.0, 0.35) * t, 1 + int'($urandom % 30), urand(0.0, 1.9), urand(0.01, 15.9));
      end
    end
    @(posedge clk); #1 bet_in_valid = 1'b0; exp_in_valid = 1'b0;
    wait (bt_q.size() == 0 && et_q.size() == 0);
    repeat (3) @(posedge clk);
    $display("events: bet=%0d exp=%0d back_to_back=%0d both_units=%0d input_gaps=%0d",
             n_bet, n_exp, n_b2b, n_both, n_gap);
    checks += 4;
    if (n_b2b == 0)  begin failures++; $display("no back-to-back results"); end
    if (n_both == 0) begin failures++; $display("units never produced together"); end
    if (n_gap == 0)  begin failures++; $display("no input gap"); end
    if (n_bet != n_exp || n_bet != N - n_gap + 1) begin failures++; $display("result count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic prev_bet = 1'b0;
  always @(negedge clk) begin
    if (!rst) begin
      if (bet_out_valid) begin
        real w;
        int t0;
        w = bw_q.pop_front(); t0 = bt_q.pop_front();
        checks += 2;
        if (rel_err(fp2r(bet_metric_out), w) > 2.5e-7) begin
          failures++; $display("BET got %g want %g", fp2r(bet_metric_out), w);
        end
        if (cycle - t0 != BET_LAT) begin failures++; $display("BET latency %0d", cycle - t0); end
        if (n_bet == 0) begin
          $display("BET reference point: %f", fp2r(bet_metric_out));
          checks++;
          if (rel_err(fp2r(bet_metric_out), 0.1053) > 5.0e-4) failures++;
        end
        if (prev_bet) n_b2b++;
        n_bet++;
      end
      if (exp_out_valid) begin
        real w;
        int t0;
        w = ew_q.pop_front(); t0 = et_q.pop_front();
        checks += 2;
        if (rel_err(fp2r(exp_metric_out), w) > 3.0e-3) begin
          failures++; $display("EXP got %g want %g", fp2r(exp_metric_out), w);
        end
        if (cycle - t0 != EXP_LAT) begin failures++; $display("EXP latency %0d", cycle - t0); end
        if (n_exp == 0) $display("EXP reference point: %f (equation %f)", fp2r(exp_metric_out), w);
        n_exp++;
      end
      if (bet_out_valid && exp_out_valid) n_both++;
      prev_bet = bet_out_valid;
    end
  end
endmodule
