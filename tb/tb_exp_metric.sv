// tb_exp_metric -- self-checking testbench for exp_metric.
//
// First the reference operating point (tau = 0.01, D_HOL = 0.003,
// N_RT = 10, sum of D_HOL = 0.03, Gamma = 3), then random flows, one per
// clock: tau in [0.005, 0.5), D_HOL up to 0.35 tau (so that alpha*D_HOL
// stays inside the Fix_16_14 range of the Mult output), N_RT in 1..30, the
// delay sum in [0, 1.9) and Gamma in (0, 16). Each metric is compared with
// exp(alpha D / (1 + sqrt(sum / N_RT))) * Gamma, alpha = 5 / (0.99 tau),
// computed in double precision from the same quantised inputs; the
// fixed-point stages between the float units (1/N_RT in Fix_16_14, the
// argument in Fix_16_13, exp() in Fix_21_14) allow 3e-3 relative. Each
// metric must arrive 76 clocks after its inputs.
module tb_exp_metric;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;
  localparam int LAT = 76;
  localparam int N   = 2000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [15:0] tau = '0, dhol = '0, n_rt = '0, dhol_sum = '0, gamma = '0;
  logic out_valid;
  fp32_t metric;
  logic signed [15:0] exp_arg;
  int checks = 0, failures = 0, cycle = 0;
  real want_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  exp_metric dut (.clk, .rst, .in_valid, .tau, .dhol, .n_rt, .dhol_sum, .gamma,
                  .out_valid, .metric, .exp_arg);

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input real t, input real d, input int n, input real s, input real g);
    @(posedge clk); #1;
    in_valid = 1'b1;
    tau = 16'(r2fx(t, 14)); dhol = 16'(r2fx(d, 16)); n_rt = 16'(r2fx(real'(n), 10));
    dhol_sum = 16'(r2fx(s, 14)); gamma = 16'(r2fx(g, 10));
    want_q.push_back(exp_ref(fx2r(tau, 14), fx2r(dhol, 16), fx2r(n_rt, 10),
                             fx2r(dhol_sum, 14), fx2r(gamma, 10)));
    t_q.push_back(cycle);
  endtask

  initial begin : stimulus
    real t;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(0.01, 0.003, 10, 0.03, 3.0);
    for (int i = 0; i < N; i++) begin
      t = 0.005 + 0.495 * real'($urandom % 10000) / 10000.0;
      send(t, 0.35 * t * real'($urandom % 10000) / 10000.0, 1 + int'($urandom % 30),
           1.9 * real'($urandom % 10000) / 10000.0, 0.01 + 15.9 * real'($urandom % 10000) / 10000.0);
    end
    @(posedge clk); #1 in_valid = 1'b0;
    wait (t_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit first = 1'b1;
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real want;
      int t0;
      want = want_q.pop_front(); t0 = t_q.pop_front();
      checks += 2;
      if (rel_err(fp2r(metric), want) > 3.0e-3) begin
        failures++; $display("metric got %g want %g", fp2r(metric), want);
      end
      if (cycle - t0 != LAT) begin failures++; $display("latency %0d", cycle - t0); end
      if (first) begin
        first = 1'b0;
        $display("reference point -> %f (equation: %f)", fp2r(metric), want);
      end
    end
  end
endmodule
