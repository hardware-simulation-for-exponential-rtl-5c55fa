// tb_bet_metric -- self-checking testbench for bet_metric.
//
// First the reference operating point of the design (r(t) = 5,
// beta = 0.1, R(t-1) = 10, metric 1/9.5 = 0.1053), then random users, one
// per clock: r(t) in (0, 8), beta in [0, 1], R(t-1) in (0, 32). Each metric
// is compared with 1 / (beta r + (1 - beta) R(t-1)) computed in double
// precision from the same quantised inputs (the fixed-point part is exact,
// so the allowed error is 2.5e-7 relative), and must arrive 9 clocks
// (Mult 3 + Divide 6) after its inputs. The exposed average R(t) is
// checked exactly 3 clocks after the inputs.
module tb_bet_metric;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;
  localparam int LAT = 9;
  localparam int N   = 2000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [15:0] r_now = '0, beta = '0, r_prev = '0;
  logic out_valid;
  fp32_t metric;
  logic signed [35:0] r_avg;
  int checks = 0, failures = 0, cycle = 0;
  real want_q[$], avg_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bet_metric dut (.clk, .rst, .in_valid, .r_now, .beta, .r_prev, .out_valid, .metric, .r_avg);

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [15:0] rn, input logic [15:0] bt, input logic [15:0] rp);
    @(posedge clk); #1;
    in_valid = 1'b1; r_now = rn; beta = bt; r_prev = rp;
    avg_q.push_back(fx2r(bt, 12) * fx2r(rn, 12) + (1.0 - fx2r(bt, 12)) * fx2r(rp, 10));
    want_q.push_back(bet_ref(fx2r(rn, 12), fx2r(bt, 12), fx2r(rp, 10)));
    t_q.push_back(cycle);
  endtask

  initial begin : stimulus
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(16'(r2fx(5.0, 12)), 16'(r2fx(0.1, 12)), 16'(r2fx(10.0, 10)));
    for (int i = 0; i < N; i++)
      send(16'(1 + $urandom % 32767), 16'($urandom % 4097), 16'(1 + $urandom % 32767));
    @(posedge clk); #1 in_valid = 1'b0;
    wait (t_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // R(t) appears at AddSub1, MULT_LATENCY = 3 clocks after the inputs.
  int n_avg = 0;
  always @(negedge clk) begin
    if (!rst && dut.v_sum) begin
      checks++;
      if (fx2r(r_avg, 24) != avg_q[n_avg]) begin
        failures++; $display("R(t) got %f want %f", fx2r(r_avg, 24), avg_q[n_avg]);
      end
      n_avg++;
    end
  end

  bit first = 1'b1;
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real want;
      int t0;
      want = want_q.pop_front(); t0 = t_q.pop_front();
      checks += 2;
      if (rel_err(fp2r(metric), want) > 2.5e-7) begin
        failures++; $display("metric got %g want %g", fp2r(metric), want);
      end
      if (cycle - t0 != LAT) begin failures++; $display("latency %0d", cycle - t0); end
      if (first) begin
        first = 1'b0;
        checks++;
        if (rel_err(fp2r(metric), 0.1053) > 5.0e-4) begin
          failures++; $display("reference point got %g want 0.1053", fp2r(metric));
        end
        $display("reference point r=5 beta=0.1 R(t-1)=10 -> %f", fp2r(metric));
      end
    end
  end
endmodule
