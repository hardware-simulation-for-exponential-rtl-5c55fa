// tb_fp_to_fx -- self-checking testbench for fp_to_fx.
//
// Three instances with the design's output formats: Fix_32_14 (alpha),
// Fix_16_14 (1/N_RT) and Fix_16_13 (the exponent argument). Random floats
// over a range wider than each format are converted; each result must be
// the real value scaled to the format, rounded to nearest (ties away from
// zero) and clamped. One register stage; latency checked.
module tb_fp_to_fx;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;
  localparam int LAT = 1;
  localparam int N   = 3000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  fp32_t x = '0;
  logic signed [31:0] y0;
  logic signed [15:0] y1, y2;
  logic v0, v1, v2;
  int checks = 0, failures = 0, cycle = 0;
  longint w0_q[$], w1_q[$], w2_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp_to_fx #(.OUT_W(32), .OUT_F(14), .LATENCY(LAT)) u0 (
    .clk, .rst, .in_valid, .x, .out_valid(v0), .y(y0));
  fp_to_fx #(.OUT_W(16), .OUT_F(14), .LATENCY(LAT)) u1 (
    .clk, .rst, .in_valid, .x, .out_valid(v1), .y(y1));
  fp_to_fx #(.OUT_W(16), .OUT_F(13), .LATENCY(LAT)) u2 (
    .clk, .rst, .in_valid, .x, .out_valid(v2), .y(y2));

  function automatic longint expect_q(input real v, input int f, input int w);
    longint q, mx;
    mx = (longint'(1) <<< (w - 1)) - 1;
    if (v * pow2(f) > real'(mx) + 1.0) return mx;
    if (v * pow2(f) < -real'(mx) - 2.0) return -mx - 1;
    q = r2fx(v, f);
    if (q > mx) return mx;
    if (q < -mx - 1) return -mx - 1;
    return q;
  endfunction

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < N; i++) begin
      @(posedge clk); #1;
      in_valid = 1'b1;
      x = (i == 0) ? 32'h0 : rand_fp(-20, 20, 1'b1);
      w0_q.push_back(expect_q(fp2r(x), 14, 32));
      w1_q.push_back(expect_q(fp2r(x), 14, 16));
      w2_q.push_back(expect_q(fp2r(x), 13, 16));
      t_q.push_back(cycle);
    end
    @(posedge clk); #1 in_valid = 1'b0;
    wait (t_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && v0) begin
      longint e0, e1, e2;
      int t0;
      e0 = w0_q.pop_front(); e1 = w1_q.pop_front(); e2 = w2_q.pop_front();
      t0 = t_q.pop_front();
      checks += 4;
      if (longint'(y0) != e0) begin failures++; $display("u0 got %0d want %0d", y0, e0); end
      if (longint'(y1) != e1) begin failures++; $display("u1 got %0d want %0d", y1, e1); end
      if (longint'(y2) != e2) begin failures++; $display("u2 got %0d want %0d", y2, e2); end
      if (cycle - t0 != LAT || !v1 || !v2) begin failures++; $display("latency %0d", cycle - t0); end
    end
  end
endmodule
