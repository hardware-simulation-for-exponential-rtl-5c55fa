// tb_fx_addsub -- self-checking testbench for fx_addsub.
//
// Three instances: the BET subtractor 1 - beta (Fix_16_14 - Fix_16_12 ->
// Fix_19_14, exact), the BET adder Fix_32_24 + Fix_35_24 -> Fix_36_24
// (exact) and a narrowing adder Fix_16_14 + Fix_16_12 -> Fix_16_12 that
// must truncate and clamp. Results are compared with the real-number sum
// scaled, floored and clamped to each output format. The instances are run
// with one register stage, and the one-clock latency is checked.
module tb_fx_addsub;
  import tb_util_pkg::*;
  localparam int LAT = 1;
  localparam int N   = 2000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [15:0] a = '0, b = '0;
  logic signed [31:0] c = '0;
  logic signed [34:0] d = '0;
  logic signed [18:0] y0;
  logic signed [35:0] y1;
  logic signed [15:0] y2;
  logic v0, v1, v2;
  int checks = 0, failures = 0, cycle = 0;
  longint w0_q[$], w1_q[$], w2_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fx_addsub #(.A_W(16), .A_F(14), .B_W(16), .B_F(12), .S_W(19), .S_F(14), .SUB(1'b1),
              .LATENCY(LAT)) u0 (.clk, .rst, .in_valid, .a, .b, .out_valid(v0), .y(y0));
  fx_addsub #(.A_W(32), .A_F(24), .B_W(35), .B_F(24), .S_W(36), .S_F(24), .SUB(1'b0),
              .LATENCY(LAT)) u1 (.clk, .rst, .in_valid, .a(c), .b(d), .out_valid(v1), .y(y1));
  fx_addsub #(.A_W(16), .A_F(14), .B_W(16), .B_F(12), .S_W(16), .S_F(12), .SUB(1'b0),
              .LATENCY(LAT)) u2 (.clk, .rst, .in_valid, .a, .b, .out_valid(v2), .y(y2));

  function automatic longint expect_q(input real s_in, input int f, input int w);
    real s;
    longint mx;
    s  = $floor(s_in * pow2(f));
    mx = (longint'(1) <<< (w - 1)) - 1;
    if (s > real'(mx)) return mx;
    if (s < -real'(mx) - 1.0) return -mx - 1;
    return longint'(s);
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
      a = 16'($urandom); b = 16'($urandom);
      c = 32'($urandom); d = {3'($urandom), 32'($urandom)};
      w0_q.push_back(expect_q(fx2r(a, 14) - fx2r(b, 12), 14, 19));
      w1_q.push_back(expect_q(fx2r(c, 24) + fx2r(d, 24), 24, 36));
      w2_q.push_back(expect_q(fx2r(a, 14) + fx2r(b, 12), 12, 16));
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
