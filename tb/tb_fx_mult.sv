// tb_fx_mult -- self-checking testbench for fx_mult.
//
// Two instances with the formats of the design: the exact BET multiplier
// Fix_16_12 x Fix_16_12 -> Fix_32_24 and the narrowing EXP rule multiplier
// Fix_32_14 x Fix_16_16 -> Fix_16_14, which truncates low bits and clamps.
// Random operands enter every clock; each result is compared with the
// real-number product scaled to the output format, floored and clamped,
// and must arrive 3 clocks after its operands.
module tb_fx_mult;
  import tb_util_pkg::*;
  localparam int LAT = 3;
  localparam int N   = 2000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [15:0] a0 = '0, b0 = '0, b1 = '0;
  logic signed [31:0] a1 = '0;
  logic signed [31:0] y0;
  logic signed [15:0] y1;
  logic v0, v1;
  int checks = 0, failures = 0, cycle = 0;
  longint w0_q[$], w1_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fx_mult #(.A_W(16), .A_F(12), .B_W(16), .B_F(12), .P_W(32), .P_F(24), .LATENCY(LAT))
    u0 (.clk, .rst, .in_valid, .a(a0), .b(b0), .out_valid(v0), .y(y0));
  fx_mult #(.A_W(32), .A_F(14), .B_W(16), .B_F(16), .P_W(16), .P_F(14), .LATENCY(LAT))
    u1 (.clk, .rst, .in_valid, .a(a1), .b(b1), .out_valid(v1), .y(y1));

  function automatic longint expect_q(input real p, input int f, input int w);
    real s;
    longint q, mx;
    s  = $floor(p * pow2(f));
    mx = (longint'(1) <<< (w - 1)) - 1;
    if (s > real'(mx)) q = mx;
    else if (s < -real'(mx) - 1.0) q = -mx - 1;
    else q = longint'(s);
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
      a0 = 16'($urandom); b0 = 16'($urandom);
      // mostly in range, sometimes large enough to clamp
      a1 = (i % 4 == 0) ? 32'($urandom) : 32'(int'($urandom % 32'h0100_0000) - 32'sh0080_0000);
      b1 = 16'($urandom);
      w0_q.push_back(expect_q(fx2r(a0, 12) * fx2r(b0, 12), 24, 32));
      w1_q.push_back(expect_q(fx2r(a1, 14) * fx2r(b1, 16), 14, 16));
      t_q.push_back(cycle);
    end
    @(posedge clk); #1 in_valid = 1'b0;
    wait (t_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && v0) begin
      longint e0, e1;
      int t0;
      e0 = w0_q.pop_front(); e1 = w1_q.pop_front(); t0 = t_q.pop_front();
      checks += 3;
      if (longint'(y0) != e0) begin failures++; $display("u0 got %0d want %0d", y0, e0); end
      if (longint'(y1) != e1) begin failures++; $display("u1 got %0d want %0d", y1, e1); end
      if (cycle - t0 != LAT || !v1) begin failures++; $display("latency %0d", cycle - t0); end
    end
  end
endmodule
