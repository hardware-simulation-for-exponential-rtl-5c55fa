// tb_fx_to_fp -- self-checking testbench for fx_to_fp.
//
// Two instances with the design's formats: Fix_36_24 (the BET moving
// average, more significant bits than a float holds, so it must round) and
// Fix_16_10 (exact). Every result is compared with the real value of the
// input: Fix_16_10 must convert exactly, Fix_36_24 to within half a unit
// in the last place (6e-8 relative). One register stage; latency checked.
module tb_fx_to_fp;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;
  localparam int LAT = 1;
  localparam int N   = 3000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [35:0] x0 = '0;
  logic signed [15:0] x1 = '0;
  fp32_t y0, y1;
  logic v0, v1;
  int checks = 0, failures = 0, cycle = 0;
  real w0_q[$], w1_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fx_to_fp #(.IN_W(36), .IN_F(24), .LATENCY(LAT)) u0 (
    .clk, .rst, .in_valid, .x(x0), .out_valid(v0), .y(y0));
  fx_to_fp #(.IN_W(16), .IN_F(10), .LATENCY(LAT)) u1 (
    .clk, .rst, .in_valid, .x(x1), .out_valid(v1), .y(y1));

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
      case (i)
        0: begin x0 = 36'sd0;            x1 = 16'sd0;      end
        1: begin x0 = -36'sd1;           x1 = -16'sd32768; end
        2: begin x0 = 36'sh7_FFFF_FFFF;  x1 = 16'sd32767;  end
        default: begin
          x0 = 36'({4'($urandom), 32'($urandom)}) >>> (i % 30);
          x1 = 16'($urandom);
        end
      endcase
      w0_q.push_back(fx2r(x0, 24));
      w1_q.push_back(fx2r(x1, 10));
      t_q.push_back(cycle);
    end
    @(posedge clk); #1 in_valid = 1'b0;
    wait (t_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && v0) begin
      real e0, e1;
      int t0;
      e0 = w0_q.pop_front(); e1 = w1_q.pop_front(); t0 = t_q.pop_front();
      checks += 3;
      if (rel_err(fp2r(y0), e0) > 6.0e-8) begin failures++; $display("u0 got %g want %g", fp2r(y0), e0); end
      if (fp2r(y1) != e1) begin failures++; $display("u1 got %g want %g", fp2r(y1), e1); end
      if (cycle - t0 != LAT || !v1) begin failures++; $display("latency %0d", cycle - t0); end
    end
  end
endmodule
