// tb_cordic_sinh_cosh -- self-checking testbench for cordic_sinh_cosh.
//
// Feeds phases across the whole Fix_16_13 range (|phase| < 4), one per
// clock, plus the end points and zero, and compares x_out and y_out with
// cosh and sinh of the phase computed in double precision. The allowed
// error is 2 units of the Fix_x_14 output plus 2e-5 relative (the Q24
// internal error scaled by up to 2**6 after range reduction). The result
// must arrive 28 clocks after the phase.
module tb_cordic_sinh_cosh;
  import tb_util_pkg::*;
  localparam int LAT = 28;
  localparam int N   = 3000;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [15:0] ph = '0;
  logic signed [19:0] xo, yo;
  logic ov;
  int checks = 0, failures = 0, cycle = 0;
  real p_q[$];
  int t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cordic_sinh_cosh dut (.clk, .rst, .in_valid, .phase_in(ph), .out_valid(ov),
                        .x_out(xo), .y_out(yo));

  function automatic bit close(input real got, input real want);
    real d;
    d = got - want;
    if (d < 0.0) d = -d;
    return d <= 2.0 / 16384.0 + 2.0e-5 * (want < 0.0 ? -want : want);
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
      case (i)
        0: ph = 16'sd0;
        1: ph = 16'sh7FFF;
        2: ph = -16'sh8000;
        3: ph = 16'sd11767;          // 1.4365, the reference EXP argument
        default: ph = 16'($urandom);
      endcase
      p_q.push_back(fx2r(ph, 13));
      t_q.push_back(cycle);
    end
    @(posedge clk); #1 in_valid = 1'b0;
    wait (t_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && ov) begin
      real p, c, s;
      int t0;
      p = p_q.pop_front(); t0 = t_q.pop_front();
      c = fx2r(xo, 14); s = fx2r(yo, 14);
      checks += 3;
      if (!close(c, $cosh(p))) begin failures++; $display("cosh(%f) got %f want %f", p, c, $cosh(p)); end
      if (!close(s, $sinh(p))) begin failures++; $display("sinh(%f) got %f want %f", p, s, $sinh(p)); end
      if (cycle - t0 != LAT) begin failures++; $display("latency %0d", cycle - t0); end
    end
  end
endmodule
