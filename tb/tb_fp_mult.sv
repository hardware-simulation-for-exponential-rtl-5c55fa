// tb_fp_mult -- self-checking testbench for fp_mult: 32-bit floating-point multiply.
//
// Drives 400 random operand sets, one per clock, and checks every result
// against the real-number value of the operation on the same operands,
// worked out in double precision: the result must be within 1.2e-7 relative
// of it (rounding to nearest single is at most 6e-8). Directed cases include 0.01 * 0.99. It also checks
// that each result arrives exactly LAT clocks after its operands.
module tb_fp_mult;
  import exp_bet_pkg::*;
  import tb_util_pkg::*;

  localparam int LAT = 3;
  localparam int N   = 400;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  in_valid = 1'b0;
  fp32_t a = '0, b = '0;
  logic  out_valid;
  fp32_t y;
  int    checks = 0, failures = 0, cycle = 0;
  real   want_q[$];
  int    t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp_mult #(.LATENCY(LAT)) dut (.clk, .rst, .in_valid, .a, .b, .out_valid, .y);

  initial begin : watchdog
    repeat (N + LAT + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [31:0] x, input logic [31:0] z);
    @(posedge clk); #1;
    in_valid = 1'b1; a = x; b = z;
    want_q.push_back(fp2r(x) * fp2r(z));
    t_q.push_back(cycle);
  endtask

  initial begin : stimulus
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(32'h3C23D70A, 32'h3F7D70A4);  // 0.01 * 0.99
    send(32'h40400000, 32'h40866666);  // 3 * 4.2

    for (int i = 0; i < N; i++) send(rand_fp(-30, 30, 1'b1), rand_fp(-30, 30, 1'b1));
    @(posedge clk); #1 in_valid = 1'b0;
    wait (want_q.size() == 0);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real want, got;
      int  t0;
      if (want_q.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        want = want_q.pop_front();
        t0   = t_q.pop_front();
        got  = fp2r(y);
        checks++;
        if (rel_err(got, want) > 1.2e-7) begin
          failures++;
          $display("value mismatch: got %g want %g", got, want);
        end
        checks++;
        if (cycle - t0 != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - t0, LAT);
        end
      end
    end
  end
endmodule
