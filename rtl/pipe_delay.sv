// pipe_delay -- a chain of LATENCY registers for a W-bit word.
//
// Used by every arithmetic unit of the EXP-BET datapath to give its result
// the latency written on the block (the z^-N of the block diagram), and by
// the metric units to line up operands that reach a join point over paths
// of different latency. LATENCY = 0 is a plain wire. All stages clear on the
// synchronous active-high reset so that nothing downstream reads an unset
// value; the reset value is this design's choice.
module pipe_delay #(
  parameter int W       = 1,
  parameter int LATENCY = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (LATENCY == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [LATENCY];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < LATENCY; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < LATENCY; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[LATENCY-1];
  end
endmodule
