// cordic_sinh_cosh -- pipelined hyperbolic CORDIC producing cosh and sinh of
// a phase (the "CORDIC 4.0" block of the EXP rule datapath, whose two
// outputs are added downstream to give exp(phase)).
//
// How it works. The plain hyperbolic CORDIC converges only for
// |phase| < 1.118, so the phase is first reduced: k = round(phase / ln 2)
// and r = phase - k ln 2, |r| <= 0.35. Twenty-six rotation-mode iterations
// (i = 1..24, with i = 4 and i = 13 repeated as hyperbolic CORDIC requires)
// start from X = 1/K, Y = 0, Z = r and end with X = cosh r, Y = sinh r in
// Q24. With P = e^r = X + Y and M = e^-r = X - Y,
//   cosh(phase) = (P * 2**k + M * 2**-k) / 2
//   sinh(phase) = (P * 2**k - M * 2**-k) / 2,
// rounded to OUT_F fractional bits and clamped to OUT_W bits.
//
// Interface. phase_in is Fix_IN_W_IN_F (Fix_16_13 in the EXP rule diagram);
// x_out = cosh and y_out = sinh are Fix_OUT_W_OUT_F. The diagram gives the
// outputs as Fix_16_14, which cannot hold cosh or sinh above 2; the default
// OUT_W = 20 holds them for the whole Fix_16_13 input range (|phase| < 4,
// cosh < 27.3). The range reduction and the widened outputs are this
// design's choices; the diagram gives only the block and its formats.
//
// Timing: fully pipelined, one phase per clock, latency 28 cycles
// (1 reduction stage, 26 iteration stages, 1 recombination stage).
module cordic_sinh_cosh
  import exp_bet_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int IN_F  = 13,
  parameter int OUT_W = 20,
  parameter int OUT_F = 14
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  phase_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] x_out,
  output logic signed [OUT_W-1:0] y_out
);
  localparam int NIT     = 26;
  localparam int W       = 40;              // working width, Q24

  // Shift count of iteration stage s.
  function automatic int iter_shift(input int s);
    if (s <= 3)       return s + 1;
    else if (s <= 13) return s;
    else              return s - 1;
  endfunction

  function automatic logic signed [W-1:0] atanh_q24(input int i);
    if (i <= 7) return W'(CORDIC_ATANH[i]);
    else        return W'(1) <<< (CORDIC_F - i);
  endfunction

  typedef struct packed {
    logic              v;
    logic signed [3:0] k;
    logic signed [W-1:0] x, y, z;
  } cstage_t;

  cstage_t st [NIT + 1];

  // ---- stage 0: range reduction --------------------------------------
  logic signed [63:0] t_q, t_k;
  logic signed [3:0]  k0;
  logic signed [W-1:0] r0;
  always_comb begin
    t_q = 64'(phase_in) * 64'(INV_LN2_Q24);               // Q(IN_F+24)
    t_k = (t_q + (64'sd1 <<< (IN_F + CORDIC_F - 1))) >>> (IN_F + CORDIC_F);
    k0  = t_k[3:0];
    r0  = W'((64'(phase_in) <<< (CORDIC_F - IN_F)) - t_k * 64'(LN2_Q24));
  end

  always_ff @(posedge clk) begin
    if (rst) st[0] <= '0;
    else begin
      st[0].v <= in_valid;
      st[0].k <= k0;
      st[0].x <= W'(CORDIC_INV_GAIN);
      st[0].y <= '0;
      st[0].z <= r0;
    end
  end

  // ---- stages 1..NIT: rotations ----------------------------------------
  for (genvar s = 0; s < NIT; s++) begin : g_it
    localparam int SH = iter_shift(s);
    always_ff @(posedge clk) begin
      if (rst) st[s+1] <= '0;
      else begin
        st[s+1].v <= st[s].v;
        st[s+1].k <= st[s].k;
        if (!st[s].z[W-1]) begin
          st[s+1].x <= st[s].x + (st[s].y >>> SH);
          st[s+1].y <= st[s].y + (st[s].x >>> SH);
          st[s+1].z <= st[s].z - atanh_q24(SH);
        end else begin
          st[s+1].x <= st[s].x - (st[s].y >>> SH);
          st[s+1].y <= st[s].y - (st[s].x >>> SH);
          st[s+1].z <= st[s].z + atanh_q24(SH);
        end
      end
    end
  end

  // ---- last stage: undo the reduction ----------------------------------
  localparam int CW = W + 8;
  localparam logic signed [CW-1:0] OMAX = (CW'(1) <<< (OUT_W - 1)) - CW'(1);
  localparam logic signed [CW-1:0] OMIN = -(CW'(1) <<< (OUT_W - 1));

  function automatic logic signed [OUT_W-1:0] to_out(input logic signed [CW-1:0] v);
    logic signed [CW-1:0] q;
    q = (v + (CW'(1) <<< (CORDIC_F - OUT_F - 1))) >>> (CORDIC_F - OUT_F);
    if (q > OMAX)      return OMAX[OUT_W-1:0];
    else if (q < OMIN) return OMIN[OUT_W-1:0];
    else               return q[OUT_W-1:0];
  endfunction

  logic signed [CW-1:0] p_e, m_e, p_k, m_k, ch, sh;
  always_comb begin
    p_e = CW'(st[NIT].x) + CW'(st[NIT].y);
    m_e = CW'(st[NIT].x) - CW'(st[NIT].y);
    if (st[NIT].k >= 0) begin
      p_k = p_e <<< st[NIT].k;
      m_k = m_e >>> st[NIT].k;
    end else begin
      p_k = p_e >>> (-st[NIT].k);
      m_k = m_e <<< (-st[NIT].k);
    end
    ch = (p_k + m_k) >>> 1;
    sh = (p_k - m_k) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= st[NIT].v;
      x_out     <= to_out(ch);
      y_out     <= to_out(sh);
    end
  end
endmodule
