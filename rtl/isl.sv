// isl: incremental-switching logic of the incremental frequency control
// (IFC) DCO interface.
//
// A unit-weighted integer FCE bank must have exactly d_I FCEs switched to
// "up". Instead of driving every FCE, the IFC scheme changes at most one
// FCE per fast clock cycle. The ISL resamples the reference-rate code
// d_I[n] at f_fast and issues the step command
//     m[r] = clip(d_I[r] - t[r-1], -1, +1)      (-1 dn, 0 noc, +1 up)
// where t[r] = t[r-1] + m[r] is the running count of FCEs that are up.
// Larger code changes are thus serialised into single steps over several
// fast cycles; pending = d_I[r] - t[r] holds the steps still owed.
//
// Interface: m is a 2-bit two's-complement value. Timing: d_I is captured
// on one clk_fast edge and the resulting m appears after the next one
// (registered); t and pending are registered too. t resets to T_INIT, the
// bank's hard-wired initial state (half of the FCEs up).
// The step law follows the design; the reset value is this design's
// reading of the bank's initial condition.
module isl #(
  parameter int unsigned   W      = 8,
  parameter logic [W-1:0]  T_INIT = W'(1) << (W - 1)
) (
  input  logic                 clk_fast,
  input  logic                 rst_n,
  input  logic [W-1:0]         d_i,
  output logic signed [1:0]    m,
  output logic [W-1:0]         t,
  output logic signed [W:0]    pending
);
  logic [W-1:0]      d_r;      // d_I[r]
  logic signed [W:0] diff;
  logic signed [1:0] m_n;

  always_comb begin
    diff = signed'({1'b0, d_r}) - signed'({1'b0, t});
    if (diff > 0)      m_n = 2'sd1;
    else if (diff < 0) m_n = -2'sd1;
    else               m_n = 2'sd0;
  end

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      d_r     <= T_INIT;
      t       <= T_INIT;
      m       <= 2'sd0;
      pending <= '0;
    end else begin
      d_r     <= d_i;
      m       <= m_n;
      t       <= W'(signed'({1'b0, t}) + (W+1)'(m_n));
      pending <= diff - (W+1)'(m_n);
    end
  end
endmodule
