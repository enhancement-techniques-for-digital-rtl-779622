// fdc_gain_cal: background sign-LMS gain calibration of the Delta-Sigma FDC.
//
// The FDC's forward gain (charge-pump current, integrator capacitor, ADC
// step) is corrected by multiplying the ADC output by gc_coeff. The loop
// correlates the quantization-noise-cancelled signal c[n] with the sign of
// the coarse quantization error e_qc[n-1] that was added to it: a residual
// of -e_qc (coefficient too large) or +e_qc (too small) drives the
// accumulator down or up,
//     acc <- acc + K * c[n] * sgn(e_qc[n-1]),   K = 2^(gain2x - 11),
// so the default gain2x = 5 gives K = 2^-6.
//
// Number formats: c_in is 15(2,13) signed, the accumulator 25(1,24)
// unsigned and saturated to [0,2), gc_coeff 13(1,12) = the accumulator's
// top bits. With these formats K*c is simply c shifted left by gain2x.
//
// Timing: one clock (clock.fdc_dlc.clk). The accumulator updates on cycles
// with sma_ce high, and gc_coeff is reloaded from it on cycles with
// strobe_ce high; the two enables stand for the down-sampled gain
// calibration clocks, which let the loop run slower to save power.
// Controls: gc_dis freezes the accumulator, gc_pol_inv flips the sign
// reference, gc_load_sel loads gc_load_value, gc_ena = 0 outputs 1.0.
// The loop law follows the design; the K mapping, the enable-based
// clocking and the split between accumulator and output update are this
// design's choices.
// It takes the whole FDC configuration struct and uses only the gc_*
// fields; the others are unused here.
module fdc_gain_cal
  import pll_pkg::*;
#(
  parameter int unsigned ACC_W  = 25,
  parameter int unsigned COEF_W = 13,
  parameter int unsigned C_W    = 15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sma_ce,
  input  logic                     strobe_ce,
  input  logic signed [C_W-1:0]    c_in,
  input  logic                     eqc_neg,   // sign bit of e_qc[n-1]
  input  fdc_cfg_t                 cfg,
  output logic        [COEF_W-1:0] gc_coeff
);
  localparam int unsigned DROP = ACC_W - COEF_W;          // 12
  localparam logic [ACC_W-1:0] ONE = ACC_W'(1) << (ACC_W - 1);

  logic [ACC_W-1:0]          acc;
  logic [COEF_W-1:0]         coef_q;
  logic signed [ACC_W+2:0]   delta, sum;
  logic                      neg;

  always_comb begin
    neg   = eqc_neg ^ cfg.gc_pol_inv;
    delta = (ACC_W+3)'(c_in) <<< cfg.gc_gain2x;
    if (neg) delta = -delta;
    sum = signed'({3'b000, acc}) + delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= ONE;
      coef_q <= COEF_W'(1) << (COEF_W - 1);
    end else begin
      if (cfg.gc_load_sel) begin
        acc <= {cfg.gc_load_value, DROP'(0)};
      end else if (sma_ce && !cfg.gc_dis) begin
        if (sum < 0)                           acc <= '0;
        else if (sum > signed'({3'b000, {ACC_W{1'b1}}})) acc <= '1;
        else                                   acc <= sum[ACC_W-1:0];
      end
      if (strobe_ce || cfg.gc_load_sel) coef_q <= acc[ACC_W-1:DROP];
    end
  end

  assign gc_coeff = cfg.gc_ena ? coef_q : COEF_W'(1) << (COEF_W - 1);
endmodule
