// dlc: digital loop controller (loop filter) of the Delta-Sigma FDC PLL.
//
// Filters the phase error perr into the DCO control word fctrl with
//   L(z) = 0.125*km * 2^kp * ( 2^-ka / (1 - (1-2^-ka) z^-1)
//                              + 2^(-15+ki_kp) * z^-1 / (1 - z^-1) )
//          * 2^-kr / (1 - (1-2^-kr) z^-1)
// i.e. a proportional path with a one-pole IIR, an integral path, their sum
// scaled by 2^kp, a second one-pole IIR stage and a final gain of km/8.
// Every coefficient is a power of two except km, so the datapath is shifts,
// adds and one small multiplier.
//
// Formats: perr 14(4,10) signed; internal state signed with ACC_FRAC
// fractional bits; fctrl 15(7,8) unsigned, formed by rounding the filter
// output to 8 fractional bits, adding mid-scale (64.0) and saturating.
// Timing: one register stage; fctrl updates on the clock.fdc_dlc.clk edge
// after the perr sample it depends on. Controls: byp_perr feeds user_perr
// instead of perr, intg_path_byp pins the integral path to user_intg,
// ena_snap captures perr and fctrl for read-back.
// The transfer function and the gain selectors follow the design; the
// internal precision, mid-scale offset and bypass details are this
// design's choices.
module dlc
  import pll_pkg::*;
#(
  parameter int unsigned ACC_FRAC = 28
) (
  input  logic                clk,     // clock.fdc_dlc.clk
  input  logic                rst_n,   // rstb_dlc
  input  logic [PERR_W-1:0]   perr,
  input  dlc_cfg_t            cfg,
  output logic [FCTRL_W-1:0]  fctrl,
  output logic [PERR_W-1:0]   snap_perr,
  output logic [FCTRL_W-1:0]  snap_fctrl
);
  localparam int unsigned SH = ACC_FRAC - PERR_FRAC;        // perr -> internal
  localparam logic signed [63:0] YI_MAX = 64'sd1 <<< (ACC_FRAC + 16);

  logic signed [63:0] x, x_d, yp, yi, yr;
  logic signed [63:0] yp_n, yi_n, s, yr_n, outv, q;
  logic [PERR_W-1:0]  pin;

  always_comb begin
    pin  = cfg.byp_perr ? cfg.user_perr : perr;
    x    = 64'(signed'(pin)) <<< SH;
    yp_n = yp + ((x - yp) >>> cfg.ka);
    if (cfg.intg_path_byp) yi_n = 64'(signed'(cfg.user_intg)) <<< SH;
    else begin
      yi_n = yi + (x_d >>> (4'd15 - cfg.ki_kp));
      if (yi_n > YI_MAX)       yi_n = YI_MAX;
      else if (yi_n < -YI_MAX) yi_n = -YI_MAX;
    end
    s    = (yp_n + yi_n) <<< cfg.kp;
    yr_n = yr + ((s - yr) >>> cfg.kr);
    outv = (yr_n * signed'(64'(cfg.km))) >>> 3;
    // round to 8 fractional bits and move to mid-scale
    q    = ((outv + (64'sd1 <<< (ACC_FRAC - FCTRL_FRAC - 1))) >>> (ACC_FRAC - FCTRL_FRAC))
           + (64'sd1 <<< (FCTRL_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d   <= '0;
      yp    <= '0;
      yi    <= '0;
      yr    <= '0;
      fctrl <= FCTRL_W'(1) << (FCTRL_W - 1);
      snap_perr  <= '0;
      snap_fctrl <= '0;
    end else begin
      x_d <= x;
      yp  <= yp_n;
      yi  <= yi_n;
      yr  <= yr_n;
      if (q < 0)                          fctrl <= '0;
      else if (q > signed'(64'((1 << FCTRL_W) - 1))) fctrl <= '1;
      else                                fctrl <= q[FCTRL_W-1:0];
      if (cfg.ena_snap) begin
        snap_perr  <= pin;
        snap_fctrl <= fctrl;
      end
    end
  end
endmodule
