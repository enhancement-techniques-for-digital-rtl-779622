// cnr: clock and reset generation for the PLL digital.
//
// Clocks:
//   clk_fast     clk_dig_fast (DCO/10) when fast_src or frc_fast is set,
//                else the reference clk_xosc
//   clk_fdc_dlc  clock.fdc_dlc.clk, one pulse per reference period: the
//                selected reference event (clk_xosc = vrfd, or the divider's
//                vdiv_ext) is passed through a two-flop synchronizer on
//                clk_fast (rising edge, or falling edge with phase_sel),
//                edge-detected, and stretched to pulse_width fast cycles
//                (one with dis_pulse_ext). dis_retime uses the raw event,
//                frc_xosc uses clk_xosc, dis stops the clock.
//   sma_ce       gain-calibration update enable, every ds_rate+1 cycles
//                of clk_fdc_dlc; sma_strobe_ce every strobe_rate+1 of those.
//   clk_dco      clock.dco = clk_fast, or clk_fast/2 with half_rate,
//                clk_xosc with frc_xosc, stopped with dis
//   clk_regs     clk_xosc gated by regs_gate (gate sampled on the falling
//                edge so the gated clock has no glitches)
// Resets (active low): each block reset is asserted asynchronously by
// rstb_pin low, reset_all, or its own register bit (reset_pll for the
// FDC, DLC and DCO digital) and released synchronously by a two-flop
// synchronizer in that block's clock domain.
// The clock set, the register names and their meaning follow the design;
// the retiming structure, the divider laws and the treatment of ref_src = 2
// (as clk_xosc) are this design's choices. The gain-calibration clocks are
// provided as enables on clock.fdc_dlc.clk rather than as divided clocks.
// The reference event must stay high for more than one clk_fast period
// (with vdiv_ext: vdiv_ext_width above about 10 DCO cycles) or the
// synchronizer can miss it.
// Lint note: the reset synchronizer registers are flopped synchronously
// and also drive asynchronous resets downstream; this is the intended
// assert-async / release-sync structure.
// spi_drvb (SPI active indicator) is accepted but its role is not defined
// here.
module cnr
  import pll_pkg::*;
(
  input  logic     clk_xosc,
  input  logic     clk_dig_fast,
  input  logic     vdiv_ext,
  input  logic     rstb_pin,
  input  logic     spi_drvb,
  input  cnr_cfg_t cfg,
  output logic     clk_fast,
  output logic     clk_fdc_dlc,
  output logic     sma_ce,
  output logic     sma_strobe_ce,
  output logic     clk_dco,
  output logic     clk_regs,
  output logic     rstb_fdc,
  output logic     rstb_dlc,
  output logic     rstb_dco,
  output logic     rstb_regs
);
  logic       ref_event;
  logic [2:0] sync_r, sync_f;
  logic       rise;
  logic       pclk;
  logic [2:0] pcnt;
  logic [2:0] width;
  logic       half;
  logic       gate_q;
  logic       rq_fdc, rq_dlc, rq_dco, rq_regs;
  logic [1:0] s_fdc, s_dlc, s_dco, s_regs;
  logic [2:0] ds_cnt;
  logic [3:0] st_cnt;
  logic       unused_spi;

  assign unused_spi = spi_drvb;
  assign clk_fast   = (cfg.fast_src | cfg.frc_fast) ? clk_dig_fast : clk_xosc;
  assign ref_event  = (cfg.ref_src == 2'd1) ? vdiv_ext : clk_xosc;

  // ---- reference-event retiming onto the fast clock
  always_ff @(posedge clk_fast or negedge rstb_pin) begin
    if (!rstb_pin) sync_r <= '0;
    else           sync_r <= {sync_r[1:0], ref_event};
  end
  always_ff @(negedge clk_fast or negedge rstb_pin) begin
    if (!rstb_pin) sync_f <= '0;
    else           sync_f <= {sync_f[1:0], ref_event};
  end

  always_comb begin
    rise  = cfg.phase_sel ? (sync_f[1] & ~sync_f[2]) : (sync_r[1] & ~sync_r[2]);
    width = cfg.dis_pulse_ext ? 3'd1 : ((cfg.pulse_width == 3'd0) ? 3'd1 : cfg.pulse_width);
  end

  always_ff @(posedge clk_fast or negedge rstb_pin) begin
    if (!rstb_pin) begin
      pclk <= 1'b0;
      pcnt <= '0;
    end else if (rise) begin
      pclk <= 1'b1;
      pcnt <= width - 3'd1;
    end else if (pcnt != 3'd0) begin
      pcnt <= pcnt - 3'd1;
    end else begin
      pclk <= 1'b0;
    end
  end

  always_comb begin
    if (cfg.fdc_dis)           clk_fdc_dlc = 1'b0;
    else if (cfg.fdc_frc_xosc) clk_fdc_dlc = clk_xosc;
    else if (cfg.dis_retime)   clk_fdc_dlc = ref_event;
    else                       clk_fdc_dlc = pclk;
  end

  // ---- DCO digital clock
  always_ff @(posedge clk_fast or negedge rstb_pin) begin
    if (!rstb_pin) half <= 1'b0;
    else           half <= ~half;
  end

  always_comb begin
    if (cfg.dco_dis)           clk_dco = 1'b0;
    else if (cfg.dco_frc_xosc) clk_dco = clk_xosc;
    else if (cfg.dco_half_rate) clk_dco = half;
    else                       clk_dco = clk_fast;
  end

  // ---- register clock
  always_ff @(negedge clk_xosc or negedge rstb_pin) begin
    if (!rstb_pin) gate_q <= 1'b0;
    else           gate_q <= cfg.regs_gate;
  end
  assign clk_regs = clk_xosc & ~gate_q;

  // ---- resets: asynchronous assertion, synchronous release
  always_comb begin
    rq_regs = ~rstb_pin | cfg.reset_all | cfg.reset_regs;
    rq_fdc  = ~rstb_pin | cfg.reset_all | cfg.reset_pll | cfg.reset_fdc;
    rq_dlc  = ~rstb_pin | cfg.reset_all | cfg.reset_pll | cfg.reset_dlc;
    rq_dco  = ~rstb_pin | cfg.reset_all | cfg.reset_pll | cfg.reset_dco;
  end

  always_ff @(posedge clk_fdc_dlc or posedge rq_fdc) begin
    if (rq_fdc) s_fdc <= '0;
    else        s_fdc <= {s_fdc[0], 1'b1};
  end
  always_ff @(posedge clk_fdc_dlc or posedge rq_dlc) begin
    if (rq_dlc) s_dlc <= '0;
    else        s_dlc <= {s_dlc[0], 1'b1};
  end
  always_ff @(posedge clk_dco or posedge rq_dco) begin
    if (rq_dco) s_dco <= '0;
    else        s_dco <= {s_dco[0], 1'b1};
  end
  always_ff @(posedge clk_regs or posedge rq_regs) begin
    if (rq_regs) s_regs <= '0;
    else         s_regs <= {s_regs[0], 1'b1};
  end

  assign rstb_fdc  = s_fdc[1];
  assign rstb_dlc  = s_dlc[1];
  assign rstb_dco  = s_dco[1];
  assign rstb_regs = s_regs[1];

  // ---- gain-calibration down-sampling enables
  always_ff @(posedge clk_fdc_dlc or negedge rstb_fdc) begin
    if (!rstb_fdc) begin
      ds_cnt <= '0;
      st_cnt <= '0;
    end else if (!cfg.sma_dis) begin
      ds_cnt <= (ds_cnt == cfg.sma_ds_rate) ? 3'd0 : ds_cnt + 3'd1;
      if (ds_cnt == cfg.sma_ds_rate)
        st_cnt <= (st_cnt == cfg.sma_strobe_rate) ? 4'd0 : st_cnt + 4'd1;
    end
  end

  assign sma_ce        = ~cfg.sma_dis & (ds_cnt == cfg.sma_ds_rate);
  assign sma_strobe_ce = sma_ce & (st_cnt == cfg.sma_strobe_rate);
endmodule
