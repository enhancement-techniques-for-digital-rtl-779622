// dco_digital: DCO fine-frequency control of the Delta-Sigma FDC PLL.
//
// The loop filter's 15-bit word fctrl (7 integer, 8 fractional bits,
// updated at the reference rate) is split into an integer part d_I and a
// fraction d_F. d_I drives the integer fine-FCE bank through the
// binary-to-segmented encoder (7 thermometer lines of weight 16, 4 binary
// lines). d_F is re-quantized at the fast clock.dco rate by a second-order
// error-feedback Delta-Sigma modulator with LFSR dither, whose output
// (-1..2 for d_F in [0,1)) is offset by one and drives 0..3 of the 4
// fractional unit elements through the DEM encoder. The average number of
// fractional elements on is therefore d_F + 1: a fixed one-element offset
// that the PLL loop absorbs like any DCO centre-frequency error.
//
// Timing: fctrl is registered in the clock.dco domain (clock.fdc_dlc.clk
// is derived from the same fast clock, so the word is stable around the
// clock.dco edges), and every FCE control leaves through a clock.dco
// register. ena_snap captures fctrl on clock.fdc_dlc.clk for read-back.
// Controls: byp_fctrl / byp_fce substitute user values, dis_dsm uses a
// plain rounding quantizer, dis_dither and dis_lfsr remove the dither,
// ena_dem / dis_shaping select the element-selection scheme.
// The split, encoders and the modulator follow the design; the
// integer-boundary avoider that precedes the split in the design is not
// built (dis_bound_avoid has no effect), and the +1 offset, the DEM
// algorithm and the dither position are this design's choices.
// Lint note: the modulator's error outputs are not needed and are left
// open; only two LFSR state bits are used (random DEM start), and the
// dis_bound_avoid field is unused.
module dco_digital
  import pll_pkg::*;
(
  input  logic               clk_dco,      // clock.dco
  input  logic               clk_fdc_dlc,  // clock.fdc_dlc.clk
  input  logic               rst_n,        // rstb_dco
  input  logic [FCTRL_W-1:0] fctrl,
  input  dco_cfg_t           cfg,
  output logic [6:0]         fine_int_therm,
  output logic [3:0]         fine_int_bin,
  output logic [3:0]         fine_frac,
  output logic [FCTRL_W-1:0] snap_fctrl
);
  logic [FCTRL_W-1:0] fq;
  logic [6:0]         d_i;
  logic [7:0]         d_f;
  logic [6:0]         therm;
  logic [3:0]         bin;
  logic [2:0]         y_dsm;      // -1..2, two's complement
  logic [2:0]         code;       // 0..4 elements
  logic [3:0]         el;
  logic               lfsr_bit;
  logic [22:0]        lfsr_state;

  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) fq <= FCTRL_W'(1) << (FCTRL_W - 1);
    else        fq <= cfg.byp_fctrl ? cfg.user_fctrl : fctrl;
  end

  assign d_i = fq[FCTRL_W-1 -: 7];
  assign d_f = fq[FCTRL_FRAC-1:0];

  bin2seg #(.INT_W(7)) u_seg (.d_int(d_i), .therm(therm), .bin(bin));

  lfsr u_lfsr (
    .clk(clk_dco), .rst_n(rst_n), .en(~cfg.dis_lfsr), .bit_out(lfsr_bit), .state(lfsr_state)
  );

  dsm2_ef #(.IN_W(10), .FRAC(8), .OUT_W(3), .OUT_MIN(-1), .OUT_MAX(2)) u_dsm (
    .clk(clk_dco), .rst_n(rst_n), .en(~cfg.dis_dsm), .x({2'b00, d_f}),
    .dither(lfsr_bit & ~cfg.dis_dither), .y(y_dsm), .e(), .e_d1(), .e_d2()
  );

  always_comb begin
    if (cfg.dis_dsm) code = {2'b00, d_f[7]} + 3'd1;   // round(d_F) + 1
    else             code = y_dsm + 3'd1;
  end

  dem_encoder #(.N_EL(4)) u_dem (
    .clk(clk_dco), .rst_n(rst_n), .en(1'b1), .code(code), .ena_dem(cfg.ena_dem),
    .dis_shaping(cfg.dis_shaping), .rnd(lfsr_state[1:0]), .el(el)
  );

  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) begin
      fine_int_therm <= '0;
      fine_int_bin   <= '0;
      fine_frac      <= '0;
    end else if (cfg.byp_fce) begin
      fine_int_therm <= cfg.user_int_therm;
      fine_int_bin   <= cfg.user_int_bin;
      fine_frac      <= cfg.user_frac;
    end else begin
      fine_int_therm <= therm;
      fine_int_bin   <= bin;
      fine_frac      <= el;
    end
  end

  always_ff @(posedge clk_fdc_dlc or negedge rst_n) begin
    if (!rst_n)            snap_fctrl <= '0;
    else if (cfg.ena_snap) snap_fctrl <= fctrl;
  end
endmodule
