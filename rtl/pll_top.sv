// pll_top: digital part of the Delta-Sigma FDC PLL, and beside it the
// incremental-frequency-control (IFC) DCO interface.
//
// PLL digital. The DCO output clocks the multi-modulus divider (mmd),
// which produces the divider edge vdiv compared with the doubled reference
// by the analog phase detector, the ADC conversion window vconv_mmd, the
// ready pulse vdiv_ext and the fast digital clock clk_dig_fast = DCO/10.
// The clock-and-reset block (cnr) turns a reference event (vrfd or
// vdiv_ext) into clock.fdc_dlc.clk, one pulse per reference period,
// retimed to the fast clock, and derives clock.dco from the fast clock.
// On each clock.fdc_dlc.clk edge the FDC digital (fdc_digital) takes the
// ADC word, closes the Delta-Sigma FDC loop through the divider phase
// counts num_div3 / num_div4_m1, and hands the phase error perr to the
// loop controller (dlc), whose 15-bit word fctrl drives the DCO digital
// (dco_digital); the latter runs on clock.dco and produces the fine-FCE
// bank controls. Analog parts (reference doubler, phase detector, charge
// pump, integrator, ADC, DCO core) and the configuration registers are
// outside: their signals are ports.
//
// IFC interface. A separate DCO control scheme: ifc_dco_if turns a 16-bit
// DCO word into the two Gray-coded control lines c1/c2 of a unit-weighted
// FCE bank plus a 1-bit fractional control, on its own fast clock. It
// shares nothing with the PLL digital and has its own ports.
module pll_top
  import pll_pkg::*;
(
  // ---- PLL digital
  input  logic               dco_clk,        // DCO output (drives the divider)
  input  logic               vrfd,           // doubled reference = clk_xosc
  input  logic               rstb_pin,
  input  logic               spi_drvb,
  input  logic [ADC_W-1:0]   adc_data,
  input  logic [FCW_W-1:0]   fcw,            // N + alpha, 25(7,18)
  input  cnr_cfg_t           cnr_cfg,
  input  fdc_cfg_t           fdc_cfg,
  input  dlc_cfg_t           dlc_cfg,
  input  dco_cfg_t           dco_cfg,
  input  mmd_cfg_t           mmd_cfg,
  output logic               vdiv,
  output logic               vdiv_ext,
  output logic               vconv_mmd,
  output logic               samp_strobe,
  output logic [6:0]         dco_fine_int_therm,
  output logic [3:0]         dco_fine_int_bin,
  output logic [3:0]         dco_fine_frac,
  output logic               clk_regs,
  output logic               rstb_regs,
  output logic               clk_fdc_dlc,
  output logic [PERR_W-1:0]  perr,
  output logic [FCTRL_W-1:0] fctrl,
  output logic [GC_W-1:0]    gc_coeff,
  output logic [DIV_W-1:0]   div_code,
  output logic               mmd_debug_flag,
  output logic [PERR_W-1:0]  snap_perr,
  output logic [FCTRL_W-1:0] snap_fctrl_dlc,
  output logic [FCTRL_W-1:0] snap_fctrl_dco,
  // ---- IFC DCO interface
  input  logic               ifc_clk_fast,
  input  logic               ifc_rst_n,
  input  logic [15:0]        ifc_d,
  output logic               ifc_c1,
  output logic               ifc_c1_b,
  output logic               ifc_c2,
  output logic               ifc_c2_b,
  output logic               ifc_c_f,
  output logic [7:0]         ifc_t
);
  logic       clk_dig_fast, clk_fast, clk_dco;
  logic       sma_ce, sma_strobe_ce;
  logic       rstb_fdc, rstb_dlc, rstb_dco;
  logic [1:0] num_div3;
  logic [4:0] num_div4_m1;
  logic signed [RS_W-1:0] r_unused;
  logic       unused;

  mmd u_mmd (
    .clk_dco(dco_clk), .rst_n(rstb_pin), .num_div3(num_div3), .num_div4_m1(num_div4_m1),
    .cfg(mmd_cfg), .vdiv(vdiv), .vdiv_ext(vdiv_ext), .vconv_mmd(vconv_mmd),
    .clk_dig_fast(clk_dig_fast), .samp_strobe(samp_strobe)
  );

  cnr u_cnr (
    .clk_xosc(vrfd), .clk_dig_fast(clk_dig_fast), .vdiv_ext(vdiv_ext), .rstb_pin(rstb_pin),
    .spi_drvb(spi_drvb), .cfg(cnr_cfg), .clk_fast(clk_fast), .clk_fdc_dlc(clk_fdc_dlc),
    .sma_ce(sma_ce), .sma_strobe_ce(sma_strobe_ce), .clk_dco(clk_dco), .clk_regs(clk_regs),
    .rstb_fdc(rstb_fdc), .rstb_dlc(rstb_dlc), .rstb_dco(rstb_dco), .rstb_regs(rstb_regs)
  );

  fdc_digital u_fdc (
    .clk(clk_fdc_dlc), .rst_n(rstb_fdc), .sma_ce(sma_ce), .strobe_ce(sma_strobe_ce),
    .adc_data(adc_data), .fcw(fcw), .cfg(fdc_cfg), .perr(perr), .num_div3(num_div3),
    .num_div4_m1(num_div4_m1), .div_code(div_code), .mmd_debug_flag(mmd_debug_flag),
    .gc_coeff(gc_coeff), .r_out(r_unused)
  );

  dlc u_dlc (
    .clk(clk_fdc_dlc), .rst_n(rstb_dlc), .perr(perr), .cfg(dlc_cfg), .fctrl(fctrl),
    .snap_perr(snap_perr), .snap_fctrl(snap_fctrl_dlc)
  );

  dco_digital u_dco (
    .clk_dco(clk_dco), .clk_fdc_dlc(clk_fdc_dlc), .rst_n(rstb_dco), .fctrl(fctrl), .cfg(dco_cfg),
    .fine_int_therm(dco_fine_int_therm), .fine_int_bin(dco_fine_int_bin),
    .fine_frac(dco_fine_frac), .snap_fctrl(snap_fctrl_dco)
  );

  assign unused = clk_fast ^ (^r_unused);

  ifc_dco_if #(.W(16)) u_ifc (
    .clk_fast(ifc_clk_fast), .rst_n(ifc_rst_n), .d(ifc_d), .c1(ifc_c1), .c1_b(ifc_c1_b),
    .c2(ifc_c2), .c2_b(ifc_c2_b), .c_f(ifc_c_f), .t(ifc_t)
  );
endmodule
