// fdc_digital: digital back end of the second-order Delta-Sigma
// frequency-to-digital converter (FDC).
//
// Each clock.fdc_dlc.clk edge captures the ADC word a (7 bits, 2 integer /
// 5 fractional, two's complement). The word then flows through one
// combinational path that must settle within about 2 ns:
//   b  = a * gc_coeff                     gain normalisation (1,12 coefficient)
//   c  = clip(b + e_qc[n-1])              quantization-noise cancellation (QNC)
//   r  = c - 2 r[n-1] - r[n-2]            R(z) = 1/(1+z^-1)^2, resonator at f_RFD/2
//   rF = 2 r - r[n-2]                     F(z) = 2 - z^-2
//   div_code = DSM2(N + alpha - rF)       second-order error-feedback quantizer;
//                                         the divider modulus N - v with v = Q(rF - alpha)
//   (num_div3, num_div4_m1) = fbdiv_ctrl(div_code)   -> divider
// The ADC word captured at an edge belongs to the previous divider period,
// which supplies the z^-1 of the full feedback filter z^-1(2 - z^-2).
// The resonator forces the divider edges to absorb the alternating
// duty-cycle error of the doubled reference, so no calibration is needed.
// The phase error for the loop filter is perr = sum (r[n] + r[n-1]): the
// 1+z^-1 notch removes the f_RFD/2 component that carries the duty-cycle
// correction, and the accumulator turns frequency error into phase error.
// A sign-LMS loop (fdc_gain_cal) adjusts gc_coeff in the background.
//
// Formats: adc 7(2,5); gc 13(1,12); c 15(2,13) in [-2,2), clipped to
// +/-2^(1-clip_sel); r 18(5,13) saturated; perr 14(4,10) from a wrapping
// 17(4,13) accumulator; fcw 25(7,18) unsigned; div_code 7 bits in 0..127.
// Registers: ADC capture, two R(z) states, two past r values, the
// modulator's error registers and the phase accumulator, all reset by
// rst_n (rstb_fdc). Structure and formats follow the design; the reading
// of the low-resolution widths, saturation in R(z) and the perr split are
// this design's choices.
// Lint note: only e_qc[n-2] of the modulator is needed here, so its other
// error outputs and the LFSR state are left open or unused, and the top
// bits of the wide intermediate sums are dropped on purpose.
module fdc_digital
  import pll_pkg::*;
(
  input  logic                 clk,         // clock.fdc_dlc.clk
  input  logic                 rst_n,       // rstb_fdc
  input  logic                 sma_ce,      // gain-calibration update enable
  input  logic                 strobe_ce,   // gain-calibration output strobe
  input  logic [ADC_W-1:0]     adc_data,
  input  logic [FCW_W-1:0]     fcw,         // N + alpha, 25(7,18)
  input  fdc_cfg_t             cfg,
  output logic [PERR_W-1:0]    perr,
  output logic [1:0]           num_div3,
  output logic [4:0]           num_div4_m1,
  output logic [DIV_W-1:0]     div_code,
  output logic                 mmd_debug_flag,
  output logic [GC_W-1:0]      gc_coeff,
  output logic signed [RS_W-1:0] r_out
);
  localparam int signed QMAX = (1 <<< (QNC_W - 1)) - 1;   // just under +2.0
  localparam int signed RMAX = (1 <<< (RS_W - 1)) - 1;    // just under +16.0
  localparam int unsigned PACC_W = PERR_W + (QNC_FRAC - PERR_FRAC);  // 17

  logic signed [ADC_W-1:0]   a_q;
  logic signed [ADC_W+GC_W:0] prod;       // (.,17)
  logic signed [FCW_FRAC:0]  e_cur, e_d1, e_d2;
  logic signed [31:0]        b13, qnc_full, qnc_sat, lim, c_clip;
  logic signed [31:0]        y1, r_cur, rf, notch;
  logic signed [RS_W-1:0]    y1_q, r_d1, r_d2;
  logic signed [PACC_W-1:0]  pacc;
  logic signed [FCW_W+1:0]   dsm_in;
  logic                      dither, lfsr_bit;
  logic [4:0]                unused_div4;

  function automatic logic signed [31:0] sat(input logic signed [31:0] v, input int signed m);
    if (v > m)          return m;
    else if (v < -m-1)  return -m-1;
    else                return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_q <= '0;
    else        a_q <= adc_data;
  end

  always_comb begin
    prod     = a_q * signed'({1'b0, gc_coeff});
    b13      = 32'(prod) >>> (ADC_FRAC + GC_FRAC - QNC_FRAC);
    qnc_full = b13 + (cfg.dis_qnc ? 32'sd0 : (32'(e_d2) >>> (FCW_FRAC - QNC_FRAC)));
    qnc_sat  = sat(qnc_full, QMAX);
    lim      = 32'sd1 <<< (QNC_W - 1 - 32'(cfg.clip_sel));   // 2^(1-clip_sel) in (.,13)
    c_clip   = sat(qnc_sat, lim - 1);
    y1       = sat(c_clip - 32'(y1_q), RMAX);
    r_cur    = sat(y1 - 32'(r_d1), RMAX);
    notch    = r_cur + 32'(r_d1);
    rf       = (r_cur <<< 1) - 32'(r_d2);
    dsm_in   = signed'({2'b00, fcw}) - ((FCW_W+2)'(rf) <<< (FCW_FRAC - QNC_FRAC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1_q <= '0;
      r_d1 <= '0;
      r_d2 <= '0;
      pacc <= '0;
    end else begin
      y1_q <= RS_W'(y1);
      r_d1 <= RS_W'(r_cur);
      r_d2 <= r_d1;
      pacc <= pacc + PACC_W'(notch);
    end
  end

  assign perr  = pacc[PACC_W-1 -: PERR_W];
  assign r_out = RS_W'(r_cur);

  lfsr u_lfsr (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .bit_out(lfsr_bit), .state()
  );
  assign dither = lfsr_bit & ~cfg.dis_dsm_dither;

  dsm2_ef #(
    .IN_W(FCW_W + 2), .FRAC(FCW_FRAC), .OUT_W(DIV_W), .OUT_MIN(0), .OUT_MAX(127)
  ) u_qc (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .x(dsm_in), .dither(dither),
    .y(div_code), .e(e_cur), .e_d1(e_d1), .e_d2(e_d2)
  );

  fbdiv_ctrl #(.NB(DIV_W), .MIN_DIV4(10)) u_fbdiv (
    .divcode(div_code), .num_div3(num_div3), .num_div4(unused_div4),
    .num_div4_m1(num_div4_m1), .debug_flag(mmd_debug_flag)
  );

  fdc_gain_cal #(.ACC_W(25), .COEF_W(GC_W), .C_W(QNC_W)) u_gc (
    .clk(clk), .rst_n(rst_n), .sma_ce(sma_ce), .strobe_ce(strobe_ce),
    .c_in(QNC_W'(qnc_sat)), .eqc_neg(e_d2[FCW_FRAC]), .cfg(cfg), .gc_coeff(gc_coeff)
  );
endmodule
