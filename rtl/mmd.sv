// mmd: multi-modulus divider with 3/4 pre-scaler, plus the divider-side
// clock generation (vdiv, vdiv_ext, vconv_mmd, clk_dig_fast).
//
// Clocked by the DCO output. One divider period consists of num_div4
// pre-scaler counts of four DCO cycles followed by num_div3 counts of
// three, i.e. 4*num_div4 + 3*num_div3 DCO cycles. The FSM compares the
// index of the running count-to-4 with the target num_div4_m1 (= num_div4
// - 1); on a match it switches the pre-scaler to count-to-3 (or ends the
// period when num_div3 = 0). The new phase counts from the FDC digital are
// sampled when count-to-4 number samp_ctrl_delay completes (9 for N <= 64,
// 10 for N > 64), so the FDC has until then to compute them; as every
// period has at least 10 counts of four, the comparison that ends the
// count-to-4 phase always uses the freshly sampled target. On the
// sampling edge itself the incoming counts are used directly, and the
// count-to-4 phase ends when the index reaches or passes the target, so a
// short period sampled late still ends at once rather than overrunning.
// After reset the first period is one DCO cycle short (reset artefact).
//
// Outputs, all registered on the DCO clock:
//   vdiv         u(t): high for oc_width DCO cycles at the start of a period;
//                its rising edge is the divider edge compared with the reference
//   vdiv_ext     high for vdiv_ext_width DCO cycles after vdiv falls
//                (if ena_vdiv_ext); a ready signal for the digital clock
//   vconv_mmd    high from pre-scaler count adc_conv_del to
//                adc_conv_del + adc_conv_width: the ADC conversion window
//   clk_dig_fast DCO / 10 (5 cycles high, 5 low)
//   samp_strobe  one DCO cycle when new phase counts are taken
// The divide scheme, sample point and output set follow the design; the
// units of the width settings and the reset values are this design's
// choices (reset: divide by 64 until the first sample).
module mmd
  import pll_pkg::*;
(
  input  logic       clk_dco,
  input  logic       rst_n,
  input  logic [1:0] num_div3,
  input  logic [4:0] num_div4_m1,
  input  mmd_cfg_t   cfg,
  output logic       vdiv,
  output logic       vdiv_ext,
  output logic       vconv_mmd,
  output logic       clk_dig_fast,
  output logic       samp_strobe
);
  typedef enum logic {S_DIV4 = 1'b0, S_DIV3 = 1'b1} pmode_t;

  pmode_t     mode;
  logic [1:0] pc;          // DCO cycle within the current pre-scaler count
  logic [4:0] k4;          // index of the running count-to-4
  logic [1:0] k3;          // index of the running count-to-3
  logic [1:0] lat_d3;
  logic [4:0] lat_d4m1;
  logic [5:0] pcount;      // pre-scaler counts completed in this period
  logic [7:0] dcyc;        // DCO cycles since the period start (saturating)
  logic [3:0] div10;

  logic       end_cnt, period_end, do_samp;
  logic [1:0] eff_d3;      // counts in force at this edge (new ones on the sampling edge)
  logic [4:0] eff_d4m1;
  logic [5:0] pcount_n;
  logic [7:0] dcyc_n;

  always_comb begin
    end_cnt    = (mode == S_DIV4) ? (pc == 2'd3) : (pc == 2'd2);
    do_samp    = end_cnt && (mode == S_DIV4) && (k4 == cfg.samp_ctrl_delay - 5'd1);
    eff_d3     = do_samp ? num_div3    : lat_d3;
    eff_d4m1   = do_samp ? num_div4_m1 : lat_d4m1;
    period_end = 1'b0;
    if (end_cnt) begin
      if (mode == S_DIV4) period_end = (k4 >= eff_d4m1) && (eff_d3 == 2'd0);
      else                period_end = (k3 >= lat_d3 - 2'd1);
    end
    pcount_n = period_end ? 6'd0 : (end_cnt && pcount != 6'h3f) ? pcount + 6'd1 : pcount;
    dcyc_n   = period_end ? 8'd0 : (dcyc != 8'hff) ? dcyc + 8'd1 : dcyc;
  end

  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= S_DIV4;
      pc       <= '0;
      k4       <= '0;
      k3       <= '0;
      lat_d3   <= '0;
      lat_d4m1 <= 5'd15;
      pcount   <= '0;
      dcyc     <= '0;
      vdiv     <= 1'b0;
      vdiv_ext <= 1'b0;
      vconv_mmd   <= 1'b0;
      samp_strobe <= 1'b0;
    end else begin
      pc <= end_cnt ? 2'd0 : pc + 2'd1;
      if (do_samp) begin
        lat_d3   <= num_div3;
        lat_d4m1 <= num_div4_m1;
      end
      if (end_cnt) begin
        if (period_end) begin
          mode <= S_DIV4;
          k4   <= '0;
          k3   <= '0;
        end else if (mode == S_DIV4) begin
          if (k4 >= eff_d4m1) begin
            mode <= S_DIV3;
            k3   <= '0;
          end else k4 <= k4 + 5'd1;
        end else k3 <= k3 + 2'd1;
      end
      pcount      <= pcount_n;
      dcyc        <= dcyc_n;
      samp_strobe <= do_samp;
      vdiv        <= (dcyc_n < 8'(cfg.oc_width));
      vdiv_ext    <= cfg.ena_vdiv_ext && (dcyc_n >= 8'(cfg.oc_width))
                     && (dcyc_n < 8'(cfg.oc_width) + 8'(cfg.vdiv_ext_width));
      vconv_mmd   <= (pcount_n >= 6'(cfg.adc_conv_del))
                     && (pcount_n < 6'(cfg.adc_conv_del) + 6'(cfg.adc_conv_width));
    end
  end

  // free-running divide-by-10 for the digital fast clock
  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) begin
      div10        <= '0;
      clk_dig_fast <= 1'b0;
    end else begin
      div10        <= (div10 == 4'd9) ? 4'd0 : div10 + 4'd1;
      clk_dig_fast <= ((div10 == 4'd9) ? 4'd0 : div10 + 4'd1) < 4'd5;
    end
  end
endmodule
