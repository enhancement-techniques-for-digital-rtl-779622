// pll_closed_loop_env: closed-loop test environment for the whole digital
// PLL: pll_top with behavioural models of the analog parts, plus a drive
// of the incremental DCO interface. pll_top is used at its default size
// (it has no parameters). The crystal duty cycle, N + alpha and the
// forward-path gain are parameters of this environment (defaults 55 %,
// 65.1 and 1.1); it reports its check and failure counts and raises done
// when its sequence is complete. The testbenches tb_pll_top and
// tb_pll_workloads instantiate it.
//
// Models (all kept in this file, times as reals in ps):
//  - reference: doubled crystal reference, rising edges at
//      t_n = n*T_ref + dT*(-1)^n,  T_ref = 1/153.6 MHz,  dT = (D/100-0.5)*T_ref
//    with a crystal duty cycle D = 55 % (5 % duty-cycle error); 2 ns pulses;
//  - DCO: frequency f = F_C + KDCO*(16*therm + bin + frac - 1 - 64), with
//    the cell counts taken from the fine-bank controls; F_C is offset from
//    the target (N + alpha)*f_ref so the loop has to pull in; each edge
//    time is kept exactly and the simulated edge is that time rounded
//    to 1 ps;
//  - phase detector / charge pump / integrator: each divider edge adds the
//    fixed offset charge A*T_OC/T_PLL, each reference edge removes
//    A*(t_n - tau_n)/T_PLL (the DN pulse runs from the divider edge to the
//    reference edge); A = 1.1 is a 10 % forward-path gain error that the
//    gain calibration must remove (expected coefficient 1/1.1);
//  - ADC: samples the integrator when vconv_mmd rises, rounds to 1/32,
//    saturates to [-2, 2) and presents the 7-bit word when vconv_mmd falls.
// The digital clock comes from vdiv_ext retimed to DCO/10; vdiv_ext is
// set 20 DCO cycles wide so the retiming never misses an event.
// Start-up: the reference starts on the third divider edge, one T_OC
// after it, and the integrator starts at the mid value of its ripple, so
// the loop starts phase-aligned and the ADC does not saturate. A cold
// phase acquisition is not modelled. The DCO gain is positive: more
// fine cells raise the frequency.
// Taken from the design: reference frequency, N+alpha = 65.1, OC width,
// KDCO = 200 kHz/cell, the evaluated loop settings (km=10, kp=3, ki_kp=7,
// kr=2, gain2x=5), ADC format. Own choices:
// duty error, gain error, the 1.5 MHz start offset, window lengths and
// tolerances.
//
// Mechanisms counted and checked (counts printed at the end):
//  lock       - DCO mean frequency within 20 kHz of (N+alpha)*f_ref and
//               |phase error| < 0.25 cycle over the last window;
//  gain cal   - coefficient within 3 % of 4096/1.1;
//  duty cycle - the alternating part of t_n - tau_n (PD output) below 3 %
//               of dT, while the reference edges carry the full dT;
//  offset     - mean t_n - tau_n equals T_OC (reference lags the divider);
//  divider    - periods with count-to-3 phases and with only count-to-4
//               phases both occur; divider period = code (checked per edge);
//  noise cancellation / dither / element rotation - fractional cell
//               pattern changes while its count repeats; code moves;
//  clamp      - an out-of-range frequency word raises the debug flag;
//  snapshots, sma strobes;
//  IFC        - up steps, down steps and fractional pulses on the separate
//               interface, with its cell count tracking a ramped word.
// Time unit 1 ps.
module pll_closed_loop_env #(
  parameter real DUTY   = 55.0,   // crystal duty cycle, percent
  parameter real NALPHA = 65.1,   // N + alpha
  parameter real A_GAIN = 1.1     // forward-path gain (1 + gain error)
) (
  output int checks,
  output int failures,
  output bit done
);
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;

  // ---------------- constants
  localparam real F_REF   = 153.6e6;
  localparam real T_REF   = 1.0e12 / F_REF;           // ps
  localparam real DT      = (DUTY / 100.0 - 0.5) * T_REF;
  localparam real F_TGT   = NALPHA * F_REF;
  localparam real KDCO    = 200.0e3;                   // Hz per cell
  localparam real F_C     = F_TGT + 1.5e6;
  localparam int  OC_W    = 8;

  // ---------------- DUT signals
  logic dco_clk = 0, vrfd = 0, rstb_pin = 1, spi_drvb = 0;
  logic [6:0]  adc_data = '0;
  logic [24:0] fcw;
  cnr_cfg_t cnr_cfg; fdc_cfg_t fdc_cfg; dlc_cfg_t dlc_cfg; dco_cfg_t dco_cfg; mmd_cfg_t mmd_cfg;
  logic vdiv, vdiv_ext, vconv_mmd, samp_strobe;
  logic [6:0] dco_fine_int_therm; logic [3:0] dco_fine_int_bin, dco_fine_frac;
  logic clk_regs, rstb_regs, clk_fdc_dlc;
  logic [13:0] perr, snap_perr; logic [14:0] fctrl, snap_fctrl_dlc, snap_fctrl_dco;
  logic [12:0] gc_coeff; logic [6:0] div_code; logic mmd_debug_flag;
  logic ifc_clk_fast = 0, ifc_rst_n = 1; logic [15:0] ifc_d;
  logic ifc_c1, ifc_c1_b, ifc_c2, ifc_c2_b, ifc_c_f; logic [7:0] ifc_t;

  pll_top dut (.*);

  initial begin checks = 0; failures = 0; done = 0; #1 rstb_pin = 0; ifc_rst_n = 0; end  // real reset edges
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask


  // ---------------- DCO model
  real t_dco_rise = 0.0, f_now;
  longint dco_cycles = 0;
  function automatic real dco_freq();
    real cells = 16.0 * $countones(dco_fine_int_therm) + real'(dco_fine_int_bin)
                 + real'($countones(dco_fine_frac)) - 1.0;
    return F_C + KDCO * (cells - 64.0);
  endfunction
  initial begin
    real t_next;
    t_next = 1000.0;
    forever begin
      f_now = dco_freq();
      t_next += 0.5e12 / f_now;
      #(t_next - $realtime);
      if (!dco_clk) begin t_dco_rise = t_next; dco_cycles++; end
      dco_clk = ~dco_clk;
    end
  end

  // ---------------- reference model
  real t_ref_last = 0.0;
  int  n_ref = 0;
  bit ref_on = 0;
  real v_int = 0.0, tau_last = 0.0, t_pend = 0.0;
  bit  wait_ref = 0, ref_pend = 0;
  initial begin
    real t, t0;
    // start after coarse setup: the first reference edge follows the third
    // divider edge (the first with the loop's own modulus) by T_OC + dT, and
    // the integrator starts midway between the two alternating levels
    repeat (3) @(posedge vdiv);
    t0 = t_dco_rise + real'(OC_W) * 1.0e12 / F_TGT;
    v_int = 0.5 * A_GAIN * DT * F_TGT * 1.0e-12;
    wait_ref = 1; tau_last = t_dco_rise; ref_on = 1;
    for (int n = 0; ; n++) begin
      t = t0 + real'(n) * T_REF + DT * ((n % 2 == 0) ? 1.0 : -1.0);
      #(t - $realtime);
      t_ref_last = t; n_ref = n;
      vrfd = 1;
      #2000 vrfd = 0;
    end
  end

  // ---------------- PD / CP / integrator / ADC
  real u_hist[$];            // t_n - tau_n per reference period (ps)
  bit  u_parity[$];
  int  ref_parity = 0;
  real t_pll;
  always @(posedge vdiv) if (ref_on) begin
    tau_last = t_dco_rise;
    t_pll = 1.0e12 / f_now;
    v_int += A_GAIN * real'(OC_W);                   // offset pulse, T_OC / T_PLL
    if (ref_pend) begin                              // reference came first
      v_int -= A_GAIN * (t_pend - tau_last) / t_pll;
      u_hist.push_back(t_pend - tau_last); u_parity.push_back(1'(ref_parity));
      ref_pend = 0;
    end else wait_ref = 1;
  end
  always @(posedge vrfd) begin
    real t;
    t = t_ref_last;
    ref_parity = n_ref % 2;
    t_pll = 1.0e12 / f_now;
    if (wait_ref && (t - tau_last) < T_REF / 2) begin
      v_int -= A_GAIN * (t - tau_last) / t_pll;
      u_hist.push_back(t - tau_last); u_parity.push_back(1'(ref_parity));
      wait_ref = 0;
    end else begin
      ref_pend = 1; t_pend = t; wait_ref = 0;
    end
  end
  logic [6:0] adc_held = '0;
  always @(posedge vconv_mmd) begin
    int q;
    q = int'($floor(v_int * 32.0 + 0.5));
    if (q > 63) q = 63;
    if (q < -64) q = -64;
    adc_held = 7'(q);
  end
  always @(negedge vconv_mmd) adc_data = adc_held;

  // ---------------- divider period check (code present at the sample)
  int exp_mod = 0, div_periods = 0, div_bad = 0, n_div3 = 0, n_div4only = 0;
  longint cyc_at_div = 0;
  always @(posedge dco_clk) if (samp_strobe) begin
    exp_mod = int'(div_code) < 40 ? 40 : int'(div_code);
    if (int'(div_code) % 4 != 0) n_div3++; else n_div4only++;
  end
  always @(posedge vdiv) begin
    if (div_periods > 3 && exp_mod != 0 && int'(dco_cycles - cyc_at_div) != exp_mod) div_bad++;
    cyc_at_div = dco_cycles;
    div_periods++;
  end

  // ---------------- mechanism counters
  int n_frac_patterns = 0, n_sma = 0, n_code_moves = 0, n_flag = 0;
  logic [3:0] last_frac;
  always @(posedge dco_clk) begin
    if ($countones(dco_fine_frac) == $countones(last_frac) && dco_fine_frac != last_frac) n_frac_patterns++;
    last_frac = dco_fine_frac;
  end
  logic [6:0] last_code;
  always @(posedge clk_fdc_dlc) begin
    #1;
    if (div_code != last_code) n_code_moves++;
    last_code = div_code;
    if (mmd_debug_flag) n_flag++;
  end
  always @(posedge clk_fdc_dlc) if (dut.u_cnr.sma_strobe_ce) n_sma++;

  // ---------------- IFC drive
  always #500 ifc_clk_fast = ~ifc_clk_fast;
  int ifc_up = 0, ifc_dn = 0, ifc_cf = 0;
  logic [1:0] ifc_prev = 2'b01;
  function automatic int gpos(logic [1:0] g);
    return (g == 2'b00) ? 0 : (g == 2'b01) ? 1 : (g == 2'b11) ? 2 : 3;
  endfunction
  always @(negedge ifc_clk_fast) if (ifc_rst_n) begin
    int dp;
    dp = (gpos({ifc_c1, ifc_c2}) - gpos(ifc_prev) + 4) % 4;
    if (dp == 1) ifc_up++;
    if (dp == 3) ifc_dn++;
    chk(dp != 2, "IFC lines move one Gray step at most");
    ifc_prev = {ifc_c1, ifc_c2};
    ifc_cf += int'(ifc_c_f);
  end

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // ---------------- measurement helpers
  task automatic window(input int n_periods, output real f_mean, output real u_mean,
                        output real u_alt, output real perr_max);
    longint c0; real t0;
    int i0;
    c0 = dco_cycles; t0 = t_dco_rise; i0 = u_hist.size();
    perr_max = 0.0;
    repeat (n_periods) begin
      @(posedge clk_fdc_dlc); #1;
      if (fabs(real'(int'(signed'(perr))) / 1024.0) > perr_max)
        perr_max = fabs(real'(int'(signed'(perr))) / 1024.0);
    end
    f_mean = real'(dco_cycles - c0) / ((t_dco_rise - t0) * 1.0e-12);
    u_mean = 0.0; u_alt = 0.0;
    for (int i = i0; i < u_hist.size(); i++) begin
      u_mean += u_hist[i];
      u_alt  += u_parity[i] ? u_hist[i] : -u_hist[i];
    end
    u_mean /= real'(u_hist.size() - i0);
    u_alt  /= real'(u_hist.size() - i0);
  endtask

  initial begin
    real f_mean, u_mean, u_alt, pmax, gc_exp;
    int  ifc_target;
    // configuration
    fcw = 25'(longint'(NALPHA * 262144.0 + 0.5));
    cnr_cfg = '0; cnr_cfg.fast_src = 1; cnr_cfg.ref_src = 2'd1; cnr_cfg.pulse_width = 3'd2;
    cnr_cfg.sma_ds_rate = 3'd0; cnr_cfg.sma_strobe_rate = 4'd3;
    fdc_cfg = '0; fdc_cfg.gc_ena = 1; fdc_cfg.gc_gain2x = 3'd5;
    dlc_cfg = '0; dlc_cfg.km = 4'd10; dlc_cfg.kp = 3'd3; dlc_cfg.ka = 3'd0; dlc_cfg.ki_kp = 4'd7;
    dlc_cfg.kr = 3'd2; dlc_cfg.ena_snap = 1;
    dco_cfg = '0; dco_cfg.ena_dem = 1; dco_cfg.ena_snap = 1;
    mmd_cfg = '0; mmd_cfg.oc_width = 4'(OC_W); mmd_cfg.ena_vdiv_ext = 1; mmd_cfg.vdiv_ext_width = 6'd20;
    // conversion window follows N: 5 / 5 pre-scaler counts up to N = 64, 6 / 6 above.
    // The sample point stays at count-to-4 no. 10 (40 DCO cycles) for every N:
    // the clock.fdc_dlc edge, retimed from vdiv_ext through the DCO/10
    // synchronizer, falls 28..38 DCO cycles into the period, so no. 9 (36
    // cycles) would sometimes sample the phase counts before they are updated.
    if (int'($floor(NALPHA)) <= 64) begin
      mmd_cfg.samp_ctrl_delay = 5'd10; mmd_cfg.adc_conv_del = 4'd5; mmd_cfg.adc_conv_width = 4'd5;
    end else begin
      mmd_cfg.samp_ctrl_delay = 5'd10; mmd_cfg.adc_conv_del = 4'd6; mmd_cfg.adc_conv_width = 4'd6;
    end
    ifc_d = 16'h8000;
    #20000;
    rstb_pin = 1; ifc_rst_n = 1;
    // acquisition
    for (int k = 0; k < 12; k++) begin
      window(500, f_mean, u_mean, u_alt, pmax);
      $display("%m window %0d: f-ftgt=%0.1f kHz  u_mean=%0.1f ps  u_alt=%0.2f ps  |perr|max=%0.3f  gc=%0d fctrl=%0d",
               k, (f_mean - F_TGT) / 1e3, u_mean, u_alt, pmax, gc_coeff, fctrl);
    end
    window(1000, f_mean, u_mean, u_alt, pmax);
    $display("%m final: f-ftgt=%0.1f kHz  u_mean=%0.1f ps  u_alt=%0.2f ps (dT=%0.1f)  |perr|max=%0.3f  gc=%0d",
             (f_mean - F_TGT) / 1e3, u_mean, u_alt, DT, pmax, gc_coeff);
    chk(fabs(f_mean - F_TGT) < 20.0e3, "lock: mean frequency");
    chk(pmax < 0.25, "lock: phase error");
    gc_exp = 4096.0 / A_GAIN;
    chk(fabs(real'(gc_coeff) - gc_exp) < 0.03 * gc_exp, "gain calibration converged");
    chk(fabs(u_alt) < 0.03 * DT, "duty-cycle error cancelled at the PD");
    chk(fabs(u_mean - real'(OC_W) * 1.0e12 / F_TGT) < 20.0, "reference lags divider by T_OC");
    chk(div_bad == 0, "divider periods equal the sampled codes");
    chk(n_div3 > 10 && n_div4only > 10, "both divider phase kinds used");
    chk(n_frac_patterns > 100, "fractional element rotation");
    chk(n_code_moves > 100, "divider code modulated");
    chk(n_sma > 100, "calibration strobes");
    for (int k = 0; k < 20; k++) begin
      logic [13:0] p_old; logic [14:0] f_old;
      @(negedge clk_fdc_dlc); p_old = perr; f_old = fctrl;
      @(posedge clk_fdc_dlc); #1;
      chk(snap_perr == p_old && snap_fctrl_dlc == f_old && snap_fctrl_dco == f_old, "snapshots");
    end
    // IFC ramp
    for (int k = 0; k < 6; k++) begin
      ifc_target = (k % 2 == 0) ? 200 : 60;
      ifc_d = {8'(ifc_target), 8'd77};
      repeat (300) @(negedge ifc_clk_fast);
      chk(int'(ifc_t) == ifc_target, "IFC count tracks the word");
    end
    chk(ifc_up > 300 && ifc_dn > 300, "IFC up and down steps");
    chk(ifc_cf > 100, "IFC fractional pulses");
    // clamp: a frequency word far below the divider range
    fcw = 25'(30 << 18);
    repeat (20) @(posedge clk_fdc_dlc);
    chk(n_flag > 0, "divider range clamp flag");
    $display("%m counts: div3=%0d div4only=%0d frac_rot=%0d code_moves=%0d sma=%0d flag=%0d ifc_up=%0d ifc_dn=%0d ifc_cf=%0d div_bad=%0d",
             n_div3, n_div4only, n_frac_patterns, n_code_moves, n_sma, n_flag, ifc_up, ifc_dn, ifc_cf, div_bad);
    done = 1;
  end
endmodule
