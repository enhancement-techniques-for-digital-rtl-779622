// tb_fdc_digital: checks the FDC digital datapath cycle by cycle against a
// reference model written here with 64-bit integers:
//   c      = sat2(a * gc / 16 + e_qc[n-2] / 32), then clipped to +/-2^(1-clip_sel)
//   y1     = sat16(c - y1[n-1]);  r = sat16(y1 - r[n-1])      (R(z) = 1/(1+z^-1)^2)
//   perr   = top 14 bits of the 17-bit wrapping sum of r + r[n-1]
//   rF     = 2 r - r[n-2];  v = fcw - 32 rF + dither + 2 e[n-1] - e[n-2]
//   code   = clamp(round-half-up(v / 2^18), 0, 127);  e = v - code * 2^18
//   counts = fewest count-to-3 phases (0..3) with 4 n4 + 3 n3 = code, n4 >= 10
//   gc     = sign-LMS accumulator (1.0 at reset), updated on sma_ce with
//            c * 2^gain2x * sign(e_qc[n-2]), copied to the output on strobe_ce.
// The dither bit comes from a second x^23 + x^18 + 1 generator kept here.
// Random ADC words, random enables and periodic configuration changes
// (clip level, noise cancellation off, dither off, calibration gain and
// load) are applied; every output is compared after each clock edge.
// Clock period 10 time units; inputs change on the falling edge.
// The reference model follows the FDC signal chain; stimulus is random.
module tb_fdc_digital;
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, sma_ce = 0, strobe_ce = 0;
  logic [6:0]  adc_data;
  logic [24:0] fcw;
  fdc_cfg_t    cfg;
  logic [13:0] perr;
  logic [1:0]  num_div3;
  logic [4:0]  num_div4_m1;
  logic [6:0]  div_code;
  logic        mmd_debug_flag;
  logic [12:0] gc_coeff;
  logic signed [17:0] r_out;
  int checks = 0, failures = 0;

  fdc_digital dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- reference state
  longint a_m, y1q, rd1, rd2, pacc, e1, e2, acc, coef;
  logic [22:0] lf;

  function automatic longint sat(longint v, longint m);
    return (v > m) ? m : (v < -m - 1) ? -m - 1 : v;
  endfunction
  function automatic longint fdiv(longint v, longint d);   // floor division
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction
  function automatic longint wrap(longint v, int bits);
    longint m = 64'sd1 <<< bits;
    longint r = ((v % m) + m) % m;
    return (r >= m/2) ? r - m : r;
  endfunction

  // combinational part of the model for the current cycle
  longint qs, r_m, notch_m, y1_m, code_m, e_m, n3_m, n4_m;
  bit flag_m;
  task automatic comb();
    longint b, cc, lim, rf, v, g;
    g = cfg.gc_ena ? coef : 4096;
    b = fdiv(a_m * g, 16);
    if (!cfg.dis_qnc) b += fdiv(e2, 32);
    qs = sat(b, 16383);
    lim = 64'sd1 <<< (14 - cfg.clip_sel);
    cc = sat(qs, lim - 1);
    y1_m = sat(cc - y1q, 131071);
    r_m = sat(y1_m - rd1, 131071);
    notch_m = r_m + rd1;
    rf = 2 * r_m - rd2;
    v = longint'(fcw) - rf * 32 + ((lf[22] && !cfg.dis_dsm_dither) ? 1 : 0) + 2 * e1 - e2;
    code_m = fdiv(v + (1 << 17), 1 << 18);
    if (code_m > 127) code_m = 127;
    if (code_m < 0) code_m = 0;
    e_m = wrap(v - code_m * (1 << 18), 19);
    flag_m = 1; n3_m = 0; n4_m = 10;
    for (int k = 0; k < 4; k++)
      if (flag_m && (code_m - 3*k) % 4 == 0 && (code_m - 3*k) / 4 >= 10) begin
        flag_m = 0; n3_m = k; n4_m = (code_m - 3*k) / 4;
      end
  endtask

  task automatic clock_model(input logic [6:0] adc_next);
    longint acc_old = acc, d;
    comb();
    if (cfg.gc_load_sel) acc = longint'(cfg.gc_load_value) * 4096;
    else if (sma_ce && !cfg.gc_dis) begin
      d = qs * (64'sd1 <<< cfg.gc_gain2x);
      if ((e2 < 0) ^ cfg.gc_pol_inv) d = -d;
      acc = acc + d;
      if (acc < 0) acc = 0;
      if (acc > (64'sd1 <<< 25) - 1) acc = (64'sd1 <<< 25) - 1;
    end
    if (strobe_ce || cfg.gc_load_sel) coef = acc_old >>> 12;
    y1q = y1_m; rd2 = rd1; rd1 = r_m;
    pacc = wrap(pacc + notch_m, 17);
    e2 = e1; e1 = e_m;
    lf = {lf[21:0], lf[22] ^ lf[17]};
    a_m = longint'(signed'(adc_next));
  endtask

  initial begin
    cfg = '0; cfg.gc_ena = 1; cfg.gc_gain2x = 3'd5; cfg.gc_dis = 1;
    fcw = 25'(65 << 18) + 25'd26214;
    adc_data = '0;
    a_m = 0; y1q = 0; rd1 = 0; rd2 = 0; pacc = 0; e1 = 0; e2 = 0;
    acc = 64'sd1 <<< 24; coef = 4096; lf = 23'h5A5A5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40000; n++) begin
      // small ADC words most of the time (a locked loop), full range sometimes
      adc_data = (n % 5 == 0) ? 7'($urandom) : 7'($urandom_range(0, 8) - 4);
      sma_ce = ($urandom_range(0, 3) == 0);
      strobe_ce = sma_ce && ($urandom_range(0, 3) == 0);
      if (n % 1000 == 0) begin
        cfg.clip_sel = 2'($urandom_range(0, 2));
        cfg.dis_qnc = ($urandom_range(0, 5) == 0);
        cfg.dis_dsm_dither = ($urandom_range(0, 3) == 0);
        cfg.gc_gain2x = 3'($urandom);
        cfg.gc_dis = ($urandom_range(0, 3) == 0);
        cfg.gc_pol_inv = ($urandom_range(0, 5) == 0);
        cfg.gc_ena = ($urandom_range(0, 7) != 0);
        cfg.gc_load_value = 13'($urandom_range(3000, 5000));
        fcw = 25'($urandom_range(45 << 18, 89 << 18));
      end
      cfg.gc_load_sel = (n % 4000 == 2000);
      @(posedge clk);
      clock_model(adc_data);
      @(negedge clk);
      comb();
      chk(longint'(perr) == (pacc & 17'h1FFFF) >> 3, "perr");
      chk(longint'(div_code) == code_m, "divider code");
      chk(mmd_debug_flag == flag_m && longint'(num_div3) == n3_m &&
          longint'(num_div4_m1) == n4_m - 1, "phase counts");
      chk(longint'(gc_coeff) == (cfg.gc_ena ? coef : 4096), "gain coefficient");
      chk(longint'(r_out) == r_m, "filtered output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
