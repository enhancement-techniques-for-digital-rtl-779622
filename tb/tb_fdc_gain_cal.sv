// tb_fdc_gain_cal: checks the sign-LMS gain calibration of the FDC.
// Reference model here: a 25-bit unsigned accumulator value in [0, 2^25)
// (1.0 = 2^24), updated on the down-sampled enable by
// +/- (c * 2^gain2x) with the sign of the previous quantisation error
// (inverted by pol_inv), clamped to the range, frozen by gc_dis,
// overwritten by load_sel; the 13-bit coefficient is the accumulator's
// top 13 bits, refreshed on the strobe enable (and on load), and forced to
// 1.0 when gc_ena = 0. Random stimulus and random configuration changes,
// compared every cycle. A drift phase with a constant non-negative error
// sign and positive input checks that the coefficient reaches the upper
// clamp, and the reverse phase that it reaches the lower clamp 0. Clock period 10 time units.
module tb_fdc_gain_cal;
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0, sma_ce = 0, strobe_ce = 0, eqc_neg = 0;
  logic signed [14:0] c_in;
  fdc_cfg_t cfg;
  logic [12:0] gc_coeff;
  int checks = 0, failures = 0;

  fdc_gain_cal dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s gc=%0d at %0t", what, gc_coeff, $time); end
  endtask

  longint acc_m, coef_m;

  task automatic step_model();
    longint d;
    if (cfg.gc_load_sel) acc_m = longint'(cfg.gc_load_value) * 4096;
    else if (sma_ce && !cfg.gc_dis) begin
      d = longint'(c_in) * (64'sd1 <<< cfg.gc_gain2x);
      if (eqc_neg ^ cfg.gc_pol_inv) d = -d;
      acc_m += d;
      if (acc_m < 0) acc_m = 0;
      if (acc_m > (64'sd1 <<< 25) - 1) acc_m = (64'sd1 <<< 25) - 1;
    end
  endtask

  function automatic longint coef_out();
    return cfg.gc_ena ? coef_m : 64'sd4096;
  endfunction

  initial begin
    longint acc_before;
    cfg = '0;
    cfg.gc_ena = 1; cfg.gc_gain2x = 3'd5;
    c_in = '0;
    acc_m = 64'sd1 <<< 24; coef_m = 4096;
    repeat (2) @(negedge clk);
    rst_n = 1; #1;
    chk(gc_coeff == 13'd4096, "reset value 1.0");
    for (int n = 0; n < 30000; n++) begin
      c_in = 15'($urandom);
      eqc_neg = 1'($urandom);
      sma_ce = ($urandom_range(0, 3) == 0);
      strobe_ce = sma_ce && ($urandom_range(0, 7) == 0);
      if (n % 2000 == 0) begin
        cfg.gc_gain2x = 3'($urandom);
        cfg.gc_pol_inv = 1'($urandom);
        cfg.gc_dis = ($urandom_range(0, 4) == 0);
        cfg.gc_ena = ($urandom_range(0, 5) != 0);
        cfg.gc_load_value = 13'($urandom);
      end
      cfg.gc_load_sel = (n % 2000 == 1000);
      @(posedge clk);
      acc_before = acc_m;
      step_model();
      if (strobe_ce || cfg.gc_load_sel) coef_m = acc_before >>> 12;
      @(negedge clk); #1;
      chk(longint'(gc_coeff) == coef_out(), "coefficient");
    end
    // drift: positive c with a non-negative error sign raises the coefficient
    cfg = '0; cfg.gc_ena = 1; cfg.gc_gain2x = 3'd7;
    sma_ce = 1; strobe_ce = 1; eqc_neg = 0; c_in = 15'sd16000;
    repeat (400) @(negedge clk);
    chk(gc_coeff == 13'h1FFF, "upper clamp");
    eqc_neg = 1;
    repeat (400) @(negedge clk);
    chk(gc_coeff == 13'd0, "lower clamp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
