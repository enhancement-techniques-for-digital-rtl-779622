// tb_mmd: checks the multi-modulus divider clocked by a model DCO clock.
// The phase counts (num_div3 0..3, num_div4_m1 9..21) are changed at random
// falling edges. The testbench records the counts present when the
// sampling strobe fires and checks that the divider period holding that
// strobe, measured between rising edges of vdiv in DCO cycles, equals
// 4*(num_div4_m1+1) + 3*num_div3 of those recorded counts. Within each
// period it checks, against cycle positions counted here, the vdiv pulse
// width (oc_width), the vdiv_ext pulse that follows it, the ADC conversion
// window (pre-scaler counts adc_conv_del .. adc_conv_del+width-1, turned
// into DCO cycles with the period's own count-to-4/count-to-3 split), and
// the strobe position (end of count-to-4 number samp_ctrl_delay). The first
// period after reset is not checked. clk_dig_fast must have a period of 10
// DCO cycles with 5 high. Two configurations are run (N > 64 and N <= 64
// settings). DCO clock period 10 time units.
module tb_mmd;
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;
  logic clk_dco = 0, rst_n = 0;
  logic [1:0] num_div3;
  logic [4:0] num_div4_m1;
  mmd_cfg_t cfg;
  logic vdiv, vdiv_ext, vconv_mmd, clk_dig_fast, samp_strobe;
  int checks = 0, failures = 0;

  mmd dut (.*);
  always #5 clk_dco = ~clk_dco;

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

  // change the counts at random falling edges
  bit run = 0;
  always @(negedge clk_dco)
    if (run && $urandom_range(0, 30) == 0) begin
      num_div3    <= 2'($urandom);
      num_div4_m1 <= 5'($urandom_range(9, 21));
    end

  // DCO cycle (from the period start) at which pre-scaler count k begins
  function automatic int cnt_start(int k, int d4);
    return (k <= d4) ? 4*k : 4*d4 + 3*(k - d4);
  endfunction

  task automatic run_cfg(int scd, int del, int wid, int oc, int ext, int n_periods);
    int dcount, exp_p, exp_d4, periods, fast_hi, fast_cnt, fast_periods, samps;
    bit vd_prev, have_exp, fd_prev;
    cfg = '0;
    cfg.samp_ctrl_delay = 5'(scd); cfg.adc_conv_del = 4'(del); cfg.adc_conv_width = 4'(wid);
    cfg.oc_width = 4'(oc); cfg.ena_vdiv_ext = 1'b1; cfg.vdiv_ext_width = 6'(ext);
    rst_n = 0;
    repeat (2) @(negedge clk_dco);
    rst_n = 1; run = 1;
    dcount = 0; periods = 0; have_exp = 0; vd_prev = 0; exp_p = 0;
    fast_hi = 0; fast_cnt = 0; fast_periods = 0; fd_prev = 0; samps = 0;
    while (periods < n_periods) begin
      @(posedge clk_dco); #1;
      // the strobe may coincide with the edge that ends the period: it belongs
      // to the period that is ending, so it is handled before the edge test
      if (periods > 1) chk(samp_strobe == (dcount + 1 == 4*scd), "strobe position");
      if (samp_strobe) begin
        exp_p = 4*(int'(num_div4_m1) + 1) + 3*int'(num_div3);
        exp_d4 = int'(num_div4_m1) + 1;
        have_exp = 1; samps++;
      end
      if (vdiv && !vd_prev) begin
        // the first period after reset starts mid-count: checks begin after it
        if (periods > 1) begin
          chk(have_exp, "strobe seen in period");
          chk(dcount + 1 == exp_p, "divider period");
          if (dcount + 1 != exp_p) $display("  period %0d expected %0d", dcount + 1, exp_p);
        end
        periods++; dcount = 0; have_exp = 0;
      end else dcount++;
      vd_prev = vdiv;
      if (periods > 1) begin
        int d4;
        d4 = have_exp ? exp_d4 : 99;
        chk(vdiv == (dcount < oc), "vdiv width");
        chk(vdiv_ext == (dcount >= oc && dcount < oc + ext), "vdiv_ext pulse");
        chk(vconv_mmd == (dcount >= cnt_start(del, d4) && dcount < cnt_start(del + wid, d4)),
            "conversion window");
      end
      // fast clock
      if (clk_dig_fast && !fd_prev) begin
        if (fast_periods > 1) chk(fast_cnt == 10 && fast_hi == 5, "clk_dig_fast 10 cycles, 5 high");
        fast_periods++; fast_cnt = 0; fast_hi = 0;
      end
      fast_cnt++; fast_hi += int'(clk_dig_fast);
      fd_prev = clk_dig_fast;
    end
    run = 0;
  endtask

  initial begin
    num_div3 = 2'd1; num_div4_m1 = 5'd14;
    run_cfg(10, 6, 6, 4, 8, 800);
    run_cfg(9, 5, 4, 2, 20, 800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
