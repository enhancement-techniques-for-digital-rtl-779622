// tb_cnr: checks the clock-and-reset block with a 6.5 ns reference (vrfd),
// a 1 ns fast digital clock and a divider-ready pulse train.
// Checked against counts and times measured here:
//  - fast-clock selection;
//  - clock.fdc_dlc.clk: exactly one pulse per reference event, pulse width
//    pulse_width fast cycles, rising 2..3 fast cycles after the event
//    (two-flop retiming), for both retiming edges and both event sources;
//    the direct, forced-reference and disabled modes;
//  - clock.dco: full rate, half rate (period two fast cycles), forced, off;
//  - clock.regs: follows vrfd and is gated off by regs_gate;
//  - resets: assertion without a clock, release after two edges of the
//    block's own clock, per-block soft resets leave the other blocks alone;
//  - the sma enables: one sma_ce per ds_rate+1 clock.fdc_dlc edges and
//    one strobe per strobe_rate+1 sma_ce pulses.
// Time unit 1 ps.
module tb_cnr;
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;
  logic clk_xosc = 0, clk_dig_fast = 0, vdiv_ext = 0, rstb_pin = 1, spi_drvb = 0;
  cnr_cfg_t cfg;
  logic clk_fast, clk_fdc_dlc, sma_ce, sma_strobe_ce, clk_dco, clk_regs;
  logic rstb_fdc, rstb_dlc, rstb_dco, rstb_regs;
  int checks = 0, failures = 0;

  cnr dut (.*);
  always #3250 clk_xosc = ~clk_xosc;
  always #500  clk_dig_fast = ~clk_dig_fast;
  // divider-ready pulses: 2 ns wide, every 6.5 ns, offset from vrfd
  always begin
    #1700 vdiv_ext = 1; #2000 vdiv_ext = 0; #2800;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // event and output edge bookkeeping
  realtime t_ev, t_rise;
  int n_ev = 0, n_out = 0, hi_cycles = 0;
  logic ev;
  assign ev = (cfg.ref_src == 2'd1) ? vdiv_ext : clk_xosc;
  always @(posedge ev) begin t_ev = $realtime; n_ev++; end
  always @(posedge clk_fdc_dlc) begin t_rise = $realtime; n_out++; end

  task automatic check_retime(int pw, bit ph, bit src);
    int w;
    cfg.pulse_width = 3'(pw); cfg.phase_sel = ph; cfg.ref_src = src ? 2'd1 : 2'd0;
    repeat (5) @(posedge clk_xosc);
    for (int k = 0; k < 40; k++) begin
      realtime d;
      @(posedge clk_fdc_dlc);
      d = $realtime - t_ev;
      chk(d >= 1500 && d <= 3600, "retiming delay 2..3 fast cycles");
      if (!(d >= 1500 && d <= 3600)) $display("  d=%0t", d);
      w = 0;
      while (clk_fdc_dlc) begin @(posedge clk_dig_fast); #1; w++; end
      chk(w == pw, "pulse width");
    end
    n_ev = 0; n_out = 0;
    repeat (50) @(posedge clk_xosc);
    #5000;
    chk(n_out == n_ev || n_out == n_ev - 1 || n_out == n_ev + 1, "one pulse per reference event");
    chk(n_out > 45, "pulses present");
  endtask

  initial begin
    int n, k;
    cfg = '0;
    cfg.fast_src = 1; cfg.pulse_width = 3'd2;
    cfg.sma_ds_rate = 3'd3; cfg.sma_strobe_rate = 4'd2;
    #1 rstb_pin = 0;   // a real falling edge, so the asynchronous resets act
    #9;
    chk(!rstb_fdc && !rstb_dlc && !rstb_dco && !rstb_regs, "resets asserted");
    #20000;
    rstb_pin = 1;
    #100000;
    chk(rstb_fdc && rstb_dlc && rstb_dco && rstb_regs, "resets released");
    // fast clock mux
    for (int i = 0; i < 20; i++) begin #137; chk(clk_fast == clk_dig_fast, "fast clock = divider clock"); end
    cfg.fast_src = 0;
    for (int i = 0; i < 20; i++) begin #137; chk(clk_fast == clk_xosc, "fast clock = reference"); end
    cfg.fast_src = 1;
    // retiming
    check_retime(2, 0, 0);
    check_retime(1, 1, 0);
    check_retime(4, 0, 1);
    check_retime(3, 1, 1);
    cfg.ref_src = 2'd0;
    // direct / forced / disabled
    cfg.dis_retime = 1;
    for (int i = 0; i < 50; i++) begin #211; chk(clk_fdc_dlc == clk_xosc, "direct reference clock"); end
    cfg.dis_retime = 0; cfg.fdc_frc_xosc = 1; cfg.ref_src = 2'd1;
    for (int i = 0; i < 50; i++) begin #211; chk(clk_fdc_dlc == clk_xosc, "forced reference clock"); end
    cfg.fdc_frc_xosc = 0; cfg.fdc_dis = 1;
    for (int i = 0; i < 50; i++) begin #211; chk(clk_fdc_dlc == 1'b0, "fdc clock off"); end
    cfg.fdc_dis = 0; cfg.ref_src = 2'd0;
    // clock.dco
    for (int i = 0; i < 20; i++) begin #137; chk(clk_dco == clk_fast, "dco clock full rate"); end
    cfg.dco_half_rate = 1;
    @(posedge clk_dco); n = 0;
    repeat (20) begin @(posedge clk_dig_fast); #1; n += int'(clk_dco); end
    chk(n == 10, "dco clock half rate duty");
    k = 0;
    fork
      begin repeat (20) @(posedge clk_dco); end
      begin forever begin @(posedge clk_dig_fast); k++; end end
    join_any
    disable fork;
    chk(k >= 39 && k <= 41, "dco clock half rate period");
    cfg.dco_half_rate = 0; cfg.dco_frc_xosc = 1;
    for (int i = 0; i < 20; i++) begin #137; chk(clk_dco == clk_xosc, "dco clock forced"); end
    cfg.dco_frc_xosc = 0; cfg.dco_dis = 1;
    for (int i = 0; i < 20; i++) begin #137; chk(clk_dco == 1'b0, "dco clock off"); end
    cfg.dco_dis = 0;
    // register clock gating
    for (int i = 0; i < 20; i++) begin #311; chk(clk_regs == clk_xosc, "register clock"); end
    cfg.regs_gate = 1;
    repeat (2) @(posedge clk_xosc);
    for (int i = 0; i < 20; i++) begin #311; chk(clk_regs == 1'b0, "register clock gated"); end
    cfg.regs_gate = 0;
    repeat (2) @(posedge clk_xosc);
    // sma enables: sampled on clock.fdc_dlc edges
    begin
      int nce, nst, edges;
      nce = 0; nst = 0; edges = 0;
      repeat (3) @(posedge clk_fdc_dlc);
      repeat (240) begin
        @(negedge clk_fdc_dlc);
        edges++; nce += int'(sma_ce); nst += int'(sma_strobe_ce);
        if (sma_strobe_ce) chk(sma_ce, "strobe only with sma_ce");
      end
      chk(nce == 60, "sma_ce every 4 edges");
      chk(nst == 20, "strobe every 3 sma pulses");
      cfg.sma_dis = 1;
      nce = 0;
      repeat (40) begin @(negedge clk_fdc_dlc); nce += int'(sma_ce); end
      chk(nce == 0, "sma disabled");
      cfg.sma_dis = 0;
    end
    // soft resets
    cfg.reset_fdc = 1; #1;
    chk(!rstb_fdc && rstb_dlc && rstb_dco && rstb_regs, "fdc soft reset only");
    cfg.reset_fdc = 0;
    @(posedge clk_fdc_dlc); #1;
    chk(!rstb_fdc, "release waits for the second edge");
    @(posedge clk_fdc_dlc); #1;
    chk(rstb_fdc, "released after two edges");
    cfg.reset_pll = 1; #1;
    chk(!rstb_fdc && !rstb_dlc && !rstb_dco && rstb_regs, "pll soft reset");
    cfg.reset_pll = 0; cfg.reset_all = 1; #1;
    chk(!rstb_fdc && !rstb_dlc && !rstb_dco && !rstb_regs, "reset all");
    cfg.reset_all = 0;
    #50000;
    chk(rstb_fdc && rstb_dlc && rstb_dco && rstb_regs, "all released");
    rstb_pin = 0; #1;
    chk(!rstb_fdc && !rstb_dlc && !rstb_dco && !rstb_regs, "pin reset asynchronous");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
