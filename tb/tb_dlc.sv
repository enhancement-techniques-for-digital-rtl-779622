// tb_dlc: checks the digital loop controller against a floating-point
// model of its transfer function, written here as difference equations:
//   x   = perr / 2^10 (two's complement)
//   yp  = yp + 2^-ka (x - yp)                 first-order low-pass
//   yi  = yi + 2^(ki_kp-15) x[n-1]            delayed integrator
//   s   = 2^kp (yp + yi)
//   yr  = yr + 2^-kr (s - yr)                 output low-pass
//   fctrl = clamp(round(256 * km/8 * yr) + 2^14, 0, 2^15 - 1)
// The design computes this in fixed point, so the comparison allows one
// LSB of fctrl. Random phase errors with random coefficient sets (the
// evaluated loop setting km=10,kp=3,ka=0,ki_kp=7,kr=2 and the register reset
// defaults km=7,kp=4,ka=1,ki_kp=7,kr=1 included), the phase-error and
// integral-path bypasses and the snapshot registers are exercised; a
// constant phase error checks that the integral path ramps fctrl by the
// expected slope. Clock period 10 time units.
// The difference equations are the loop filter transfer function; tolerances are own choices.
module tb_dlc;
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [13:0] perr;
  dlc_cfg_t cfg;
  logic [14:0] fctrl, snap_fctrl;
  logic [13:0] snap_perr;
  int checks = 0, failures = 0;

  dlc dut (.*);
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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s fctrl=%0d model=%0d perr=%0d at %0t", what, fctrl, f_m, perr, $time); end
  endtask

  real yp, yi, yr, xd;
  int  f_m, f_prev;

  function automatic real sx(logic [13:0] v);
    return real'(int'(signed'(v))) / 1024.0;
  endfunction

  task automatic model_step();
    real x, s, o;
    longint q;
    x = cfg.byp_perr ? sx(cfg.user_perr) : sx(perr);
    yp = yp + (x - yp) / real'(1 << cfg.ka);
    if (cfg.intg_path_byp) yi = sx(cfg.user_intg);
    else begin
      yi = yi + xd * real'(1 << cfg.ki_kp) / 32768.0;
      if (yi > 65536.0) yi = 65536.0;
      if (yi < -65536.0) yi = -65536.0;
    end
    xd = x;
    s = (yp + yi) * real'(1 << cfg.kp);
    yr = yr + (s - yr) / real'(1 << cfg.kr);
    o = yr * real'(cfg.km) / 8.0 * 256.0;
    q = longint'($floor(o + 0.5)) + 16384;
    f_m = (q < 0) ? 0 : (q > 32767) ? 32767 : int'(q);
  endtask

  task automatic set_table(int t);
    if (t == 0) begin cfg.km = 4'd10; cfg.kp = 3'd3; cfg.ka = 3'd0; cfg.ki_kp = 4'd7; cfg.kr = 3'd2; end
    else if (t == 1) begin cfg.km = 4'd7; cfg.kp = 3'd4; cfg.ka = 3'd1; cfg.ki_kp = 4'd7; cfg.kr = 3'd1; end
    else begin
      cfg.km = 4'($urandom_range(1, 15)); cfg.kp = 3'($urandom_range(0, 5));
      cfg.ka = 3'($urandom_range(0, 4)); cfg.ki_kp = 4'($urandom_range(0, 12));
      cfg.kr = 3'($urandom_range(0, 4));
    end
  endtask

  initial begin
    int diff, slope;
    cfg = '0; set_table(0);
    perr = '0;
    yp = 0; yi = 0; yr = 0; xd = 0; f_m = 16384;
    repeat (2) @(negedge clk);
    chk(fctrl == 15'd16384, "reset at mid-scale");
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      // restart the filters from rest for each coefficient set
      rst_n = 0; #1; rst_n = 1;
      yp = 0; yi = 0; yr = 0; xd = 0;
      set_table(blk % 4);
      cfg.byp_perr = (blk % 7 == 3);
      cfg.intg_path_byp = (blk % 5 == 4);
      cfg.user_perr = 14'($urandom_range(0, 200) - 100);
      cfg.user_intg = 14'($urandom_range(0, 2000) - 1000);
      cfg.ena_snap = (blk % 2 == 0);
      for (int n = 0; n < 1000; n++) begin
        perr = 14'($urandom_range(0, 60) - 30);
        @(posedge clk);
        model_step();
        @(negedge clk);
        diff = int'(fctrl) - f_m;
        chk(diff >= -1 && diff <= 1, "fctrl against model");
        if (cfg.ena_snap) chk(snap_perr == (cfg.byp_perr ? cfg.user_perr : perr), "snapshot of perr");
      end
    end
    // constant phase error: the integral path gives a ramp of
    // 256 * km/8 * 2^kp * 2^(ki_kp-15) * x per cycle once the low-passes settle
    rst_n = 0; #1; rst_n = 1;
    cfg = '0; set_table(0);
    perr = 14'd16;                              // x = 1/64
    repeat (200) @(negedge clk);
    f_prev = int'(fctrl);
    repeat (100) @(negedge clk);
    slope = int'(fctrl) - f_prev;               // expected 100 * 256 * 10/8 * 8 * 2^-8 / 64 = 15.6
    chk(slope >= 14 && slope <= 17, "integral ramp slope");
    // saturation
    perr = 14'h1FFF;
    repeat (3000) @(negedge clk);
    chk(fctrl == 15'h7FFF, "upper saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
