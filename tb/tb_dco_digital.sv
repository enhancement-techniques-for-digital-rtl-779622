// tb_dco_digital: checks the DCO digital block on its own clock.
// Reference model kept here: the registered 15-bit word, its 7-bit integer
// part split into a 7-element thermometer (16 units each) and 4 binary
// bits, its 8-bit fraction through a second-order error-feedback modulator
// with outputs -1..2 (integer arithmetic, round half up), the +1 offset to
// 0..3 elements, and the rotating element selection (pointer advances by
// the element count). All outputs are registered one clock later.
// Phase 1 (dither off): every output bit is compared with the model.
// Phase 2 (dither on): the element count stays in 0..3, and the mean
// element count minus one equals the fraction to 1%.
// Also checked: word bypass, cell-control bypass, the modulator-off mode
// (rounded fraction) and the snapshot register.
// DCO-digital clock period 10 time units, loop clock period 70.
module tb_dco_digital;
  timeunit 1ps; timeprecision 1ps;
  import pll_pkg::*;
  logic clk_dco = 0, clk_fdc_dlc = 0, rst_n = 0;
  logic [14:0] fctrl, snap_fctrl;
  dco_cfg_t cfg;
  logic [6:0] fine_int_therm;
  logic [3:0] fine_int_bin, fine_frac;
  int checks = 0, failures = 0;

  dco_digital dut (.*);
  always #5 clk_dco = ~clk_dco;
  always #35 clk_fdc_dlc = ~clk_fdc_dlc;

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

  int fq, e1, e2, ptr;
  logic [6:0] th_m; logic [3:0] bi_m, fr_m;

  task automatic model_edge();
    int df, v, y, c, w;
    df = fq % 256;
    th_m = 7'((1 << (fq / 4096)) - 1);
    bi_m = 4'((fq / 256) % 16);
    if (cfg.dis_dsm) c = (df >= 128) ? 2 : 1;
    else begin
      v = df + 2*e1 - e2;
      y = (v + 128) >>> 8;
      if (y > 2) y = 2;
      if (y < -1) y = -1;
      w = v - y*256;
      e2 = e1; e1 = w;
      c = y + 1;
    end
    fr_m = '0;
    for (int i = 0; i < c; i++) fr_m[(ptr + i) % 4] = 1'b1;
    if (!cfg.ena_dem) fr_m = 4'((1 << c) - 1);
    else ptr = (ptr + c) % 4;
    if (cfg.byp_fce) begin th_m = cfg.user_int_therm; bi_m = cfg.user_int_bin; fr_m = cfg.user_frac; end
    fq = cfg.byp_fctrl ? int'(cfg.user_fctrl) : int'(fctrl);
  endtask

  initial begin
    int sum, n;
    cfg = '0; cfg.dis_dither = 1; cfg.ena_dem = 1;
    fctrl = 15'h4000;
    fq = 16384; e1 = 0; e2 = 0; ptr = 0;
    repeat (2) @(negedge clk_dco);
    rst_n = 1;
    for (int k = 0; k < 30000; k++) begin
      if (k % 97 == 0) fctrl = 15'($urandom);
      if (k % 3000 == 0) begin
        cfg.byp_fctrl = ($urandom_range(0, 5) == 0);
        cfg.user_fctrl = 15'($urandom);
        cfg.byp_fce = ($urandom_range(0, 5) == 0);
        cfg.user_int_therm = 7'($urandom); cfg.user_int_bin = 4'($urandom); cfg.user_frac = 4'($urandom);
        cfg.ena_dem = ($urandom_range(0, 3) != 0);
      end
      @(posedge clk_dco);
      model_edge();
      @(negedge clk_dco);
      chk(fine_int_therm == th_m && fine_int_bin == bi_m, "integer cell controls");
      chk(fine_frac == fr_m, "fractional cell controls");
    end
    // modulator off: rounded fraction
    cfg = '0; cfg.dis_dsm = 1; cfg.dis_dither = 1;
    for (int k = 0; k < 2000; k++) begin
      if (k % 13 == 0) fctrl = 15'($urandom);
      @(posedge clk_dco);
      model_edge();
      @(negedge clk_dco);
      chk(fine_frac == fr_m, "rounded fraction");
    end
    // dither on: mean
    cfg = '0; cfg.ena_dem = 1;
    fctrl = 15'h5A4D;                              // fraction 0x4D = 77/256
    repeat (10) @(negedge clk_dco);
    sum = 0; n = 40000;
    repeat (n) begin
      @(negedge clk_dco);
      sum += $countones(fine_frac) - 1;
      chk($countones(fine_frac) <= 3, "element count range");
    end
    chk(sum * 256 > 77 * n - n * 256 / 100 && sum * 256 < 77 * n + n * 256 / 100, "dithered mean");
    // snapshot
    cfg.ena_snap = 1;
    fctrl = 15'h1234;
    repeat (2) @(posedge clk_fdc_dlc);
    #1;
    chk(snap_fctrl == 15'h1234, "snapshot");
    cfg.ena_snap = 0; fctrl = 15'h0777;
    repeat (2) @(posedge clk_fdc_dlc);
    #1;
    chk(snap_fctrl == 15'h1234, "snapshot held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
