// tb_dsm2_ef: checks the second-order error-feedback Delta-Sigma modulator
// in its two uses: the 7-bit divider-code modulator (26-bit input with 18
// fractional bits, output 0..127) and the DCO fractional modulator (10-bit
// input with 8 fractional bits, output -1..2).
// Reference: a 64-bit integer model kept here, v = x + d + 2 e[n-1] - e[n-2],
// y = clamp(round-half-up(v)), e = v - y wrapped to FRAC+1 bits. Outputs
// and the delayed errors are compared every cycle with random inputs and
// random dither. The noise shaping is checked too: for a constant input
// the running sum of (x - y) stays bounded (second-order shaping keeps the
// accumulated error within a few LSBs), and the long-run mean of y equals
// x to better than 1e-3.
// The noise-shaping law is the design's; stimulus and limits are own choices.
module tb_dsm2_ef;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [25:0] xa;  logic da;  logic [6:0] ya;
  logic signed [18:0] ea, ea1, ea2;
  logic signed [9:0]  xb;  logic db;  logic [2:0] yb;
  logic signed [8:0]  eb, eb1, eb2;
  int checks = 0, failures = 0;

  dsm2_ef #(.IN_W(26), .FRAC(18), .OUT_W(7), .OUT_MIN(0), .OUT_MAX(127)) dut_a (
    .clk, .rst_n, .en, .x(xa), .dither(da), .y(ya), .e(ea), .e_d1(ea1), .e_d2(ea2));
  dsm2_ef #(.IN_W(10), .FRAC(8), .OUT_W(3), .OUT_MIN(-1), .OUT_MAX(2)) dut_b (
    .clk, .rst_n, .en, .x(xb), .dither(db), .y(yb), .e(eb), .e_d1(eb1), .e_d2(eb2));

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

  // reference state
  longint ma1, ma2, mb1, mb2;

  function automatic longint wrap(longint v, int bits);
    longint m = 64'sd1 <<< bits;
    longint r = ((v % m) + m) % m;
    return (r >= m/2) ? r - m : r;
  endfunction

  task automatic model(input longint x, input longint d, input int frac, input int lo, input int hi,
                       input longint e1, input longint e2, output longint y, output longint e);
    longint v = x + d + 2*e1 - e2;
    longint yy = (v + (64'sd1 <<< (frac-1)));
    yy = (yy >= 0) ? yy / (64'sd1 <<< frac) : -((-yy + (64'sd1 <<< frac) - 1) / (64'sd1 <<< frac));
    if (yy > hi) yy = hi;
    if (yy < lo) yy = lo;
    y = yy;
    e = wrap(v - (yy <<< frac), frac + 1);
  endtask

  initial begin
    longint ya_m, ea_m, yb_m, eb_m, acc, sum_y;
    xa = '0; da = 0; xb = '0; db = 0;
    ma1 = 0; ma2 = 0; mb1 = 0; mb2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    // random phase: includes values beyond the output range (saturation)
    for (int n = 0; n < 20000; n++) begin
      xa = 26'($urandom_range(0, 130 << 18)) - ((n % 7 == 0) ? 26'(1 << 18) : 26'd0);
      da = 1'($urandom);
      xb = 10'($urandom_range(0, 255));
      db = 1'($urandom);
      #1;
      model(longint'(xa), longint'(da), 18, 0, 127, ma1, ma2, ya_m, ea_m);
      model(longint'(xb), longint'(db), 8, -1, 2, mb1, mb2, yb_m, eb_m);
      chk(longint'(ya) == ya_m && longint'(ea) == ea_m, "fdc modulator y/e");
      chk(longint'(signed'(yb)) == yb_m && longint'(eb) == eb_m, "dco modulator y/e");
      chk(longint'(ea1) == ma1 && longint'(ea2) == ma2, "fdc delayed errors");
      @(negedge clk);
      ma2 = ma1; ma1 = ea_m; mb2 = mb1; mb1 = eb_m;
    end
    // hold when disabled
    en = 0;
    @(negedge clk);
    chk(longint'(ea1) == ma1 && longint'(ea2) == ma2, "hold when disabled");
    en = 1;
    // constant input: mean and bounded accumulated error
    rst_n = 0; #1; rst_n = 1;
    xa = 26'(65 << 18) + 26'(26214);      // 65.1
    da = 0;
    acc = 0; sum_y = 0;
    begin
      longint amax = 0;
      for (int n = 0; n < 100000; n++) begin
        #1;
        acc += longint'(xa) - (longint'(ya) <<< 18);
        sum_y += longint'(ya);
        if (acc > amax) amax = acc;
        if (-acc > amax) amax = -acc;
        @(negedge clk);
      end
      chk(amax <= (64'sd4 <<< 18), "accumulated error bounded");
      chk((sum_y * 10 - 651 * 100000) < 100 && (sum_y * 10 - 651 * 100000) > -100, "mean equals input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
