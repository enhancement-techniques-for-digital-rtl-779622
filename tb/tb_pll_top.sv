// tb_pll_top: end-to-end test of the PLL digital at its default size.
// It runs one closed-loop environment (pll_closed_loop_env) at the main
// operating point: 10.0 GHz from the 153.6 MHz doubled reference
// (N + alpha = 65.1), a 5 % crystal duty-cycle error and a 10 % forward
// gain error. The environment checks lock, gain calibration, cancellation
// of the duty-cycle error at the phase detector, divider periods, and
// counts every mechanism (count-to-3 / count-to-4 periods, element
// rotation, code moves, calibration strobes, snapshots, range clamp, IFC
// steps). This wrapper adds the watchdog and prints the result.
// Operating point from the design; the error sizes are own choices.
// Time unit 1 ps; about 48 us of simulated time.
module tb_pll_top;
  timeunit 1ps; timeprecision 1ps;
  int checks, failures;
  bit done;

  pll_closed_loop_env env (.checks(checks), .failures(failures), .done(done));

  initial begin
    #200us;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
