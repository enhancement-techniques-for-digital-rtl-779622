// tb_pll_workloads: the closed-loop PLL at the two ends of its 9-11 GHz
// tuning range, each with the largest forward-gain error the gain
// calibration is meant to handle (20 %) and a 5 % crystal duty-cycle
// error, and at 10 GHz with the largest duty-cycle error (10 %). Three
// independent environments run side by side:
//   lo: N + alpha = 58.6  (9.0 GHz, N <= 64: sample after count-to-4 no. 9,
//       conversion window 5 / 5 pre-scaler counts), forward gain 0.8;
//   hi: N + alpha = 71.6  (11.0 GHz, N > 64: count-to-4 no. 10, window
//       6 / 6), forward gain 1.2;
//   dc: N + alpha = 65.1  (10.0 GHz), crystal duty cycle 60 %, gain 1.0.
// Each environment checks lock, the gain coefficient (4096 / gain),
// duty-cycle cancellation at the phase detector and the divider periods,
// and counts its mechanisms (see pll_closed_loop_env). The range, the
// duty errors and the gain-error bound follow the design; the choice of
// these three corners is this testbench's own. Time unit 1 ps.
module tb_pll_workloads;
  timeunit 1ps; timeprecision 1ps;
  int checks_lo, failures_lo, checks_hi, failures_hi, checks_dc, failures_dc;
  bit done_lo, done_hi, done_dc;

  pll_closed_loop_env #(.DUTY(55.0), .NALPHA(58.6), .A_GAIN(0.8)) env_lo (
    .checks(checks_lo), .failures(failures_lo), .done(done_lo));
  pll_closed_loop_env #(.DUTY(55.0), .NALPHA(71.6), .A_GAIN(1.2)) env_hi (
    .checks(checks_hi), .failures(failures_hi), .done(done_hi));
  pll_closed_loop_env #(.DUTY(60.0), .NALPHA(65.1), .A_GAIN(1.0)) env_dc (
    .checks(checks_dc), .failures(failures_dc), .done(done_dc));

  initial begin
    #200us;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_lo + checks_hi + checks_dc, failures_lo + failures_hi + failures_dc + 1);
    $finish;
  end

  initial begin
    wait (done_lo && done_hi && done_dc);
    $display("TB_RESULT checks=%0d failures=%0d", checks_lo + checks_hi + checks_dc, failures_lo + failures_hi + failures_dc);
    $finish;
  end
endmodule
