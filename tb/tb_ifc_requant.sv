// tb_ifc_requant: checks the first-order requantizer of the fractional
// DCO word. Reference: an 8-bit accumulator kept here whose carry out is
// the 1-bit output, registered. Checked every cycle with random words, and
// for constant words that exactly d_f ones appear in every 256 cycles
// (the mean of the output equals d_f / 256). Clock period 10 time units.
// The expected mean c_F = d_F/256 follows from the function; checks are own.
module tb_ifc_requant;
  timeunit 1ps; timeprecision 1ps;
  logic clk_fast = 0, rst_n = 0;
  logic [7:0] d_f;
  logic c_f;
  int checks = 0, failures = 0;

  ifc_requant #(.W(8)) dut (.*);
  always #5 clk_fast = ~clk_fast;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int acc, cm, ones;
    d_f = '0;
    repeat (2) @(negedge clk_fast);
    rst_n = 1; acc = 0;
    for (int n = 0; n < 20000; n++) begin
      d_f = 8'($urandom);
      @(posedge clk_fast);
      acc += int'(d_f);
      cm = acc / 256;
      acc = acc % 256;
      @(negedge clk_fast);
      chk(int'(c_f) == cm, "carry");
    end
    for (int k = 0; k < 20; k++) begin
      d_f = (k == 0) ? 8'd0 : (k == 1) ? 8'd255 : 8'($urandom);
      repeat (3) @(negedge clk_fast);
      ones = 0;
      repeat (256) begin @(negedge clk_fast); ones += int'(c_f); end
      chk(ones == int'(d_f), "mean over 256 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
