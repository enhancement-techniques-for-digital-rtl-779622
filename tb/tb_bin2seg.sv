// tb_bin2seg: exhaustive check of the 7-bit integer DCO code split into a
// 7-element thermometer (the three MSBs, each element worth 16 unit cells)
// and 4 binary-weighted bits. Checks, for all 128 codes, that the weighted
// sum 16*ones(therm) + bin reproduces the code, that the thermometer is
// contiguous from bit 0, and that bin equals the code modulo 16.
// Exhaustive over all 128 codes; the expected split is the 3+4 segmentation.
module tb_bin2seg;
  timeunit 1ps; timeprecision 1ps;
  logic [6:0] d_int, therm;
  logic [3:0] bin;
  int checks = 0, failures = 0;

  bin2seg dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL d=%0d %s therm=%b bin=%0d", d_int, what, therm, bin); end
  endtask

  initial begin
    for (int c = 0; c < 128; c++) begin
      int ones;
      d_int = 7'(c);
      #1;
      ones = $countones(therm);
      chk(16*ones + int'(bin) == c, "weighted sum");
      chk(therm == 7'((1 << ones) - 1), "contiguous thermometer");
      chk(int'(bin) == c % 16, "binary part");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
