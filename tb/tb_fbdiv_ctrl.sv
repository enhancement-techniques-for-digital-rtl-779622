// tb_fbdiv_ctrl: exhaustive check of the divider-code to phase-count
// translation. For every 7-bit code the expected counts are computed here
// from the rule "modulus = 4*num_div4 + 3*num_div3, at most three
// count-to-3 phases, fewest count-to-3 phases", by search rather than by
// the closed form used in the design, and the modulus identity is checked
// directly. Codes whose count-to-4 phase would fall under the minimum of 10
// must raise the debug flag and give 10 count-to-4 phases, no count-to-3.
// Combinational block: inputs are applied and checked after a 1 ns settle.
// Exhaustive over all 128 codes against the count-split rule of the design.
module tb_fbdiv_ctrl;
  timeunit 1ps; timeprecision 1ps;
  logic [6:0] divcode;
  logic [1:0] num_div3;
  logic [4:0] num_div4, num_div4_m1;
  logic       debug_flag;
  int checks = 0, failures = 0;

  fbdiv_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL code=%0d %s: d3=%0d d4=%0d d4m1=%0d flag=%0d", divcode, what,
               num_div3, num_div4, num_div4_m1, debug_flag);
    end
  endtask

  initial begin
    int e3, e4;
    bit ok_found;
    for (int c = 0; c < 128; c++) begin
      divcode = 7'(c);
      #1;
      // search: the fewest count-to-3 phases (0..3) that give the modulus
      ok_found = 0;
      e3 = 0; e4 = 0;
      for (int n3 = 0; n3 < 4 && !ok_found; n3++)
        if ((c - 3*n3) % 4 == 0 && c - 3*n3 >= 0) begin
          e3 = n3; e4 = (c - 3*n3) / 4; ok_found = 1;
        end
      if (!ok_found || e4 < 10) begin
        chk(debug_flag == 1'b1, "flag expected");
        chk(num_div3 == 2'd0 && num_div4 == 5'd10 && num_div4_m1 == 5'd9, "clamp");
      end else begin
        chk(debug_flag == 1'b0, "no flag");
        chk(int'(num_div3) == e3 && int'(num_div4) == e4, "counts");
        chk(4*int'(num_div4) + 3*int'(num_div3) == c, "modulus identity");
        chk(int'(num_div4_m1) == e4 - 1, "minus one");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
