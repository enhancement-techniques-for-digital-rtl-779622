// tb_ifc_dco_if: checks the complete incremental DCO interface from the
// cell side. The testbench decodes every change of the registered control
// lines (c1,c2) as an up or down step of the Gray sequence 00,01,11,10 and
// keeps the resulting count of active unit cells (128 after reset). It
// checks that the count always equals the interface's running count t,
// that it reaches and holds the integer part d[15:8] of each new word,
// that the complementary lines are
// always the inverse, and that the fractional output carries d[7:0]/256
// on average. Clock period 10 time units.
module tb_ifc_dco_if;
  timeunit 1ps; timeprecision 1ps;
  logic clk_fast = 0, rst_n = 0;
  logic [15:0] d;
  logic c1, c1_b, c2, c2_b, c_f;
  logic [7:0] t;
  int checks = 0, failures = 0;

  ifc_dco_if #(.W(16)) dut (.*);
  always #5 clk_fast = ~clk_fast;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0d units=%0d d=%h at %0t", what, t, units, d, $time); end
  endtask

  function automatic int gpos(logic [1:0] g);
    case (g)
      2'b00: return 0;
      2'b01: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  int units;
  logic [1:0] prev;
  // count cells from the control lines
  always @(negedge clk_fast) if (rst_n) begin
    int dp;
    dp = (gpos({c1, c2}) - gpos(prev) + 4) % 4;
    if (dp == 1) units++;
    else if (dp == 3) units--;
    prev = {c1, c2};
  end

  initial begin
    int ones, target, lag;
    d = 16'h8000;
    units = 128; prev = 2'b01;
    repeat (2) @(negedge clk_fast);
    chk(c1 == 0 && c2 == 1 && c1_b == 1 && c2_b == 0, "reset lines");
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      target = $urandom_range(20, 235);
      d = {8'(target), 8'($urandom)};
      lag = 0;
      // the count reaches the target |change| + pipeline clocks later
      while (units != target && lag < 400) begin
        @(negedge clk_fast); #1;
        lag++;
        chk(c1_b == ~c1 && c2_b == ~c2, "complementary lines");
      end
      chk(units == target, "count reaches the integer word");
      repeat (5) @(negedge clk_fast);
      #1;
      chk(units == target, "count stays");
      // the interface's own count runs one register stage ahead of the lines
      chk(int'(t) == units, "cell count equals running count");
      ones = 0;
      repeat (256) begin @(negedge clk_fast); ones += int'(c_f); end
      chk(ones == int'(d[7:0]) || ones == int'(d[7:0]) + 1 || ones == int'(d[7:0]) - 1, "fractional mean");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
