// tb_ifc_fsm: checks the up/down state machine that drives the two control
// lines of the unit-weighted frequency-control cells. Reference: a
// position counter p (mod 4) kept here, p+1 on an up step, p-1 on a down
// step, mapped to the Gray sequence (c1,c2) = 00, 01, 11, 10; reset is at
// position 1 (01). Random step streams, checked every cycle, plus a check
// that at most one line changes per clock and that four up steps (or four
// down steps) return the lines to their starting value.
// Clock period 10 time units.
module tb_ifc_fsm;
  timeunit 1ps; timeprecision 1ps;
  logic clk_fast = 0, rst_n = 0;
  logic signed [1:0] m;
  logic c1, c2;
  int checks = 0, failures = 0;

  ifc_fsm dut (.*);
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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s c=%b%b at %0t", what, c1, c2, $time); end
  endtask

  localparam logic [1:0] GRAY [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    int p;
    logic [1:0] prev, start;
    m = 2'sd0;
    repeat (2) @(negedge clk_fast);
    rst_n = 1; p = 1;
    chk({c1, c2} == 2'b01, "reset state");
    prev = {c1, c2};
    for (int n = 0; n < 20000; n++) begin
      case ($urandom_range(0, 2))
        0: m = 2'sd1;
        1: m = -2'sd1;
        default: m = 2'sd0;
      endcase
      @(negedge clk_fast);
      p = (p + int'(m) + 4) % 4;
      chk({c1, c2} == GRAY[p], "Gray position");
      chk($countones({c1, c2} ^ prev) <= 1, "one line per clock");
      prev = {c1, c2};
    end
    for (int dir = 0; dir < 2; dir++) begin
      start = {c1, c2};
      m = dir ? -2'sd1 : 2'sd1;
      repeat (4) @(negedge clk_fast);
      chk({c1, c2} == start, "four steps return");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
