// tb_lfsr: checks the 23-bit dither generator against a reference
// sequence produced here with the x^23 + x^18 + 1 recurrence
// b[n] = b[n-23] xor b[n-18], written on a bit history rather than on a
// shift register. Also checks the hold on en = 0, the reset seed, that the
// output is balanced to within 2% over 20000 bits, and that the state
// does not return to the seed within 100000 steps.
// Clock period 10 time units, inputs change on the falling edge.
// Compared with an independent software LFSR of the same polynomial.
module tb_lfsr;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 0, bit_out;
  logic [22:0] state;
  int checks = 0, failures = 0;
  localparam logic [22:0] SEED = 23'h5A5A5;

  lfsr dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  bit hist[$];
  initial begin
    int ones = 0;
    bit back;
    logic [22:0] cur;
    // history holds the bits in the order they left/entered: oldest first
    for (int i = 22; i >= 0; i--) hist.push_back(SEED[i]);
    @(negedge clk); rst_n = 1;
    chk(state == SEED, "reset seed");
    // hold
    repeat (3) @(negedge clk);
    chk(state == SEED, "hold when disabled");
    en = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      hist.push_back(hist[hist.size()-23] ^ hist[hist.size()-18]);
      for (int i = 0; i < 23; i++) cur[i] = hist[hist.size()-1-i];
      chk(state == cur, "state sequence");
      chk(bit_out == hist[hist.size()-23], "output bit");
      ones += int'(bit_out);
      void'(hist.pop_front());
    end
    chk(ones > 9800 && ones < 10200, "balance");
    back = 0;
    for (int n = 0; n < 100000; n++) begin
      @(negedge clk);
      if (state == SEED) back = 1;
    end
    chk(!back, "no short period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
