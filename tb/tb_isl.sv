// tb_isl: checks the integer step limiter of the incremental frequency
// control. Reference kept here: the registered target d_r, the running
// count t (128 after reset) and the step m = sign(d_r - t), with
// t[n+1] = t[n] + m. Checks every cycle m, t and the pending difference
// d_r[n] - t[n+1]; checks that a jump of the input is followed by exactly
// |jump| unit steps (slew of one unit per clock); and that the output
// never moves by more than one unit per clock. Random small and large
// input changes. Clock period 10 time units.
// Expected behaviour: t follows d_I one step per cycle; stimulus is own.
module tb_isl;
  timeunit 1ps; timeprecision 1ps;
  logic clk_fast = 0, rst_n = 0;
  logic [7:0] d_i, t;
  logic signed [1:0] m;
  logic signed [8:0] pending;
  int checks = 0, failures = 0;

  isl #(.W(8)) dut (.*);
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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0d m=%0d at %0t", what, t, m, $time); end
  endtask

  initial begin
    int dr, dr_old, tm, mm, t_prev, steps;
    d_i = 8'd128;
    dr = 128; tm = 128;
    repeat (2) @(negedge clk_fast);
    rst_n = 1;
    chk(t == 8'd128 && m == 2'sd0, "reset values");
    t_prev = 128;
    for (int n = 0; n < 30000; n++) begin
      if ($urandom_range(0, 9) == 0)
        d_i = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'(int'(d_i) + $urandom_range(0, 6) - 3);
      @(posedge clk_fast);
      mm = (dr > tm) ? 1 : (dr < tm) ? -1 : 0;
      tm += mm;
      dr_old = dr;
      dr = int'(d_i);
      @(negedge clk_fast);
      chk(int'(m) == mm, "step");
      chk(int'(t) == tm, "count");
      chk(int'(pending) == dr_old - tm, "pending");
      chk(int'(t) - t_prev <= 1 && int'(t) - t_prev >= -1, "one unit per clock");
      t_prev = int'(t);
    end
    // jump: exactly |jump| steps to settle
    d_i = 8'd40;
    repeat (300) @(negedge clk_fast);
    d_i = 8'd200; steps = 0;
    repeat (300) begin @(negedge clk_fast); if (m != 0) steps++; end
    chk(steps == 160 && t == 8'd200, "slewed jump of 160");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
