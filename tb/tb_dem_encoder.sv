// tb_dem_encoder: checks the 4-element dynamic-element-matching encoder.
// For random codes 0..4 the number of enabled elements must equal the code
// every cycle. In rotation mode (shaping on) a reference pointer kept here
// advances by the code modulo 4 and the enabled set must be the code
// elements starting at that pointer; over a long run every element must be
// used equally often (within 1%). With shaping off the pointer is the
// random input of the previous cycle. With matching off the output is
// the plain thermometer code. Clock period 10 time units.
// Reference model and random stimulus are this testbench's own.
module tb_dem_encoder;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 0, ena_dem = 0, dis_shaping = 0;
  logic [2:0] code;
  logic [1:0] rnd;
  logic [3:0] el;
  int checks = 0, failures = 0;

  dem_encoder #(.N_EL(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s code=%0d el=%b at %0t", what, code, el, $time); end
  endtask

  function automatic logic [3:0] expect_el(int p, int c);
    logic [3:0] r = '0;
    for (int i = 0; i < c; i++) r[(p + i) % 4] = 1'b1;
    return r;
  endfunction

  initial begin
    int p;
    int use_cnt[4];
    code = '0; rnd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    // matching off: thermometer
    for (int n = 0; n < 50; n++) begin
      code = 3'($urandom_range(0, 4)); #1;
      chk(el == expect_el(0, int'(code)), "thermometer when matching off");
      @(negedge clk);
    end
    // rotation
    rst_n = 0; #1; rst_n = 1;
    ena_dem = 1; p = 0;
    foreach (use_cnt[i]) use_cnt[i] = 0;
    for (int n = 0; n < 40000; n++) begin
      code = 3'($urandom_range(0, 4)); #1;
      chk($countones(el) == int'(code), "element count");
      chk(el == expect_el(p, int'(code)), "rotation");
      for (int i = 0; i < 4; i++) use_cnt[i] += int'(el[i]);
      p = (p + int'(code)) % 4;
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++)
      chk(use_cnt[i] > use_cnt[0] - use_cnt[0]/100 && use_cnt[i] < use_cnt[0] + use_cnt[0]/100, "equal use");
    // random pointer
    dis_shaping = 1;
    for (int n = 0; n < 2000; n++) begin
      rnd = 2'($urandom); code = 3'($urandom_range(0, 4)); #1;
      chk($countones(el) == int'(code), "element count random");
      chk(el == expect_el(p, int'(code)), "random pointer");
      p = int'(rnd);
      @(negedge clk);
    end
    // hold when disabled
    en = 0; code = 3'd1; #1;
    begin
      logic [3:0] first;
      first = el;
      @(negedge clk); #1;
      chk(el == first, "pointer holds when disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
