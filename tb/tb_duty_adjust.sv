// tb_duty_adjust: self-checking test of the duty-cycle adjustment model.
//
// Feeds a 100 ps clock with a 50% (and then 45%) duty cycle and, for every
// code, measures the output high time and edge delays against
// high_in - (code - 8) * 0.5 ps and T_PD +/- (code - 8) * 0.25 ps. Also checks
// that the duty falls monotonically as the code rises (a larger code
// strengthens the pull-down).
module tb_duty_adjust;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CLK = 100.0;
  localparam real STEP  = 0.5;
  localparam real T_PD  = 20.0;
  localparam real TOL   = 0.002;

  logic       clk_in = 1'b0;
  logic [3:0] code = 4'd8;
  logic       clk_out;
  real        t_high = 50.0;

  int checks = 0, failures = 0;

  duty_adjust dut (.clk_in, .code, .clk_out);

  initial forever begin
    #(T_CLK - t_high) clk_in = 1'b1;
    #(t_high) clk_in = 1'b0;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic near(real a, real b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  real ti_r, ti_f, to_r, to_f, prev_high, hi;

  task automatic sweep(input real h);
    t_high = h;
    repeat (3) @(posedge clk_in);
    prev_high = 1.0e9;
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      repeat (2) @(posedge clk_in);
      @(posedge clk_in) ti_r = $realtime;
      @(posedge clk_out) to_r = $realtime;
      @(negedge clk_in) ti_f = $realtime;
      @(negedge clk_out) to_f = $realtime;
      hi = to_f - to_r;
      check(near(hi, h - (c - 8) * STEP), "output high time");
      check(near(to_r - ti_r, T_PD + (c - 8) * STEP / 2.0), "rise delay");
      check(near(to_f - ti_f, T_PD - (c - 8) * STEP / 2.0), "fall delay");
      check(hi < prev_high, "duty falls as code rises");
      prev_high = hi;
    end
  endtask

  initial begin
    sweep(50.0);
    sweep(45.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
