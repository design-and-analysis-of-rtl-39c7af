// tb_async_osc: self-checking test of the sampling-oscillator model.
//
// Measures rising and falling edge times of two instances: one set to the
// 520.0217 ps / 0.81 ps-step operating example and one at its defaults
// (about 88.24 MHz). Checks every period against T_BASE + code * T_STEP to
// 2 fs, the 50% high time, that a new code applies from the next period,
// and that 2000 periods add up without drift.
module tb_async_osc;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TB = 520.0217;
  localparam real TS = 0.81;
  localparam real TOL = 0.002;

  logic [3:0] osc_code = 4'd0;
  logic [3:0] code_def = 4'd0;
  logic       clk_a, clk_d;

  int checks = 0, failures = 0;

  async_osc #(.T_BASE_PS(TB), .T_STEP_PS(TS)) dut (.osc_code, .clk_async(clk_a));
  async_osc dut_def (.osc_code(code_def), .clk_async(clk_d));

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

  real t0, t1, tf, t_start;

  // Measure n periods of clk_a with the given code.
  task automatic measure(input int code, input int n);
    osc_code = 4'(code);
    @(posedge clk_a);       // new code takes effect from this edge
    t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      @(negedge clk_a);
      tf = $realtime;
      @(posedge clk_a);
      t1 = $realtime;
      check(near(t1 - t0, TB + code * TS), "period");
      check(near(tf - t0, (TB + code * TS) / 2.0), "high time");
      t0 = t1;
    end
  endtask

  initial begin
    @(posedge clk_a);
    measure(0, 50);
    measure(1, 50);
    measure(15, 50);
    measure(7, 50);
    // Drift: 2000 periods at code 0.
    osc_code = 4'd0;
    @(posedge clk_a);
    @(posedge clk_a);
    t_start = $realtime;
    repeat (2000) @(posedge clk_a);
    check(near($realtime - t_start, 2000.0 * TB), "no accumulated drift");
    // Default instance: about 88.24 MHz.
    @(posedge clk_d);
    t0 = $realtime;
    repeat (10) @(posedge clk_d);
    check(near(($realtime - t0) / 10.0, 11332.7), "default period");
    check((1.0e6 / (($realtime - t0) / 10.0)) > 88.2 && (1.0e6 / (($realtime - t0) / 10.0)) < 88.3,
          "default frequency about 88.24 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TB * 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
