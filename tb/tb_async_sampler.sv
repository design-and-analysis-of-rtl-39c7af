// tb_async_sampler: self-checking test of the asynchronous-sampling flop.
//
// A fast data clock (100 ps, 50% duty) is sampled by a slow clock whose
// period is 520.0217 ps, as in the AS-DCC operating example. Each sample is
// compared with the value of the fast clock computed analytically from the
// sampling time (never from the flop), valid must rise with the first
// sample after reset, and the long-run fraction of ones must be close to
// the 50% duty cycle. Reset behaviour is checked at the start and once more
// in the middle of the run.
module tb_async_sampler;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CLK   = 100.0;
  localparam real T_ASYNC = 520.0217;
  localparam real T_HIGH  = 50.0;
  localparam int  NSAMP   = 4000;

  logic clk_async = 1'b0;
  logic clk_fast  = 1'b0;
  logic rst_n     = 1'b0;
  logic q, valid;

  int checks = 0, failures = 0;
  int ones = 0, total = 0;

  async_sampler dut (.clk_async, .rst_n, .clk_fast, .q, .valid);

  // Fast clock: rises at k*T_CLK + 7 ps (offset keeps edges apart).
  initial forever begin
    #(7.0) clk_fast = 1'b1;
    #(T_HIGH) clk_fast = 1'b0;
    #(T_CLK - T_HIGH - 7.0);
  end

  // Reference value of the fast clock at absolute time t (ps).
  function automatic logic ref_level(real t);
    real ph;
    ph = t - T_CLK * $floor(t / T_CLK);
    return (ph >= 7.0) && (ph < 7.0 + T_HIGH);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  real t_edge;
  logic expect_q;

  initial begin
    // Reset holds q and valid low even while clk_async runs.
    repeat (3) begin
      #(T_ASYNC / 2) clk_async = 1'b1;
      #(T_ASYNC / 2) clk_async = 1'b0;
      #1;
      check(q == 1'b0 && valid == 1'b0, "reset holds outputs");
    end
    rst_n = 1'b1;
    for (int i = 0; i < NSAMP; i++) begin
      #(T_ASYNC / 2);
      clk_async = 1'b1;
      t_edge    = $realtime;
      expect_q  = ref_level(t_edge);
      #1;
      check(valid == 1'b1, "valid after first sample");
      check(q == expect_q, "sample value");
      ones  += int'(q);
      total += 1;
      #(T_ASYNC / 2 - 1.0) clk_async = 1'b0;
      if (i == NSAMP / 2) begin
        rst_n = 1'b0;
        #1;
        check(q == 1'b0 && valid == 1'b0, "asynchronous reset");
        rst_n = 1'b1;
      end
    end
    // Long-run average of CLK_sampled tracks the 50% duty (within 2%).
    checks++;
    if (ones * 100 < total * 48 || ones * 100 > total * 52) begin
      failures++;
      $display("FAIL average %0d/%0d", ones, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_ASYNC * (NSAMP + 100));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
