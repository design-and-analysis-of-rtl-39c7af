// tb_as_dcc_full: the AS-DCC at its default parameters over its 4-8 GHz
// operating range.
//
// Three correctors with default parameters (sampling clock about 88.24 MHz,
// 8-bit counter, 4-bit code, settling scheme on) correct:
//  u8 - an 8 GHz clock with 47.5% duty (59.375 ps high of 125 ps),
//  u4 - a 4 GHz clock with 48.88% duty (122.2 ps high of 250 ps),
//  u6 - a 6 GHz clock with 49% duty (81.667 ps high of 166.667 ps).
// At 6 GHz the default sampling period is 67.996 fast periods: alpha is
// almost 0, the quasi-harmonic case, so the FSM must also slow the
// oscillator there (each step moves alpha by about 0.005).
// At 4 GHz the default sampling period gives alpha = 0.3308, close to 1/3,
// so the settling FSM is expected to slow the oscillator before the loop
// settles. The test waits until each loop has reported two settled windows
// since its last slow-down, then measures three more windows in which the
// FSM changes nothing (retrying if it does): the code must toggle by at most one value,
// the code must sit next to the value that cancels the input error, and
// the output duty error must stay below 0.8% per cycle.
module tb_as_dcc_full;
  import as_dcc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T8 = 125.0, H8 = 59.375;
  localparam real T4 = 250.0, H4 = 122.2;
  localparam real T6 = 1000.0 / 6.0, H6 = 0.49 * 1000.0 / 6.0;
  localparam real STEP = 0.5;            // duty adjuster step, ps
  localparam real T_ASYNC = 11332.7;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic rst_n = 1'b0;
  logic ck8 = 1'b0, ck4 = 1'b0;
  initial forever begin #(T8 - H8) ck8 = 1'b1; #(H8) ck8 = 1'b0; end
  initial forever begin #(T4 - H4) ck4 = 1'b1; #(H4) ck4 = 1'b0; end
  logic ck6 = 1'b0;
  real  t6 = 0.0;   // ideal edge grid, so 166.667 ps does not drift
  initial forever begin
    t6 += T6 - H6; #(t6 - $realtime) ck6 = 1'b1;
    t6 += H6;      #(t6 - $realtime) ck6 = 1'b0;
  end

  logic        o8, ca8, sm8, sat8, un8, sl8, sw8;
  logic        o4, ca4, sm4, sat4, un4, sl4, sw4;
  logic        o6, ca6, sm6, sat6, un6, sl6, sw6;
  logic [7:0]  cnt8, cnt4, cnt6;
  logic [3:0]  code8, code4, osc8, osc4, code6, osc6;
  settle_state_t st8, st4, st6;

  as_dcc u8 (.clk_in(ck8), .rst_n, .ctrl_en(1'b1), .clk_out(o8), .clk_async(ca8),
             .sample(sm8), .cnt(cnt8), .code(code8), .cnt_sat(sat8), .osc_code(osc8),
             .unstable(un8), .slow_pulse(sl8), .stable_win(sw8), .fsm_state(st8));
  as_dcc u4 (.clk_in(ck4), .rst_n, .ctrl_en(1'b1), .clk_out(o4), .clk_async(ca4),
             .sample(sm4), .cnt(cnt4), .code(code4), .cnt_sat(sat4), .osc_code(osc4),
             .unstable(un4), .slow_pulse(sl4), .stable_win(sw4), .fsm_state(st4));

  as_dcc u6 (.clk_in(ck6), .rst_n, .ctrl_en(1'b1), .clk_out(o6), .clk_async(ca6),
             .sample(sm6), .cnt(cnt6), .code(code6), .cnt_sat(sat6), .osc_code(osc6),
             .unstable(un6), .slow_pulse(sl6), .stable_win(sw6), .fsm_state(st6));

  logic clr8 = 1'b1, clr4 = 1'b1, clr6 = 1'b1;
  dcc_probe p8 (.clear(clr8), .clk_out(o8), .clk_async(ca8), .code(code8));
  dcc_probe p4 (.clear(clr4), .clk_out(o4), .clk_async(ca4), .code(code4));
  dcc_probe p6 (.clear(clr6), .clk_out(o6), .clk_async(ca6), .code(code6));

  int nsw8 = 0, nsw4 = 0, nsl8 = 0, nsl4 = 0, nsw6 = 0, nsl6 = 0;
  // nswX counts settled windows since the last slow-down.
  always @(posedge ca8) begin #1; if (sw8) nsw8++; if (sl8) begin nsl8++; nsw8 = 0; end end
  always @(posedge ca4) begin #1; if (sw4) nsw4++; if (sl4) begin nsl4++; nsw4 = 0; end end
  always @(posedge ca6) begin #1; if (sw6) nsw6++; if (sl6) begin nsl6++; nsw6 = 0; end end

  // Code that cancels a high-time error e (ps): 8 - e / STEP.
  function automatic real ideal_code(real t, real h);
    return 8.0 - (t / 2.0 - h) / STEP;
  endfunction

  task automatic measure(input int which);
    real ic;
    if (which == 8) begin
      // Measure three windows during which the FSM made no further change.
      do begin
        wait (nsw8 >= 2);
        clr8 = 1'b0;
        #(T_ASYNC * 3 * 8192);
        clr8 = 1'b1;
      end while (nsw8 < 5);
      ic = ideal_code(T8, H8);
      $display("8 GHz: osc %0d slows %0d code %0d..%0d (ideal %f) duty %f..%f avg %f", osc8, nsl8,
               p8.code_min, p8.code_max, ic, p8.duty_min, p8.duty_max, p8.duty_avg());
      check(p8.code_max - p8.code_min <= 1, "8 GHz: code toggles by at most one");
      check(real'(p8.code_min) <= ic + 1.0 && real'(p8.code_max) >= ic - 1.0, "8 GHz: code near ideal");
      check(p8.duty_min > 0.492 && p8.duty_max < 0.508, "8 GHz: duty error below 0.8%");
    end else if (which == 6) begin
      do begin
        wait (nsw6 >= 2);
        clr6 = 1'b0;
        #(T_ASYNC * 3 * 8192);
        clr6 = 1'b1;
      end while (nsw6 < 5);
      ic = ideal_code(T6, H6);
      $display("6 GHz: osc %0d slows %0d code %0d..%0d (ideal %f) duty %f..%f avg %f", osc6, nsl6,
               p6.code_min, p6.code_max, ic, p6.duty_min, p6.duty_max, p6.duty_avg());
      check(p6.code_max - p6.code_min <= 1, "6 GHz: code toggles by at most one");
      check(real'(p6.code_min) <= ic + 1.0 && real'(p6.code_max) >= ic - 1.0, "6 GHz: code near ideal");
      check(p6.duty_min > 0.492 && p6.duty_max < 0.508, "6 GHz: duty error below 0.8%");
    end else begin
      do begin
        wait (nsw4 >= 2);
        clr4 = 1'b0;
        #(T_ASYNC * 3 * 8192);
        clr4 = 1'b1;
      end while (nsw4 < 5);
      ic = ideal_code(T4, H4);
      $display("4 GHz: osc %0d slows %0d code %0d..%0d (ideal %f) duty %f..%f avg %f", osc4, nsl4,
               p4.code_min, p4.code_max, ic, p4.duty_min, p4.duty_max, p4.duty_avg());
      check(p4.code_max - p4.code_min <= 1, "4 GHz: code toggles by at most one");
      check(real'(p4.code_min) <= ic + 1.0 && real'(p4.code_max) >= ic - 1.0, "4 GHz: code near ideal");
      check(p4.duty_min > 0.492 && p4.duty_max < 0.508, "4 GHz: duty error below 0.8%");
    end
  endtask

  initial begin
    #(3.0 * T_ASYNC);      // reset held over several sampling edges
    rst_n = 1'b1;
    fork
      measure(8);
      measure(4);
      measure(6);
    join
    $display("slow-downs: 8 GHz %0d, 4 GHz %0d, 6 GHz %0d", nsl8, nsl4, nsl6);
    check(nsl4 > 0, "4 GHz: settling scheme slowed the oscillator");
    check(nsl6 > 0, "6 GHz: settling scheme slowed the oscillator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_ASYNC * 300000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
