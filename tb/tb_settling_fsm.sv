// tb_settling_fsm: self-checking test of the settling controller.
//
// Runs the FSM with short settle/observation periods and drives the watched
// code directly. Checked: nothing happens while disabled; a code toggling
// between two neighbours gives a settled verdict every window and never
// slows the oscillator; a code wandering over a wider range slows it by one
// step exactly SETTLE + WINDOW + 1 cycles after the scheme starts and then
// once per SETTLE + WINDOW + 1 cycles; swings during the settle wait are
// ignored; a single outlier inside a window is caught; osc_code saturates;
// disabling holds osc_code.
module tb_settling_fsm;
  import as_dcc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int SETTLE = 16;
  localparam int WINDOW = 64;
  localparam int ROUND  = SETTLE + WINDOW + 1;   // cycles between slow-downs

  logic          clk_async = 1'b0;
  logic          rst_n = 1'b0;
  logic          enable = 1'b0;
  logic [3:0]    code = 4'd8;
  logic [3:0]    osc_code;
  logic          unstable, slow_pulse, stable_win;
  settle_state_t state;

  int checks = 0, failures = 0;
  int cyc = 0;          // rising edges since the scheme was enabled
  int n_slow = 0, n_stable = 0;
  int first_slow = -1, last_slow = -1;
  int first_stable = -1;
  int bad_gap = 0;

  settling_fsm #(.SETTLE(SETTLE), .WINDOW(WINDOW)) dut (
    .clk_async, .rst_n, .enable, .code, .osc_code, .unstable, .slow_pulse,
    .stable_win, .state
  );

  always #5000 clk_async = ~clk_async;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Monitor: count edges and record when the pulses fire.
  always @(posedge clk_async) begin
    #1;
    if (enable) cyc++;
    if (slow_pulse) begin
      n_slow++;
      if (first_slow < 0) first_slow = cyc;
      else if (cyc - last_slow != ROUND) bad_gap++;
      last_slow = cyc;
    end
    if (stable_win) begin
      n_stable++;
      if (first_stable < 0) first_stable = cyc;
    end
  end

  task automatic reset_all();
    enable = 1'b0;
    rst_n  = 1'b0;
    repeat (2) @(posedge clk_async);
    #2;
    rst_n = 1'b1;
    cyc = 0; n_slow = 0; n_stable = 0;
    first_slow = -1; last_slow = -1; first_stable = -1; bad_gap = 0;
  endtask

  // Change the code just after a clock edge.
  task automatic drive(input int ncyc, input int lo, input int hi);
    for (int i = 0; i < ncyc; i++) begin
      @(posedge clk_async);
      #2;
      code = 4'($urandom_range(lo, hi));
    end
  endtask

  initial begin
    reset_all();
    check(osc_code == '0 && state == ST_OFF, "reset state");
    // Disabled: a wild code does nothing.
    drive(300, 0, 15);
    check(osc_code == '0 && n_slow == 0 && state == ST_OFF, "disabled is idle");

    // Settled loop: code toggles between 8 and 9.
    enable = 1'b1;
    drive(1 + SETTLE + 5 * WINDOW, 8, 9);
    check(n_slow == 0 && osc_code == '0, "no slow-down when settled");
    check(first_stable == 1 + SETTLE + WINDOW, "first settled window timing");
    check(n_stable == 5, "settled verdict every window");
    check(!unstable, "settled verdict flag");

    // Unsettled loop: code wanders over 5..11.
    reset_all();
    enable = 1'b1;
    drive(1 + SETTLE + WINDOW + 1 + 3 * ROUND, 5, 11);
    check(first_slow == SETTLE + WINDOW + 2, "first slow-down timing");
    check(n_slow == 4 && osc_code == 4'd4, "one step per round");
    check(bad_gap == 0, "slow-down spacing");
    check(unstable, "unsettled verdict flag");

    // Saturation of the oscillator code.
    drive(20 * ROUND, 0, 15);
    check(osc_code == 4'hF, "osc_code saturates");

    // Disable holds the code.
    enable = 1'b0;
    drive(3 * ROUND, 0, 15);
    check(osc_code == 4'hF && state == ST_OFF, "disable holds osc_code");

    // Swing only during the settle wait is ignored; one outlier in a
    // window is caught.
    reset_all();
    enable = 1'b1;
    drive(SETTLE - 1, 0, 15);
    drive(WINDOW, 8, 9);
    drive(ROUND, 8, 9);
    check(n_slow == 0 && n_stable >= 1, "settle-time swing ignored");
    drive(WINDOW / 2, 8, 9);
    drive(1, 12, 12);
    drive(WINDOW, 8, 9);
    check(n_slow == 1 && osc_code == 4'd1, "single outlier detected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000.0 * 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
