// tb_as_dcc: end-to-end test of the closed AS-DCC loop with the settling
// scheme, at a 100 ps (10 GHz) input clock.
//
// Three corrector instances run side by side:
//  u_odd - sampling period 520.0217 ps, i.e. alpha = 0.200217, only 0.000217
//          away from 1/5. With the scheme off the code must wander over more
//          than two values; once the scheme is on, the FSM must slow the
//          oscillator (0.81 ps per step), after which the code settles to
//          1-bit toggling and the output duty to 49.5..50%.
//  u_acq - a 47.2% input duty and a sampling period with alpha near 1/4 (an
//          even fraction): the loop must pull the output to 50% within one
//          code step (code 2/3). Its scheme is switched on only once it has
//          acquired (the FSM cannot tell a large acquisition step from a
//          wandering code); it must then report settled windows without
//          slowing the oscillator.
//  u_sat - a 42% input duty, beyond the 4-bit correction range: the counter
//          must saturate and the code pin at 0 (best-effort correction).
// Each mechanism (code update, counter saturation, unstable detection,
// oscillator slow-down, settled verdict) is counted and must occur.
module tb_as_dcc;
  import as_dcc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CLK = 100.0;
  localparam int  SETTLE = 4096;
  localparam int  WINDOW = 8192;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- inputs
  logic rst_n = 1'b0;
  logic en_odd = 1'b0, en_acq = 1'b0, en_sat = 1'b1;
  logic ck_odd = 1'b0, ck_acq = 1'b0, ck_sat = 1'b0;

  initial forever begin #(T_CLK / 2) ck_odd = ~ck_odd; end
  initial forever begin #(T_CLK - 47.2) ck_acq = 1'b1; #(47.2) ck_acq = 1'b0; end
  initial forever begin #(T_CLK - 42.0) ck_sat = 1'b1; #(42.0) ck_sat = 1'b0; end

  // ---------------------------------------------------------------- DUTs
  `define DCC_OUTS(p) \
    logic p``_out, p``_ca, p``_smp, p``_sat, p``_unst, p``_slow, p``_stab; \
    logic [7:0] p``_cnt; logic [3:0] p``_code, p``_osc; settle_state_t p``_st;
  `DCC_OUTS(o)
  `DCC_OUTS(a)
  `DCC_OUTS(s)

  as_dcc #(.SETTLE(SETTLE), .WINDOW(WINDOW), .T_BASE_PS(520.0217)) u_odd (
    .clk_in(ck_odd), .rst_n, .ctrl_en(en_odd), .clk_out(o_out), .clk_async(o_ca),
    .sample(o_smp), .cnt(o_cnt), .code(o_code), .cnt_sat(o_sat), .osc_code(o_osc),
    .unstable(o_unst), .slow_pulse(o_slow), .stable_win(o_stab), .fsm_state(o_st));
  as_dcc #(.SETTLE(SETTLE), .WINDOW(WINDOW), .T_BASE_PS(525.37)) u_acq (
    .clk_in(ck_acq), .rst_n, .ctrl_en(en_acq), .clk_out(a_out), .clk_async(a_ca),
    .sample(a_smp), .cnt(a_cnt), .code(a_code), .cnt_sat(a_sat), .osc_code(a_osc),
    .unstable(a_unst), .slow_pulse(a_slow), .stable_win(a_stab), .fsm_state(a_st));
  as_dcc #(.SETTLE(SETTLE), .WINDOW(WINDOW), .T_BASE_PS(525.37)) u_sat (
    .clk_in(ck_sat), .rst_n, .ctrl_en(en_sat), .clk_out(s_out), .clk_async(s_ca),
    .sample(s_smp), .cnt(s_cnt), .code(s_code), .cnt_sat(s_sat), .osc_code(s_osc),
    .unstable(s_unst), .slow_pulse(s_slow), .stable_win(s_stab), .fsm_state(s_st));

  logic clr_o = 1'b1, clr_a = 1'b1, clr_s = 1'b1;
  dcc_probe p_odd (.clear(clr_o), .clk_out(o_out), .clk_async(o_ca), .code(o_code));
  dcc_probe p_acq (.clear(clr_a), .clk_out(a_out), .clk_async(a_ca), .code(a_code));
  dcc_probe p_sat (.clear(clr_s), .clk_out(s_out), .clk_async(s_ca), .code(s_code));

  // ---------------------------------------------------- mechanism counters
  int n_code_upd = 0, n_sat = 0, n_unstable = 0, n_slow = 0, n_stable = 0;
  int n_stable_odd = 0;
  int n_samples = 0;
  logic [3:0] o_code_q;
  always @(posedge o_ca) begin
    #1;
    n_samples++;
    if (o_code != o_code_q) n_code_upd++;
    o_code_q = o_code;
    if (o_slow) n_slow++;
    if (o_stab) n_stable_odd++;
    if (o_st == ST_SLOW) n_unstable++;
  end
  always @(posedge a_ca) begin #1; if (a_stab) n_stable++; if (a_slow) n_slow++; end
  always @(posedge s_ca) begin #1; if (s_sat) n_sat++; end

  real t_a0;

  initial begin
    o_code_q = 4'd8;
    #(2000.0);
    rst_n = 1'b1;

    // ---- Phase 1: scheme off on u_odd; acquisition on u_acq / u_sat.
    #(520.0 * 4096);
    clr_o = 1'b0;
    #(520.0 * 3 * WINDOW);
    clr_o = 1'b1;
    $display("odd, scheme off: code %0d..%0d duty %f..%f", p_odd.code_min, p_odd.code_max,
             p_odd.duty_min, p_odd.duty_max);
    check(p_odd.code_max - p_odd.code_min > 1, "unstable ratio: code wanders when scheme is off");
    check(o_osc == 4'd0 && o_st == ST_OFF, "scheme off: oscillator untouched");

    // u_acq has settled by now: measure it.
    clr_a = 1'b0; clr_s = 1'b0;
    #(525.0 * 2 * WINDOW);
    clr_a = 1'b1; clr_s = 1'b1;
    $display("acq: code %0d..%0d duty avg %f  osc %0d", p_acq.code_min, p_acq.code_max,
             p_acq.duty_avg(), a_osc);
    check(p_acq.code_max - p_acq.code_min <= 1, "acquired loop toggles by at most one code");
    check(p_acq.code_min >= 2 && p_acq.code_max <= 3, "acquired code near the ideal 2.4");
    check(p_acq.duty_avg() > 0.495 && p_acq.duty_avg() < 0.505, "acquired average duty 50 +/- 0.5%");
    check(p_acq.duty_min >= 0.495 - 0.001 && p_acq.duty_max <= 0.505 + 0.001,
          "acquired per-cycle duty within one step");
    $display("sat: code %0d..%0d duty avg %f", p_sat.code_min, p_sat.code_max, p_sat.duty_avg());
    check(p_sat.code_max == 0, "out-of-range input pins the code at 0");
    check(p_sat.duty_avg() > 0.459 && p_sat.duty_avg() < 0.461, "saturated correction gives 42%+4%");

    // ---- Phase 2: scheme on for u_odd and the acquired u_acq.
    en_odd = 1'b1;
    en_acq = 1'b1;
    wait (n_slow >= 1);
    wait (n_stable_odd >= 2);
    clr_o = 1'b0;
    #(520.0 * 3 * WINDOW);
    clr_o = 1'b1;
    $display("odd, scheme on: osc %0d code %0d..%0d duty %f..%f avg %f", o_osc, p_odd.code_min,
             p_odd.code_max, p_odd.duty_min, p_odd.duty_max, p_odd.duty_avg());
    check(o_osc >= 4'd1, "scheme slowed the oscillator");
    check(p_odd.code_max - p_odd.code_min <= 1, "after slow-down the code toggles by one");
    check(p_odd.duty_min >= 0.494 && p_odd.duty_max <= 0.5051, "after slow-down duty within 49.5..50.5%");
    // Sampling period really lengthened by osc_code * 0.81 ps.
    @(posedge o_ca) t_a0 = $realtime;
    repeat (100) @(posedge o_ca);
    check((($realtime - t_a0) / 100.0 - (520.0217 + 0.81 * o_osc)) < 0.002 &&
          ((520.0217 + 0.81 * o_osc) - ($realtime - t_a0) / 100.0) < 0.002,
          "slowed sampling period");

    check(a_osc == 4'd0 && n_stable > 0, "acquired loop: settled windows, not slowed");

    // ---- Mechanisms
    $display("mechanisms: code updates %0d, counter saturation %0d, unstable windows %0d, slow-downs %0d, settled windows %0d/%0d",
             n_code_upd, n_sat, n_unstable, n_slow, n_stable, n_stable_odd);
    check(n_code_upd > 0, "code update happened");
    check(n_sat > 0, "counter saturation happened");
    check(n_unstable > 0, "unstable window detected");
    check(n_slow > 0, "oscillator slow-down happened");
    check(n_stable > 0 && n_stable_odd > 0, "settled windows reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(520.0 * 400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
