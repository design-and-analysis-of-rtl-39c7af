// tb_closed_loop_sweep: steady state of the closed AS-DCC loop across
// sampling ratios, with the settling controller off.
//
// Six correctors correct the same perfect 50% clock (T_clk = 100 ps) with
// T_async = (5 + k/d + beta) * T_clk. After acquisition, the code range over
// three 8192-sample windows is measured. The expectation:
//  - odd d (5 and 7) with beta = 0.0002: the loop cannot settle and the code
//    moves over more than two values;
//  - odd d with beta well above the threshold (0.0083 for d = 5, 0.006 for
//    d = 7): the code only toggles between two neighbours (or holds);
//  - even d (4), small or large beta: the code toggles by at most one.
// The output duty must then stay within one adjuster step of 50%
// (49.5 .. 50.5%) in every settled case.
module tb_closed_loop_sweep;
  import as_dcc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CLK = 100.0;
  localparam int  NC = 6;
  localparam int  WINDOW = 8192;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic rst_n = 1'b0;
  logic clk = 1'b0;
  logic clr = 1'b1;
  initial forever begin #(T_CLK / 2) clk = ~clk; end

  // One corrector plus its probe, sampling period (5 + f) * T_CLK.
  `define CL_INST(i, f) \
    logic o``i, ca``i, sm``i, st``i, un``i, sl``i, sw``i; \
    logic [7:0] cn``i; logic [3:0] cd``i, oc``i; settle_state_t fs``i; \
    as_dcc #(.T_BASE_PS((5.0 + (f)) * T_CLK)) u``i ( \
      .clk_in(clk), .rst_n, .ctrl_en(1'b0), .clk_out(o``i), .clk_async(ca``i), \
      .sample(sm``i), .cnt(cn``i), .code(cd``i), .cnt_sat(st``i), .osc_code(oc``i), \
      .unstable(un``i), .slow_pulse(sl``i), .stable_win(sw``i), .fsm_state(fs``i)); \
    dcc_probe p``i (.clear(clr), .clk_out(o``i), .clk_async(ca``i), .code(cd``i));

  `CL_INST(0, 1.0/5 + 0.0002)
  `CL_INST(1, 2.0/5 + 0.0083)
  `CL_INST(2, 3.0/7 + 0.0002)
  `CL_INST(3, 3.0/7 + 0.006)
  `CL_INST(4, 1.0/4 + 0.0002)
  `CL_INST(5, 3.0/4 + 0.008)

  int  cmin[NC], cmax[NC];
  real dmin[NC], dmax[NC];
  localparam logic UNSTABLE[NC] = '{1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam string NAME[NC] = '{"1/5+0.0002", "2/5+0.0083", "3/7+0.0002", "3/7+0.006",
                                 "1/4+0.0002", "3/4+0.008"};
  int n_unst = 0, n_stab = 0;

  initial begin
    #(T_CLK * 6.0 * 3);    // reset held over several sampling edges
    rst_n = 1'b1;
    #(T_CLK * 5.9 * 4096);
    clr = 1'b0;
    #(T_CLK * 5.9 * 3 * WINDOW);
    clr = 1'b1;
    cmin = '{p0.code_min, p1.code_min, p2.code_min, p3.code_min, p4.code_min, p5.code_min};
    cmax = '{p0.code_max, p1.code_max, p2.code_max, p3.code_max, p4.code_max, p5.code_max};
    dmin = '{p0.duty_min, p1.duty_min, p2.duty_min, p3.duty_min, p4.duty_min, p5.duty_min};
    dmax = '{p0.duty_max, p1.duty_max, p2.duty_max, p3.duty_max, p4.duty_max, p5.duty_max};
    for (int i = 0; i < NC; i++) begin
      $display("alpha = %s: code %0d..%0d duty %f..%f", NAME[i], cmin[i], cmax[i], dmin[i], dmax[i]);
      if (UNSTABLE[i]) begin
        n_unst++;
        check(cmax[i] - cmin[i] > 1, "odd fraction, small beta: code moves over more than two values");
      end else begin
        n_stab++;
        check(cmax[i] - cmin[i] <= 1, "settled: code toggles by at most one");
        check(dmin[i] > 0.4949 && dmax[i] < 0.5051, "settled: duty within one step of 50%");
      end
    end
    check(n_unst == 2 && n_stab == 4, "both regimes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 6.0 * 40000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
