// tb_sampling_sweep: open-loop settling study of the asynchronous sampler
// and the 8-bit counter.
//
// Reproduces the behavioural experiment behind the settling analysis: a
// perfect 50% clock with T_clk = 100 ps is sampled with
// T_async = (N + k/d + beta) * T_clk, N = 5, the first rising edges of both
// clocks coincide (the fast clock rises 1 fs later, so the first sample is
// 0), and the counter starts at 8'b1000_1000. There is no feedback, so
// every move of the 4-bit code is a fluctuation caused only by the sampling
// ratio. For each (denominator d, k, beta) the code spread over 30000 samples
// is compared with the prediction:
//  - odd d: the code holds still exactly when the burst length
//      O'(d, beta) = (T_clk/2 - (d-1)/2*T_clk/d - (d-1)/2*beta*T_clk)
//                    / (d*beta*T_clk) + 1
//    does not exceed 7 - (d-1)/2 (margin of the 4 hidden LSBs less the
//    asymmetric net count (d-1)/2); this is what gives the thresholds
//    beta > 0.00455 for d = 5 and beta > 0.002977 for d = 7, which are also
//    checked. Cases far from the threshold are simulated so that the
//    verdict does not depend on rounding; for beta below 0.0005 the swing
//    must also exceed one code;
//  - even d: the code never moves, whatever beta is. (The even case with
//    the largest beta uses 0.008: 3/4 + 0.01 would equal 19/25, itself an
//    odd-denominator fraction.)
// A second counter of 10 bits (4 code bits over m = 6 hidden bits) sees the
// same samples; its margin is 2^(m-1) - 1 = 31 instead of 7, so cases such
// as 2/5 + 0.002 that move the 8-bit counter's code leave it still.
module tb_sampling_sweep;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CLK = 100.0;
  localparam int  N     = 5;
  localparam int  NS    = 30000;
  localparam int  NCFG  = 11;

  // Test cases: denominator, numerator, beta.
  localparam int  DEN [NCFG] = '{5, 5, 5, 5, 7, 7, 7, 4, 4, 4, 5};
  localparam int  NUM [NCFG] = '{1, 2, 1, 3, 3, 3, 2, 1, 1, 3, 2};
  localparam real BETA[NCFG] = '{0.0002, 0.000217, 0.001, 0.01, 0.0002, 0.001, 0.006,
                                 0.0002, 0.001, 0.008, 0.002};

  logic       clk_fast = 1'b0;
  logic       clk_async = 1'b0;
  logic       rst_n = 1'b1;   // each case starts with a falling edge
  logic       q, valid;
  logic [7:0] cnt;
  logic [3:0] code;
  logic       sat;

  int checks = 0, failures = 0;
  int n_moving = 0, n_still = 0;

  async_sampler u_smp (.clk_async, .rst_n, .clk_fast, .q, .valid);
  dcc_counter   u_cnt (.clk_async, .rst_n, .en(valid), .up(q), .cnt, .code, .sat);

  // Same sample stream into a 10-bit counter: 4 code bits over 6 hidden
  // bits, reset to the same mid-scale pattern 10'b1000_100000.
  logic [9:0] cnt6;
  logic [3:0] code6;
  logic       sat6;
  dcc_counter #(.W(10), .CW(4), .INIT(10'b1000_100000)) u_cnt6 (
    .clk_async, .rst_n, .en(valid), .up(q), .cnt(cnt6), .code(code6), .sat(sat6));

  // 50% clock, rising 1 fs after every multiple of T_CLK.
  initial begin
    #(0.001);
    forever begin
      clk_fast = 1'b1;
      #(T_CLK / 2);
      clk_fast = 1'b0;
      #(T_CLK / 2);
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Eq. (8) burst length and the resulting prediction for odd denominators.
  function automatic real burst_len(int d, real b);
    return (0.5 - (d - 1) / 2.0 / d - (d - 1) / 2.0 * b) / (d * b) + 1.0;
  endfunction

  // m hidden counter bits leave a margin of 2^(m-1) - 1 net counts.
  function automatic logic predict_moves(int d, real b, int m);
    if (d % 2 == 0) return 1'b0;
    return burst_len(d, b) > real'(2 ** (m - 1) - 1) - (d - 1) / 2.0;
  endfunction

  // Smallest beta for which the code of an odd denominator holds still.
  function automatic real beta_min(int d);
    real lim = 7.0 - (d - 1) / 2.0;
    return (0.5 - (d - 1) / 2.0 / d) / (d * (lim - 1.0) + (d - 1) / 2.0);
  endfunction

  real t0, ta;
  int  cmin, cmax, cmin6, cmax6;
  int  n_moving6 = 0, n_still6 = 0;

  initial begin
    check(beta_min(5) > 0.00454 && beta_min(5) < 0.00456, "threshold for d = 5 is 0.00455");
    check(beta_min(7) > 0.002976 && beta_min(7) < 0.002978, "threshold for d = 7 is 0.002977");
    for (int c = 0; c < NCFG; c++) begin
      ta = (N + real'(NUM[c]) / DEN[c] + BETA[c]) * T_CLK;
      rst_n = 1'b0;
      // Start on a rising edge of the fast clock.
      t0 = T_CLK * ($floor($realtime / T_CLK) + 2.0);
      #(t0 - $realtime - 1.0);
      rst_n = 1'b1;
      #(1.0);
      cmin = 15; cmax = 0; cmin6 = 15; cmax6 = 0;
      for (int i = 0; i < NS; i++) begin
        #(t0 + i * ta - $realtime);
        clk_async = 1'b1;
        #(ta / 2.0);
        clk_async = 1'b0;
        if (int'(code) < cmin) cmin = int'(code);
        if (int'(code) > cmax) cmax = int'(code);
        if (int'(code6) < cmin6) cmin6 = int'(code6);
        if (int'(code6) > cmax6) cmax6 = int'(code6);
      end
      $display("d=%0d k=%0d beta=%f: O'=%f 8-bit code %0d..%0d (%s), 10-bit code %0d..%0d (%s)",
               DEN[c], NUM[c], BETA[c], burst_len(DEN[c], BETA[c]), cmin, cmax,
               predict_moves(DEN[c], BETA[c], 4) ? "fluctuating" : "still", cmin6, cmax6,
               predict_moves(DEN[c], BETA[c], 6) ? "fluctuating" : "still");
      if (predict_moves(DEN[c], BETA[c], 6)) begin
        n_moving6++;
        check(cmax6 != cmin6, "10-bit counter: code moves");
      end else begin
        n_still6++;
        check(cmin6 == 8 && cmax6 == 8, "10-bit counter: code holds still");
      end
      if (predict_moves(DEN[c], BETA[c], 4)) begin
        n_moving++;
        check(cmax != cmin, "odd denominator, small beta: code moves");
        if (BETA[c] < 0.0005)
          check(cmax - cmin > 1, "odd denominator, very small beta: code swings beyond 1 bit");
      end else begin
        n_still++;
        check(cmin == 8 && cmax == 8, "code holds still");
      end
    end
    check(n_moving > 0 && n_still > 0, "both regimes exercised");
    check(n_moving6 > 0 && n_still6 > 0, "both regimes exercised, 10-bit counter");
    check(n_moving6 < n_moving, "more hidden bits keep more cases still");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 6.0 * (NS + 10) * NCFG);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
