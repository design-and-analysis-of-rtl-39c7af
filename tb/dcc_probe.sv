// dcc_probe: measurement helper for the AS-DCC testbenches.
//
// While 'clear' is low (statistics restart at its falling edge), collects over the
// corrected clock clk_out the total high time and total period time
// (giving the average duty cycle), the smallest and largest high-time
// fraction of single periods, and on every clk_async edge the smallest and
// largest counter code. Results are read by the testbench through
// hierarchical references once 'clear' has been raised again.
module dcc_probe (
  input logic       clear,
  input logic       clk_out,
  input logic       clk_async,
  input logic [3:0] code
);
  timeunit 1ps;
  timeprecision 1fs;

  real t_r, t_f, t_prev_r;
  real sum_high, sum_per, duty_min, duty_max;
  int  code_min, code_max, n_per, n_code_chg;
  int  last_code;
  logic seen_r;

  always @(negedge clear) begin
    sum_high = 0.0; sum_per = 0.0; n_per = 0;
    duty_min = 2.0; duty_max = -1.0;
    code_min = 99; code_max = -1; n_code_chg = 0;
    seen_r = 1'b0;
    last_code = int'(code);
  end

  always @(posedge clk_out) begin
    if (!clear) begin
      if (seen_r && t_f > t_prev_r) begin
        sum_high += t_f - t_prev_r;
        sum_per  += $realtime - t_prev_r;
        n_per++;
        if ((t_f - t_prev_r) / ($realtime - t_prev_r) < duty_min)
          duty_min = (t_f - t_prev_r) / ($realtime - t_prev_r);
        if ((t_f - t_prev_r) / ($realtime - t_prev_r) > duty_max)
          duty_max = (t_f - t_prev_r) / ($realtime - t_prev_r);
      end
      seen_r   = 1'b1;
      t_prev_r = $realtime;
    end
  end

  always @(negedge clk_out) t_f = $realtime;

  always @(posedge clk_async) begin
    if (!clear) begin
      if (int'(code) < code_min) code_min = int'(code);
      if (int'(code) > code_max) code_max = int'(code);
      if (int'(code) != last_code) n_code_chg++;
      last_code = int'(code);
    end
  end

  function automatic real duty_avg();
    return (sum_per > 0.0) ? sum_high / sum_per : -1.0;
  endfunction

endmodule
