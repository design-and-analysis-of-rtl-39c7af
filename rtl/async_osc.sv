// async_osc: behavioural model of the slow sampling oscillator (CLK_async).
//
// Behavioural model, not synthesizable: the real part is an analog ring
// oscillator. Its only job in the AS-DCC is to run well below the counter's
// maximum rate (the design keeps it under 100 MHz) at a frequency unrelated
// to the corrected clock; no frequency tuning loop exists. The settling
// controller can slow it down: the period is
//     T_async = T_BASE_PS + osc_code * T_STEP_PS.
// The default base period (about 88.24 MHz) is the operating point given for
// the 8 GHz design; the step of 0.81 ps is the increment seen when the
// scheme moved T_async from 520.0217 ps to 520.8317 ps. Whether the real
// oscillator moves by exactly this amount per step is not known; it is this
// model's assumption.
//
// Edges are placed on an ideal time grid accumulated in real arithmetic, so
// rounding to the 1 fs precision does not build up over many periods. A new
// osc_code takes effect from the next rising edge. FIRST_EDGE_PS sets the
// time of the first rising edge.
module async_osc #(
  parameter int unsigned OW        = 4,
  parameter real         T_BASE_PS = 11332.7,
  parameter real         T_STEP_PS = 0.81,
  parameter real         FIRST_EDGE_PS = 0.0
) (
  input  logic [OW-1:0] osc_code,   // slow-down code from the settling FSM
  output logic          clk_async
);
  timeunit 1ps;
  timeprecision 1fs;

  real t_rise = FIRST_EDGE_PS;  // absolute time of the next rising edge, ps
  real period;                  // period in force for the current cycle, ps

  // One period per pass: low until the rising edge, then the high half.
  always begin
    clk_async = 1'b0;
    #(t_rise - $realtime);
    clk_async = 1'b1;
    period    = T_BASE_PS + real'(osc_code) * T_STEP_PS;
    #(t_rise + period / 2.0 - $realtime);
    t_rise    = t_rise + period;
  end

endmodule
