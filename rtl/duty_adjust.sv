// duty_adjust: behavioural model of the duty-cycle adjustment stage.
//
// Behavioural model, not synthesizable: the real stage is a clock buffer
// whose pull-up and pull-down strengths are switched by the counter code.
// A larger code strengthens the NMOS pull-down, which makes falling edges
// earlier and rising edges later and so lowers the output duty cycle; a
// smaller code does the opposite. Code 2^(CW-1) (4'b1000) is neutral.
// The model delays each rising edge by T_PD_PS + d/2 and each falling edge
// by T_PD_PS - d/2, with d = (code - 2^(CW-1)) * STEP_PS, so every code step
// removes STEP_PS of high time. STEP_PS = 0.5 ps is this model's reading of
// the settled output toggling between 49.5% and 50% with a 100 ps clock;
// the propagation delay T_PD_PS is assumed.
//
// Interface: clk_in is the uncorrected clock, clk_out the corrected one; clk_out
// is first defined T_PD_PS after the first edge of clk_in. A
// new code applies to the next edge of clk_in. Edges are scheduled as
// transport delays, so clk_in must stay high and low longer than
// CW-bit-range * STEP_PS.
module duty_adjust #(
  parameter int unsigned CW      = 4,
  parameter real         STEP_PS = 0.5,
  parameter real         T_PD_PS = 20.0
) (
  input  logic          clk_in,
  input  logic [CW-1:0] code,
  output logic          clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int MID = 2 ** (CW - 1);

  real shift_ps;

  always_comb shift_ps = real'(int'(code) - MID) * STEP_PS;

  // Each input edge schedules the matching output edge after its own
  // code-dependent delay (transport delay: edges are never swallowed).
  always @(clk_in) begin
    automatic logic lvl = clk_in;
    automatic real  d   = lvl ? T_PD_PS + shift_ps / 2.0 : T_PD_PS - shift_ps / 2.0;
    fork
      begin
        #(d) clk_out <= lvl;
      end
    join_none
  end

endmodule
