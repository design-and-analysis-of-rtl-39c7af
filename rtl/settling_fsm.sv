// settling_fsm: controller that keeps the AS-DCC out of its unstable
// operating points.
//
// When T_async / T_clk lies very close to a fraction with an odd denominator,
// the sampler produces long bursts of identical bits and the counter code
// wanders over many values even with a perfect 50% input. In the settled
// case the code only toggles between two neighbours. This block watches the
// code: after a settling wait it records the minimum and maximum code over
// an observation window; if max - min exceeds STABLE_SPREAD (1), it raises
// osc_code by one, which lengthens T_async and moves alpha away from the
// bad fraction, then waits and observes again. A settled window keeps
// osc_code and starts the next window, so the loop is watched continuously.
// Detecting "more than 1-bit toggling" and slowing the oscillator follow the
// design; the window/settle lengths, the one-step increment and the
// saturation of osc_code at its maximum are this design's own choices.
//
// Interface: 'enable' low parks the FSM in ST_OFF with osc_code held (the
// scheme switched off). 'slow_pulse' is high for the one cycle in which
// osc_code steps. 'unstable' reports the verdict of the last completed
// window; 'stable_win' pulses for one cycle after every settled window.
//
// Timing: clocked by clk_async, rst_n asynchronous active low. A window of
// WINDOW cycles is judged on its last cycle; osc_code steps one cycle later
// (state ST_SLOW), then SETTLE cycles pass before the next window.
module settling_fsm
  import as_dcc_pkg::*;
#(
  parameter int unsigned CW     = CODE_BITS,  // width of the watched code
  parameter int unsigned OW     = 4,          // width of the oscillator code
  parameter int unsigned SETTLE = 4096,       // cycles waited before a window
  parameter int unsigned WINDOW = 8192        // cycles per observation window
) (
  input  logic          clk_async,
  input  logic          rst_n,
  input  logic          enable,       // settling scheme on
  input  logic [CW-1:0] code,         // counter output being watched
  output logic [OW-1:0] osc_code,     // oscillator slow-down code
  output logic          unstable,     // last window exceeded the spread
  output logic          slow_pulse,   // osc_code stepped this cycle
  output logic          stable_win,   // a window just ended settled
  output settle_state_t state
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TW = $clog2((SETTLE > WINDOW ? SETTLE : WINDOW) + 1);

  logic [TW-1:0] timer;
  logic [CW-1:0] cmin, cmax;
  logic [CW-1:0] nmin, nmax;
  logic          wide;

  // Running min/max including the current code.
  always_comb begin
    nmin = (code < cmin) ? code : cmin;
    nmax = (code > cmax) ? code : cmax;
    wide = (nmax - nmin) > CW'(STABLE_SPREAD);
  end

  always_ff @(posedge clk_async or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_OFF;
      timer      <= '0;
      cmin       <= '1;
      cmax       <= '0;
      osc_code   <= '0;
      unstable   <= 1'b0;
      slow_pulse <= 1'b0;
      stable_win <= 1'b0;
    end else begin
      slow_pulse <= 1'b0;
      stable_win <= 1'b0;
      if (!enable) begin
        state <= ST_OFF;
        timer <= '0;
      end else begin
        unique case (state)
          ST_OFF: begin
            state <= ST_SETTLE;
            timer <= TW'(SETTLE - 1);
          end
          ST_SETTLE: begin
            if (timer == '0) begin
              state <= ST_MONITOR;
              timer <= TW'(WINDOW - 1);
              cmin  <= code;
              cmax  <= code;
            end else begin
              timer <= timer - 1'b1;
            end
          end
          ST_MONITOR: begin
            cmin <= nmin;
            cmax <= nmax;
            if (timer == '0) begin
              unstable <= wide;
              if (wide) begin
                state <= ST_SLOW;
              end else begin
                stable_win <= 1'b1;
                timer      <= TW'(WINDOW - 1);
                cmin       <= code;
                cmax       <= code;
              end
            end else begin
              timer <= timer - 1'b1;
            end
          end
          ST_SLOW: begin
            if (osc_code != '1) begin
              osc_code   <= osc_code + 1'b1;
              slow_pulse <= 1'b1;
            end
            state <= ST_SETTLE;
            timer <= TW'(SETTLE - 1);
          end
          default: state <= ST_OFF;
        endcase
      end
    end
  end

endmodule
