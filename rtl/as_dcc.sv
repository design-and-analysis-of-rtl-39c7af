// as_dcc: asynchronous-sampling duty cycle corrector with settling control.
//
// Closed loop: the uncorrected clock clk_in passes through the duty-cycle
// adjuster to become clk_out. A flip-flop clocked by the slow, free-running
// clk_async samples clk_out; the fraction of ones it sees equals the duty
// cycle of clk_out. The samples drive an 8-bit up/down counter whose upper
// 4 bits are the adjuster code, so the loop moves the code until ones and
// zeros arrive at the same rate (50% duty); the 4 lower bits filter the
// sample stream. The settling FSM watches the code and, when it swings over
// more than two adjacent values, slows the sampling oscillator to escape the
// odd-denominator frequency ratios where the loop cannot settle.
//
// The loop structure (adjuster, sampling DFF, counter, FSM driving the
// oscillator) follows the design. The sampling oscillator and the adjuster
// are behavioural models, so this top is a simulation model of the whole
// mixed-signal loop; async_sampler, dcc_counter and settling_fsm are the
// synthesizable digital part.
//
// Timing: all digital state is clocked by clk_async (one sample per period);
// a sample reaches the counter one cycle after it is taken and the code
// reaches the adjuster combinationally. rst_n is asynchronous, active low.
// ctrl_en switches the settling scheme on.
module as_dcc
  import as_dcc_pkg::*;
#(
  parameter int unsigned OSC_BITS   = 4,
  parameter int unsigned SETTLE     = 4096,
  parameter int unsigned WINDOW     = 8192,
  parameter real         T_BASE_PS  = 11332.7,
  parameter real         T_STEP_PS  = 0.81,
  parameter real         DUTY_STEP_PS = 0.5
) (
  input  logic                 clk_in,      // uncorrected clock
  input  logic                 rst_n,
  input  logic                 ctrl_en,     // settling scheme enable
  output logic                 clk_out,     // duty-corrected clock
  output logic                 clk_async,   // sampling clock
  output logic                 sample,      // CLK_sampled
  output logic [CNT_BITS-1:0]  cnt,         // full counter value
  output logic [CODE_BITS-1:0] code,        // adjuster code
  output logic                 cnt_sat,     // counter at an end of range
  output logic [OSC_BITS-1:0]  osc_code,    // oscillator slow-down code
  output logic                 unstable,    // last window was unsettled
  output logic                 slow_pulse,  // oscillator just slowed
  output logic                 stable_win,  // a window just ended settled
  output settle_state_t        fsm_state
);
  timeunit 1ps;
  timeprecision 1fs;

  logic sample_valid;

  duty_adjust #(
    .CW      (CODE_BITS),
    .STEP_PS (DUTY_STEP_PS)
  ) u_adjust (
    .clk_in  (clk_in),
    .code    (code),
    .clk_out (clk_out)
  );

  async_osc #(
    .OW        (OSC_BITS),
    .T_BASE_PS (T_BASE_PS),
    .T_STEP_PS (T_STEP_PS)
  ) u_osc (
    .osc_code  (osc_code),
    .clk_async (clk_async)
  );

  async_sampler u_sampler (
    .clk_async (clk_async),
    .rst_n     (rst_n),
    .clk_fast  (clk_out),
    .q         (sample),
    .valid     (sample_valid)
  );

  dcc_counter u_counter (
    .clk_async (clk_async),
    .rst_n     (rst_n),
    .en        (sample_valid),
    .up        (sample),
    .cnt       (cnt),
    .code      (code),
    .sat       (cnt_sat)
  );

  settling_fsm #(
    .CW     (CODE_BITS),
    .OW     (OSC_BITS),
    .SETTLE (SETTLE),
    .WINDOW (WINDOW)
  ) u_fsm (
    .clk_async  (clk_async),
    .rst_n      (rst_n),
    .enable     (ctrl_en),
    .code       (code),
    .osc_code   (osc_code),
    .unstable   (unstable),
    .slow_pulse (slow_pulse),
    .stable_win (stable_win),
    .state      (fsm_state)
  );

endmodule
