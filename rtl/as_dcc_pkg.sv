// as_dcc_pkg: constants and types shared by the asynchronous-sampling duty
// cycle corrector (AS-DCC).
//
// The counter geometry follows the design: an 8-bit up/down counter that
// starts at 8'b1000_1000, of which the upper 4 bits drive the duty-cycle
// adjustment stage. The settling-FSM state encoding is this design's own.
package as_dcc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Counter width and number of code (MSB) bits fed to the duty adjuster.
  localparam int unsigned CNT_BITS  = 8;
  localparam int unsigned CODE_BITS = 4;

  // Counter reset value: mid-scale code 4'b1000 with the 4 LSBs at 4'b1000,
  // so the code only moves after 8 net ups or 9 net downs.
  localparam logic [CNT_BITS-1:0] CNT_INIT = 8'b1000_1000;

  // Largest code spread (max - min) seen in one observation window that
  // still counts as settled: toggling between two adjacent codes.
  localparam int unsigned STABLE_SPREAD = 1;

  // States of the settling controller.
  typedef enum logic [1:0] {
    ST_OFF     = 2'd0,  // scheme disabled, oscillator code frozen
    ST_SETTLE  = 2'd1,  // let the loop acquire before judging it
    ST_MONITOR = 2'd2,  // record min/max of the code over one window
    ST_SLOW    = 2'd3   // spread too large: lengthen T_async by one step
  } settle_state_t;

endpackage
