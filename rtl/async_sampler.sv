// async_sampler: the asynchronous-sampling D flip-flop of the AS-DCC.
//
// The fast clock being corrected (clk_fast, several GHz) is used as *data*
// and sampled on each rising edge of the slow, unrelated clock clk_async
// (below 100 MHz). Because T_async = (N + alpha) * T_clk with a fractional
// alpha, successive samples land at different phases of clk_fast, and the
// fraction of ones in the sample stream tends to the duty cycle of clk_fast.
// This is a single flip-flop as in the design; the slow sample rate gives the
// flop a whole T_async to resolve, so no synchroniser is added.
//
// A 'valid' flag, this design's own addition, rises with the first sample
// after reset so that the counter never integrates the reset value of q.
//
// Timing: q and valid update on posedge clk_async; rst_n is asynchronous,
// active low.
module async_sampler (
  input  logic clk_async,  // slow sampling clock (CLK_async)
  input  logic rst_n,      // asynchronous active-low reset
  input  logic clk_fast,   // fast clock sampled as data (CLK)
  output logic q,          // CLK_sampled
  output logic valid       // q holds a real sample
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_async or negedge rst_n) begin
    if (!rst_n) begin
      q     <= 1'b0;
      valid <= 1'b0;
    end else begin
      q     <= clk_fast;
      valid <= 1'b1;
    end
  end

endmodule
