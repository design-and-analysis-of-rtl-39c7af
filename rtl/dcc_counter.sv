// dcc_counter: up/down accumulator of the asynchronous samples.
//
// On every rising edge of clk_async where 'en' is high, the counter steps up
// by one when the sample is 1 and down by one when it is 0, so over many
// samples it integrates (duty - 50%). The default 8-bit counter starts at
// 8'b1000_1000; only its upper CODE_BITS bits leave the block as the duty
// adjustment code, so the lower bits act as a filter that hides short
// bursts of identical samples (a code change needs 8 net ups or 9 net downs
// from reset). Width, reset value and the split into 4 code bits plus 4
// filter bits follow the design.
//
// This design's own choice: the count saturates at all-zeros and all-ones
// instead of wrapping, so a long burst can never flip the code from one end
// of the range to the other.
//
// Timing: cnt and code update on posedge clk_async; one cycle from a sample
// to its effect on cnt. rst_n is asynchronous, active low.
module dcc_counter
  import as_dcc_pkg::*;
#(
  parameter int unsigned W     = CNT_BITS,   // counter width
  parameter int unsigned CW    = CODE_BITS,  // code (MSB) bits
  parameter logic [W-1:0] INIT = W'(CNT_INIT)
) (
  input  logic          clk_async,
  input  logic          rst_n,
  input  logic          en,      // a valid sample is present
  input  logic          up,      // sample value: 1 = count up, 0 = down
  output logic [W-1:0]  cnt,     // full counter value
  output logic [CW-1:0] code,    // upper bits: duty adjustment code
  output logic          sat      // counter is pinned at an end of its range
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [W-1:0] CNT_MAX = '1;
  localparam logic [W-1:0] CNT_MIN = '0;

  always_ff @(posedge clk_async or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= INIT;
    end else if (en) begin
      if (up && cnt != CNT_MAX)       cnt <= cnt + 1'b1;
      else if (!up && cnt != CNT_MIN) cnt <= cnt - 1'b1;
    end
  end

  assign code = cnt[W-1 -: CW];
  assign sat  = (cnt == CNT_MAX) || (cnt == CNT_MIN);

endmodule
