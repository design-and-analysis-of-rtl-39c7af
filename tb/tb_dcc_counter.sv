// tb_dcc_counter: self-checking test of the saturating up/down counter.
//
// Checks the reset value 8'b1000_1000, that the code (upper 4 bits) first
// moves after 8 net ups or 9 net downs from reset, that 'en' low holds the
// count, saturation at both ends, and a long random up/down stream against
// a reference count kept in the testbench.
module tb_dcc_counter;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk_async = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0, up = 1'b0;
  logic [7:0] cnt;
  logic [3:0] code;
  logic       sat;

  int checks = 0, failures = 0;
  int model;

  dcc_counter dut (.clk_async, .rst_n, .en, .up, .cnt, .code, .sat);

  always #5000 clk_async = ~clk_async;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t cnt=%h model=%0d", what, $time, cnt, model);
    end
  endtask

  // One clock with the given inputs; the reference count follows.
  task automatic step(input logic e, input logic u);
    en = e; up = u;
    @(posedge clk_async);
    if (e) model = u ? (model < 255 ? model + 1 : 255) : (model > 0 ? model - 1 : 0);
    #1;
    check(cnt == 8'(model), "count");
    check(code == 4'(model >> 4), "code is the upper nibble");
    check(sat == (model == 0 || model == 255), "saturation flag");
  endtask

  initial begin
    #12000;
    check(cnt == 8'h88 && code == 4'b1000, "reset value");
    rst_n = 1'b1;
    model = 136;
    // Seven ups keep the code; the eighth moves it.
    repeat (7) step(1'b1, 1'b1);
    check(code == 4'b1000, "code holds after 7 ups");
    step(1'b1, 1'b1);
    check(code == 4'b1001, "code moves on 8th up");
    // Back to the reset value, then 8 downs hold and the 9th moves.
    repeat (8) step(1'b1, 1'b0);
    check(cnt == 8'h88, "back to reset value");
    repeat (8) step(1'b1, 1'b0);
    check(code == 4'b1000, "code holds after 8 downs");
    step(1'b1, 1'b0);
    check(code == 4'b0111, "code moves on 9th down");
    // Enable low: no change.
    repeat (20) step(1'b0, 1'b1);
    // Saturate high and low.
    repeat (300) step(1'b1, 1'b1);
    check(cnt == 8'hFF, "saturates at top");
    repeat (300) step(1'b1, 1'b0);
    check(cnt == 8'h00, "saturates at bottom");
    // Random stream.
    repeat (5000) step(1'($urandom_range(0, 9) != 0), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000.0 * 7000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
