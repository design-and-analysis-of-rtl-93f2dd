// tb_mux_switch_stage - checks routing and delays of one straight/cross switch stage.
// For every select value it raises and lowers each input alone and checks that the edge
// appears on the right output exactly D_TOP_PS or D_BOT_PS later, and never earlier.
module tb_mux_switch_stage;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DT = 730;
  localparam int unsigned DB = 910;

  logic in_top, in_bot, sel, out_top, out_bot;
  int   checks = 0, failures = 0;

  mux_switch_stage #(.D_TOP_PS(DT), .D_BOT_PS(DB)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (sel=%0b in=%0b%0b out=%0b%0b)", what, sel, in_top, in_bot, out_top, out_bot);
    end
  endtask

  // Raise one input and follow the edge: expected output and its delay.
  task automatic pulse(input bit top_input, input bit s);
    bit exp_on_top;
    int unsigned d;
    sel = s;
    in_top = 0;
    in_bot = 0;
    #5000;
    exp_on_top = top_input ^ s;          // straight keeps the path, cross swaps it
    d = exp_on_top ? DT : DB;
    if (top_input) in_top = 1; else in_bot = 1;
    #(d - 1);
    check(out_top == 0 && out_bot == 0, "output changed before the stage delay");
    #2;
    check(out_top == exp_on_top && out_bot == !exp_on_top, "edge on wrong output or late");
    #3000;
    check(out_top == exp_on_top && out_bot == !exp_on_top, "steady value wrong");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int t = 0; t < 2; t++)
        pulse(t[0], s[0]);
    // both inputs high: both outputs high whatever the select
    for (int s = 0; s < 2; s++) begin
      sel = s[0]; in_top = 1; in_bot = 1;
      #3000;
      check(out_top && out_bot, "both inputs high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
