// tb_demux_skip_stage - checks both modes of the skippable stage.
// skip = 0: straight/cross switching with switch delay plus merge delay.
// skip = 1: no swapping whatever sel is, merge delay only.
module tb_demux_skip_stage;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DT  = 700;
  localparam int unsigned DB  = 800;
  localparam int unsigned DMT = 300;
  localparam int unsigned DMB = 450;

  logic in_top, in_bot, sel, skip, out_top, out_bot;
  int   checks = 0, failures = 0;

  demux_skip_stage #(.D_TOP_PS(DT), .D_BOT_PS(DB), .D_MERGE_TOP_PS(DMT), .D_MERGE_BOT_PS(DMB))
    dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (skip=%0b sel=%0b in=%0b%0b out=%0b%0b)", what, skip, sel, in_top,
               in_bot, out_top, out_bot);
    end
  endtask

  task automatic pulse(input bit top_input, input bit s, input bit k);
    bit exp_on_top;
    int unsigned d;
    sel = s;
    skip = k;
    in_top = 0;
    in_bot = 0;
    #5000;
    exp_on_top = k ? top_input : (top_input ^ s);
    if (k) d = exp_on_top ? DMT : DMB;
    else   d = exp_on_top ? DT + DMT : DB + DMB;
    if (top_input) in_top = 1; else in_bot = 1;
    #(d - 1);
    check(out_top == 0 && out_bot == 0, "output changed before the expected delay");
    #2;
    check(out_top == exp_on_top && out_bot == !exp_on_top, "edge on wrong output or late");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++)
      for (int s = 0; s < 2; s++)
        for (int t = 0; t < 2; t++)
          pulse(t[0], s[0], k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
