// tb_puf_arbiter - checks the arbiter's decision for both arrival orders and several margins.
// resp must be 1 exactly when the bottom edge arrives before the top edge, and must hold
// while both inputs return low.
module tb_puf_arbiter;
  timeunit 1ps; timeprecision 1ps;

  logic in_top, in_bot, resp;
  int   checks = 0, failures = 0;

  puf_arbiter dut (.*);

  task automatic race(input int signed top_minus_bot);
    in_top = 0;
    in_bot = 0;
    #2000;
    if (top_minus_bot > 0) begin
      in_bot = 1; #(top_minus_bot); in_top = 1;
    end else begin
      in_top = 1; #(-top_minus_bot); in_bot = 1;
    end
    #100;
    checks++;
    if (resp !== (top_minus_bot > 0)) begin
      failures++;
      $display("FAIL: delta=%0d resp=%0b", top_minus_bot, resp);
    end
    in_top = 0;
    in_bot = 0;
    #500;
    checks++;
    if (resp !== (top_minus_bot > 0)) begin
      failures++;
      $display("FAIL: response not held, delta=%0d", top_minus_bot);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    race(5); race(-5); race(1); race(-1); race(300); race(-300);
    for (int k = 0; k < 50; k++) begin
      d = int'($urandom_range(1, 400));
      if ($urandom_range(0, 1) == 1) d = -d;
      race(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
