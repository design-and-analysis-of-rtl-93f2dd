// tb_workload_ffmd - characterisation experiment: the feed-forward MUX/DeMUX PUF at 30 stages (3 select lines, 8 challenges)
// and 100 stages (6 select lines, 64 challenges).
// Five chips per configuration (puf_workload_bench); each response is checked against the
// delay model and uniqueness and randomness are printed. Temperature variation is not
// modelled, so reliability is ideal here and not reported.
module tb_workload_ffmd;
  timeunit 1ps; timeprecision 1ps;

  localparam int NB = 2;

  logic [NB-1:0] start;
  int            chk [NB];
  int            fail [NB];
  logic [NB-1:0] done;
  int            checks, failures;

  puf_workload_bench #(.KIND(4), .N(30),  .L(3), .SEED_BASE(700)) u_ffmd30  (start[0], chk[0], fail[0], done[0]);
  puf_workload_bench #(.KIND(4), .N(100), .L(6), .SEED_BASE(800)) u_ffmd100 (start[1], chk[1], fail[1], done[1]);

  initial begin
    #100_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    // the experiments run one after another
    start = '0;
    #10;
    for (int b = 0; b < NB; b++) begin
      start[b] = 1'b1;
      wait (done[b]);
    end
    checks   = 0;
    failures = 0;
    for (int b = 0; b < NB; b++) begin
      checks   += chk[b];
      failures += fail[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
