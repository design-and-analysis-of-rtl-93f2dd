// tb_workload_mux_demux - characterisation experiment: the MUX/DeMUX PUF at 30 stages, driven through 3 select lines (8 challenges).
// Five chips per configuration (puf_workload_bench); each response is checked against the
// delay model and uniqueness and randomness are printed. Temperature variation is not
// modelled, so reliability is ideal here and not reported.
module tb_workload_mux_demux;
  timeunit 1ps; timeprecision 1ps;

  localparam int NB = 1;

  logic [NB-1:0] start;
  int            chk [NB];
  int            fail [NB];
  logic [NB-1:0] done;
  int            checks, failures;

  puf_workload_bench #(.KIND(3), .N(30),  .L(3), .SEED_BASE(600)) u_md30    (start[0], chk[0], fail[0], done[0]);

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
