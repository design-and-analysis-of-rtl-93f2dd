// tb_workload_basic_mux - characterisation experiment: the basic MUX PUF at 20, 30 and 50 stages, driven through 4 select lines
// (16 challenges).
// Five chips per configuration (puf_workload_bench); each response is checked against the
// delay model and uniqueness and randomness are printed. Temperature variation is not
// modelled, so reliability is ideal here and not reported.
module tb_workload_basic_mux;
  timeunit 1ps; timeprecision 1ps;

  localparam int NB = 3;

  logic [NB-1:0] start;
  int            chk [NB];
  int            fail [NB];
  logic [NB-1:0] done;
  int            checks, failures;

  puf_workload_bench #(.KIND(0), .N(20),  .L(4), .SEED_BASE(100)) u_basic20 (start[0], chk[0], fail[0], done[0]);
  puf_workload_bench #(.KIND(0), .N(30),  .L(4), .SEED_BASE(200)) u_basic30 (start[1], chk[1], fail[1], done[1]);
  puf_workload_bench #(.KIND(0), .N(50),  .L(4), .SEED_BASE(300)) u_basic50 (start[2], chk[2], fail[2], done[2]);

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
