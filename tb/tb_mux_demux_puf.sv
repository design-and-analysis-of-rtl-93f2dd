// tb_mux_demux_puf - self-checking test of mux_demux_puf at its default size.
// Applies random challenges and skip configurations, launches one shared rising edge into
// both paths, and compares the response with a stage-by-stage
// arrival-time model (puf_ref.svh). Whenever the response changes it also checks that it
// changed exactly when the model's top edge reaches the final arbiter (the chain's latency).
module tb_mux_demux_puf;
  timeunit 1ps; timeprecision 1ps;
`include "puf_ref.svh"

  localparam int unsigned N      = 30;
  localparam int unsigned SEED   = 4;
  localparam int unsigned NEVAL  = 300;
  localparam int unsigned SETTLE = 2 * 2200 * N;

  logic         launch_top, launch_bot, response;
  logic [N-1:0] challenge;
  logic [N-1:0] skip;
  int           checks = 0, failures = 0, ones = 0, ties = 0;
  int           ff_ones [2] = '{0, 0};
  longint       t_launch, t_change;
  bit           prev_resp, have_prev = 1'b0;

  initial forever begin
    @(response);
    t_change = $time;
  end

  mux_demux_puf #(.SEED(SEED)) dut (
    .launch_top(launch_top),
    .launch_bot(launch_bot),
    .challenge (challenge),
    .skip(skip),
    .response  (response)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s challenge=%h", what, challenge);
    end
  endtask

  initial begin
    #((longint'(NEVAL) + 10) * 2 * SETTLE);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_result_t r;
    launch_top = 0;
    launch_bot = 0;
    challenge  = '0;
    skip = ($urandom_range(0, 3) == 0) ? '0 : N'(rand_vec() & rand_vec());
    #(SETTLE);
    for (int e = 0; e < NEVAL; e++) begin
      challenge = N'(rand_vec());
      skip = ($urandom_range(0, 3) == 0) ? '0 : N'(rand_vec() & rand_vec());
      r = ref_eval(N, SEED, REF_MAXN'(challenge), REF_MAXN'(skip), 1'b1, 0, 0, 0, 0, 0, 0);
      check(!r.late, "feed-forward loop too short for these delays");
      if (r.tie) begin
        ties++;
      end else begin
        #1;
        launch_top = 1;
        launch_bot = 1;
        t_launch   = $time;
        #(SETTLE);
        check(response == r.resp, "response");
        // a changed response must appear exactly when the top edge reaches the final arbiter
        if (have_prev && r.resp != prev_resp)
          check(t_change == t_launch + longint'(r.t_top), $sformatf("response latency %0d, model %0d", t_change - t_launch, r.t_top));
        prev_resp = r.resp;
        have_prev = 1'b1;
        if (r.resp) ones++;
        launch_top = 0;
        launch_bot = 0;
        #(SETTLE);
      end
    end
    // the responses must not be constant
    check(ones > 0 && ones < int'(NEVAL) - ties, "response never changed");
    $display("mux_demux_puf: %0d evaluations, P(R=1)=%0d/%0d, ties skipped=%0d, ff ones=%0d/%0d",
             NEVAL, ones, NEVAL - ties, ties, ff_ones[0], ff_ones[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
