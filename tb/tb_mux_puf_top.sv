// tb_mux_puf_top - end-to-end test of the whole PUF family at its default size (N = 30).
//
// Every round launches all five PUFs at once with fresh random challenges and skip
// configurations and compares each response, and each feed-forward decision, with the
// arrival-time model of puf_ref.svh. Some rounds launch the bottom edge later than the top
// edge (separate launch inputs), which must shift the race by exactly that skew. Finally the
// basic PUF is driven by two free-running clocks of different periods, one per launch input,
// and the response is checked after every arbiter decision.
// The test counts how often each mechanism happened - crossed and straight stages, skipped
// stages, each feed-forward loop deciding 0 and 1, a skipped feed-forward destination stage,
// skewed launches, and both response values of every PUF - and fails any that never did.
module tb_mux_puf_top;
  timeunit 1ps; timeprecision 1ps;
`include "puf_ref.svh"

  localparam int unsigned N      = 30;
  localparam int unsigned NROUND = 200;
  localparam int unsigned SETTLE = 2 * 2200 * N;
  localparam int unsigned NPUF   = 5;   // 0 ffmd, 1 basic, 2 sff, 3 mffo, 4 md
  // two-clock stimulus: periods of the top and bottom launch clocks, top clock cycles per run
  localparam longint      P_TOP      = 9000;
  localparam longint      P_BOT      = 6000;
  localparam int unsigned CLK_CYCLES = 40;

  // seeds and loop placement of the instances inside mux_puf_top
  localparam int unsigned SEED_FFMD = 5, SEED_BASIC = 1, SEED_SFF = 2, SEED_MFFO = 3, SEED_MD = 4;

  logic [NPUF-1:0] launch_top, launch_bot;
  logic [N-1:0]    chal [NPUF];
  logic [N-1:0]    ffmd_skip, md_skip;
  logic            ffmd_ff_resp, sff_ff_resp;
  logic [1:0]      mffo_ff_resp;
  logic [NPUF-1:0] resp;

  int checks = 0, failures = 0;
  int n_cross = 0, n_straight = 0, n_skipped = 0, n_skew = 0, n_ff_dst_skipped = 0, n_ties = 0;
  int n_two_clock = 0;
  int n_ff [4][2];          // loops: 0 sff, 1 mffo loop 0, 2 mffo loop 1, 3 ffmd
  int n_resp [NPUF][2];

  mux_puf_top dut (
    .ffmd_launch_top (launch_top[0]), .ffmd_launch_bot (launch_bot[0]),
    .ffmd_challenge  (chal[0]),       .ffmd_skip       (ffmd_skip),
    .ffmd_ff_resp    (ffmd_ff_resp),  .ffmd_response   (resp[0]),
    .basic_launch_top(launch_top[1]), .basic_launch_bot(launch_bot[1]),
    .basic_challenge (chal[1]),       .basic_response  (resp[1]),
    .sff_launch_top  (launch_top[2]), .sff_launch_bot  (launch_bot[2]),
    .sff_challenge   (chal[2]),       .sff_ff_resp     (sff_ff_resp),
    .sff_response    (resp[2]),
    .mffo_launch_top (launch_top[3]), .mffo_launch_bot (launch_bot[3]),
    .mffo_challenge  (chal[3]),       .mffo_ff_resp    (mffo_ff_resp),
    .mffo_response   (resp[3]),
    .md_launch_top   (launch_top[4]), .md_launch_bot   (launch_bot[4]),
    .md_challenge    (chal[4]),       .md_skip         (md_skip),
    .md_response     (resp[4])
  );

  // level of a clock that started high at time 0, and whether t is within 2 ps of its edges
  function automatic bit clock_level(input longint t, input longint period);
    return (t >= 0) && ((t % period) < period / 2);
  endfunction

  function automatic bit clock_near_edge(input longint t, input longint period);
    longint ph;
    ph = t % period;
    return (t < 2) || (ph < 2) || (ph > period - 2) || (ph > period / 2 - 2 && ph < period / 2 + 2);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic happened(input int count, input string what);
    $display("  %-34s %0d", what, count);
    check(count > 0, {"mechanism never exercised: ", what});
  endtask

  initial begin
    #((longint'(NROUND) + 20) * 2 * SETTLE);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_result_t r [NPUF];
    int unsigned skew;
    foreach (n_ff[i, j]) n_ff[i][j] = 0;
    foreach (n_resp[i, j]) n_resp[i][j] = 0;
    launch_top = '0;
    launch_bot = '0;
    foreach (chal[p]) chal[p] = '0;
    ffmd_skip = '0;
    md_skip   = '0;
    #(SETTLE);
    for (int e = 0; e < NROUND; e++) begin
      foreach (chal[p]) chal[p] = N'(rand_vec());
      ffmd_skip = ($urandom_range(0, 3) == 0) ? '0 : N'(rand_vec() & rand_vec());
      md_skip   = ($urandom_range(0, 3) == 0) ? '0 : N'(rand_vec() & rand_vec());
      skew      = ($urandom_range(0, 4) == 0) ? $urandom_range(1, 300) : 0;
      r[0] = ref_eval(N, SEED_FFMD, REF_MAXN'(chal[0]), REF_MAXN'(ffmd_skip), 1'b1, 1, 14, 20, 0, 0, 5, 0, skew);
      r[1] = ref_eval(N, SEED_BASIC, REF_MAXN'(chal[1]), '0, 1'b0, 0, 0, 0, 0, 0, 0, 0, skew);
      r[2] = ref_eval(N, SEED_SFF, REF_MAXN'(chal[2]), '0, 1'b0, 1, 14, 20, 0, 0, 5, 0, skew);
      r[3] = ref_eval(N, SEED_MFFO, REF_MAXN'(chal[3]), '0, 1'b0, 2, 9, 16, 13, 22, 4, 0, skew);
      r[4] = ref_eval(N, SEED_MD, REF_MAXN'(chal[4]), REF_MAXN'(md_skip), 1'b1, 0, 0, 0, 0, 0, 0, 0, skew);
      #1;
      launch_top = '1;
      if (skew == 0) launch_bot = '1;
      else begin
        #(skew);
        launch_bot = '1;
        n_skew++;
      end
      #(SETTLE);
      for (int p = 0; p < int'(NPUF); p++) begin
        check(!r[p].late, $sformatf("puf %0d: feed-forward loop too short", p));
        if (r[p].tie) n_ties++;
        else begin
          check(resp[p] == r[p].resp, $sformatf("puf %0d round %0d: response", p, e));
          n_resp[p][r[p].resp]++;
        end
      end
      if (!r[0].tie) begin
        check(ffmd_ff_resp == r[0].ff[0], "ffmd feed-forward decision");
        n_ff[3][r[0].ff[0]]++;
      end
      if (!r[2].tie) begin
        check(sff_ff_resp == r[2].ff[0], "sff feed-forward decision");
        n_ff[0][r[2].ff[0]]++;
      end
      if (!r[3].tie) begin
        check(mffo_ff_resp == r[3].ff, "mffo feed-forward decisions");
        n_ff[1][r[3].ff[0]]++;
        n_ff[2][r[3].ff[1]]++;
      end
      for (int i = 0; i < int'(N); i++) begin
        if (chal[1][i]) n_cross++; else n_straight++;
        if (md_skip[i]) n_skipped++;
        if (ffmd_skip[i]) n_skipped++;
      end
      if (|ffmd_skip[24:20]) n_ff_dst_skipped++;
      launch_top = '0;
      launch_bot = '0;
      #(SETTLE);
    end
    // Two-clock stimulus on the basic PUF: the two launch inputs are driven by free-running
    // clocks of different periods. The arbiter's top input is launch X delayed by the model's
    // t_top and its bottom input launch Y delayed by t_bot (X = bottom when an odd number of
    // stages cross), so after every top-arbiter rising edge the response must equal launch Y
    // as it was t_bot before that edge.
    for (int c = 0; c < 4; c++) begin
      longint t_start, t_edge, t_samp;
      bit     odd;
      chal[1] = N'(rand_vec());
      r[1]    = ref_eval(N, SEED_BASIC, REF_MAXN'(chal[1]), '0, 1'b0, 0, 0, 0, 0, 0, 0);
      odd     = ^chal[1];
      #(SETTLE);
      t_start = $time;
      fork
        repeat (CLK_CYCLES) begin
          launch_top[1] = 1'b1; #(P_TOP / 2);
          launch_top[1] = 1'b0; #(P_TOP / 2);
        end
        repeat (int'(longint'(CLK_CYCLES) * P_TOP / P_BOT)) begin
          launch_bot[1] = 1'b1; #(P_BOT / 2);
          launch_bot[1] = 1'b0; #(P_BOT / 2);
        end
        for (int k = 0; k < (odd ? int'(longint'(CLK_CYCLES) * P_TOP / P_BOT) : int'(CLK_CYCLES)) - 8; k++) begin
          t_edge = t_start + longint'(k) * (odd ? P_BOT : P_TOP) + longint'(r[1].t_top);
          t_samp = t_edge - longint'(r[1].t_bot);
          #(t_edge + 1 - $time);
          if (clock_near_edge(t_samp - t_start, odd ? P_TOP : P_BOT)) continue;
          check(resp[1] == clock_level(t_samp - t_start, odd ? P_TOP : P_BOT),
                $sformatf("two-clock stimulus, edge %0d", k));
          n_two_clock++;
        end
      join
      launch_top[1] = 1'b0;
      launch_bot[1] = 1'b0;
    end
    #(SETTLE);
    $display("mechanisms:");
    happened(n_cross, "crossed stages");
    happened(n_straight, "straight stages");
    happened(n_skipped, "skipped stages");
    happened(n_ff_dst_skipped, "ffmd feed-forward stage skipped");
    happened(n_skew, "skewed launches");
    happened(n_two_clock, "two-clock stimulus samples");
    happened(n_ff[0][0], "sff feed-forward decided 0");
    happened(n_ff[0][1], "sff feed-forward decided 1");
    happened(n_ff[1][0], "mffo loop 0 decided 0");
    happened(n_ff[1][1], "mffo loop 0 decided 1");
    happened(n_ff[2][0], "mffo loop 1 decided 0");
    happened(n_ff[2][1], "mffo loop 1 decided 1");
    happened(n_ff[3][0], "ffmd feed-forward decided 0");
    happened(n_ff[3][1], "ffmd feed-forward decided 1");
    for (int p = 0; p < int'(NPUF); p++) begin
      happened(n_resp[p][0], $sformatf("puf %0d responded 0", p));
      happened(n_resp[p][1], $sformatf("puf %0d responded 1", p));
    end
    $display("  exact ties skipped                 %0d", n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
