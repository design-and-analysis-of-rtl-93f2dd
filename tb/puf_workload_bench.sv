// puf_workload_bench - runs one chip-population experiment on one PUF structure.
//
// Builds K copies of the chosen structure, each with its own SEED (K different "chips"), and
// drives them all with the same challenges. Following the measurement set-up of the family's
// characterisation, the N challenge bits come from L select lines: stage i takes line i mod L,
// and all 2^L line combinations are applied. Skippable structures use a fixed configuration
// that skips every fifth stage (i mod 5 = 4) on every chip.
// Every response is checked against the arrival-time model of puf_ref.svh. From the responses
// the bench computes the inter-chip Hamming distance over all chip pairs, the uniqueness
// 1 - |2 P_inter - 1|, the share of 1 responses P(R=1) and the randomness 1 - |2 P(R=1) - 1|,
// and prints them in percent.
// Exact ties (both edges arriving in the same picosecond) are neither compared nor counted
// in P(R=1).
//
// KIND: 0 basic MUX, 1 standard feed-forward, 2 modified feed-forward overlap, 3 MUX/DeMUX,
// 4 feed-forward MUX/DeMUX. Raise start; done rises when the bench has finished.
module puf_workload_bench #(
  parameter int unsigned KIND      = 0,
  parameter int unsigned N         = 30,
  parameter int unsigned L         = 4,
  parameter int unsigned K         = 5,
  parameter int unsigned SEED_BASE = 100
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);
  timeunit 1ps; timeprecision 1ps;
`include "puf_ref.svh"

  localparam int unsigned SETTLE = 2 * 2200 * N;
  localparam int unsigned M      = 1 << L;
  // feed-forward placement, scaled from the 30-stage instances as in mux_puf_top
  localparam int unsigned FF_TAP  = N / 2 - 1;
  localparam int unsigned FF_DST  = (2 * N) / 3;
  localparam int unsigned FF_LEN  = N / 6;
  localparam int unsigned FF0_TAP = (3 * N) / 10;
  localparam int unsigned FF1_TAP = (13 * N) / 30;
  localparam int unsigned FF0_DST = (16 * N) / 30;
  localparam int unsigned FF1_DST = (22 * N) / 30;
  localparam int unsigned FFO_LEN = (4 * N) / 30;

  logic         launch;
  logic [N-1:0] challenge, skip;
  logic [K-1:0] resp;

  for (genvar k = 0; k < K; k++) begin : g_chip
    logic [1:0] ff;
    if (KIND == 0) begin : g_basic
      mux_puf #(.N(N), .SEED(SEED_BASE + k)) u_puf (
        .launch_top(launch), .launch_bot(launch), .challenge(challenge), .response(resp[k]));
      assign ff = '0;
    end else if (KIND == 1) begin : g_sff
      ff_mux_puf #(.N(N), .SEED(SEED_BASE + k), .FF_TAP(FF_TAP), .FF_DST(FF_DST),
                   .FF_LEN(FF_LEN)) u_puf (
        .launch_top(launch), .launch_bot(launch), .challenge(challenge), .ff_resp(ff[0]),
        .response(resp[k]));
      assign ff[1] = 1'b0;
    end else if (KIND == 2) begin : g_mffo
      mffo_mux_puf #(.N(N), .SEED(SEED_BASE + k), .FF0_TAP(FF0_TAP), .FF0_DST(FF0_DST),
                     .FF1_TAP(FF1_TAP), .FF1_DST(FF1_DST), .FF_LEN(FFO_LEN)) u_puf (
        .launch_top(launch), .launch_bot(launch), .challenge(challenge), .ff_resp(ff),
        .response(resp[k]));
    end else if (KIND == 3) begin : g_md
      mux_demux_puf #(.N(N), .SEED(SEED_BASE + k)) u_puf (
        .launch_top(launch), .launch_bot(launch), .challenge(challenge), .skip(skip),
        .response(resp[k]));
      assign ff = '0;
    end else begin : g_ffmd
      ffmd_puf #(.N(N), .SEED(SEED_BASE + k), .FF_TAP(FF_TAP), .FF_DST(FF_DST),
                 .FF_LEN(FF_LEN)) u_puf (
        .launch_top(launch), .launch_bot(launch), .challenge(challenge), .skip(skip),
        .ff_resp(ff[0]), .response(resp[k]));
      assign ff[1] = 1'b0;
    end
  end

  function automatic real abs_r(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    ref_result_t r;
    logic [K-1:0] exp_resp, tie_mask;
    longint ones, diff, pairs, tot, ties;
    real p_inter, p_one;
    int unsigned nl;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    launch   = 1'b0;
    ones     = 0;
    diff     = 0;
    tot      = 0;
    ties     = 0;
    challenge = '0;
    for (int i = 0; i < int'(N); i++) skip[i] = (KIND >= 3) && (i % 5 == 4);
    nl = (KIND == 2) ? 2 : (KIND == 1 || KIND == 4) ? 1 : 0;
    wait (start);
    #(SETTLE);
    for (int c = 0; c < int'(M); c++) begin
      for (int i = 0; i < int'(N); i++) challenge[i] = c[i % L];
      for (int k = 0; k < int'(K); k++) begin
        r = ref_eval(N, SEED_BASE + k, REF_MAXN'(challenge), REF_MAXN'(skip), KIND >= 3, nl,
                     (nl == 2) ? FF0_TAP : FF_TAP, (nl == 2) ? FF0_DST : FF_DST,
                     FF1_TAP, FF1_DST, (nl == 2) ? FFO_LEN : FF_LEN);
        exp_resp[k] = r.resp;
        tie_mask[k] = r.tie;
        ties += r.tie;
        if (r.late) begin
          failures++;
          $display("FAIL: kind %0d N %0d: feed-forward loop too short", KIND, N);
        end
      end
      launch = 1'b1;
      #(SETTLE);
      checks++;
      // an exact tie is metastable in silicon and undefined here: not compared
      if ((resp & ~tie_mask) != (exp_resp & ~tie_mask)) begin
        failures++;
        $display("FAIL: kind %0d N %0d combination %0d: responses %b, model %b", KIND, N, c,
                 resp, exp_resp);
      end
      for (int i = 0; i < int'(K); i++) begin
        if (!tie_mask[i]) ones += resp[i];
        for (int j = i + 1; j < int'(K); j++) diff += (resp[i] != resp[j]);
      end
      tot++;
      launch = 1'b0;
      #(SETTLE);
    end
    pairs = longint'(K) * (longint'(K) - 1) / 2;
    p_inter = real'(diff) / real'(pairs * tot);
    p_one   = real'(ones) / real'(longint'(K) * tot - ties);
    $display("kind %0d, %0d stages, %0d chips, %0d challenges: inter-chip HD %.2f%%, uniqueness %.2f%%, P(R=1) %.2f%%, randomness %.2f%% (%0d exact ties)",
             KIND, N, K, M, 100.0 * p_inter, 100.0 * (1.0 - abs_r(2.0 * p_inter - 1.0)),
             100.0 * p_one, 100.0 * (1.0 - abs_r(2.0 * p_one - 1.0)), ties);
    done = 1'b1;
  end
endmodule
