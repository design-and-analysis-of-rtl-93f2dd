// ff_mux_puf - standard feed-forward MUX PUF.
//
// A basic MUX PUF chain of N switch stages with one extra arbiter in the middle. The
// feed-forward arbiter watches the race after stage FF_TAP and its decision becomes the select
// bit of a block of FF_LEN later stages, starting at FF_DST. The response therefore depends on
// an internal race result, which makes the challenge-to-response map non-linear and harder to
// model than the basic chain.
//
// Ports: as mux_puf, plus ff_resp (the feed-forward arbiter's decision, for observation).
// challenge[i] is unused for the FF_LEN stages driven by the feed-forward arbiter; the port
// keeps one bit per stage so all PUFs of the family share one interface.
// Timing: the feed-forward decision is taken when the top edge leaves stage FF_TAP and must
// settle before either edge reaches stage FF_DST, so FF_DST must exceed FF_TAP + 1 (checked at
// start of simulation). Loop position and block length are this design's choice; delays are
// simulation-only (see puf_pkg).
module ff_mux_puf #(
  parameter int unsigned N      = 30,
  parameter int unsigned SEED   = 2,
  parameter int unsigned FF_TAP = 14,
  parameter int unsigned FF_DST = 20,
  parameter int unsigned FF_LEN = 5
) (
  input  logic         launch_top,
  input  logic         launch_bot,
  input  logic [N-1:0] challenge,
  output logic         ff_resp,
  output logic         response
);
  timeunit 1ps; timeprecision 1ps;

  logic         path_top [N+1];
  logic         path_bot [N+1];
  logic [N-1:0] sel;

  initial assert (FF_DST > FF_TAP + 1 && FF_DST + FF_LEN <= N)
    else $error("ff_mux_puf: feed-forward loop does not fit the chain");

  assign path_top[0] = launch_top;
  assign path_bot[0] = launch_bot;

  always_comb begin
    for (int i = 0; i < N; i++)
      sel[i] = (i >= FF_DST && i < FF_DST + FF_LEN) ? ff_resp : challenge[i];
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    mux_switch_stage #(
      .D_TOP_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_TOP)),
      .D_BOT_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_BOT))
    ) u_stage (
      .in_top (path_top[i]),
      .in_bot (path_bot[i]),
      .sel    (sel[i]),
      .out_top(path_top[i+1]),
      .out_bot(path_bot[i+1])
    );
  end

  puf_arbiter u_ff_arbiter (
    .in_top(path_top[FF_TAP+1]),
    .in_bot(path_bot[FF_TAP+1]),
    .resp  (ff_resp)
  );

  puf_arbiter u_arbiter (
    .in_top(path_top[N]),
    .in_bot(path_bot[N]),
    .resp  (response)
  );
endmodule
