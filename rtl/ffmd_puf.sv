// ffmd_puf - feed-forward MUX/DeMUX (FFMD) PUF.
//
// Combines the two ideas of the family. Like the MUX/DeMUX PUF, each of the N stages is a
// demux_skip_stage that configuration bit skip[i] can take out of the race. Like the standard
// feed-forward PUF, an intermediate arbiter samples the race after stage FF_TAP and its
// decision drives the select bit of a block of FF_LEN later stages starting at FF_DST. Skipping
// reshapes which delays race, and the feed-forward bit makes later routing depend on an
// internal race result, so the response is both reconfigurable and non-linear in the
// challenge. If a feed-forward destination stage is skipped, that stage ignores the bit.
//
// Ports: launch_top/launch_bot, challenge (one bit per stage; unused for the feed-forward
// block), skip (configuration), ff_resp (feed-forward decision, for observation), response.
// Timing: FF_DST must exceed FF_TAP + 1 so the feed-forward bit settles before the edges reach
// its block (checked at start of simulation). Launch inputs must return low between
// evaluations. Which stages carry a demultiplexer (all), the loop position and its block
// length are this design's choices; delays are simulation-only (see puf_pkg).
module ffmd_puf #(
  parameter int unsigned N      = 30,
  parameter int unsigned SEED   = 5,
  parameter int unsigned FF_TAP = 14,
  parameter int unsigned FF_DST = 20,
  parameter int unsigned FF_LEN = 5
) (
  input  logic         launch_top,
  input  logic         launch_bot,
  input  logic [N-1:0] challenge,
  input  logic [N-1:0] skip,
  output logic         ff_resp,
  output logic         response
);
  timeunit 1ps; timeprecision 1ps;

  logic         path_top [N+1];
  logic         path_bot [N+1];
  logic [N-1:0] sel;

  initial assert (FF_DST > FF_TAP + 1 && FF_DST + FF_LEN <= N)
    else $error("ffmd_puf: feed-forward loop does not fit the chain");

  assign path_top[0] = launch_top;
  assign path_bot[0] = launch_bot;

  always_comb begin
    for (int i = 0; i < N; i++)
      sel[i] = (i >= FF_DST && i < FF_DST + FF_LEN) ? ff_resp : challenge[i];
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    demux_skip_stage #(
      .D_TOP_PS      (puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_TOP)),
      .D_BOT_PS      (puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_BOT)),
      .D_MERGE_TOP_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_MERGE_TOP)),
      .D_MERGE_BOT_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_MERGE_BOT))
    ) u_stage (
      .in_top (path_top[i]),
      .in_bot (path_bot[i]),
      .sel    (sel[i]),
      .skip   (skip[i]),
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
