// mffo_mux_puf - modified feed-forward overlap MUX PUF.
//
// A chain of N switch stages with two feed-forward loops whose spans overlap: loop 1 taps the
// race before loop 0 has delivered its bit. Each loop's intermediate arbiter samples the race
// after its tap stage, and its decision is used as the challenge bit of a block of FF_LEN
// later stages. A final arbiter gives the response.
//
// Ports: as mux_puf, plus ff_resp[1:0] (the two feed-forward decisions, for observation).
// challenge[i] is unused for the stages driven by a loop.
// Timing: each loop's destination must start at least two stages after its tap (checked at
// start of simulation); loop 1's tap must lie between loop 0's tap and destination, which is
// what makes the loops overlap. The number and placement of loops are this design's choice;
// delays are simulation-only (see puf_pkg).
module mffo_mux_puf #(
  parameter int unsigned N       = 30,
  parameter int unsigned SEED    = 3,
  parameter int unsigned FF0_TAP = 9,
  parameter int unsigned FF0_DST = 16,
  parameter int unsigned FF1_TAP = 13,
  parameter int unsigned FF1_DST = 22,
  parameter int unsigned FF_LEN  = 4
) (
  input  logic         launch_top,
  input  logic         launch_bot,
  input  logic [N-1:0] challenge,
  output logic [1:0]   ff_resp,
  output logic         response
);
  timeunit 1ps; timeprecision 1ps;

  logic         path_top [N+1];
  logic         path_bot [N+1];
  logic [N-1:0] sel;

  initial assert (FF0_DST > FF0_TAP + 1 && FF1_DST > FF1_TAP + 1 &&
                  FF1_TAP > FF0_TAP && FF1_TAP < FF0_DST &&
                  FF0_DST + FF_LEN <= FF1_DST && FF1_DST + FF_LEN <= N)
    else $error("mffo_mux_puf: feed-forward loops do not overlap or do not fit the chain");

  assign path_top[0] = launch_top;
  assign path_bot[0] = launch_bot;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (i >= FF0_DST && i < FF0_DST + FF_LEN)      sel[i] = ff_resp[0];
      else if (i >= FF1_DST && i < FF1_DST + FF_LEN) sel[i] = ff_resp[1];
      else                                           sel[i] = challenge[i];
    end
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

  puf_arbiter u_ff0_arbiter (
    .in_top(path_top[FF0_TAP+1]),
    .in_bot(path_bot[FF0_TAP+1]),
    .resp  (ff_resp[0])
  );

  puf_arbiter u_ff1_arbiter (
    .in_top(path_top[FF1_TAP+1]),
    .in_bot(path_bot[FF1_TAP+1]),
    .resp  (ff_resp[1])
  );

  puf_arbiter u_arbiter (
    .in_top(path_top[N]),
    .in_bot(path_bot[N]),
    .resp  (response)
  );
endmodule
