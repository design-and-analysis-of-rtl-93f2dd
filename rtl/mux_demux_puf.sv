// mux_demux_puf - reconfigurable MUX/DeMUX PUF.
//
// A MUX PUF whose N stages can each be skipped. Every stage is a demux_skip_stage: with
// skip[i] = 0 it acts as a normal straight/cross switch steered by challenge[i]; with
// skip[i] = 1 its demultiplexers route both edges around the switch. The skip vector is
// configuration data: changing it changes which delays take part in the race and so
// reconfigures the whole challenge-to-response map without new hardware.
//
// Ports: launch_top/launch_bot, challenge (one bit per stage), skip (one configuration bit per
// stage), response (valid after the edges have crossed the chain). Launch inputs must return
// low between evaluations. Every stage carrying a demultiplexer is this design's choice;
// delays are simulation-only (see puf_pkg).
module mux_demux_puf #(
  parameter int unsigned N    = 30,
  parameter int unsigned SEED = 4
) (
  input  logic         launch_top,
  input  logic         launch_bot,
  input  logic [N-1:0] challenge,
  input  logic [N-1:0] skip,
  output logic         response
);
  timeunit 1ps; timeprecision 1ps;

  logic path_top [N+1];
  logic path_bot [N+1];

  assign path_top[0] = launch_top;
  assign path_bot[0] = launch_bot;

  for (genvar i = 0; i < N; i++) begin : g_stage
    demux_skip_stage #(
      .D_TOP_PS      (puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_TOP)),
      .D_BOT_PS      (puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_BOT)),
      .D_MERGE_TOP_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_MERGE_TOP)),
      .D_MERGE_BOT_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_MERGE_BOT))
    ) u_stage (
      .in_top (path_top[i]),
      .in_bot (path_bot[i]),
      .sel    (challenge[i]),
      .skip   (skip[i]),
      .out_top(path_top[i+1]),
      .out_bot(path_bot[i+1])
    );
  end

  puf_arbiter u_arbiter (
    .in_top(path_top[N]),
    .in_bot(path_bot[N]),
    .resp  (response)
  );
endmodule
