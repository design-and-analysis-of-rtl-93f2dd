// mux_puf - basic (original) MUX-based arbiter PUF.
//
// Two rising edges are launched into two nominally identical paths of N switch stages. Stage i
// passes them straight or crossed according to challenge[i], so the challenge picks which
// multiplexer delays each edge collects. An arbiter after the last stage turns the arrival-time
// difference into one response bit: 1 when the bottom edge arrives first. Because the delays
// differ randomly from chip to chip, the challenge-to-response map is a per-chip fingerprint.
//
// Ports: launch_top/launch_bot - the two launch inputs (normally one shared rising edge; they
// are separate so two different stimuli can also be applied); challenge - one bit per stage;
// response - valid once both edges have crossed N stages and held until the next evaluation.
// Both launch inputs must return low, and stay low long enough to clear the chain, between
// evaluations.
// Structure and response convention follow the classic design; SEED selects the simulated
// chip's delays (simulation only, see puf_pkg).
module mux_puf #(
  parameter int unsigned N    = 30,
  parameter int unsigned SEED = 1
) (
  input  logic         launch_top,
  input  logic         launch_bot,
  input  logic [N-1:0] challenge,
  output logic         response
);
  timeunit 1ps; timeprecision 1ps;

  logic path_top [N+1];
  logic path_bot [N+1];

  assign path_top[0] = launch_top;
  assign path_bot[0] = launch_bot;

  for (genvar i = 0; i < N; i++) begin : g_stage
    mux_switch_stage #(
      .D_TOP_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_TOP)),
      .D_BOT_PS(puf_pkg::mux_delay_ps(SEED, i, puf_pkg::EL_BOT))
    ) u_stage (
      .in_top (path_top[i]),
      .in_bot (path_bot[i]),
      .sel    (challenge[i]),
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
