// demux_skip_stage - a PUF stage that configuration can take out of the race.
//
// Each path first meets a 1:2 demultiplexer. With skip = 0 both edges enter a normal
// straight/cross switch stage (mux_switch_stage) steered by sel; with skip = 1 they are sent
// along a bypass instead and the switch never sees them. A 2:1 merge multiplexer per path then
// picks the switch output or the bypass. A skipped stage therefore neither swaps the paths nor
// adds the switch delays, only the merge delays, which makes the challenge-to-response map
// reconfigurable. The unselected demultiplexer output is held at 0.
//
// Ports: in_top/in_bot, sel (challenge bit), skip (configuration bit), out_top/out_bot.
// Timing: combinational; D_* are simulation-only delays (see puf_pkg), ignored by synthesis.
module demux_skip_stage #(
  parameter int unsigned D_TOP_PS       = 1000,
  parameter int unsigned D_BOT_PS       = 1000,
  parameter int unsigned D_MERGE_TOP_PS = 1000,
  parameter int unsigned D_MERGE_BOT_PS = 1000
) (
  input  logic in_top,
  input  logic in_bot,
  input  logic sel,
  input  logic skip,
  output logic out_top,
  output logic out_bot
);
  timeunit 1ps; timeprecision 1ps;

  logic sw_in_top, sw_in_bot;     // demultiplexer outputs towards the switch
  logic byp_top, byp_bot;         // demultiplexer outputs towards the bypass
  logic sw_out_top, sw_out_bot;

  always_comb begin
    sw_in_top = in_top & ~skip;
    sw_in_bot = in_bot & ~skip;
    byp_top   = in_top & skip;
    byp_bot   = in_bot & skip;
  end

  mux_switch_stage #(
    .D_TOP_PS(D_TOP_PS),
    .D_BOT_PS(D_BOT_PS)
  ) u_switch (
    .in_top (sw_in_top),
    .in_bot (sw_in_bot),
    .sel    (sel),
    .out_top(sw_out_top),
    .out_bot(sw_out_bot)
  );

  assign #(D_MERGE_TOP_PS) out_top = skip ? byp_top : sw_out_top;
  assign #(D_MERGE_BOT_PS) out_bot = skip ? byp_bot : sw_out_bot;
endmodule
