// mux_switch_stage - one stage of a MUX-based delay PUF.
//
// Two 2:1 multiplexers share one challenge bit. With sel = 0 the two racing edges go straight
// through (top to top, bottom to bottom); with sel = 1 they cross over. The stage thus adds
// D_TOP_PS to whatever leaves on the top path and D_BOT_PS to whatever leaves on the bottom
// path, and the challenge decides which input edge takes which of the two delays. This is the
// straight/cross switch of the classic arbiter PUF.
//
// Ports: in_top/in_bot are the two paths, sel the challenge bit, out_top/out_bot the paths out.
// Timing: purely combinational. The two delays are simulation-only stand-ins for the
// manufacturing variation of the two multiplexers (see puf_pkg); synthesis ignores them and a
// real implementation must place both multiplexers symmetrically.
module mux_switch_stage #(
  parameter int unsigned D_TOP_PS = 1000,
  parameter int unsigned D_BOT_PS = 1000
) (
  input  logic in_top,
  input  logic in_bot,
  input  logic sel,
  output logic out_top,
  output logic out_bot
);
  timeunit 1ps; timeprecision 1ps;

  assign #(D_TOP_PS) out_top = sel ? in_bot : in_top;
  assign #(D_BOT_PS) out_bot = sel ? in_top : in_bot;
endmodule
