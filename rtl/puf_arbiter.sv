// puf_arbiter - decides which of two racing rising edges arrived first.
//
// The usual edge-triggered arbiter of delay PUFs: the bottom path feeds the D input of a
// flip-flop and the top path clocks it. When the top edge arrives, the flip-flop captures
// whether the bottom edge is already there. resp = 1 therefore means the bottom edge won, i.e.
// the top path was slower (delay difference top minus bottom >= 0), which is the sign
// convention of the additive delay model. An exact tie would be metastable in silicon; in
// simulation its outcome is undefined.
//
// Ports: in_top, in_bot - the two paths; resp - the decision, updated on every rising edge of
// in_top and held until the next one. Both paths must return low before the next evaluation.
module puf_arbiter (
  input  logic in_top,
  input  logic in_bot,
  output logic resp
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge in_top) resp <= in_bot;
endmodule
