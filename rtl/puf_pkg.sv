// puf_pkg - shared constants and the process-variation delay model of the MUX PUF family.
//
// A delay PUF works because nominally identical multiplexers end up with slightly different
// delays on every die. RTL has no such variation, so each multiplexer in this code carries a
// simulation-only delay that is drawn here from a per-chip SEED. The delays follow the usual
// additive model: every MUX delay is an independent, approximately Gaussian value
// N(mean, sigma^2). The Gaussian is approximated by summing the four bytes of a 32-bit hash of
// (seed, stage, element), which is deterministic, so a SEED always gives the same "chip".
// Mean and sigma are this design's own choices; synthesis ignores all delays.
//
// Element numbers within a stage: 0 = top-path MUX, 1 = bottom-path MUX,
// 2 = top-path merge MUX of a skippable stage, 3 = bottom-path merge MUX.
package puf_pkg;
  timeunit 1ps; timeprecision 1ps;

  parameter int unsigned MUX_DELAY_MEAN_PS  = 1000;
  parameter int unsigned MUX_DELAY_SIGMA_PS = 50;

  typedef enum int unsigned {
    EL_TOP       = 0,
    EL_BOT       = 1,
    EL_MERGE_TOP = 2,
    EL_MERGE_BOT = 3
  } element_e;

  // 32-bit avalanche hash (multiply / xor-shift finaliser).
  function automatic int unsigned mix32(int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in ps of one multiplexer of one simulated chip.
  // Sum of four uniform bytes: mean 510, standard deviation about 148.
  function automatic int unsigned mux_delay_ps(int unsigned seed, int unsigned stage,
                                               int unsigned element);
    int unsigned h;
    int          sum;
    h   = mix32(seed * 32'h9E37_79B1 ^ mix32(stage * 32'h85EB_CA77 + element * 32'hC2B2_AE3D + 1));
    sum = int'(h[7:0]) + int'(h[15:8]) + int'(h[23:16]) + int'(h[31:24]);
    return int'(MUX_DELAY_MEAN_PS) + ((sum - 510) * int'(MUX_DELAY_SIGMA_PS)) / 148;
  endfunction
endpackage
