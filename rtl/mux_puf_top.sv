// mux_puf_top - the MUX-based PUF family, side by side.
//
// Holds one instance of each structure: the feed-forward MUX/DeMUX (FFMD) PUF, and the four
// structures it is built from and compared with - the basic MUX PUF, the standard
// feed-forward PUF, the modified feed-forward overlap PUF and the MUX/DeMUX PUF. They share
// nothing; each has its own launch inputs, challenge, configuration and response, so each can
// be evaluated on its own. Every instance gets a different SEED, i.e. behaves in simulation as
// a differently varied piece of silicon.
//
// Timing: for each PUF, raise its launch inputs, wait for the edges to cross N stages (about
// N x 1 ns with the default delay model, N x 2 ns for the skippable stages), read the
// response, then lower the launch inputs and wait as long again before the next evaluation.
module mux_puf_top #(
  parameter int unsigned N = 30
) (
  // feed-forward MUX/DeMUX PUF
  input  logic         ffmd_launch_top,
  input  logic         ffmd_launch_bot,
  input  logic [N-1:0] ffmd_challenge,
  input  logic [N-1:0] ffmd_skip,
  output logic         ffmd_ff_resp,
  output logic         ffmd_response,
  // basic MUX PUF
  input  logic         basic_launch_top,
  input  logic         basic_launch_bot,
  input  logic [N-1:0] basic_challenge,
  output logic         basic_response,
  // standard feed-forward MUX PUF
  input  logic         sff_launch_top,
  input  logic         sff_launch_bot,
  input  logic [N-1:0] sff_challenge,
  output logic         sff_ff_resp,
  output logic         sff_response,
  // modified feed-forward overlap MUX PUF
  input  logic         mffo_launch_top,
  input  logic         mffo_launch_bot,
  input  logic [N-1:0] mffo_challenge,
  output logic [1:0]   mffo_ff_resp,
  output logic         mffo_response,
  // MUX/DeMUX PUF
  input  logic         md_launch_top,
  input  logic         md_launch_bot,
  input  logic [N-1:0] md_challenge,
  input  logic [N-1:0] md_skip,
  output logic         md_response
);
  timeunit 1ps; timeprecision 1ps;

  // Feed-forward loop placement scaled from the 30-stage choice: tap about half way, block of
  // stages in the last third.
  localparam int unsigned FF_TAP  = N / 2 - 1;
  localparam int unsigned FF_DST  = (2 * N) / 3;
  localparam int unsigned FF_LEN  = N / 6;
  localparam int unsigned FF0_TAP = (3 * N) / 10;
  localparam int unsigned FF1_TAP = (13 * N) / 30;
  localparam int unsigned FF0_DST = (16 * N) / 30;
  localparam int unsigned FF1_DST = (22 * N) / 30;
  localparam int unsigned FFO_LEN = (4 * N) / 30;

  ffmd_puf #(
    .N(N), .SEED(5), .FF_TAP(FF_TAP), .FF_DST(FF_DST), .FF_LEN(FF_LEN)
  ) u_ffmd (
    .launch_top(ffmd_launch_top),
    .launch_bot(ffmd_launch_bot),
    .challenge (ffmd_challenge),
    .skip      (ffmd_skip),
    .ff_resp   (ffmd_ff_resp),
    .response  (ffmd_response)
  );

  mux_puf #(
    .N(N), .SEED(1)
  ) u_basic (
    .launch_top(basic_launch_top),
    .launch_bot(basic_launch_bot),
    .challenge (basic_challenge),
    .response  (basic_response)
  );

  ff_mux_puf #(
    .N(N), .SEED(2), .FF_TAP(FF_TAP), .FF_DST(FF_DST), .FF_LEN(FF_LEN)
  ) u_sff (
    .launch_top(sff_launch_top),
    .launch_bot(sff_launch_bot),
    .challenge (sff_challenge),
    .ff_resp   (sff_ff_resp),
    .response  (sff_response)
  );

  mffo_mux_puf #(
    .N(N), .SEED(3), .FF0_TAP(FF0_TAP), .FF0_DST(FF0_DST), .FF1_TAP(FF1_TAP),
    .FF1_DST(FF1_DST), .FF_LEN(FFO_LEN)
  ) u_mffo (
    .launch_top(mffo_launch_top),
    .launch_bot(mffo_launch_bot),
    .challenge (mffo_challenge),
    .ff_resp   (mffo_ff_resp),
    .response  (mffo_response)
  );

  mux_demux_puf #(
    .N(N), .SEED(4)
  ) u_md (
    .launch_top(md_launch_top),
    .launch_bot(md_launch_bot),
    .challenge (md_challenge),
    .skip      (md_skip),
    .response  (md_response)
  );
endmodule
