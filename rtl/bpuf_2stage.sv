// bpuf_2stage: two butterfly cells in series, the second excited by a latch
// of the first.
//
// Stage 1 is excited from the input. One of its latch outputs, chosen by TAP,
// becomes the excite of stage 2, and the response is stage 2's latch 1.
//
//   TAP = 2 (default): stage 1's latch 2 drives stage 2. While excite is
//     high, latch 2 of stage 1 is preset, so stage 2 is held unstable and
//     out = 0. After excite falls:
//       stage 1 latch 1 first -> stage 1 settles to 1, stage 2 stays held,
//                                out = 0;
//       stage 1 latch 2 first -> stage 1 settles to 0, the falling link
//                                releases stage 2, and stage 2's own race
//                                decides out.
//     So P(out = 0) = P(s1 latch 1 first) + P(s1 latch 2 first) * P(s2
//     latch 2 first).
//   TAP = 1: stage 1's latch 1 (its response) drives stage 2. Stage 2 is
//     excited only when stage 1 settles to 1, and it resolves only when that
//     link falls again, i.e. on the next rising edge of excite; until then
//     it keeps whatever it held.
//
// Interface: excite in; out = stage 2 latch 1; link = stage 2's excite;
// s1_out = stage 1 latch 1. No clock. Delay parameters are simulation-only
// (see bpuf_cell). The two connections follow the published series designs;
// the TAP parameter that selects between them and the default are this
// design's choice.
module bpuf_2stage #(
  parameter int unsigned TAP = 2,
  parameter int unsigned S1_L1_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned S1_L2_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned S2_L1_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned S2_L2_PS = bpuf_pkg::LATCH_SWITCH_PS
) (
  input  logic excite,
  output logic out,
  output logic link,
  output logic s1_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic s1_q2;

  bpuf_cell #(.L1_SWITCH_PS(S1_L1_PS), .L2_SWITCH_PS(S1_L2_PS)) u_stage1 (
    .excite(excite), .out(s1_out), .q2(s1_q2)
  );

  assign link = (TAP == 1) ? s1_out : s1_q2;

  bpuf_cell #(.L1_SWITCH_PS(S2_L1_PS), .L2_SWITCH_PS(S2_L2_PS)) u_stage2 (
    .excite(link), .out(out), .q2()
  );

endmodule
