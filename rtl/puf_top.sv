// puf_top: the two butterfly-PUF designs side by side.
//
//  * Array8 butterfly PUF (bpuf_array): ARRAY_BITS independent butterfly
//    cells. Raise excite, lower it, read outt: a weak PUF, one response word
//    per device.
//  * Hybrid arbiter-butterfly PUF (abpuf): a STAGES-bit challenge steers a
//    falling edge of ab_start through a switch chain into one butterfly cell,
//    giving one response bit per challenge: a strong PUF.
//  * Two-stage series butterfly PUF (bpuf_2stage): a second cell excited by
//    a latch of the first, one response bit per excitation. It is the
//    cascade that was studied before the parallel array was preferred, and
//    is brought out on its own ports for comparison.
//
// The two share no signals. There is no clock and no state outside the
// latches of the cells. Every delay parameter is a simulation annotation
// that stands for one device's process variation; synthesis ignores them,
// and on a real FPGA the race in each cell only means anything if the two
// latches of a cell are placed and routed symmetrically. The combinational
// loops that tools report here are the butterfly cells' latch pairs; the
// unconnected q2, link and s1_out pins are observation outputs.
module puf_top #(
  parameter int unsigned ARRAY_BITS = bpuf_pkg::ARRAY_BITS,
  parameter int unsigned ARRAY_L1_PS [ARRAY_BITS] = '{default: bpuf_pkg::LATCH_SWITCH_PS},
  parameter int unsigned ARRAY_L2_PS [ARRAY_BITS] = '{default: bpuf_pkg::LATCH_SWITCH_PS},
  parameter int unsigned STAGES = bpuf_pkg::ABPUF_STAGES,
  parameter int unsigned ARC_P_PS [STAGES] = '{default: 0},
  parameter int unsigned ARC_S_PS [STAGES] = '{default: 0},
  parameter int unsigned ARC_Q_PS [STAGES] = '{default: 0},
  parameter int unsigned ARC_R_PS [STAGES] = '{default: 0},
  parameter int unsigned AB_L1_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned AB_L2_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned TS_TAP = 2,
  parameter int unsigned TS_S1_L1_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned TS_S1_L2_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned TS_S2_L1_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned TS_S2_L2_PS = bpuf_pkg::LATCH_SWITCH_PS
) (
  // Array8 butterfly PUF
  input  logic [ARRAY_BITS-1:0] excite,
  output logic [ARRAY_BITS-1:0] outt,
  // Hybrid arbiter-butterfly PUF
  input  logic                  ab_start,
  input  logic [STAGES-1:0]     ab_challenge,
  output logic                  ab_response,
  // Two-stage series butterfly PUF
  input  logic                  ts_excite,
  output logic                  ts_out
);
  timeunit 1ps;
  timeprecision 1ps;

  bpuf_array #(
    .N    (ARRAY_BITS),
    .L1_PS(ARRAY_L1_PS),
    .L2_PS(ARRAY_L2_PS)
  ) u_array (
    .excite(excite),
    .outt  (outt),
    .q2    ()
  );

  abpuf #(
    .STAGES      (STAGES),
    .ARC_P_PS    (ARC_P_PS),
    .ARC_S_PS    (ARC_S_PS),
    .ARC_Q_PS    (ARC_Q_PS),
    .ARC_R_PS    (ARC_R_PS),
    .L1_SWITCH_PS(AB_L1_PS),
    .L2_SWITCH_PS(AB_L2_PS)
  ) u_abpuf (
    .start    (ab_start),
    .challenge(ab_challenge),
    .response (ab_response),
    .q2       ()
  );

  bpuf_2stage #(
    .TAP     (TS_TAP),
    .S1_L1_PS(TS_S1_L1_PS),
    .S1_L2_PS(TS_S1_L2_PS),
    .S2_L1_PS(TS_S2_L1_PS),
    .S2_L2_PS(TS_S2_L2_PS)
  ) u_series (
    .excite(ts_excite),
    .out   (ts_out),
    .link  (),
    .s1_out()
  );

endmodule
