// bpuf_cell: one butterfly PUF cell, two cross-coupled D latches.
//
// Latch 1 takes latch 2's output as data and has its clear on excite and its
// preset tied low; latch 2 takes latch 1's output as data and has its preset
// on excite and its clear tied low. Both gates are held open, so the latches
// are transparent whenever they are not forced.
//
//   excite = 1 (unstable mode): latch 1 is cleared (out = 0), latch 2 is
//     preset (q2 = 1). Each latch holds the opposite of its data input.
//   excite 1 -> 0 (stable mode): both forces release and each latch starts
//     to copy the other's old value. The latch that finishes switching first
//     decides the result: latch 1 first gives out = 1, latch 2 first gives
//     out = 0. Latch 1 finishes at EXC_CLR_PS + L1_SWITCH_PS after the fall,
//     latch 2 at EXC_PRE_PS + L2_SWITCH_PS. When both finish at the same
//     instant they swap together and keep toggling for as long as excite
//     stays low.
//
// Interface: excite in, out = latch 1 output (the response bit), q2 = latch 2
// output. There is no clock.
// Parameters (simulation only, see bpuf_latch and wire_delay):
//   L1_SWITCH_PS / L2_SWITCH_PS  latch switching delays, 1.9 ns each;
//   EXC_CLR_PS / EXC_PRE_PS      routing delay from excite to latch 1's clear
//                                and to latch 2's preset, 2.086 ns each (the
//                                matched routes of the reference layout).
// Equal defaults are the ideal, variation-free case. A difference between
// the two routes is a static skew: it decides the bit the same way on every
// chip, which is why the routes must be matched. The wiring and the default
// delays follow the published cell; exposing q2 is this design's choice.
//
// The combinational loop through the two latches is the circuit itself, not
// an error: lint and synthesis report it, and an FPGA flow must be told to
// allow it. The latch instances carry dont_touch so that they are kept as
// latch primitives.
module bpuf_cell #(
  parameter int unsigned L1_SWITCH_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned L2_SWITCH_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned EXC_CLR_PS   = bpuf_pkg::EXCITE_ROUTE_PS,
  parameter int unsigned EXC_PRE_PS   = bpuf_pkg::EXCITE_ROUTE_PS
) (
  input  logic excite,
  output logic out,
  output logic q2
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q1;
  logic clr1, pre2;   // excite as it arrives at the two force pins

  wire_delay #(.DELAY_PS(EXC_CLR_PS)) u_route_clr (.a(excite), .y(clr1));
  wire_delay #(.DELAY_PS(EXC_PRE_PS)) u_route_pre (.a(excite), .y(pre2));

  (* dont_touch = "true" *)
  bpuf_latch #(.SWITCH_PS(L1_SWITCH_PS)) u_latch1 (
    .d(q2), .g(1'b1), .ge(1'b1), .clr(clr1), .pre(1'b0), .q(q1)
  );

  (* dont_touch = "true" *)
  bpuf_latch #(.SWITCH_PS(L2_SWITCH_PS)) u_latch2 (
    .d(q1), .g(1'b1), .ge(1'b1), .clr(1'b0), .pre(pre2), .q(q2)
  );

  assign out = q1;

endmodule
