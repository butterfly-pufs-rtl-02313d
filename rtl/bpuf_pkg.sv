// bpuf_pkg: constants shared by the butterfly-PUF blocks.
//
// The array width and the arbiter chain length are the sizes of the main
// configurations: an 8-cell butterfly array and a 64-stage challenge chain in
// front of the hybrid arbiter-butterfly PUF. LATCH_SWITCH_PS is the time a
// latch takes to pass a new level to its output once its clear or preset is
// released (1.9 ns in the post-implementation timing of an Artix-7 latch);
// EXCITE_ROUTE_PS is the matched excite-to-clear/preset route of that layout
// (2.086 ns).
// The delay values are simulation annotations only; synthesis ignores them and
// the real race is decided by the silicon.
package bpuf_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Cells in the butterfly array (Array8).
  parameter int unsigned ARRAY_BITS = 8;

  // Challenge bits / switch stages in the arbiter chain of the hybrid PUF.
  parameter int unsigned ABPUF_STAGES = 64;

  // Nominal latch switching delay, picoseconds.
  parameter int unsigned LATCH_SWITCH_PS = 1900;

  // Nominal routing delay from the excite input to a latch's clear or
  // preset pin, picoseconds (matched for both latches of a cell).
  parameter int unsigned EXCITE_ROUTE_PS = 2086;

  // Outcome of one excitation of a butterfly cell, as seen by a test harness.
  typedef enum logic [1:0] {
    RESOLVED_0  = 2'd0,
    RESOLVED_1  = 2'd1,
    OSCILLATING = 2'd2
  } bpuf_outcome_e;

endpackage
