// bpuf_latch: level-sensitive D latch with asynchronous clear and preset,
// the LDCPE-style primitive that each half of a butterfly cell is mapped to.
//
// Function (clear has priority over preset, then the gate):
//   clr = 1               -> q = 0
//   clr = 0, pre = 1      -> q = 1
//   clr = 0, pre = 0, g & ge = 1 -> q follows d (transparent)
//   otherwise             -> q holds
// Clear, preset and gate are active high, as in the butterfly cell where the
// excite signal drives them directly.
//
// Timing: SWITCH_PS models the latch's switching delay, the time from a
// change of its function to a change of q. It is an inertial delay: a change
// that is undone within SWITCH_PS never reaches q. In a butterfly cell this
// delay decides which latch wins the race after excite falls, so a test can
// model one device's process variation by giving the two latches different
// values. SWITCH_PS = 0 gives a plain zero-delay latch. Synthesis ignores the
// delay. The 1.9 ns default is the switching time seen in the Artix-7
// post-implementation timing; clear-over-preset priority is this design's
// choice.
//
// Lint and synthesis note: inside a butterfly cell both gate inputs are tied
// to 1, so after constant propagation this block is no longer a storage
// element on its own (q = clr ? 0 : pre ? 1 : d) and tools report that no
// latch remains. That is expected: the cell's storage is the loop between
// its two latches. An FPGA build maps each instance onto the vendor's
// clear/preset latch primitive and keeps it (dont_touch on the instances).
module bpuf_latch #(
  parameter int unsigned SWITCH_PS = bpuf_pkg::LATCH_SWITCH_PS
) (
  input  logic d,    // data
  input  logic g,    // gate
  input  logic ge,   // gate enable
  input  logic clr,  // asynchronous clear, active high
  input  logic pre,  // asynchronous preset, active high
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q_lat;

  always_latch begin
    if (clr)          q_lat = 1'b0;
    else if (pre)     q_lat = 1'b1;
    else if (g && ge) q_lat = d;
  end

  generate
    if (SWITCH_PS == 0) begin : g_ideal
      assign q = q_lat;
    end else begin : g_delayed
      assign #(SWITCH_PS * 1ps) q = q_lat;
    end
  endgenerate

endmodule
