// wire_delay: inertial wire delay used to annotate one timing arc or route.
//
// y follows a after DELAY_PS picoseconds; a change of a that is undone
// sooner never reaches y. DELAY_PS = 0 is a plain wire. Synthesis ignores the
// delay, so in hardware this is a wire and the arc's delay is whatever the
// placed and routed gate and net give. Used by apuf_stage for its four
// first-level NAND arcs and by bpuf_cell for the excite routes to the clear
// and preset pins.
module wire_delay #(
  parameter int unsigned DELAY_PS = 0
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  generate
    if (DELAY_PS == 0) begin : g_wire
      assign y = a;
    end else begin : g_delay
      assign #(DELAY_PS * 1ps) y = a;
    end
  endgenerate

endmodule
