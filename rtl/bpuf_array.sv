// bpuf_array: N independent butterfly cells side by side (Array8 at N = 8).
//
// Bit i of the excite vector drives cell i, and cell i's latch-1 output is
// bit i of the response. The cells share nothing, so the N-bit response is
// simply N single-bit responses read together: all zeros while excite is
// high, and a device-specific word once excite has fallen and every cell has
// settled. Driving every excite bit from one pin gives the single-EXCITE
// arrangement of the published 8- and 4-bit implementations; keeping a vector
// lets a caller excite cells one at a time.
//
// Parameters: N cells; L1_PS[i] / L2_PS[i] are the switching delays of
// cell i's two latches and EXC_PS[i] the routing delay from excite to both
// force pins of cell i (simulation only). Cells may see excite at different
// times (different logic blocks), but within a cell the two routes are
// matched. Equal latch delays everywhere, the default, model an ideal device
// without process variation.
// Interface: excite[N-1:0] in, outt[N-1:0] out (response), q2[N-1:0] out
// (latch-2 side of each cell, for observation). No clock.
module bpuf_array #(
  parameter int unsigned N = bpuf_pkg::ARRAY_BITS,
  parameter int unsigned L1_PS [N] = '{default: bpuf_pkg::LATCH_SWITCH_PS},
  parameter int unsigned L2_PS [N] = '{default: bpuf_pkg::LATCH_SWITCH_PS},
  parameter int unsigned EXC_PS [N] = '{default: bpuf_pkg::EXCITE_ROUTE_PS}
) (
  input  logic [N-1:0] excite,
  output logic [N-1:0] outt,
  output logic [N-1:0] q2
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar i = 0; i < N; i++) begin : g_cell
    bpuf_cell #(
      .L1_SWITCH_PS(L1_PS[i]),
      .L2_SWITCH_PS(L2_PS[i]),
      .EXC_CLR_PS  (EXC_PS[i]),
      .EXC_PRE_PS  (EXC_PS[i])
    ) u_cell (
      .excite(excite[i]),
      .out   (outt[i]),
      .q2    (q2[i])
    );
  end

endmodule
