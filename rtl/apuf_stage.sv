// apuf_stage: one switch stage of an arbiter-PUF delay chain.
//
// Two signals enter (top_i, bot_i) and two leave. With challenge bit c = 0 the
// stage passes them straight through; with c = 1 it swaps them. It is built
// from two levels of NAND gates as in the symmetric single-stage circuit:
//   p = ~(~c & top)   s = ~(c & bot)   top_o = ~(p & s)
//   q = ~(~c & bot)   r = ~(c & top)   bot_o = ~(q & r)
// so top_o = c ? bot : top and bot_o = c ? top : bot. The pair (p, q) is used
// when c = 0 and the pair (s, r) when c = 1.
//
// Timing (simulation only): each of the four timing arcs has its own delay,
// placed on its first-level NAND (P_PS, S_PS, Q_PS, R_PS). An edge entering on
// top leaves on top after P_PS (c = 0) or on bot after R_PS (c = 1); an edge
// entering on bot leaves on bot after Q_PS or on top after S_PS. Process
// variation between these arcs is what the chain accumulates. The gate
// structure follows the published stage; the per-arc delay parameters and
// their zero default (ideal, symmetric stage) are this design's choice.
module apuf_stage #(
  parameter int unsigned P_PS = 0,
  parameter int unsigned S_PS = 0,
  parameter int unsigned Q_PS = 0,
  parameter int unsigned R_PS = 0
) (
  input  logic c,
  input  logic top_i,
  input  logic bot_i,
  output logic top_o,
  output logic bot_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic p, s, q, r;

  // First-level NANDs, each carrying its arc's delay (none when zero).
  logic p_n, s_n, q_n, r_n;

  assign p_n = ~(~c & top_i);
  assign s_n = ~( c & bot_i);
  assign q_n = ~(~c & bot_i);
  assign r_n = ~( c & top_i);

  wire_delay #(.DELAY_PS(P_PS)) u_dly_p (.a(p_n), .y(p));
  wire_delay #(.DELAY_PS(S_PS)) u_dly_s (.a(s_n), .y(s));
  wire_delay #(.DELAY_PS(Q_PS)) u_dly_q (.a(q_n), .y(q));
  wire_delay #(.DELAY_PS(R_PS)) u_dly_r (.a(r_n), .y(r));

  assign top_o = ~(p & s);
  assign bot_o = ~(q & r);

endmodule
