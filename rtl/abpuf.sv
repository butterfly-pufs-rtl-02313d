// abpuf: hybrid arbiter-butterfly PUF. A challenge-programmed delay chain
// (the front half of an arbiter PUF) feeds a butterfly cell that replaces
// the arbiter.
//
// How it works: `start` is split into two paths that run through STAGES
// apuf_stage switches; challenge bit i straightens (0) or crosses (1) the
// two paths at stage i. The chain's top output drives the clear of latch 1
// and its bottom output the preset of latch 2 of a butterfly pair whose
// latch-1 preset and latch-2 clear are tied inactive. While start is high,
// both forces are on and the pair sits in its unstable state (response 0).
// When start falls, the falling edge reaches latch 1 and latch 2 at times
// that differ by the chain's challenge-dependent skew dTa, and each latch
// then needs its own switching time dTb1 / dTb2. Latch 1 finishing first
// gives response 1; latch 2 finishing first gives 0. So the response is a
// function of the challenge and of the device's delays, which gives the
// butterfly cell a challenge-response space.
//
// Interface: start in, challenge[STAGES-1:0] in (bit 0 is the stage nearest
// start), response out (latch 1), q2 out (latch 2). No clock: a caller holds
// the challenge steady, raises start, waits for the chain, lowers start and
// reads response once the cell has settled.
//
// Parameters: STAGES (64, the chain length of the reference arbiter PUF);
// per-stage arc delays ARC_P_PS .. ARC_R_PS (see apuf_stage) and the two
// latch switching delays, all simulation-only. Clear/preset are active high
// here, as in the single-cell design; the polarity, the 64-stage default and
// the delay parameters are this design's choices.
//
// As in bpuf_cell, the loop through the two latches is intended and is
// reported by lint and synthesis as a combinational loop.
module abpuf #(
  parameter int unsigned STAGES = bpuf_pkg::ABPUF_STAGES,
  parameter int unsigned ARC_P_PS [STAGES] = '{default: 0},
  parameter int unsigned ARC_S_PS [STAGES] = '{default: 0},
  parameter int unsigned ARC_Q_PS [STAGES] = '{default: 0},
  parameter int unsigned ARC_R_PS [STAGES] = '{default: 0},
  parameter int unsigned L1_SWITCH_PS = bpuf_pkg::LATCH_SWITCH_PS,
  parameter int unsigned L2_SWITCH_PS = bpuf_pkg::LATCH_SWITCH_PS
) (
  input  logic              start,
  input  logic [STAGES-1:0] challenge,
  output logic              response,
  output logic              q2
);
  timeunit 1ps;
  timeprecision 1ps;

  // top[i] / bot[i]: the two race paths entering stage i.
  logic [STAGES:0] top, bot;
  logic            q1;

  assign top[0] = start;
  assign bot[0] = start;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    apuf_stage #(
      .P_PS(ARC_P_PS[i]),
      .S_PS(ARC_S_PS[i]),
      .Q_PS(ARC_Q_PS[i]),
      .R_PS(ARC_R_PS[i])
    ) u_stage (
      .c    (challenge[i]),
      .top_i(top[i]),
      .bot_i(bot[i]),
      .top_o(top[i+1]),
      .bot_o(bot[i+1])
    );
  end

  // Butterfly pair: top path clears latch 1, bottom path presets latch 2.
  (* dont_touch = "true" *)
  bpuf_latch #(.SWITCH_PS(L1_SWITCH_PS)) u_latch1 (
    .d(q2), .g(1'b1), .ge(1'b1), .clr(top[STAGES]), .pre(1'b0), .q(q1)
  );

  (* dont_touch = "true" *)
  bpuf_latch #(.SWITCH_PS(L2_SWITCH_PS)) u_latch2 (
    .d(q1), .g(1'b1), .ge(1'b1), .clr(1'b0), .pre(bot[STAGES]), .q(q2)
  );

  assign response = q1;

endmodule
