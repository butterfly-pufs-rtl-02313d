// tb_puf_top: end-to-end test of both PUFs on two simulated devices.
//
// Board A and board B are two puf_top instances at the default sizes (8
// array cells, 64 chain stages) whose delay parameters differ, as two
// FPGAs of one model would. On board A, array cell 7 has perfectly matched
// latches. The test:
//   1. excites the whole array 20 times on each board, checks the unstable
//      state (all zeros), the predicted response word after release, the
//      within-board Hamming distance (must be 0) and the between-board
//      distance (must be above 0); cell 7 of board A must keep oscillating;
//   2. applies 100 random challenges to the hybrid PUF of both boards and
//      checks each response against the arrival-time prediction;
//   3. excites the two-stage series PUF with the array (20 times): on board
//      A stage 1's latch 2 is faster, so stage 2 is released and its own
//      race gives 1; on board B stage 1's latch 1 is faster, so stage 2 stays
//      held and the response is 0.
// Every mechanism is counted: unstable mode, cells resolving to 1 and to 0,
// a cell oscillating, both hybrid race cases, a challenge changing the
// hybrid response, the series PUF's second stage released and held, and the two boards disagreeing. One that never happens is
// a failure.
`timescale 1ps/1ps
module tb_puf_top;
  import tb_puf_pkg::*;
  import bpuf_pkg::*;

  localparam int unsigned NB = ARRAY_BITS;
  localparam int unsigned NS = ABPUF_STAGES;
  localparam int unsigned REPS = 20, NCHAL = 100;
  typedef int unsigned arr_nb_t [NB];
  typedef int unsigned arr_ns_t [NS];

  function automatic arr_nb_t latch_delays(input int unsigned seed);
    arr_nb_t a;
    for (int i = 0; i < NB; i++) a[i] = 1800 + mix(seed, i) % 200;
    return a;
  endfunction

  function automatic arr_nb_t tie_last(input arr_nb_t a, input arr_nb_t b);
    arr_nb_t r = a;
    for (int i = 0; i < NB; i++) if (r[i] == b[i]) r[i] = r[i] + 3;
    r[NB-1] = b[NB-1];
    return r;
  endfunction

  function automatic arr_nb_t no_tie(input arr_nb_t a, input arr_nb_t b);
    arr_nb_t r = a;
    for (int i = 0; i < NB; i++) if (r[i] == b[i]) r[i] = r[i] + 3;
    return r;
  endfunction

  function automatic arr_ns_t arcs(input int unsigned seed);
    arr_ns_t a;
    for (int i = 0; i < NS; i++) a[i] = 80 + mix(seed, i) % 41;
    return a;
  endfunction

  localparam arr_nb_t A_L2 = latch_delays(21);
  localparam arr_nb_t A_L1 = tie_last(latch_delays(22), A_L2);
  localparam arr_nb_t B_L2 = latch_delays(31);
  localparam arr_nb_t B_L1 = no_tie(latch_delays(32), B_L2);
  localparam arr_ns_t A_P = arcs(41), A_S = arcs(42), A_Q = arcs(43), A_R = arcs(44);
  localparam arr_ns_t B_P = arcs(51), B_S = arcs(52), B_Q = arcs(53), B_R = arcs(54);
  localparam int unsigned A_TB1 = 1950, A_TB2 = 1900, B_TB1 = 1880, B_TB2 = 1930;
  // Series PUF latch delays: stage 1 latch 1/2, stage 2 latch 1/2.
  localparam int unsigned A_TS [4] = '{1950, 1850, 1850, 1950};
  localparam int unsigned B_TS [4] = '{1850, 1950, 1950, 1850};

  logic [NB-1:0] excite, outt_a, outt_b;
  logic          ab_start, resp_a, resp_b;
  logic          ts_excite, ts_a, ts_b;
  logic [NS-1:0] challenge;

  puf_top #(
    .ARRAY_L1_PS(A_L1), .ARRAY_L2_PS(A_L2),
    .ARC_P_PS(A_P), .ARC_S_PS(A_S), .ARC_Q_PS(A_Q), .ARC_R_PS(A_R),
    .AB_L1_PS(A_TB1), .AB_L2_PS(A_TB2),
    .TS_S1_L1_PS(A_TS[0]), .TS_S1_L2_PS(A_TS[1]), .TS_S2_L1_PS(A_TS[2]), .TS_S2_L2_PS(A_TS[3])
  ) u_board_a (
    .excite, .outt(outt_a), .ab_start, .ab_challenge(challenge), .ab_response(resp_a),
    .ts_excite, .ts_out(ts_a)
  );

  puf_top #(
    .ARRAY_L1_PS(B_L1), .ARRAY_L2_PS(B_L2),
    .ARC_P_PS(B_P), .ARC_S_PS(B_S), .ARC_Q_PS(B_Q), .ARC_R_PS(B_R),
    .AB_L1_PS(B_TB1), .AB_L2_PS(B_TB2),
    .TS_S1_L1_PS(B_TS[0]), .TS_S1_L2_PS(B_TS[1]), .TS_S2_L1_PS(B_TS[2]), .TS_S2_L2_PS(B_TS[3])
  ) u_board_b (
    .excite, .outt(outt_b), .ab_start, .ab_challenge(challenge), .ab_response(resp_b),
    .ts_excite, .ts_out(ts_b)
  );

  int checks = 0, failures = 0;
  int n_unstable = 0, n_res1 = 0, n_res0 = 0, n_osc = 0;
  int n_ab1 = 0, n_ab0 = 0, n_ab_challenge = 0, n_boards_differ = 0;
  int n_ts_released = 0, n_ts_held = 0;
  int osc_toggles;

  always @(outt_a[NB-1]) if (excite == '0) osc_toggles++;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Predicted outcome of array cell i for given latch delays.
  function automatic bpuf_outcome_e cell_outcome(input int unsigned l1, input int unsigned l2);
    return race(l1, l2, l1, l2);
  endfunction

  function automatic bpuf_outcome_e ab_outcome(input logic [NS-1:0] c, input arr_ns_t p,
                                               input arr_ns_t s, input arr_ns_t q,
                                               input arr_ns_t r, input int unsigned tb1,
                                               input int unsigned tb2);
    longint unsigned et = 0, eb = 0, nt, nb;
    for (int i = 0; i < NS; i++) begin
      if (c[i]) begin nt = eb + s[i]; nb = et + r[i]; end
      else      begin nt = et + p[i]; nb = eb + q[i]; end
      et = nt; eb = nb;
    end
    return race(et + tb1, eb + tb2, tb1, tb2);
  endfunction

  initial begin : watchdog
    #((2 * REPS + 2 * NCHAL) * 100ns + 10us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] exp_a, exp_b, mask_a, first_a, first_b;
    bpuf_outcome_e oa, ob;
    bit seen1, seen0;

    // Predicted array responses; mask out cells that never settle.
    for (int i = 0; i < NB; i++) begin
      oa = cell_outcome(A_L1[i], A_L2[i]);
      ob = cell_outcome(B_L1[i], B_L2[i]);
      exp_a[i]  = (oa == RESOLVED_1);
      exp_b[i]  = (ob == RESOLVED_1);
      mask_a[i] = (oa != OSCILLATING);
      check(ob != OSCILLATING, 1, "board B has no matched cell");
    end
    check(mask_a[NB-1], 0, "board A cell 7 is the matched cell");
    $display("board A expected %b (mask %b), board B expected %b", exp_a, mask_a, exp_b);

    // 1. Array: repeated excitation on both boards.
    ab_start = 1;
    challenge = '0;
    for (int rep = 0; rep < REPS; rep++) begin
      excite = '1;
      ts_excite = 1;
      #150ns;
      check(ts_a, 0, "series A unstable: 0");
      check(ts_b, 0, "series B unstable: 0");
      check(outt_a, '0, "board A unstable: all zeros");
      check(outt_b, '0, "board B unstable: all zeros");
      if (outt_a == '0 && outt_b == '0) n_unstable++;
      excite = '0;
      ts_excite = 0;
      #100ns;
      osc_toggles = 0;
      #50ns;
      check(outt_a & mask_a, exp_a & mask_a, "board A response word");
      check(outt_b, exp_b, "board B response word");
      check(osc_toggles >= 20, 1, "board A matched cell oscillates");
      check(ts_a, 1, "series A: stage 2 released, its latch 1 wins");
      check(ts_b, 0, "series B: stage 2 held");
      if (ts_a == 1) n_ts_released++;
      if (ts_b == 0) n_ts_held++;
      if (osc_toggles >= 20) n_osc++;
      n_res1 += $countones(outt_b) + $countones(outt_a & mask_a);
      n_res0 += $countones(~outt_b) + $countones(~outt_a & mask_a);
      if (rep == 0) begin
        first_a = outt_a & mask_a;
        first_b = outt_b;
      end
      check(hamming(64'(outt_a & mask_a), 64'(first_a)), 0, "within-class distance, board A");
      check(hamming(64'(outt_b), 64'(first_b)), 0, "within-class distance, board B");
      if (hamming(64'(outt_a & mask_a), 64'(outt_b & mask_a)) > 0) n_boards_differ++;
    end
    $display("between-class distance (settled cells): %0d", hamming(64'(first_a), 64'(first_b & mask_a)));

    // 2. Hybrid PUF: random challenges on both boards.
    seen1 = 0; seen0 = 0;
    for (int k = 0; k < NCHAL; k++) begin
      for (int w = 0; w < NS; w += 32) challenge[w +: 32] = $urandom;
      ab_start = 1;
      #30ns;
      check(resp_a, 0, "hybrid A unstable while start high");
      check(resp_b, 0, "hybrid B unstable while start high");
      ab_start = 0;
      #40ns;
      oa = ab_outcome(challenge, A_P, A_S, A_Q, A_R, A_TB1, A_TB2);
      ob = ab_outcome(challenge, B_P, B_S, B_Q, B_R, B_TB1, B_TB2);
      check(resp_a, oa == RESOLVED_1, "hybrid A response");
      check(resp_b, ob == RESOLVED_1, "hybrid B response");
      if (oa == RESOLVED_1) begin n_ab1++; seen1 = 1; end else begin n_ab0++; seen0 = 1; end
      if (ob == RESOLVED_1) n_ab1++; else n_ab0++;
      if (resp_a != resp_b) n_boards_differ++;
    end
    if (seen1 && seen0) n_ab_challenge++;

    $display("mechanisms: unstable=%0d resolve1=%0d resolve0=%0d oscillation=%0d hybrid1=%0d hybrid0=%0d challenge_dependent=%0d boards_differ=%0d",
             n_unstable, n_res1, n_res0, n_osc, n_ab1, n_ab0, n_ab_challenge, n_boards_differ);
    $display("mechanisms: series_stage2_released=%0d series_stage2_held=%0d", n_ts_released, n_ts_held);
    check(n_unstable > 0, 1, "unstable mode happened");
    check(n_res1 > 0, 1, "a cell resolved to 1");
    check(n_res0 > 0, 1, "a cell resolved to 0");
    check(n_osc > 0, 1, "a matched cell oscillated");
    check(n_ab1 > 0, 1, "hybrid case latch 1 first happened");
    check(n_ab0 > 0, 1, "hybrid case latch 2 first happened");
    check(n_ab_challenge > 0, 1, "challenge changed the hybrid response");
    check(n_boards_differ > 0, 1, "boards gave different responses");
    check(n_ts_released > 0, 1, "series PUF released its second stage");
    check(n_ts_held > 0, 1, "series PUF held its second stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
