// tb_abpuf: self-checking test of the hybrid arbiter-butterfly PUF with the
// full 64-stage chain.
//
// One simulated device: per-stage arc delays drawn by a hash from 80..120 ps,
// latch 1 switching in 1.95 ns and latch 2 in 1.90 ns. For each challenge the
// test computes, independently of the design, when the falling edge of start
// reaches the two chain outputs:
//   c = 0: top' = top + P, bot' = bot + Q;   c = 1: top' = bot + S, bot' = top + R
// and from that the response: latch 1 finishes at t_top + dTb1, latch 2 at
// t_bot + dTb2; the earlier one wins (latch 1 -> 1, latch 2 -> 0). A tie
// swaps both latches at once; since the latch delays differ, the faster latch
// then copies the other first and the cell settles on that second round.
// Checked per challenge: unstable state while start is high, both chain
// arrival times, the response value and that the cell has settled.
`timescale 1ps/1ps
module tb_abpuf;
  localparam int unsigned STAGES = bpuf_pkg::ABPUF_STAGES;
  localparam int unsigned TB1 = 1950, TB2 = 1900;
  localparam int unsigned NCHAL = 200;
  typedef int unsigned delay_arr_t [STAGES];

  function automatic int unsigned mix(input int unsigned seed, input int unsigned i);
    int unsigned x;
    x = (seed * 32'h9E3779B1) ^ ((i + 1) * 32'h85EBCA6B);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  function automatic delay_arr_t gen(input int unsigned seed);
    delay_arr_t a;
    for (int i = 0; i < STAGES; i++) a[i] = 80 + mix(seed, i) % 41;
    return a;
  endfunction

  localparam delay_arr_t P = gen(11), S = gen(12), Q = gen(13), R = gen(14);

  logic              start, response, q2;
  logic [STAGES-1:0] challenge;
  int checks = 0, failures = 0;
  int n_case1 = 0, n_case2 = 0, n_tie = 0, resp_toggles;
  time t_top, t_bot;

  abpuf #(
    .STAGES(STAGES), .ARC_P_PS(P), .ARC_S_PS(S), .ARC_Q_PS(Q), .ARC_R_PS(R),
    .L1_SWITCH_PS(TB1), .L2_SWITCH_PS(TB2)
  ) u_dut (.start, .challenge, .response, .q2);

  always @(negedge u_dut.top[STAGES]) t_top = $time;
  always @(negedge u_dut.bot[STAGES]) t_bot = $time;
  always @(response) resp_toggles++;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(NCHAL * 100ns + 10us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    longint unsigned et, eb, nt, nb, fin1, fin2;
    start = 1;
    challenge = '0;
    for (int k = 0; k < NCHAL; k++) begin
      for (int w = 0; w < STAGES; w += 32) challenge[w +: 32] = $urandom;
      start = 1;
      #30ns;
      check(response, 0, "response 0 while start high");
      check(q2, 1, "latch 2 preset while start high");

      // Expected arrival times of the falling edge.
      et = 0; eb = 0;
      for (int i = 0; i < STAGES; i++) begin
        if (challenge[i]) begin nt = eb + S[i]; nb = et + R[i]; end
        else              begin nt = et + P[i]; nb = eb + Q[i]; end
        et = nt; eb = nb;
      end
      fin1 = et + TB1;
      fin2 = eb + TB2;

      t0 = $time;
      start = 0;
      #30ns;
      resp_toggles = 0;
      check(32'(t_top - t0), 32'(et), "top path arrival");
      check(32'(t_bot - t0), 32'(eb), "bottom path arrival");
      if (fin1 < fin2) begin
        n_case1++;
        check(response, 1, "latch 1 first -> 1");
        check(q2, 1, "settled: latch 2 agrees");
      end else if (fin1 > fin2) begin
        n_case2++;
        check(response, 0, "latch 2 first -> 0");
        check(q2, 0, "settled: latch 2 agrees");
      end else begin
        // Both latches swap at once; one switching delay later the faster
        // latch copies the other's new value first and so decides the bit.
        n_tie++;
        check(response, (TB2 < TB1) ? 1 : 0, "tie decided by the second round");
        check(q2, (TB2 < TB1) ? 1 : 0, "tie settled: latch 2 agrees");
      end
      #20ns;
      check(resp_toggles, 0, "settled response stays put");
    end
    $display("case dTb1 < dTa+dTb2: %0d, case dTb1 > dTa+dTb2: %0d, ties: %0d", n_case1, n_case2, n_tie);
    check(n_case1 > 0, 1, "case 1 occurred");
    check(n_case2 > 0, 1, "case 2 occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
