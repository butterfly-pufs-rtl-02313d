// tb_puf_top_full: puf_top with every parameter at its default.
//
// At the defaults the design models an ideal device: every latch switches in
// exactly 1.9 ns and every chain arc is delay-free, so nothing breaks the
// symmetry of any butterfly pair. The expected behaviour is the one a
// variation-free timing simulation shows:
//   * excite / start high: every response bit is 0 (unstable mode);
//   * after release: both latches of every cell swap at the same instant and
//     keep swapping, one toggle every 1.9 ns, for as long as the input stays
//     low; no cell settles. Array cells start one excite-route delay
//     (2.086 ns) after the fall, the hybrid's cell right at the chain output;
//   * the series PUF's second stage is never released: the 1.9 ns pulses of
//     the oscillating first stage are shorter than its excite route.
// One complete operation (excite high, release, observe) is run on the
// array and, for several challenges, on the hybrid PUF.
`timescale 1ps/1ps
module tb_puf_top_full;
  import bpuf_pkg::*;

  localparam int unsigned NB = ARRAY_BITS;
  localparam int unsigned NS = ABPUF_STAGES;
  localparam time HALF = 150ns;

  logic [NB-1:0] excite, outt;
  logic          ab_start, ab_response;
  logic          ts_excite, ts_out;
  int            ts_toggles;
  logic [NS-1:0] challenge;

  puf_top u_dut (.excite, .outt, .ab_start, .ab_challenge(challenge), .ab_response,
                 .ts_excite, .ts_out);

  always @(ts_out) ts_toggles++;

  int checks = 0, failures = 0;
  int n_unstable = 0, n_osc = 0;
  int toggles [NB+1];
  time last_edge [NB+1];
  bit period_ok [NB+1];

  for (genvar i = 0; i <= NB; i++) begin : g_mon
    logic bit_i;
    if (i < NB) begin : g_arr
      assign bit_i = outt[i];
    end else begin : g_ab
      assign bit_i = ab_response;
    end
    always @(bit_i) begin
      if ((i < NB && !excite[i % NB]) || (i == NB && !ab_start)) begin
        if (toggles[i] > 0 && ($time - last_edge[i]) != LATCH_SWITCH_PS) period_ok[i] = 0;
        toggles[i]++;
        last_edge[i] = $time;
      end
    end
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic clear_monitors();
    for (int i = 0; i <= NB; i++) begin
      toggles[i] = 0;
      period_ok[i] = 1;
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ab_start = 1;
    challenge = '0;
    excite = '1;
    ts_excite = 1;
    clear_monitors();

    // Array: one excitation.
    #HALF;
    check(outt, '0, "array unstable: all zeros");
    if (outt == '0) n_unstable++;
    clear_monitors();
    excite = '0;
    #HALF;
    for (int i = 0; i < NB; i++) begin
      check(toggles[i], (HALF - EXCITE_ROUTE_PS) / LATCH_SWITCH_PS, $sformatf("cell %0d toggle count", i));
      check(period_ok[i], 1, $sformatf("cell %0d toggles every switching delay", i));
      if (toggles[i] > 0) n_osc++;
    end
    excite = '1;
    #HALF;
    check(outt, '0, "array unstable again");

    // Series PUF: stage 1 oscillates once released, so its latch 2 pulses
    // for one switching delay at a time. The excite route of stage 2 is
    // longer than such a pulse and filters it, so stage 2 stays held.
    check(ts_out, 0, "series unstable while excited");
    ts_toggles = 0;
    ts_excite = 0;
    #HALF;
    check(ts_toggles, 0, "series: stage 2 held while stage 1 oscillates");
    check(ts_out, 0, "series response 0");
    ts_excite = 1;
    #HALF;

    // Hybrid PUF: a few challenges, each one excitation.
    for (int k = 0; k < 4; k++) begin
      for (int w = 0; w < NS; w += 32) challenge[w +: 32] = $urandom;
      ab_start = 1;
      #HALF;
      check(ab_response, 0, "hybrid unstable while start high");
      if (ab_response == 0) n_unstable++;
      clear_monitors();
      ab_start = 0;
      #HALF;
      check(toggles[NB], HALF / LATCH_SWITCH_PS, "hybrid toggle count");
      check(period_ok[NB], 1, "hybrid toggles every switching delay");
      if (toggles[NB] > 0) n_osc++;
    end

    $display("mechanisms: unstable=%0d oscillation=%0d", n_unstable, n_osc);
    check(n_unstable > 0, 1, "unstable mode happened");
    check(n_osc > 0, 1, "oscillation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
