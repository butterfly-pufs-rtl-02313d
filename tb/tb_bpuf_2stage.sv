// tb_bpuf_2stage: self-checking test of the two-stage series butterfly PUF
// and of the switching-probability analysis built on it.
//
// Latch-2 tap (the default): four instances cover the four orders in which
// the stages can resolve (stage 1 latch 1 or latch 2 first, times stage 2
// latch 1 or latch 2 first). Each is checked against the behaviour worked
// out from the wiring: out = 0 while excited; after release out = 0 when
// stage 1's latch 1 wins, otherwise stage 2's winner decides.
// The four outcomes are then weighted with per-latch "switches first"
// percentages, and P(out = 0) must match the analysis:
//   stage 1 60/40, stage 2 40/60 -> 84 %, and the five tabulated cases
//   40/60,60/40 -> 64 %; 10/90,50/50 -> 55 %; 90/10,50/50 -> 95 %;
//   10/90,60/40 -> 46 %; 10/90,40/60 -> 64 %.
// Latch-1 tap: two instances check that stage 2 is excited only when stage 1
// settles to 1, and resolves on the next rising edge of excite.
`timescale 1ps/1ps
module tb_bpuf_2stage;
  localparam int unsigned F = 1800, S = 2000;

  logic excite;
  // outs[a][b]: a = 1 if stage 1 latch 1 is faster, b = 1 if stage 2 latch 1 is faster.
  logic outs [2][2];
  logic links [2][2];
  logic s1s [2][2];
  logic t1_out [2], t1_link [2], t1_s1 [2];
  int checks = 0, failures = 0;

  for (genvar a = 0; a < 2; a++) begin : g_s1
    for (genvar b = 0; b < 2; b++) begin : g_s2
      bpuf_2stage #(
        .TAP(2),
        .S1_L1_PS(a ? F : S), .S1_L2_PS(a ? S : F),
        .S2_L1_PS(b ? F : S), .S2_L2_PS(b ? S : F)
      ) u_dut (.excite, .out(outs[a][b]), .link(links[a][b]), .s1_out(s1s[a][b]));
    end
    // Latch-1 tap: stage 1 order a, stage 2 latch 1 faster.
    bpuf_2stage #(
      .TAP(1),
      .S1_L1_PS(a ? F : S), .S1_L2_PS(a ? S : F),
      .S2_L1_PS(F), .S2_L2_PS(S)
    ) u_tap1 (.excite, .out(t1_out[a]), .link(t1_link[a]), .s1_out(t1_s1[a]));
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // P(out = 0) in percent from the simulated outcomes.
  function automatic int unsigned p_zero(input int unsigned p1, input int unsigned p3);
    int unsigned acc = 0;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        if (outs[a][b] == 0)
          acc += (a ? p1 : 100 - p1) * (b ? p3 : 100 - p3);
    return acc / 100;
  endfunction

  initial begin : watchdog
    #20us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    excite = 1;
    #150ns;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        check(outs[a][b], 0, "out 0 while excited");
        check(links[a][b], 1, "link held high by stage-1 preset");
      end
    excite = 0;
    #150ns;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        check(s1s[a][b], a, "stage 1 resolves by its faster latch");
        check(links[a][b], a, "link equals stage 1's settled value");
        check(outs[a][b], a ? 0 : b, "stage 2 result");
      end

    // Switching-probability analysis: percent that latch 1 of each stage
    // switches first.
    check(p_zero(60, 40), 84, "60/40 then 40/60 -> 84 % zeros");
    check(p_zero(40, 60), 64, "case 1 -> 64 % zeros");
    check(p_zero(10, 50), 55, "case 2 -> 55 % zeros");
    check(p_zero(90, 50), 95, "case 3 -> 95 % zeros");
    check(p_zero(10, 60), 46, "case 4 -> 46 % zeros");
    check(p_zero(10, 40), 64, "case 5 -> 64 % zeros");

    // Latch-1 tap. After the first release: stage 1 = a; a = 1 excites
    // stage 2 (out 0), a = 0 leaves stage 2 as it was.
    check(t1_s1[1], 1, "tap 1: stage 1 latch 1 faster -> 1");
    check(t1_link[1], 1, "tap 1: link follows stage 1");
    check(t1_out[1], 0, "tap 1: stage 2 excited -> 0");
    check(t1_s1[0], 0, "tap 1: stage 1 latch 2 faster -> 0");
    check(t1_link[0], 0, "tap 1: link stays low");
    // Next rising edge of excite: stage 1 is cleared, the link of instance 1
    // falls and stage 2 resolves (latch 1 faster -> 1) while excite is high.
    excite = 1;
    #150ns;
    check(t1_link[1], 0, "tap 1: link falls when stage 1 is cleared");
    check(t1_out[1], 1, "tap 1: stage 2 resolves on the link's fall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
