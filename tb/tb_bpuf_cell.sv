// tb_bpuf_cell: self-checking test of one butterfly cell under the
// excite pattern of the single-cell experiment: 100 samples alternating
// 1, 0, 1, 0 ..., each held for 150 ns.
//
// Four cells model four devices: latch 1 faster (u_fast1), latch 2 faster
// (u_fast2), perfectly matched latches (u_tie), and matched latches whose
// excite routes differ by 86 ps (u_skew). Expected behaviour, worked out
// from the cross-coupled structure:
//   excite high: out = 0 and q2 = 1 in every cell (unstable mode);
//   excite low:  u_fast1 settles to out = q2 = 1 exactly route + T1 after
//                the fall, u_fast2 settles to out = q2 = 0, u_tie never
//                settles (out toggles every T = 1.9 ns for the whole low
//                phase), and u_skew settles to 1 because the earlier clear
//                release lets latch 1 finish first: a static skew decides.
`timescale 1ps/1ps
module tb_bpuf_cell;
  localparam int unsigned T_FAST = 1800, T_SLOW = 2000, T_TIE = bpuf_pkg::LATCH_SWITCH_PS;
  localparam int unsigned SAMPLES = 100;
  localparam time HALF = 150ns;

  logic excite;
  logic o_f1, q_f1, o_f2, q_f2, o_t, q_t, o_s, q_s;
  localparam int unsigned ROUTE = bpuf_pkg::EXCITE_ROUTE_PS;
  int checks = 0, failures = 0;
  int tie_toggles, f1_toggles, f2_toggles;
  time last_tie_edge, tie_period;
  bit period_ok;

  bpuf_cell #(.L1_SWITCH_PS(T_FAST), .L2_SWITCH_PS(T_SLOW)) u_fast1 (.excite, .out(o_f1), .q2(q_f1));
  bpuf_cell #(.L1_SWITCH_PS(T_SLOW), .L2_SWITCH_PS(T_FAST)) u_fast2 (.excite, .out(o_f2), .q2(q_f2));
  bpuf_cell u_tie (.excite, .out(o_t), .q2(q_t));
  bpuf_cell #(.EXC_CLR_PS(2000), .EXC_PRE_PS(2086)) u_skew (.excite, .out(o_s), .q2(q_s));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  always @(o_t) begin
    if (!excite) begin
      tie_toggles++;
      if (tie_toggles > 1 && ($time - last_tie_edge) != T_TIE) period_ok = 0;
      last_tie_edge = $time;
    end
  end
  always @(o_f1) if (!excite) f1_toggles++;
  always @(o_f2) if (!excite) f2_toggles++;

  initial begin : watchdog
    #(2 * SAMPLES * HALF + 10us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_fall;
    excite = 1;
    for (int s = 0; s < SAMPLES; s++) begin
      excite = (s % 2 == 0);
      if (excite) begin
        #(HALF);
        check(o_f1, 0, "fast1 out=0 while excited");
        check(q_f1, 1, "fast1 q2=1 while excited");
        check(o_f2, 0, "fast2 out=0 while excited");
        check(q_f2, 1, "fast2 q2=1 while excited");
        check(o_t,  0, "tie out=0 while excited");
        check(q_t,  1, "tie q2=1 while excited");
        check(o_s,  0, "skew out=0 while excited");
      end else begin
        t_fall = $time;
        tie_toggles = 0; f1_toggles = 0; f2_toggles = 0; period_ok = 1;
        // Latch 1 of u_fast1 finishes switching exactly route + T_FAST after
        // the fall.
        #(ROUTE + T_FAST - 1);
        check(o_f1, 0, "fast1 out still 0 just before T1");
        #2;
        check(o_f1, 1, "fast1 out=1 just after T1");
        #(HALF - ROUTE - T_FAST - 1);
        check(o_f1, 1, "fast1 resolved to 1");
        check(q_f1, 1, "fast1 latch2 agrees");
        check(f1_toggles, 1, "fast1 switched once");
        check(o_f2, 0, "fast2 resolved to 0");
        check(q_f2, 0, "fast2 latch2 agrees");
        check(f2_toggles, 0, "fast2 out never rose");
        // Matched latches: one toggle per T_TIE for the whole low phase.
        check(tie_toggles, (HALF - ROUTE) / T_TIE, "tie oscillation count");
        check(o_s, 1, "skewed routes: earlier clear release wins");
        check(q_s, 1, "skewed routes: latch2 agrees");
        check(period_ok, 1, "tie oscillation period equals switching delay");
        check($time - t_fall, HALF, "sample length");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
