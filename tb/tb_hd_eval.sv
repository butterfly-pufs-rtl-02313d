// tb_hd_eval: the 4-bit Hamming-distance evaluation run on two simulated
// boards.
//
// A 4-cell array is excited from one EXCITE input (1 -> 0) fifty times on
// each board. Board 1's latch delays make every cell settle to 1 (response
// 1111); on board 2, cell 1 has the faster latch 2 (response 1101).
//   * within-class: every response of a board against its first response;
//     the histogram must have all fifty entries at distance 0;
//   * between-class: board 1 against board 2, trial by trial; every entry
//     must be at distance 1;
//   * reliability 1 - HD(V0, VE) / bits between a nominal run and a run with
//     every delay scaled by 1.03 (a slower, colder or lower-voltage corner);
//     a uniform scaling keeps every race's winner, so reliability must be 1.
// Board 1 places cells 0-1 and cells 2-3 in two logic blocks whose excite
// routes (to clear and preset alike) take 2.317 ns and 2.038 ns; board 2
// uses the nominal 2.086 ns. Equal routes within a cell shift when a cell
// settles but not which latch wins, and the test checks both.
// Response strings are written MSB first, bit 3 on the left.
`timescale 1ps/1ps
module tb_hd_eval;
  import tb_puf_pkg::*;

  localparam int unsigned N = 4, TRIALS = 50;
  typedef int unsigned arr_t [N];

  localparam arr_t B1_L1 = '{1870, 1880, 1860, 1875};
  localparam arr_t B1_L2 = '{1920, 1915, 1930, 1910};
  localparam arr_t B2_L1 = '{1880, 1935, 1872, 1890};
  localparam arr_t B2_L2 = '{1925, 1890, 1918, 1940};
  localparam arr_t B1_EXC = '{2317, 2317, 2038, 2038};

  function automatic arr_t scaled(input arr_t a);
    arr_t r;
    for (int i = 0; i < N; i++) r[i] = a[i] * 103 / 100;
    return r;
  endfunction

  logic excite;
  logic [N-1:0] r1, r2, r1_cold, unused_q [3];
  int checks = 0, failures = 0;
  int hist_within [N+1], hist_between [N+1];

  bpuf_array #(.N(N), .L1_PS(B1_L1), .L2_PS(B1_L2), .EXC_PS(B1_EXC)) u_board1 (
    .excite({N{excite}}), .outt(r1), .q2(unused_q[0]));
  bpuf_array #(.N(N), .L1_PS(B2_L1), .L2_PS(B2_L2)) u_board2 (
    .excite({N{excite}}), .outt(r2), .q2(unused_q[1]));
  bpuf_array #(.N(N), .L1_PS(scaled(B1_L1)), .L2_PS(scaled(B1_L2)),
               .EXC_PS(scaled(B1_EXC))) u_board1_cold (
    .excite({N{excite}}), .outt(r1_cold), .q2(unused_q[2]));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(TRIALS * 300ns + 10us);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ref1, ref2;
    int unsigned hd_rel;
    real reliability;
    for (int d = 0; d <= N; d++) begin hist_within[d] = 0; hist_between[d] = 0; end
    for (int t = 0; t < TRIALS; t++) begin
      excite = 1;
      #150ns;
      check({r1, r2, r1_cold}, '0, "all boards unstable while excited");
      excite = 0;
      if (t == 0) begin
        // Cell 2 (2.038 ns route + 1.86 ns latch) is up before cell 0
        // (2.317 ns + 1.87 ns).
        #4000ps;
        check(r1[2], 1, "board 1 cell 2 settled after its shorter route");
        check(r1[0], 0, "board 1 cell 0 still waiting on its longer route");
        #(B1_EXC[0] + B1_L1[0] - 4000);
        check(r1[0], 1, "board 1 cell 0 settles at route + switching delay");
        #(150ns - B1_EXC[0] - B1_L1[0]);
      end else begin
        #150ns;
      end
      if (t == 0) begin
        ref1 = r1;
        ref2 = r2;
        check(r1, 4'b1111, "board 1 response");
        check(r2, 4'b1101, "board 2 response");
      end
      hist_within[hamming(64'(r1), 64'(ref1))]++;
      hist_within[hamming(64'(r2), 64'(ref2))]++;
      hist_between[hamming(64'(r1), 64'(r2))]++;
    end
    $display("within-class histogram (distance 0..4): %0d %0d %0d %0d %0d",
             hist_within[0], hist_within[1], hist_within[2], hist_within[3], hist_within[4]);
    $display("between-class histogram (distance 0..4): %0d %0d %0d %0d %0d",
             hist_between[0], hist_between[1], hist_between[2], hist_between[3], hist_between[4]);
    check(hist_within[0], 2 * TRIALS, "within-class: every trial at distance 0");
    check(hist_between[1], TRIALS, "between-class: every trial at distance 1");

    hd_rel = hamming(64'(r1), 64'(r1_cold));
    reliability = 1.0 - real'(hd_rel) / real'(N);
    $display("reliability across the delay corner: %0.2f", reliability);
    check(hd_rel, 0, "reliability = 1 (no bit flips across the corner)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
