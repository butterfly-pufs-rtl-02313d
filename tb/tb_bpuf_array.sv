// tb_bpuf_array: self-checking test of the 8-cell butterfly array.
//
// The latch switching delays of one simulated device are generated by a
// hash (1.8 ns to 2.0 ns, latch 1 and latch 2 of a cell never equal). The
// expected response bit of cell i is 1 when its latch 1 is the faster one.
// The test excites all cells together (one shared EXCITE pin), then one cell
// at a time, checking that an excited cell reads 0, that cells left alone
// keep their value, and that each cell resolves to the predicted bit.
`timescale 1ps/1ps
module tb_bpuf_array;
  localparam int unsigned N = bpuf_pkg::ARRAY_BITS;
  typedef int unsigned delay_arr_t [N];

  function automatic int unsigned mix(input int unsigned seed, input int unsigned i);
    int unsigned x;
    x = (seed * 32'h9E3779B1) ^ ((i + 1) * 32'h85EBCA6B);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  function automatic delay_arr_t gen(input int unsigned seed, input int unsigned avoid_seed);
    delay_arr_t a;
    for (int i = 0; i < N; i++) begin
      a[i] = 1800 + mix(seed, i) % 200;
      if (avoid_seed != 0 && a[i] == 1800 + mix(avoid_seed, i) % 200) a[i] = a[i] + 1;
    end
    return a;
  endfunction

  localparam delay_arr_t L2 = gen(7, 0);
  localparam delay_arr_t L1 = gen(3, 7);

  logic [N-1:0] excite, outt, q2, expected;
  int checks = 0, failures = 0;

  bpuf_array #(.N(N), .L1_PS(L1), .L2_PS(L2)) u_dut (.excite, .outt, .q2);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
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
    logic [N-1:0] prev_word;
    for (int i = 0; i < N; i++) expected[i] = (L1[i] < L2[i]);
    $display("device response expected %b", expected);

    // Shared excite: all cells unstable, then all resolve.
    for (int rep = 0; rep < 4; rep++) begin
      excite = '1;
      #150ns;
      check(outt, '0, "all cells read 0 while excited");
      check(q2, {N{1'b1}}, "all latch-2 outputs 1 while excited");
      excite = '0;
      #150ns;
      check(outt, expected, "response word after release");
      check(q2, expected, "each cell settled with both latches equal");
    end

    // One cell at a time.
    for (int i = 0; i < N; i++) begin
      prev_word = outt;
      excite = N'(1) << i;
      #150ns;
      check(outt[i], 0, $sformatf("cell %0d reads 0 while excited", i));
      check(outt & ~excite, prev_word & ~excite, $sformatf("others hold while cell %0d excited", i));
      excite = '0;
      #150ns;
      check(outt, expected, $sformatf("response after re-exciting cell %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
