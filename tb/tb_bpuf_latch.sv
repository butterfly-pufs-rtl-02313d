// tb_bpuf_latch: self-checking test of the clear/preset D latch at its
// default 1.9 ns switching delay.
//
// Checks the function table (clear over preset over gate, hold when either
// gate input is low), that q moves exactly SWITCH_PS after its function
// changes, and that a change shorter than SWITCH_PS is filtered out.
`timescale 1ps/1ps
module tb_bpuf_latch;
  localparam int unsigned SW = bpuf_pkg::LATCH_SWITCH_PS;

  logic d, g, ge, clr, pre, q;
  int checks = 0, failures = 0;

  bpuf_latch u_dut (.d, .g, .ge, .clr, .pre, .q);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Apply inputs, wait for the latch to settle, compare with the table.
  task automatic apply(input logic d_i, g_i, ge_i, clr_i, pre_i, input logic exp,
                       input string what);
    {d, g, ge, clr, pre} = {d_i, g_i, ge_i, clr_i, pre_i};
    #(SW + 100);
    check(q, exp, what);
  endtask

  initial begin : watchdog
    #1us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {d, g, ge, clr, pre} = 5'b0_11_10;
    #(SW + 100);
    // Function table.
    apply(1, 1, 1, 1, 0, 0, "clear forces 0 with d=1");
    apply(1, 1, 1, 1, 1, 0, "clear wins over preset");
    apply(0, 1, 1, 0, 1, 1, "preset forces 1 with d=0");
    apply(0, 0, 0, 0, 1, 1, "preset works with gate closed");
    apply(0, 1, 1, 0, 0, 0, "transparent passes 0");
    apply(1, 1, 1, 0, 0, 1, "transparent passes 1");
    apply(0, 0, 1, 0, 0, 1, "g low holds 1");
    apply(0, 1, 0, 0, 0, 1, "ge low holds 1");
    apply(0, 1, 1, 0, 0, 0, "reopened gate passes 0");
    apply(1, 1, 0, 0, 0, 0, "ge low holds 0");
    apply(1, 0, 1, 0, 0, 0, "g low holds 0");

    // Switching delay: q must change exactly SW after the input.
    {d, g, ge, clr, pre} = 5'b0_11_00;
    #(SW + 100);
    d = 1;
    #(SW - 1);
    check(q, 0, "q unchanged 1 ps before the switching delay");
    #2;
    check(q, 1, "q changed 1 ps after the switching delay");

    // Clear release timing: clear, then release with d=1.
    clr = 1;
    #(SW + 100);
    check(q, 0, "cleared");
    clr = 0;
    #(SW - 1);
    check(q, 0, "still 0 just before release completes");
    #2;
    check(q, 1, "released latch passes d after the switching delay");

    // Inertial filtering: a clear pulse shorter than SW never reaches q.
    clr = 1;
    #(SW / 2);
    clr = 0;
    #(2 * SW);
    check(q, 1, "short clear pulse filtered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
