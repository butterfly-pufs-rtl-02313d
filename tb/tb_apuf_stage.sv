// tb_apuf_stage: self-checking test of one arbiter-chain switch stage.
//
// Instance u_ideal (zero delays) is checked against the straight/cross
// function for all eight input combinations. Instance u_timed has four
// distinct arc delays; a falling edge is sent in on one side and its arrival
// on the selected output is checked against the arc that challenge bit picks.
`timescale 1ps/1ps
module tb_apuf_stage;
  localparam int unsigned P = 110, S = 130, Q = 170, R = 190;

  logic c, top_i, bot_i, top_o, bot_o;
  logic tc, tt, tbt, tto, tbo;
  int checks = 0, failures = 0;

  apuf_stage u_ideal (.c, .top_i, .bot_i, .top_o, .bot_o);
  apuf_stage #(.P_PS(P), .S_PS(S), .Q_PS(Q), .R_PS(R)) u_timed (
    .c(tc), .top_i(tt), .bot_i(tbt), .top_o(tto), .bot_o(tbo)
  );

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Drive a falling edge on one input and time its arrival at one output.
  task automatic time_arc(input logic cbit, input bit from_top, input bit to_top,
                          input int unsigned exp_ps, input string what);
    time t0;
    tc = cbit; tt = 1; tbt = 1;
    #1000;
    t0 = $time;
    if (from_top) tt = 0; else tbt = 0;
    if (to_top) wait (tto == 0); else wait (tbo == 0);
    check(32'($time - t0), exp_ps, what);
    // The other output must not have moved.
    check(to_top ? tbo : tto, 1, {what, ": other output untouched"});
  endtask

  initial begin : watchdog
    #20us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, top_i, bot_i} = 3'(v);
      #10;
      check(top_o, c ? bot_i : top_i, $sformatf("top_o for c,top,bot=%03b", v));
      check(bot_o, c ? top_i : bot_i, $sformatf("bot_o for c,top,bot=%03b", v));
    end
    time_arc(0, 1, 1, P, "arc p: top->top, c=0");
    time_arc(0, 0, 0, Q, "arc q: bot->bot, c=0");
    time_arc(1, 0, 1, S, "arc s: bot->top, c=1");
    time_arc(1, 1, 0, R, "arc r: top->bot, c=1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
