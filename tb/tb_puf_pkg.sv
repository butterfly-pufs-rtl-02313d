// tb_puf_pkg: helpers shared by the system-level testbenches.
//
// A simulated "device" is a set of latch and arc delays. They are drawn from
// a small integer hash so that every run, and every simulator, sees the same
// device, and a testbench can pass them to the design as parameters. The
// reference functions here predict a device's responses from those delays
// without looking at the design.
package tb_puf_pkg;

  function automatic int unsigned mix(input int unsigned seed, input int unsigned i);
    int unsigned x;
    x = (seed * 32'h9E3779B1) ^ ((i + 1) * 32'h85EBCA6B);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  // Number of differing bits between two response words.
  function automatic int unsigned hamming(input logic [63:0] a, input logic [63:0] b);
    return $countones(a ^ b);
  endfunction

  // Outcome of a butterfly race: latch 1 done at fin1, latch 2 at fin2.
  // On an exact tie both latches swap and the faster one decides in the
  // next round; identical latches never settle.
  function automatic bpuf_pkg::bpuf_outcome_e race(input longint unsigned fin1,
                                                   input longint unsigned fin2,
                                                   input int unsigned tb1,
                                                   input int unsigned tb2);
    if (fin1 < fin2) return bpuf_pkg::RESOLVED_1;
    if (fin1 > fin2) return bpuf_pkg::RESOLVED_0;
    if (tb1 == tb2)  return bpuf_pkg::OSCILLATING;
    return (tb2 < tb1) ? bpuf_pkg::RESOLVED_1 : bpuf_pkg::RESOLVED_0;
  endfunction

endpackage
