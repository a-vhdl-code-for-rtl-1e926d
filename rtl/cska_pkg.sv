// Shared types and constants of the carry skip adder.
//
// The adder is cut into stages of CLA_W bits, each summed by a 4-bit carry
// look-ahead adder. From the second stage on, the carry that leaves a stage is
// formed by a single complex gate, and the gate type alternates between
// AND-OR-Invert and OR-AND-Invert so that each gate consumes the inverted
// carry produced by the one before it and no extra inverter sits on the
// carry-skip path. The stage width of 4 is the one the design uses; the
// alternation rule (even stage numbers use AOI, odd ones OAI, stage 1 has no
// skip gate) is this implementation's choice.
package cska_pkg;

  // Width of one stage: one 4-bit carry look-ahead adder.
  localparam int unsigned CLA_W = 4;

  // Which complex gate forms the stage carry-out.
  typedef enum logic {
    SKIP_AOI = 1'b0,  // inputs in true polarity, output inverted
    SKIP_OAI = 1'b1   // inputs inverted, output in true polarity
  } skip_gate_e;

  // Gate used by stage number q (stage 1 is the least significant).
  function automatic skip_gate_e stage_gate(int unsigned q);
    return (q % 2 == 0) ? SKIP_AOI : SKIP_OAI;
  endfunction

endpackage
