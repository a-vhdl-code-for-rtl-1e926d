// One-bit full adder cell of the carry look-ahead adder.
//
// It adds a, b and the carry-in ci handed to it by the look-ahead unit, and
// gives out the sum bit together with the bit's propagate p = a XOR b and
// generate g = a AND b, which the look-ahead unit uses to compute the carries
// ahead of time. It does not produce a carry-out of its own: carries come
// from the look-ahead unit. Purely combinational.
// The cell and its outputs (S, p, g) are those of the published look-ahead
// adder; its gate-level form (two XORs and an AND) is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic p,
  output logic g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
    s = p ^ ci;
  end

endmodule
