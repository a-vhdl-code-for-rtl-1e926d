// One-bit half adder: adds two bits and gives their sum and carry.
//
// s = a XOR b, c = a AND b. It is the cell the incrementation block chains
// to add the incoming stage carry to a stage's intermediate sum.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule
