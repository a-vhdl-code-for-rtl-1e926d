// Incrementation block: adds a single carry bit to a stage's intermediate sum.
//
// A stage first adds its operand slices with carry-in 0, which gives the
// intermediate result z. Once the carry from the previous stage, ci, is
// known, this block adds it to z with a chain of half adders: bit i of the
// result is z[i] XOR k[i], and k[i+1] = z[i] AND k[i] with k[0] = ci. The most
// significant bit needs only the XOR, since the block's own carry-out is never
// used: the stage carry-out is formed by the skip logic instead.
// Interface: z and ci in, s out, M bits wide. Purely combinational.
// The half-adder chain and the lone XOR on the top bit follow the published
// block; M defaults to the design's 4-bit stage width.
module incrementation_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,
  input  logic         ci,
  output logic [M-1:0] s
);

  logic [M-1:0] k;  // carry into each bit of the chain

  assign k[0] = ci;

  for (genvar i = 0; i < M - 1; i++) begin : g_ha
    half_adder u_ha (
      .a (z[i]),
      .b (k[i]),
      .s (s[i]),
      .c (k[i+1])
    );
  end

  assign s[M-1] = z[M-1] ^ k[M-1];

endmodule
