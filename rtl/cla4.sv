// Four-bit carry look-ahead adder: s + 16*co = a + b + ci.
//
// Four full-adder cells each produce a sum bit and their bit's propagate and
// generate; the look-ahead unit computes all four carries from those and ci
// at once and feeds carries 1..3 back into the cells. co is carry 4. The
// group propagate pg and generate gg are brought out as well.
// Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] s,
  output logic       co,
  output logic       pg,
  output logic       gg
);

  logic [3:0] p, g;
  logic [4:1] c;
  logic [3:0] cin;

  assign cin = {c[3:1], ci};

  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (cin[i]),
      .s  (s[i]),
      .p  (p[i]),
      .g  (g[i])
    );
  end

  cla_logic u_cla (
    .p  (p),
    .g  (g),
    .c0 (ci),
    .c  (c),
    .pg (pg),
    .gg (gg)
  );

  assign co = c[4];

endmodule
