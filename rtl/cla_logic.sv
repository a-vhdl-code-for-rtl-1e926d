// Four-bit carry look-ahead unit.
//
// From the per-bit propagate p[i] and generate g[i] and the carry-in c0 it
// forms every carry of the 4-bit group in two-level logic, each carry being
// the expanded sum of products
//   c1 = g0 + p0 c0
//   c2 = g1 + p1 g0 + p1 p0 c0
//   c3 = g2 + p2 g1 + p2 p1 g0 + p2 p1 p0 c0
//   c4 = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0 + p3 p2 p1 p0 c0
// so no carry ripples from bit to bit. It also gives the group propagate
// pg = p3 p2 p1 p0 and the group generate gg = c4 with c0 = 0.
// c[0] of the output is c1 and c[3] is c4. Purely combinational.
// The four carry equations are the published ones. PG and GG appear in the
// published block diagram without formulas; the usual group propagate and
// generate are used here. The adder itself does not use them.
module cla_logic (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [4:1] c,
  output logic       pg,
  output logic       gg
);

  always_comb begin
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c0);
    pg   = &p;
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

endmodule
