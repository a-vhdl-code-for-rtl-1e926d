// Carry skip adder with look-ahead stages and AOI/OAI skip logic.
//
// Computes {co, s} = a + b + ci for WIDTH-bit operands. The operands are cut
// into Q = WIDTH/4 stages of 4 bits. Stage 1 is a plain 4-bit carry
// look-ahead adder taking ci. Every higher stage (cska_stage) adds its slices
// with carry-in 0 at once, in parallel with all other stages, and then only a
// single complex gate per stage lies on the carry path: the stage carry is
// either generated in the stage or, when the stage's intermediate sum is all
// ones, skipped through from the stage below. The arriving carry is added to
// the intermediate sum by a half-adder chain, so the sum of the last stage is
// ready one short AND chain plus an XOR after its carry-in.
// Skip gates alternate: even-numbered stages use AOI, odd ones OAI, which
// keeps the carry between stages in alternating polarity without inverters.
// co is returned in true polarity.
// Default WIDTH = 64 (16 stages); WIDTH must be a multiple of 4 and at least 8.
// Purely combinational: no clock, no reset, result valid one propagation
// delay after the inputs settle.
// Follows the published structure (look-ahead stages, skip gates in place of
// multiplexers, incrementation blocks) with equal 4-bit stages. The 64-bit
// default follows the published headline size; the absence of registers and
// the AOI/OAI assignment per stage are this implementation's choices.
module cska_adder
  import cska_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  localparam int unsigned Q = WIDTH / CLA_W;

  // Carry leaving each stage, in the polarity its skip gate produces
  // (stage 1: true; AOI stage: inverted; OAI stage: true).
  logic [Q:1] cx;
  logic       s1_pg, s1_gg;  // group signals of stage 1, not needed here

  // Stage 1: look-ahead adder with the external carry-in.
  cla4 u_stage1 (
    .a  (a[CLA_W-1:0]),
    .b  (b[CLA_W-1:0]),
    .ci (ci),
    .s  (s[CLA_W-1:0]),
    .co (cx[1]),
    .pg (s1_pg),
    .gg (s1_gg)
  );

  // Stages 2..Q. An AOI stage (even q) needs a true carry-in and an OAI stage
  // (odd q) an inverted one. Stage 1 and every OAI stage give a true carry,
  // every AOI stage an inverted one, so each stage receives the polarity it
  // needs straight from the stage below.
  for (genvar q = 2; q <= Q; q++) begin : g_stage
    cska_stage #(.GATE(stage_gate(q))) u_stage (
      .a    (a[q*CLA_W-1 -: CLA_W]),
      .b    (b[q*CLA_W-1 -: CLA_W]),
      .ci_x (cx[q-1]),
      .s    (s[q*CLA_W-1 -: CLA_W]),
      .co_x (cx[q])
    );
  end

  // Final carry in true polarity.
  assign co = (stage_gate(Q) == SKIP_AOI) ? ~cx[Q] : cx[Q];

  // Elaboration-time checks of the size.
  if (WIDTH % CLA_W != 0 || Q < 2) begin : g_bad_width
    $error("cska_adder: WIDTH must be a multiple of 4 and at least 8");
  end

endmodule
