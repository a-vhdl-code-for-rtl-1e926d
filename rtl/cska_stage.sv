// One skipping stage (stage 2 and above) of the carry skip adder.
//
// The stage adds its 4-bit operand slices a and b in a carry look-ahead adder
// with carry-in tied to 0, which gives the intermediate result z and a stage
// carry cj without waiting for the previous stage. When the previous stage's
// carry arrives, two things happen side by side:
//   * the skip gate forms the carry to the next stage, cj OR (&z AND ci);
//   * the incrementation block adds ci to z to give the final sum bits.
// The skip gate is an AOI or an OAI gate (parameter GATE). An AOI stage takes
// the previous carry in true polarity and gives out its carry inverted; an
// OAI stage takes it inverted and gives it out true. Ports ci_x and co_x
// carry the polarity that their gate implies; the incrementation block is
// always given the true carry.
// Purely combinational; the skip path through a stage is one complex gate.
// The stage structure and the skip rule follow the published design; the
// inverter that makes the inverted stage carry for an OAI stage, and which
// stages get which gate, are this implementation's choices. The CLA group
// signals pg and gg are left unconnected: the stage carry comes from co.
module cska_stage
  import cska_pkg::*;
#(
  parameter skip_gate_e GATE = SKIP_AOI
) (
  input  logic [CLA_W-1:0] a,
  input  logic [CLA_W-1:0] b,
  input  logic             ci_x,  // previous stage carry: true for AOI, inverted for OAI
  output logic [CLA_W-1:0] s,
  output logic             co_x   // carry to next stage: inverted for AOI, true for OAI
);

  logic [CLA_W-1:0] z;
  logic             cj;
  logic             prod;
  logic             ci_true;
  logic             cla_pg, cla_gg;  // group signals of the CLA, not needed here

  cla4 u_cla (
    .a  (a),
    .b  (b),
    .ci (1'b0),
    .s  (z),
    .co (cj),
    .pg (cla_pg),
    .gg (cla_gg)
  );

  assign prod = &z;

  if (GATE == SKIP_AOI) begin : g_aoi
    skip_logic #(.GATE(SKIP_AOI)) u_skip (
      .c    (cj),
      .prod (prod),
      .ci   (ci_x),
      .y    (co_x)
    );
    assign ci_true = ci_x;
  end else begin : g_oai
    skip_logic #(.GATE(SKIP_OAI)) u_skip (
      .c    (~cj),
      .prod (~prod),
      .ci   (ci_x),
      .y    (co_x)
    );
    assign ci_true = ~ci_x;
  end

  incrementation_block #(.M(CLA_W)) u_inc (
    .z  (z),
    .ci (ci_true),
    .s  (s)
  );

endmodule
