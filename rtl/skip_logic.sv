// Skip logic: the single complex gate that forms a stage's carry-out.
//
// A stage whose own sum of a and b (taken with carry-in 0) gives carry c and
// intermediate result Z passes on
//   carry_out = c OR (AND of all Z bits AND carry_in)
// i.e. the stage makes a carry itself, or it passes the incoming one when its
// intermediate result is all ones. That function is built as one inverting
// gate instead of a multiplexer:
//   GATE = SKIP_AOI: y = NOT(c OR (prod AND ci))      inputs true, output inverted
//   GATE = SKIP_OAI: y = NOT((prod OR ci) AND c)      inputs inverted, output true
// With the OAI gate the caller feeds the inverted carry, the inverted product
// (a NAND of Z) and the inverted carry-in, and gets the true carry-out back,
// so alternating stages need no inverter on the carry path.
// Purely combinational.
module skip_logic
  import cska_pkg::*;
#(
  parameter skip_gate_e GATE = SKIP_AOI
) (
  input  logic c,     // stage carry (inverted for OAI)
  input  logic prod,  // AND of the intermediate results (NAND for OAI)
  input  logic ci,    // carry from the previous stage (inverted for OAI)
  output logic y      // carry to the next stage (inverted for AOI)
);

  if (GATE == SKIP_AOI) begin : g_aoi
    assign y = ~(c | (prod & ci));
  end else begin : g_oai
    assign y = ~((prod | ci) & c);
  end

endmodule
