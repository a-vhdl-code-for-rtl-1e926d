// Self-checking test of cska_stage with both skip gates. For all 4-bit
// operand slices and both values of the incoming carry k, the stage must
// give s = (a + b + k) mod 16 and pass on carry (a + b + k) >= 16, in the
// polarity its gate implies (AOI: carry in true, out inverted; OAI: carry in
// inverted, out true). The three ways a carry can leave a stage are counted:
// made in the stage, skipped through it, and stopped by it.
module tb_cska_stage;
  import cska_pkg::*;
  logic [3:0] a, b, s_aoi, s_oai;
  logic       k, co_aoi, co_oai;
  int checks = 0, failures = 0;
  int n_gen = 0, n_skip = 0, n_kill = 0;

  cska_stage #(.GATE(SKIP_AOI)) dut_aoi (.a(a), .b(b), .ci_x(k),  .s(s_aoi), .co_x(co_aoi));
  cska_stage #(.GATE(SKIP_OAI)) dut_oai (.a(a), .b(b), .ci_x(~k), .s(s_oai), .co_x(co_oai));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int i = 0; i < 512; i++) begin
      a = 4'(i);
      b = 4'(i >> 4);
      k = i[8];
      #1;
      sum = int'(a) + int'(b) + int'(k);
      if (int'(a) + int'(b) > 15) n_gen++;
      else if (int'(a) + int'(b) == 15 && k) n_skip++;
      else n_kill++;
      checks++;
      if ({!co_aoi, s_aoi} != 5'(sum)) begin
        failures++;
        $display("FAIL AOI %0d+%0d+%0b: co=%0b s=%0d", a, b, k, !co_aoi, s_aoi);
      end
      checks++;
      if ({co_oai, s_oai} != 5'(sum)) begin
        failures++;
        $display("FAIL OAI %0d+%0d+%0b: co=%0b s=%0d", a, b, k, co_oai, s_oai);
      end
    end
    $display("carry made=%0d skipped=%0d stopped=%0d", n_gen, n_skip, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
