// Self-checking test of skip_logic, both gate types. For every stage carry
// c, product of intermediate results pr and incoming carry k (true values),
// the expected next carry is c OR (pr AND k). The AOI gate gets the true
// values and must return the inverted next carry; the OAI gate gets the
// inverted values and must return the true next carry.
module tb_skip_logic;
  import cska_pkg::*;
  logic c, pr, k;
  logic y_aoi, y_oai;
  int checks = 0, failures = 0;

  skip_logic #(.GATE(SKIP_AOI)) dut_aoi (.c(c), .prod(pr), .ci(k), .y(y_aoi));
  skip_logic #(.GATE(SKIP_OAI)) dut_oai (.c(~c), .prod(~pr), .ci(~k), .y(y_oai));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int i = 0; i < 8; i++) begin
      {c, pr, k} = 3'(i);
      #1;
      expected = c || (pr && k);
      checks++;
      if (y_aoi != !expected) begin
        failures++;
        $display("FAIL AOI c=%0b prod=%0b ci=%0b y=%0b", c, pr, k, y_aoi);
      end
      checks++;
      if (y_oai != expected) begin
        failures++;
        $display("FAIL OAI c=%0b prod=%0b ci=%0b y=%0b", c, pr, k, y_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
