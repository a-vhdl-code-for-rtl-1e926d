// Self-checking test of incrementation_block at the design's width of 4 and
// at 8 bits: every z with carry-in 0 and 1, sum against (z + ci) mod 2^M.
module tb_incrementation_block;
  logic [3:0] z4, s4;
  logic [7:0] z8, s8;
  logic       ci;
  int checks = 0, failures = 0;

  incrementation_block dut4 (.z(z4), .ci(ci), .s(s4));
  incrementation_block #(.M(8)) dut8 (.z(z8), .ci(ci), .s(s8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      z8 = 8'(i);
      z4 = 4'(i);
      ci = i[8];
      #1;
      checks++;
      if (s8 != 8'(int'(z8) + int'(ci))) begin
        failures++;
        $display("FAIL M=8 z=%0d ci=%0b s=%0d", z8, ci, s8);
      end
      if (i < 16 || (i >= 256 && i < 272)) begin
        checks++;
        if (s4 != 4'(int'(z4) + int'(ci))) begin
          failures++;
          $display("FAIL M=4 z=%0d ci=%0b s=%0d", z4, ci, s4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
