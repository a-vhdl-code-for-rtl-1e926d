// Self-checking test of cla4: all 512 combinations of two 4-bit operands and
// carry-in, the 5-bit result {co, s} against the integer a + b + ci, and the
// group signals against x + y = 15 (pg) and x + y > 15 (gg).
module tb_cla4;
  logic [3:0] a, b, s;
  logic       ci, co, pg, gg;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .pg(pg), .gg(gg));

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
      a  = 4'(i);
      b  = 4'(i >> 4);
      ci = i[8];
      #1;
      sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} != 5'(sum)) begin
        failures++;
        $display("FAIL %0d + %0d + %0b: got %0d", a, b, ci, {co, s});
      end
      checks++;
      if (pg != (int'(a) + int'(b) == 15) || gg != (int'(a) + int'(b) > 15)) begin
        failures++;
        $display("FAIL %0d + %0d: pg=%0b gg=%0b", a, b, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
