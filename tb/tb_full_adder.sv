// Self-checking test of full_adder: all eight input combinations. The sum
// bit is checked against the parity of a + b + ci, and p, g against the
// arithmetic meaning of propagate (exactly one of a, b set) and generate
// (both set).
module tb_full_adder;
  logic a, b, ci, s, p, g;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if (s != sum[0] || p != (int'(a) + int'(b) == 1) || g != (int'(a) + int'(b) == 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b got s=%0b p=%0b g=%0b", a, b, ci, s, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
