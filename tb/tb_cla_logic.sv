// Self-checking test of cla_logic. For every pair of 4-bit operands x, y and
// carry-in, p and g are derived from x and y, and the unit's carries are
// compared with the carries of the integer sum: carry into bit i+1 is bit
// i+1 of (x mod 2^(i+1)) + (y mod 2^(i+1)) + c0. PG and GG are compared with
// "the group passes a carry" (x + y = 15) and "the group makes a carry on
// its own" (x + y > 15).
module tb_cla_logic;
  logic [3:0] p, g;
  logic       c0;
  logic [4:1] c;
  logic       pg, gg;
  int checks = 0, failures = 0;

  cla_logic dut (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, ref_c, mask;
    for (int i = 0; i < 512; i++) begin
      x  = i & 15;
      y  = (i >> 4) & 15;
      c0 = i[8];
      p  = 4'(x ^ y);
      g  = 4'(x & y);
      #1;
      for (int k = 1; k <= 4; k++) begin
        mask  = (1 << k) - 1;
        ref_c = (((x & mask) + (y & mask) + int'(c0)) >> k) & 1;
        checks++;
        if (c[k] != ref_c[0]) begin
          failures++;
          $display("FAIL x=%0d y=%0d c0=%0b c%0d=%0b expected %0b", x, y, c0, k, c[k], ref_c[0]);
        end
      end
      checks++;
      if (pg != (x + y == 15) || gg != (x + y > 15)) begin
        failures++;
        $display("FAIL x=%0d y=%0d pg=%0b gg=%0b", x, y, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
