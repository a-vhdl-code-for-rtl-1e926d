// End-to-end self-checking test of the carry skip adder at its default size
// (64 bits, 16 stages of 4 bits).
//
// Each vector is checked against the integer sum a + b + ci taken one bit
// wider than the operands. Besides plain random operands, the vectors are
// built stage by stage so that the carry mechanisms of the design all occur
// often: for each 4-bit stage the slices are drawn as random, as a
// complementary pair (intermediate result all ones, so an incoming carry is
// skipped through the stage), as a pair that generates a carry, or as a pair
// that stops one. Directed vectors cover the longest skip chain (a carry made
// in stage 1 that travels through every stage to the carry-out) and the
// all-ones and all-zero corners.
//
// Counted mechanisms (each must happen at least once):
//   generate    a stage >= 2 makes its own carry (its carry-in-0 sum overflows)
//   skip_aoi    a carry skips through an even (AOI) stage
//   skip_oai    a carry skips through an odd (OAI) stage
//   stop        an incoming carry ends in a stage (absorbed by the increment)
//   full_chain  a carry crosses every stage from stage 1 to the carry-out
//   carry_out   the adder's carry-out is 1
//   carry_in    the external carry-in is 1 and changes the result
module tb_cska_adder;
  localparam int unsigned W = 64;
  localparam int unsigned Q = W / 4;
  localparam int unsigned N_RANDOM = 200000;

  logic [W-1:0] a, b, s;
  logic         ci, co;
  int checks = 0, failures = 0;
  int n_generate = 0, n_skip_aoi = 0, n_skip_oai = 0, n_stop = 0;
  int n_full_chain = 0, n_carry_out = 0, n_carry_in = 0;

  cska_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #(100 * (64'(N_RANDOM) + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one vector, compare with the reference and count the mechanisms.
  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] ref_sum;
    logic [W:0] carries;  // carry into each bit position, W = carry-out
    logic [3:0] xs, ys;
    logic       cin_q;
    bit         chain;
    a  = x;
    b  = y;
    ci = c;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    carries = ref_sum ^ {1'b0, x ^ y};
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0b: got %0b_%h expected %0b_%h",
                 x, y, c, co, s, ref_sum[W], ref_sum[W-1:0]);
    end
    if (co) n_carry_out++;
    if (c && ((ref_sum ^ ({1'b0, x} + {1'b0, y})) != 0)) n_carry_in++;
    chain = (carries[4] == 1'b1);
    for (int unsigned q = 2; q <= Q; q++) begin
      xs    = x[4*q-1 -: 4];
      ys    = y[4*q-1 -: 4];
      cin_q = carries[4*(q-1)];
      if (5'(xs) + 5'(ys) > 5'd15) begin
        n_generate++;
        chain = 0;
      end else if (5'(xs) + 5'(ys) == 5'd15 && cin_q) begin
        if (q % 2 == 0) n_skip_aoi++;
        else n_skip_oai++;
      end else begin
        if (cin_q) n_stop++;
        chain = 0;
      end
    end
    if (chain && carries[W]) n_full_chain++;
  endtask

  // Random operands shaped stage by stage.
  task automatic random_vector();
    logic [W-1:0] x, y;
    logic [3:0]   xs;
    for (int unsigned q = 0; q < Q; q++) begin
      xs = 4'($urandom);
      x[4*q +: 4] = xs;
      case ($urandom_range(3))
        0: y[4*q +: 4] = 4'($urandom);
        1: y[4*q +: 4] = ~xs;                  // sum 15: skip an incoming carry
        2: y[4*q +: 4] = 4'(16 - int'(xs));    // sum 16 (or 0): generate
        default: y[4*q +: 4] = 4'($urandom) & ~xs & 4'b0111;  // small sum: stop
      endcase
    end
    apply(x, y, 1'($urandom));
  endtask

  initial begin
    // Corners.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);   // all ones plus carry-in: carry crosses every stage
    apply('1, 1, 1'b0);    // generated in stage 1, skipped through all others
    apply({W{1'b1}} >> 1, 1, 1'b0);
    // Walking carry-in positions: a with a single run of ones.
    for (int unsigned i = 0; i < W; i++) begin
      apply(({W{1'b1}} << i), (W)'(1) << i, 1'b0);
      apply(~((W)'(1) << i), '0, 1'b1);
    end
    // Plain random operands.
    for (int i = 0; i < 2000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // Shaped random operands.
    for (int i = 0; i < N_RANDOM; i++) random_vector();

    $display("generate=%0d skip_aoi=%0d skip_oai=%0d stop=%0d full_chain=%0d carry_out=%0d carry_in=%0d",
             n_generate, n_skip_aoi, n_skip_oai, n_stop, n_full_chain, n_carry_out, n_carry_in);
    if (n_generate == 0) begin failures++; $display("FAIL no stage generated a carry"); end
    if (n_skip_aoi == 0) begin failures++; $display("FAIL no skip through an AOI stage"); end
    if (n_skip_oai == 0) begin failures++; $display("FAIL no skip through an OAI stage"); end
    if (n_stop == 0) begin failures++; $display("FAIL no carry was stopped"); end
    if (n_full_chain == 0) begin failures++; $display("FAIL no carry crossed every stage"); end
    if (n_carry_out == 0) begin failures++; $display("FAIL carry-out never set"); end
    if (n_carry_in == 0) begin failures++; $display("FAIL carry-in never mattered"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
