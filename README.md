# Carry skip adder with look-ahead stages and AOI/OAI skip gates

A binary adder is only as fast as its carry chain. This adder shortens the
chain in two ways:

* The operands are cut into 4-bit stages. Every stage adds its own slices
  **at once, with a carry-in of 0**, in a 4-bit carry look-ahead adder. None of
  that work waits for the stage below.
* The only thing a stage then waits for is the carry from below. It decides
  its own outgoing carry with **one complex gate**: an AND-OR-Invert (AOI) or an
  OR-AND-Invert (OAI) gate, not a multiplexer. It folds the incoming carry into
  its sum with a short **incrementation block**, a chain of half adders.

The result is `{co, s} = a + b + ci` for `WIDTH`-bit operands. `WIDTH` defaults
to 64 (16 stages). The design is purely combinational.

## How a stage works

For stage `q` (q ≥ 2) with 4-bit operand slices `A`, `B`:

1. The look-ahead adder gives the intermediate result `Z = (A + B) mod 16` and
   the stage carry `Cj = (A + B) ≥ 16`.
2. The carry-out of the stage is

       Co(q) = Cj  OR  (Z3·Z2·Z1·Z0  AND  Co(q-1))

   The stage makes a carry itself, or the stage is "transparent" (`Z` is all
   ones) and the carry from below skips through it.
3. The final sum bits are `S = (Z + Co(q-1)) mod 16`. The incrementation block
   adds that single bit with half adders. Bit `i` is `Z[i] XOR k[i]`, with
   `k[0] = Co(q-1)` and `k[i+1] = Z[i] AND k[i]`. The top bit needs only the
   XOR, because the block's own carry-out is never used.

**Why the carry rule is exact.** The true carry-out is `(A + B + cin) ≥ 16`.
If `Cj = 1`, then `A + B ≥ 16`, so the carry-out is 1 whatever `cin` is.
In that case `Z = A + B − 16 ≤ 14`, so adding `cin` cannot overflow a second
time and the sum bits stay correct. If `Cj = 0`, then `A + B ≤ 15`. Adding
`cin` then overflows exactly when `A + B = 15` (that is, `Z = 1111`) and
`cin = 1`. So the skip gate and the incrementation block together compute the
exact sum. No carry is ever counted twice.

## Stage 1 and the look-ahead adder

Stage 1 has no skip gate and no incrementation block. It is a plain 4-bit
carry look-ahead adder (`cla4`) that takes the external carry-in `ci`. Its
carry `c4` starts the skip chain.

`cla4` is built from four `full_adder` cells and a look-ahead unit,
`cla_logic`:

* Each cell gives its sum bit, its propagate `p = a XOR b` and its generate
  `g = a AND b`. Each cell receives its carry from the look-ahead unit.
* The look-ahead unit computes every carry as a flat sum of products, with no
  rippling between bits:

      c1 = g0 + p0·c0
      c2 = g1 + p1·g0 + p1·p0·c0
      c3 = g2 + p2·g1 + p2·p1·g0 + p2·p1·p0·c0
      c4 = g3 + p3·g2 + p3·p2·g1 + p3·p2·p1·g0 + p3·p2·p1·p0·c0

`cla_logic` also gives the group propagate `pg` and group generate `gg`. The
adder does not use them. They are left open in the stages.

## Alternating AOI and OAI gates

An AOI gate inverts its output. If every stage used one, the carry would need
an inverter between stages, and that inverter would sit on the critical path.
So the gate type alternates instead:

| stage `q`  | gate | receives `Co(q-1)` | gives `Co(q)` | gate function                     |
|------------|------|--------------------|---------------|-----------------------------------|
| 1          | none | –                  | true          | `c4` of the look-ahead adder      |
| even       | AOI  | true               | inverted      | `y = ¬(Cj ∨ (P ∧ Cin))`           |
| odd (≥ 3)  | OAI  | inverted           | true          | `y = ¬((¬P ∨ ¬Cin) ∧ ¬Cj)`        |

Here `P` is the AND of the four `Z` bits. An OAI stage feeds its gate `¬Cj`
and the NAND of `Z`. By De Morgan's law, its output is the true
`Cj ∨ (P ∧ Cin)`. Each stage therefore gets the polarity it needs straight
from the stage below. The incrementation block always gets the true carry:
an OAI stage inverts its incoming carry for the incrementer, off the skip
path. With 16 stages the last stage is an AOI stage, so `cska_adder` inverts
`co` once at the output.

## Critical path

The slowest path starts in stage 1 and ends at a sum bit of the top stage:

1. the propagate/generate cells of stage 1 and its look-ahead carry `c4`
   (two gate levels after the XOR/AND);
2. one AOI/OAI gate in each of stages 2 … Q−1 (Q−2 gates: 14 for 64 bits,
   6 for 32 bits);
3. in stage Q, up to three ANDs of the half-adder chain and the final XOR.

All the stage-local look-ahead additions run in parallel with step 1. So the
delay grows with the number of stages by only one complex gate per stage.

## Modules

| module                 | role                                                        |
|------------------------|-------------------------------------------------------------|
| `cska_pkg`             | stage width `CLA_W = 4`, gate enum `skip_gate_e`, `stage_gate(q)` |
| `cska_adder` (top)     | `a`, `b` [WIDTH], `ci` → `s` [WIDTH], `co`                  |
| `cska_stage`           | one skipping stage; `GATE` selects AOI or OAI; carry ports `ci_x`/`co_x` in the gate's polarity |
| `cla4`                 | 4-bit carry look-ahead adder with `pg`, `gg`                |
| `cla_logic`            | look-ahead carry unit                                       |
| `full_adder`           | sum, propagate and generate of one bit                      |
| `skip_logic`           | the AOI or OAI skip gate                                    |
| `incrementation_block` | half-adder chain adding one bit to `M` bits (default 4)     |
| `half_adder`           | `s = a ^ b`, `c = a & b`                                    |

There is no clock and no reset. The outputs are valid one propagation delay
after the inputs settle. To pipeline the adder, register its ports outside it.

## Sizes and limits

* `WIDTH` must be a multiple of 4 and at least 8. A wrong value stops
  elaboration with an error. The 64-bit default is the headline size. The
  32-bit configuration (8 stages) is `cska_adder #(.WIDTH(32))`.
* All stages are 4 bits wide. Carry skip adders are often tuned by giving the
  stages different sizes. That is not done here.
* Operands are unsigned. For signed two's-complement addition, `s` is still
  correct. Detect overflow outside the adder from the operand and sum sign bits.

## How far it is verified

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_half_adder`, `tb_full_adder`, `tb_skip_logic`: exhaustive.
* `tb_cla_logic`, `tb_cla4`, `tb_cska_stage`: exhaustive over two 4-bit
  operands and the carry. `tb_cska_stage` covers both gate types.
* `tb_incrementation_block`: exhaustive at `M = 4` and `M = 8`.
* `tb_cska_adder`: runs the default 64-bit adder against the integer sum
  (about 200,000 vectors).
* `tb_cska_adder32`: the same test on the 32-bit adder.

The two adder benches build each 4-bit slice pair on purpose. A pair is drawn
as random, as complementary (the carry skips), as generating, or as stopping a
carry. Directed vectors cover the all-ones corners and a carry that crosses
every stage. Each bench counts these events and fails if one of them never
happens: a stage generating a carry, a skip through an AOI stage, a skip
through an OAI stage, a carry stopped in a stage, a carry crossing all stages,
carry-out set, and carry-in changing the result.

The tests check the logic function only. Zero-delay simulation cannot show
timing. No area or delay figures are reproduced here. A synthesis run of the
64-bit adder gives about 600 generic gates and no flip-flops.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb +libext+.sv \
        rtl/cska_pkg.sv tb/tb_cska_adder.sv --top-module tb_cska_adder
    ./obj_dir/Vtb_cska_adder

Replace `tb_cska_adder` with any other testbench name to run it. The package
must come first on the command line. Verilator finds the other modules
through `-y`.
