# Thermometer-coded modulo adder for residue number systems

In a residue number system (RNS) every channel adds small residues modulo a
small modulus m. When m is small, a residue x in 0 .. m-1 can be carried in
**thermometer code**: a word of m-1 bits whose x lowest bits are 1 and the rest
0 (for m = 7: 3 = `000111`, 5 = `011111`). Adding two such words needs no carry
chain. This RTL implements a modulo-m adder for thermometer-coded residues built
from one row of OR and XOR gates, a rotator and a four-way select. The word is
only m-1 bits wide, one bit less than related thermometer adders that use m
bits.

The adder is purely combinational. The main configuration is m = 7 (6-bit
operands). The modulus is a parameter, and the adder has also been checked
exhaustively for m = 8, 9, 11 and 13.

## The reversal trick

Reverse the bit order of V. U's ones then sit at the bottom of the word and the
reversed V's ones at the top, with U's zeros above U's ones and V's zeros below
V's ones. With W = m-1:

```
U        = 0..0 1..1          (u ones at the bottom)
rev(V)   = 1..1 0..0          (v ones at the top)
```

How these two runs meet shows how u+v compares with m:

* **They do not meet (u+v < W).** Some positions are 0 in both words. The OR
  word has a 0 there ("overlapping zeros"). The XOR word is then
  `1..1 (v) 0..0 1..1 (u)`. Rotating it left by v places moves the v ones from
  the top to the bottom, directly above nothing. The result is `0..0 1..1`
  with u+v ones, which is the sum.
* **They meet exactly (u+v = W = m-1).** Every OR bit and every XOR bit is 1.
  The all-ones XOR word is already the answer m-1.
* **They overlap by z positions (u+v = W+z).** Every OR bit is 1, and the XOR
  word has a 0 at each of the z overlapping positions. The answer is
  (u+v) mod m = z-1:
  * z = 1 (u+v = m): the answer is 0.
  * z > 1 (u+v > m): the answer is z-1 ones at the bottom of the word.

So the adder needs one OR row and one XOR row, a way to count the XOR zeros as
0, 1 or more, and a way to turn z zeros into a thermometer code of z-1.

## Getting z-1 for sums above m

The rule for sums above m is: complement the XOR word, count its M zeros and
N ones, and output (M+1) zeros followed by (N-1) ones. The complemented XOR
word has N = z ones, so this gives z-1 ones.

The complement is `0..0 1..1 0..0`: the z ones sit inside the word, not at the
bottom. This design brings them to the bottom with the same rotator the
first outcome uses:

```
xor_v              = 1..1 (v-z) 0..0 (z) 1..1 (u-z)
rotl(xor_v, v)     = 1..1 (W-z) 0..0 (z)
~rotl(xor_v, v)    = 0..0 (W-z) 1..1 (z)          thermometer code of z
~rotl(xor_v, v)>>1 = 0..0 (W-z+1) 1..1 (z-1)      thermometer code of z-1
```

This needs no popcount. For z = 1 the same expression gives 0. The select
still outputs 0 for that outcome directly, to keep the four outcomes separate.

Worked examples for m = 7 (the testbench checks all four):

| u + v | U        | V        | rev(V)   | OR       | XOR      | outcome   | sum      |
|-------|----------|----------|----------|----------|----------|-----------|----------|
| 3 + 2 | `000111` | `000011` | `110000` | `110111` | `110111` | sum < m-1 | `011111` (rotate XOR left by 2) |
| 4 + 2 | `001111` | `000011` | `110000` | `111111` | `111111` | sum = m-1 | `111111` |
| 5 + 2 | `011111` | `000011` | `110000` | `111111` | `101111` | sum = m   | `000000` |
| 6 + 2 | `111111` | `000011` | `110000` | `111111` | `001111` | sum > m   | `000001` |

## Blocks

| Module | File | Role |
|---|---|---|
| `tcr_mod_adder` | `rtl/tcr_mod_adder.sv` | Top. Reverses V, forms the OR and XOR rows, and selects the result. |
| `tcr_case_detect` | `rtl/tcr_case_detect.sv` | Sorts the sum into one of four outcomes, in this order: an OR zero (sum < m-1); no XOR zero (sum = m-1); one XOR zero (sum = m); otherwise sum > m. "Exactly one zero" uses two running flags along the word. |
| `tcr_rotl` | `rtl/tcr_rotl.sv` | Rotates left by an amount given in thermometer code. The code's 1-to-0 edge is a one-hot select (`sel[k] = amt[k-1] & ~amt[k]`). That select gates one fixed rotation, so the rotator is a single AND-OR level with no binary decoder. |
| `tcr_pkg` | `rtl/tcr_pkg.sv` | Defines `tcr_case_e`, the outcome: `SUM_LT_M1`, `SUM_EQ_M1`, `SUM_EQ_M`, `SUM_GT_M`. |

## Interface and timing

```systemverilog
tcr_mod_adder #(.MOD(7)) u_add (
  .u       (u),         // input  [MOD-2:0]  residue, thermometer code, ones at bit 0 upward
  .v       (v),         // input  [MOD-2:0]  residue, thermometer code
  .sum     (sum),       // output [MOD-2:0]  (u+v) mod MOD, thermometer code
  .sum_case(sum_case)   // output tcr_pkg::tcr_case_e  which outcome produced the sum
);
```

* `MOD` is the modulus m. It must be at least 2, and the default is 7.
  The modulus need not be prime.
* The adder has no clock, no reset and no registers. `sum` depends
  combinationally on `u` and `v`, so the latency is zero cycles. To pipeline
  it, register the operands or the sum outside the adder.
* The operands must be valid thermometer codes. For any other input word, the
  sum is not defined.
* For m = 7, synthesis gives about 60 word-level cells and no flip-flops.

## What follows the original description and what is this design's own

These parts follow the original description:

* The operand width is m-1 bits, with the ones on the right.
* V is reversed, then OR and XOR rows are formed with U.
* The four outcomes and the order in which they are tested.
* Rotating left by V when the sum is below m-1.
* Using the XOR word as the result when the sum is m-1.
* Outputting zero when the sum is m.
* The (M+1)-zeros / (N-1)-ones result when the sum is above m.

These are this design's own choices:

* **How the rule for sums above m is read.** The rule is written in terms of
  the XOR gates' zeros and ones. Taken that way, it gives the wrong result for
  6+2 mod 7 (`000111` instead of `000001`). The worked example gives
  `000001`, and so does the rule when M and N count the *complemented* XOR
  word. The complemented reading is implemented, and it is correct for every
  operand pair.
* **How the rule is built.** The original says only what the result must be.
  Here it reuses the rotator, then complements and shifts right by one.
* **The rotator.** It is built as a one-hot AND-OR level driven straight from
  the thermometer code.
* **The `sum_case` output.** The original adder has only the sum.
  `sum_case` is added so that each outcome can be observed.
* **Combinational only.** No clocking or registers were specified, so the
  adder has none.

The published comparison also covers three earlier thermometer-code adders:
a MUX-based shifting adder, an AND/NOR-based adder and an m-bit
rotate-based adder. Those are not part of this design and are not included.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=F`. A watchdog stops a run that hangs.

| Testbench | What it does |
|---|---|
| `tb/tb_tcr_mod_adder.sv` | Runs the top at its default m = 7. Checks the four worked examples bit for bit, then all 49 operand pairs for sum and outcome. Requires all four outcomes to occur: they occur 21, 7, 6 and 15 times. |
| `tb/tb_tcr_mod_adder_moduli.sv` | Runs m = 7, 8, 9, 11 and 13, exhaustively, through `tb/tcr_mod_adder_checker.sv`. These are the moduli of the published delay, power and area comparison. |
| `tb/tb_tcr_rotl.sv` | Tests the rotator at W = 6 (every data word, every amount) and at W = 12 (random data, every amount). |
| `tb/tb_tcr_case_detect.sv` | Tests the classifier on every pair of 6-bit OR and XOR words, including words that valid operands cannot produce. |

All four pass. Each block's testbench was also run against a copy of the block
with a deliberate bug, and each run failed:

* a rotator that turns one place too far;
* a classifier with the sum = m and sum > m outcomes swapped;
* an adder that skips the final shift.

Delay, power and area figures from a standard-cell flow are not reproduced
here.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_tcr_mod_adder \
  rtl/tcr_pkg.sv rtl/tcr_rotl.sv rtl/tcr_case_detect.sv rtl/tcr_mod_adder.sv \
  tb/tb_tcr_mod_adder.sv
./obj_dir/Vtb_tcr_mod_adder
```

For the multi-modulus run, add `tb/tcr_mod_adder_checker.sv` and use
`--top-module tb_tcr_mod_adder_moduli` with `tb/tb_tcr_mod_adder_moduli.sv`.
To try another modulus, change `MOD` on the instance, or add it to the
`MODS` list in the multi-modulus testbench.
