# Unified decimal/binary multi-operand adder with a fast 7-bit binary-to-BCD converter

Adding many BCD numbers at once is awkward: a conventional BCD adder has to fix every
intermediate digit sum that passes 9, so a tree of BCD adders does a decimal correction
at every level. This design does none in the tree. Every digit column is summed as
plain binary numbers. That needs only carry-save adders and one small carry-propagate
adder per column. The decimal correction is made once, at the end: each binary column
sum is split into a tens part and a units part by a fast combinational 7-bit
binary-to-BCD converter, and the split parts are added in one carry-propagate pass.

The tree never sees the radix, so the same hardware also adds binary numbers. In binary
mode the split is radix 16, which is only a bit slice. The adder is therefore a unified
decimal/binary multi-operand adder with a one-bit mode input.

Everything is combinational SystemVerilog. There are no clocks, registers or resets.

## How a sum is formed

Take `N_OPS` operands of `NDIG` four-bit digits. Operand `j` has digit `i` at
`opnds[j][i]`. The sum is

    sum = Σ_i  colsum_i · R^i,       colsum_i = Σ_j opnds[j][i],    R = 10 or 16

1. **Column sums.** For each digit position a `csa_tree` compresses the `N_OPS` digits
   into a sum word and a carry word. A 7-bit adder then gives `colsum_i`. With 8
   operands the column sum is at most 72 in decimal mode and 120 in binary mode, so it
   always fits the converter's 7-bit input. This is why `N_OPS` is limited to 1..8.
2. **Split.** Each column sum is split as `colsum_i = hi_i·R + lo_i`. In decimal mode
   the binary-to-BCD converter computes the split. In binary mode it is `v[6:4]` and
   `v[3:0]`.
3. **Final pass.** Digit position `i` receives `p_i = lo_i + hi_(i-1) + k_i`, where
   `k_i` is the carry from position `i-1`. `p_i` is at most 23 in decimal mode. It is
   split again by the same kind of splitter into the result digit `p_i mod R` and the
   carry `k_(i+1)`. Position `NDIG` has no column of its own: it takes `hi_(NDIG-1)`
   and the last carry. The result has `NDIG+1` digits, which holds any sum of up to
   8 operands.

Example, decimal, 8 operands all equal to 99: both column sums are 72, so both split
into 7 | 2. Position 0 is 2, position 1 is 2 + 7 = 9, position 2 is 7. The result is
792 = 8 · 99.

Steps 2 and 3 are both done by `final_correction`. Each split in it is a `digit_split`:
a converter plus a mode multiplexer. The multiplexer is the only place where the two
modes differ.

## The 7-bit binary-to-BCD converter

The converter takes `A = A6..A0` (0..127) and returns `D_H = A div 10` and
`D_L = A mod 10`. It does not divide. It cuts `A` into a high and a low bit group.
Each group's value is mapped at once to its share of the tens digit and its share of
the units digit. The shares are then added, and the units sum gets one BCD
correction.

One fact drives both versions. Every group except the lowest bits weighs a multiple of
8 or 16, so its units share is even. The units digit's weight-1 bit is therefore
always `A0`. The units shares are carried as three-bit "half-units" with weights 2, 4
and 8, and `D_L[0] = A0` bypasses all logic.

### Three-Four split (`bd_conv_34`)

The input is cut into `A6A5A4 | A3A2A1A0`.

| block | output |
|---|---|
| `contrib_hi3` | `X7..X4 = floor(16k/10)` and `X3X2X1 = (16k mod 10)/2`, with `k = A6A5A4` (an 8-entry table) |
| `contrib_lo4` | `Z4 = (A3..A0 ≥ 10)` and `Z3Z2Z1 = (A3..A0 mod 10)/2` |
| `dl_gen_34` | a 3-bit adder forms `t = X + Z` (carry-in 0). The decimal carry is `C = (t ≥ 5)`, because 5 half-units make ten. A second 3-bit adder adds the correction `0,C,C` (+6 on the full digit) and drops its carry-out. `D_L = {sum, A0}` |
| `dh_gen_34` | `D_H[3] = X7`. A 3-bit adder adds `X6X5X4`, `0,0,Z4` and carry-in `C`. Its carry-out is never 1 and is dropped |

This version is exact for all 128 inputs. For inputs 100..127, `D_H` is the binary
value 10..12.

### Four-Three split (`bd_conv_43`, the default in the adder)

The input is cut into `A6A5A4A3 | A2A1A0`. The low group is below 8. So it adds nothing
to the tens digit, its units share is just `0,A2,A1`, and it needs no contribution
logic. All blocks are flat sum-of-products logic:

* `contrib_hi4` computes `Y7..Y4 = floor(8k/10)` and `Y3Y2Y1 = (8k mod 10)/2`, with
  `k = A6..A3`.
* `dl_gen_43` has three parts:
  * Stage I is a custom adder of `Y3Y2Y1 + 0A2A1` for the pairs that can occur:
    * `S3 = Y3 | Y2Y1A1 | Y2A2 | Y1A2A1`
    * `S2 = Y2 ^ A2 ^ Y1A1`
    * `S1 = Y1 ^ A1`
  * The carry generator is `C = Y2Y1A2 | Y3A1 | Y3A2 | Y2A2A1`.
  * The correction adds `0,C,C`, as in the other version.
* `dh_gen_43` computes `D_H[0] = Y4 ^ C`, `D_H[1] = C·Y4 | Y5`, `D_H[3:2] = Y7Y6`.
  The increment stops at bit 1 because `C` never meets `Y5Y4 = 11`.

The tens path has no adder, and the low bits need no logic, so this is the shallower of
the two converters. Its `Y` equations treat `k ≥ 11` as don't-care. **It is exact only
for inputs 0..87.** That covers its intended use, products of two BCD digits (at most
81). It also covers every value the adder feeds it: column sums of at most 72 and
final-pass sums of at most 17 in decimal mode. Binary mode never uses its output. Use
`SPLIT_THREE_FOUR` if you reuse the converter for the full 7-bit range. In simulation, an
assertion in `digit_split` stops the run if a decimal-mode value above 87 reaches a
Four-Three converter.

## Where this RTL departs from or fills in its source

The converters follow a published design, which gives their block structure and, for
the Four-Three split, logic equations. This RTL fixes the following points itself:

* **Four-Three `Y2`.** One product term of `Y2` is `(¬A5)·A4·A3`.
* **Four-Three stage I.** `S2` is written as the exact sum bit, and the term `Y1A2A1`
  belongs to `S3`.
* **Check of the Four-Three logic.** All of its equations were checked against
  `div`/`mod` for every input from 0 to 87.
* **Three-Four split.** This version uses the plain adder form of its units generator.
  An optimized variant with a custom first adder is not included. The plain form
  computes the same function.
* **`C` in `dl_gen_34`.** The source forms `C` from the first adder's carry-out and sum
  bits. Here `C` is written as the condition those bits decide, `t ≥ 5`.
* **Contribution tables.** `contrib_hi3` and `contrib_lo4` are given only by function
  in the source. They are written as the table and as compare-and-subtract logic.
* **Four-Three correction.** The correction is the same `0,C,C` adder as in the
  Three-Four split.

The multi-operand adder around the converters is described in the source only at the
level of "binary CSA tree, then one decimal correction with the converter, usable for
binary too". The following are this design's own choices:

* the per-column CSA trees (Wallace-style, 3:2 rows);
* the 7-bit column adder;
* building the final pass from the same converter;
* the mode multiplexer;
* the sizes `N_OPS = 8` (the largest count whose column sums fit 7 bits in both modes)
  and `NDIG = 16` (the coefficient length of IEEE 754-2008 decimal64);
* the Four-Three split as default, because the source rates it the faster of the two.

Decimal operands must be valid BCD. Invalid digits give an unspecified result, and no
checker flags them.

## Modules

| module | role |
|---|---|
| `bcd_pkg` | `digit_t`, `colsum_t`, `add_mode_t` (`MODE_BIN`, `MODE_DEC`), `conv_split_t` (`SPLIT_THREE_FOUR`, `SPLIT_FOUR_THREE`) |
| `decbin_mo_adder` | top: column trees and final correction. Parameters `N_OPS` (1..8), `NDIG`, `SPLIT` |
| `csa_tree`, `csa_3to2` | N-operand carry-save tree built of 3:2 rows. The caller adds the two output words |
| `final_correction` | split of each column sum and the carry-propagate pass |
| `digit_split` | radix-10 (converter) or radix-16 (bit slice) split of a 7-bit value |
| `bd_conv_34` + `contrib_hi3`, `contrib_lo4`, `dl_gen_34`, `dh_gen_34` | Three-Four split converter |
| `bd_conv_43` + `contrib_hi4`, `dl_gen_43`, `dh_gen_43` | Four-Three split converter |

Top-level ports:
* `mode` (`add_mode_t`);
* `opnds` (`digit_t [N_OPS-1:0][NDIG-1:0]`);
* `result` (`digit_t [NDIG:0]`, least significant digit at index 0).

Delay grows with `NDIG`, because the final pass ripples one converter per digit. A
pipelined or carry-select final pass would be the natural change for long operands.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a hung run. With
Verilator 5, for example:

    verilator --binary --timing --assert --top-module tb_decbin_mo_adder \
        rtl/*.sv tb/tb_decbin_mo_adder.sv
    ./obj_dir/Vtb_decbin_mo_adder

`bcd_pkg.sv` must be read before the modules that import it. The glob above already
lists it first.

What the testbenches cover:

* **Converters and their sub-blocks.** Checked exhaustively against integer `div`/`mod`:
  all 128 inputs for the Three-Four split, inputs 0..87 for the Four-Three split.
* **`csa_tree`.** Random tests with 8, 5, 3, 2 and 1 operands.
* **`final_correction`.** Random column sums, in both modes and with both converters.
* **`tb_decbin_mo_adder`.** Runs the top at its default size (8 × 16 digits, Four-Three
  split). It sends 5000 additions and compares all 17 result digits with a 128-bit
  reference. It also counts each mechanism and fails if one never occurs:
  * decimal and binary additions;
  * a mode switch between consecutive additions;
  * a column sum of ten or more;
  * a carry inside a column converter;
  * a carry in the final pass;
  * a nonzero extra top digit.
* **`tb_decbin_mo_adder_34`.** Runs the Three-Four split version with 8, 5 and 1
  operands.

All testbenches pass. Each block was also tested against a deliberately broken copy, and
its testbench caught the fault every time.
