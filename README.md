# Fixed-width radix-4 Booth multiplier with error compensation

Many signal-processing and learning workloads tolerate small arithmetic
errors. This multiplier gives up a little accuracy to save area and energy.
It returns only the upper half of a signed N × N product, the "fixed-width"
result, and it never forms most of the partial-product bits that would feed
the discarded lower half.

Dropping those bits biases the result, because the discarded columns would
have carried into the kept half. A small *error compensation unit* (ECU)
estimates that carry from a few cheap "signatures" of the operands. It puts
the input pair into one of five groups and adds the group's constant at the
weight of the output LSB.

The default size is N = 16: 16-bit signed `a` and `b`, 16-bit result `p`.
The whole datapath is combinational, with no clock, reset or pipeline
registers.

```
 a ─┬───────────────► booth_selector ──(AP + TP_H rows, sign row)──┐
    │                      ▲                                       ▼
 b ─┼──► booth_encoder ────┘                               compression_tree ─► final_adder ─► p
    │                                                              ▲   (3:2, 4:2)   (2:2, 3:2)
    └──► ecu: signature_generator ─► classifier ─► ecu_mux ─ theta ┘
              (ca, cb, fa)                        (5 constants)
```

## What is kept and what is dropped

Radix-4 Booth recoding turns B into N/2 digits d_i ∈ {−2, −1, 0, +1, +2}.
Each digit selects a partial-product row of N+1 bits, shifted left by 2i.
For N = 16 that gives eight rows. The columns of the array split into three
regions:

| region | columns | treatment |
|---|---|---|
| AP | N … 2N−1 | kept; these are the output bits |
| TP_H | N−1 | kept; added in, so that its carry into column N is exact |
| TP_L | 0 … N−2 | never generated; replaced by the ECU's estimate |

The selector keeps only the N+1 columns N−1 … 2N−1. In every row word, bit k
stands for column N−1+k.

A negative digit is formed as the inverted magnitude plus one. That "+1" sits
at column 2i, which is always inside TP_L when N is even, so every one of
them is dropped with TP_L.

Sign extension uses the usual trick: invert each row's MSB, and add one
constant row, −Σ 2^(N+2i) mod 2^2N. Only the kept part of that row is used.

What the hardware computes is therefore exactly

```
p = upper N bits of ( A·B − TP_L + theta·2^N )   (mod 2^2N)
```

Here TP_L is the value of the dropped bits, negation "+1"s included. The
testbenches check this identity bit for bit.

## The error compensation unit

The ECU (`ecu.sv`) has three parts.

**Signature generator** (`signature_generator.sv`). From B it forms two flags
per digit:

- `n_i = b[2i+1]`, the digit's sign bit;
- `z_i`, which is 1 when b[2i+1] = b[2i] = b[2i−1], i.e. the digit is zero.

Two adders count these flags: `ca` is the number of zero digits and `cb` the
number of digits with the sign bit set. A bit-sorting network turns A into
`fa`, the thermometer code of A's population count: `fa[k]` = 1 when A has
more than k ones.

**Sorting network** (`sorting_network.sv`, `sort_cell.sv`). It is built from
min/max cells; for single bits these are AND and OR. The cells are arranged
as an odd-even transposition sorter of W stages.

**Classifier and K-to-1 mux** (`ecu.sv`, `ecu_mux.sv`). With D = N/2 digits,
the classifier picks a case:

| case | condition (first match) | theta added (output LSBs) |
|---|---|---|
| 5 | ca ≥ 3D/4 | 0 |
| 4 | ca ≥ D/2 | 1 |
| 1 | ca ≥ D/4 | 1 |
| 2 | cb ≥ D/2, or A has ≥ N/2 ones | 2 |
| 3 | otherwise | 2 |

The mux then returns the case's constant (`amul_pkg::comp_value`). The
`group` output reports the case as 0 … 4 for cases 1 … 5.

The reasoning behind the rule: a zero digit contributes no ones to TP_L. The
expected value of TP_L, in output LSBs, therefore falls almost linearly with
the number of zero digits. For random 16-bit operands it is about 2.0, 1.5,
1.0 and 0.5 at 0, 2, 4 and 6 zero digits. The sign count and A's weight
shift it by about ±0.1 to ±0.2.

The five constants 1, 2, 2, 1, 0 are those of the published 16 × 16
compensation table. That table also lists real-valued compensations for the
same five cases (0.9853, 1.1259, 1.0188, 0.8580, 0.4001). The hardware
adds the integers, not the real values. **The mapping from signatures to the five
cases is this design's own.** Only the signatures and the constants are
given, not the rule that joins them. Changing the rule means editing the
`always_comb` block in `ecu.sv` and `group_ref` in `tb/tb_ref_pkg.sv`.

## Compression and final addition

`compression_tree.sv` is a row-wise carry-save tree. At each level it does
three things:

- every group of four rows goes through a row of 4:2 compressors;
- a leftover group of three goes through 3:2 compressors;
- one or two leftover rows pass through unchanged.

Within a row of 4:2 cells, `cout` of bit j feeds `cin` of bit j+1. `cout`
never depends on `cin`, so no carry ripples through a level. For N = 16 the
tree receives 10 rows: 8 partial products, the sign-extension row and the
theta row. It reduces them in three levels, 10 → 6 → 4 → 2.

`final_adder.sv` adds the two remaining rows with a ripple-carry chain: a 2:2
compressor (half adder) at bit 0 and 3:2 compressors above it. All sums are
modulo 2^(N+1) in column coordinates. Bit 0 (column N−1) is then dropped to
give `p`.

## Accuracy measured in simulation

The end-to-end testbench runs 60,000 random 16-bit pairs. In half of them, B
has extra zero digits forced in, so that every case occurs. It compares the
results with the exact product:

| 16 × 16, errors in output LSBs | compensated | truncated only (theta = 0) |
|---|---|---|
| mean \|error\| | 1.06 | 2.12 |
| max \|error\| | 4.5 | 4.5 |
| mean square error | 1.68 | 5.00 |

These numbers describe this input mix; uniformly random operands give
somewhat different values. Energy and area were not measured. The published
results (44.85 % less energy and 28.33 % less area than an accurate
fixed-width Booth multiplier in a 90 nm library) cannot be reproduced in
simulation.

The RTL is parametric in N (any even N ≥ 4). At N = 8 it has been checked
exhaustively, over all 65,536 operand pairs. There the mean |error| is 0.54
LSBs with compensation and 1.19 without; the mean square error is 0.45
against 1.62. It has also been run at N = 32. At that size it still uses
the 16 × 16 constants. A 32-bit design would need constants of its own, which are not published. With the 16 × 16
constants the mean |error| is 2.93 LSBs, against 4.12 for truncation alone.

## Where this design departs from, or fills in, the published description

- The radix-4 flag encoding (`neg/one/two/zero`, `amul_pkg::booth_digit_t`)
  is this design's own.
- The sign-extension method is this design's own.
- The tree shape and the ripple-carry final adder are this design's own.
- Operands are taken as two's-complement signed numbers.
- The compressor types are given: 2:2, 3:2 and 4:2. The published
  description places all three in the compression stage. Here the
  compression tree uses 3:2 and 4:2 cells, and the 2:2 cell appears only in
  the final adder.
- The ECU reads B's bits directly, as the signature-generator schematic
  shows. It does not take the encoder's outputs, although the top-level
  block diagram draws an arrow from the encoder into the ECU.
- The case rule is this design's own (see above).
- The `group` output is an addition, for observation and test.
- Not built:
  - the full-width variant, which returns an approximate 2N-bit product;
  - the approximate squarer.

  Neither is described in enough detail to design.

## Files

`rtl/` (one module or package per file):

| file | role |
|---|---|
| `amul_pkg.sv` | `booth_digit_t`, group count, compensation constants |
| `proposed_array_multiplier.sv` | top level: `a`, `b` → `p`, `group` |
| `booth_encoder.sv` | radix-4 recoding of B |
| `booth_selector.sv` | kept partial-product rows + sign-extension row |
| `ecu.sv`, `ecu_mux.sv` | compensation unit, K-to-1 mux |
| `signature_generator.sv` | `ca`, `cb`, `fa` |
| `sorting_network.sv`, `sort_cell.sv` | bit sorter |
| `compression_tree.sv` | carry-save reduction to two rows |
| `compressor_22/32/42.sv` | 2:2, 3:2, 4:2 compressors |
| `final_adder.sv` | carry-propagate adder |

`tb/`:

- one self-checking testbench per module, `tb_<module>.sv`;
- `tb_amul_n8.sv`, the exhaustive 8-bit run;
- `tb_amul_n32.sv`, the 32-bit run;
- `tb_ref_pkg.sv`, the integer reference model: Booth digits, row patterns,
  the TP_L value, the case rule and the expected output.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
after a fixed simulated time if it hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/amul_pkg.sv tb/tb_ref_pkg.sv tb/tb_proposed_array_multiplier.sv \
    --top-module tb_proposed_array_multiplier
./obj_dir/Vtb_proposed_array_multiplier
```

To run another testbench, replace the last file and the top-module name. For
lint, use `verilator --lint-only -Wall -Irtl rtl/amul_pkg.sv
rtl/proposed_array_multiplier.sv`. The remaining warnings are unused top
carry bits, which are dropped on purpose because all sums are modular.
