# Complex multiplier on Vedic (Urdhva Tiryakbhyam) multipliers

This is a combinational multiplier for two complex numbers, `(ar + j ai)(br + j bi)`.
It uses three real multiplications instead of four, by sharing one product between
the real and imaginary parts:

    pr = ar·br − ai·bi = ar·(br + bi) − (ar + ai)·bi
    pi = ar·bi + ai·br = ar·(br + bi) + (ai − ar)·br

Each real multiplication runs on an unsigned N×N *Vedic* multiplier. That multiplier
follows the Urdhva Tiryakbhyam ("vertically and crosswise") rule of Vedic mathematics,
built as a recursive tree: a 2×2 gate-level cell, then 4×4 from four 2×2, 8×8 from
four 4×4, and 16×16 from four 8×8. Each level merges its four sub-products with three
ripple carry adders. The default size is 16-bit real and imaginary parts. At that size
there are three 16×16 multipliers, and both output parts are 34-bit two's complement.

## The Vedic multiplier

### The 2×2 cell (`vedic2x2`)

For `a = a1a0` and `b = b1b0`:

| step | operation | result |
|------|-----------|--------|
| vertical  | `a0·b0` | product bit 0 |
| crosswise | `a1·b0 + a0·b1`, half adder | sum → bit 1, carry `c1` |
| vertical  | `a1·b1 + c1`, half adder | sum → bit 2, carry → bit 3 |

This takes four AND gates and two half adders.

### One level of the tree (`vedic4x4`, `vedic8x8`, `vedic16x16`, `vedic_merge`)

An N-bit operand is split into halves of H = N/2 bits: `aL`/`aH` and `bL`/`bH`.
Four half-size multipliers form

    q0 = aL·bL (vertical)   q1 = aH·bL, q2 = aL·bH (crosswise)   q3 = aH·bH (vertical)

Each of these is N bits wide. `vedic_merge` adds them with three ripple carry adders:

    adder 1, N bits   : x = q1 + q2                 (carry kept: x has N+1 bits)
    adder 2, N+1 bits : y = x + q0[N-1:H]
    adder 3, N bits   : z = q3 + y[N:H]
    p = { z, y[H-1:0], q0[H-1:0] }

Two points are easy to get wrong:

- **Adder widths.** Adder 2 must be one bit wider than the others. The sum of the two
  cross products, `x`, can reach 2(2^H − 1)², and that needs N+1 bits. If the carry of
  adder 1 is dropped, the product is wrong for most large operands.
- **Unused carries.** The carry-outs of adders 2 and 3 are always zero, because the
  product fits in 2N bits. They are left unconnected, and Verilator notes each one as
  an empty pin (`PINCONNECTEMPTY`).

The column view of the same multiplication is the list of cross products
C0 … C6 of a 4×4. Column k collects the terms a_i·b_j with i + j = k, and
p = Σ C_k·2^k. The testbenches compute their expected products this way, so the
reference shares nothing with the adder tree it checks.

`vedic_mult #(N)` picks the fixed-size multiplier for N = 2, 4, 8 or 16. Any other N
stops elaboration with an error.

## The complex multiplier (`complex_mult`)

The three-multiplier identity above has operands that do not fit an N×N unsigned
multiplier directly. This implementation handles that as follows:

1. **Pre-adder carries.** `br + bi` and `ar + ai` are N+1 bits wide. Only their low
   N bits go to the multiplier. When the carry is set, the other factor is added once
   more at weight 2^N, using one N-bit ripple carry adder on the upper half of the
   product:
   `m1 = ar·(br+bi) = ar·s[N-1:0] + (carry ? ar << N : 0)`.
   `m2 = (ar+ai)·bi` is corrected the same way.
2. **Negative difference.** `ai − ar` is computed as `ai + ~ar + 1`. The carry-out
   means `ai ≥ ar`. When it is clear, the difference is negated to get its magnitude,
   which always fits in N bits. The third multiplier forms `m3 = |ai − ar|·br`. The
   sign then chooses whether `m3` is added to `m1` or subtracted from it.
3. **Output combination.** `pr = m1 − m2` and `pi = m1 ± m3` are computed with
   (2N+2)-bit ripple carry adders, subtracting as `a + ~b + 1`.

Every adder and subtractor in the design is the ripple carry adder `rca`, a chain of
`full_adder` cells.

### Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `ar`, `ai` | in | N | real and imaginary part of a, unsigned |
| `br`, `bi` | in | N | real and imaginary part of b, unsigned |
| `pr` | out | 2N+2 | `ar·br − ai·bi`, two's complement |
| `pi` | out | 2N+2 | `ar·bi + ai·br`, two's complement (never negative) |

Parameter: `N` (default 16). It may be 2, 4, 8 or 16.

### Timing

The whole design is combinational. There is no clock and no reset, and the result is
valid one propagation delay after the inputs change. The critical path runs through
one 16×16 tree (the 2×2 cell and three levels of merge adders), then the carry-correction adder, then
the 34-bit output adder. To use it in a clocked datapath, put registers around
`complex_mult`. Pipelining inside it is not part of this design.

## What follows the source description and what does not

These parts follow the description of the design:

- the 2×2 cell
- the four-sub-multiplier, three-ripple-adder construction of the 4×4, and its reuse
  for 8×8 and 16×16
- the three-multiplier complex product
- the 16-bit main size, with 8-bit also evaluated

These are choices of this implementation:

- **Unsigned operands.** The Vedic tree is an unsigned multiplier, and the only worked
  example uses positive numbers. Signed (two's complement) complex inputs are **not**
  supported. Adding them would need sign-magnitude conversion around each multiplier,
  and `br + bi` could then reach 2^N, beyond an N×N multiplier.
- **Adder widths.** The 4×4 is described with "three 4-bit" adders, and one of them is
  also called 6-bit. The widths used here (N, N+1, N) are the smallest that give exact
  products.
- The carry correction of the N+1-bit pre-adder sums, and the sign-magnitude handling
  of `ai − ar`.
- The 2N+2-bit output width. It is wide enough for every result, including the largest
  `pi` of 2(2^N − 1)².
- The carry-in port of `rca`. It lets the same cell subtract.
- The fixed sizes 2, 4, 8 and 16. Wider sizes need one more `vedicMxM` file written
  the same way.

The area and delay comparison against a conventional array multiplier, made on an
FPGA, is not reproduced. The array multiplier is not part of this design.

## Files

| file | contents |
|------|----------|
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit adder cells |
| `rtl/rca.sv` | W-bit ripple carry adder with carry in and out |
| `rtl/vedic2x2.sv` | 2×2 Vedic cell |
| `rtl/vedic_merge.sv` | three-adder merge of one tree level |
| `rtl/vedic4x4.sv`, `rtl/vedic8x8.sv`, `rtl/vedic16x16.sv` | tree levels |
| `rtl/vedic_mult.sv` | picks the multiplier for a given N |
| `rtl/complex_mult.sv` | top: three-multiplier complex product |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## Verification

Every testbench compares the block against arithmetic worked out independently. Each
prints `TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog if
something hangs.

| testbench | coverage |
|-----------|----------|
| `tb_vedic2x2` | all 16 operand pairs |
| `tb_rca` | 4-bit: all values of a, b and cin. 34-bit: random values plus the full carry chain |
| `tb_vedic4x4` | all 256 operand pairs |
| `tb_vedic8x8` | all 65,536 operand pairs |
| `tb_vedic16x16` | corner values and 50,000 random pairs |
| `tb_complex_mult` | default 16-bit size; see below |
| `tb_complex_mult_n8` | the same end-to-end test at N = 8 |

`tb_complex_mult` runs at the default 16-bit size. It applies:

- the worked example (11 + j5)(5 + j2) = 45 + j47
- corner values
- 20,000 random full-range operand sets
- 2,000 small ones

The reference is the four-multiplication formula. The test also counts how often each
internal path was taken, and fails if one never was:

- carry out of `br + bi`
- carry out of `ar + ai`
- `ai < ar`
- negative `pr`

Each testbench has also been shown to fail against a deliberately broken copy of its
block. The broken copies include a dropped carry, a miswired sub-multiplier and a
missing carry correction.

## Simulating

With Verilator 5:

    verilator --binary --timing -y rtl +libext+.sv -Irtl \
        --top-module tb_complex_mult tb/tb_complex_mult.sv
    ./obj_dir/Vtb_complex_mult

Swap in any other `tb/tb_*.sv` and its module name to run the other tests. To build the
8-bit version, instantiate `complex_mult #(.N(8))`.
