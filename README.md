# Encoded Vedic multiplier: unsigned N x N multiplication with N/2 partial products

A plain array or Vedic (vertical-and-crosswise, *Urdhva Tiryagbhyam*) multiplier
makes one partial-product row per multiplier bit. An 8 x 8 multiplier therefore
adds eight rows of AND-gate products. This design reads the multiplier **two
bits at a time** instead. Each 2-bit digit selects a ready-made row of 0, 1, 2
or 3 times the multiplicand. That halves the number of rows to N/2 (four for
8 x 8), and no AND-gate partial products are formed at all. A digit is a
plain unsigned value 0..3, so, unlike radix-4 Booth encoding, there are no
negative rows, no overlapping bit and no sign or zero padding. The price is
one small adder per row to form 3 x multiplicand.

The RTL is parameterised by the operand width `N` (even, default 8). It is
purely combinational and takes unsigned operands.

## Data path

```
multiplier[N-1:0] ──► group into 2-bit digits d_i = multiplier[2i+1:2i]
                               │
multiplicand ───► vedic_new_encoder: one vedic_row_encoder per digit
                               │ rows[i] = d_i × multiplicand (N+2 bits)
                               ▼
                  shifters: row i << 2i   (row 0 unshifted; 2, 4, 6 for N = 8)
                               │
                               ▼
                  vedic_column_adder: Σ aligned rows ──► product[2N-1:0]
```

For N = 8 the four rows are 10 bits wide and start at bits 0, 2, 4 and 6. The
last row therefore ends exactly at bit 15, and the 16-bit product never
overflows.

## The digit code and the row encoder

Each digit `{b(i+1), b(i)}` gets a code `A_i`:

| b(i+1) b(i) | A_i | row produced                                  |
|-------------|-----|-----------------------------------------------|
| 00          | 0   | 0                                             |
| 01          | 1   | multiplicand                                  |
| 10          | 2   | multiplicand shifted left by one              |
| 11          | 3   | (multiplicand) + (multiplicand << 1)          |

The code is just the digit's binary value. The point of naming it is the row
it selects. Codes 0, 1 and 2 cost only wiring and a multiplexer. Code 3 needs
an addition, and this is the only place in the design where the multiplicand
passes through an adder before the final sum. `vedic_row_encoder` builds that
sum as an (N+2)-bit ripple-carry chain of full adders. A 4-way multiplexer
then picks the row. An immediate assertion checks that the 3x adder never
carries out of bit N+1 (it cannot, since 3·(2^N−1) < 2^(N+2)).

For N = 8 the encoder has 8 + 2 inputs and a 10-bit row output. The code is
also brought out as a 2-bit output, for observation only.

`vedic_new_encoder` places N/2 row encoders side by side, one per digit. All
the rows are ready at once. One could instead reuse a single row encoder for
the digits one after another, with the multiplicand held fixed. That
sequential variant is not built here.

## Shifting and the final adder

Row i has weight 4^i, so `vedic_enc_mult` shifts it left by 2i bits into a
2N-bit frame. These are constant shifts: wiring, with no storage.

`vedic_column_adder` adds the aligned rows. It is organised the same way as
the vertical-and-crosswise product equations. Column k adds bit k of every row
plus the carry `c(k-1)` left over from column k-1. Bit 0 of that column sum is
product bit `y[k]`, and the rest of it (possibly several bits) is the carry
`c(k)` into the next column. For four rows a column sum never exceeds 7, so
the carries are at most 3 bits. Synthesis tools are free to turn this into any
adder tree. The description only fixes the arithmetic.

The encoder, the three shifts of 2/4/6 bits and the single adder feeding
Y15..Y0 are the architecture being described. These are choices of this
implementation:
- the generalisation to any even N;
- the parallel encoder bank;
- the ripple 3x adder;
- the column-wise organisation of the final adder;
- the extra `codes` port.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/vedic_enc_pkg.sv` | `vedic_enc_pkg` | `code_t` enum of the four digit codes |
| `rtl/vedic_row_encoder.sv` | `vedic_row_encoder #(N=8)` | one digit → code and row `code × multiplicand` |
| `rtl/vedic_new_encoder.sv` | `vedic_new_encoder #(N=8)` | digit grouping and N/2 row encoders |
| `rtl/vedic_column_adder.sv` | `vedic_column_adder #(ROWS=4, W=16)` | column-wise multi-operand adder, result mod 2^W |
| `rtl/vedic_enc_mult.sv` | `vedic_enc_mult #(N=8)` | top: encoder bank, shifts, adder |

Top-level ports of `vedic_enc_mult`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `multiplicand` | in | N | unsigned multiplicand |
| `multiplier` | in | N | unsigned multiplier |
| `product` | out | 2N | `multiplicand × multiplier` |
| `codes` | out | N/2 × 2 (`code_t`) | digit codes, LSB digit at index 0 |

There is no clock, reset or handshake. The product is valid one combinational
delay after the inputs change. To pipeline the multiplier, register the
inputs and the output around it. For a deeper pipeline, also register the
`aligned` rows between the shifts and the adder.

## Verification

Each testbench is self-checking. It applies one vector per clock cycle of a
testbench-only clock, compares the result with ordinary integer arithmetic,
and ends with a `TB_RESULT checks=… failures=…` line. A watchdog stops a run
that overruns.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_vedic_row_encoder.sv` | all 256 multiplicands × 4 digits (N = 8); every code seen |
| `tb/tb_vedic_new_encoder.sv` | all 65,536 operand pairs; each row and code against digits found by division |
| `tb/tb_vedic_column_adder.sv` | zero, all-ones, every single bit, carry chains, 20,000 random 4 × 16-bit sums |
| `tb/tb_vedic_enc_mult.sv` | default 8 × 8 multiplier, all 65,536 pairs. Also counts use of every code in every digit position and that Y15 and the largest product 255 × 255 are reached |
| `tb/tb_vedic_enc_mult_n4.sv` | the multiplier built with N = 4, all 256 pairs |

All of them pass. Each testbench was also run against a copy of its module
with one deliberate bug, and it caught the bug:
- code 3 giving the 2x row;
- one digit's bits corrupted;
- wrong carry extraction in the adder;
- the last row shifted by 7 instead of 6.

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/vedic_enc_pkg.sv tb/tb_vedic_enc_mult.sv --top-module tb_vedic_enc_mult
./obj_dir/Vtb_vedic_enc_mult
```

The full 8 × 8 exhaustive run takes well under a second.

## Limits and departures

- **Unsigned only.** Signed operands would need sign handling of the top
  digit (or a Booth-style recoding). That is outside this design.
- **Widths.** `N` must be even. An odd width is rejected at elaboration. For
  an odd width, zero-extend the operands by one bit.
- **Timing and area** are not characterised here. The row encoder's 3x adder
  is a ripple chain of N+2 bits, and it sits in series with the final adder.
  For wide N, a faster 3x adder would shorten the critical path.
- **Sequential encoder.** A single row encoder stepping through the digits
  (a smaller, multi-cycle variant) is not provided. The parallel form is the
  one implemented.
- **Comparison designs.** The conventional Vedic multiplier with eight AND
  rows and the radix-4 Booth encoder are the comparison points for this
  design. They are not part of this RTL.
