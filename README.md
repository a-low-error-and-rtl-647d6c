# Low-error fixed-width radix-4 Booth multiplier

A fixed-width multiplier takes two n-bit two's-complement numbers and returns
an n-bit product: the upper half of the full 2n-bit product, P ≈ A·B / 2^n.
This is the word format most DSP datapaths (filters, transforms) want.
The cheap way to get it is to build only the columns of the partial-product
array that land in the upper half, and to throw the lower half away. That
saves almost half the adders. But it always rounds the same way, and the
carries the lower half would have sent upward are lost. For n = 8 the
mean error is 1.5 units of the output LSB.

This design keeps the cheap array and adds back an estimate of the lost
carry, at almost no cost. It builds one extra column of selectors: the most
significant column of the discarded half, the *main column* at weight 2^(n-1).
It then adds a single bias bit computed from that column by a chain of
AND gates. For n = 8 the result is 20 Booth selectors, 16 full adders,
4 half adders and 3 AND gates plus an inverter. Over all 65 536 operand pairs
the mean absolute error drops from 384.25 to 103.12, in units of the full
product's LSB.

The repository holds the multiplier and its parts. It also holds a 35-tap FIR
filter that uses the multiplier for every tap, the setting in which the
multiplier is meant to be used. The filter is the top level.

## How the partial products are formed

**Booth recoding** (`booth_encoder`). B is scanned in overlapping triplets
{b[2i+1], b[2i], b[2i-1]}, with b[-1] = 0. Each triplet gives a digit
d_i = b[2i-1] + b[2i] − 2·b[2i+1] in {−2, −1, 0, 1, 2}, so there are only n/2
partial-product rows:

| b[2i+1] b[2i] b[2i-1] | row       | neg |
|-----------------------|-----------|-----|
| 000, 111              | 0         | 0   |
| 001, 010              | +A        | 0   |
| 011                   | +2A       | 0   |
| 100                   | −2A       | 1   |
| 101, 110              | −A        | 1   |

The encoder drives a control word `{neg, two, one}` (type `booth_ctrl_t` in
`fwb_pkg`) along its row.

**Selectors** (`booth_sel`). Each bit of a row is chosen by one selector:
a_j for ±A, a_(j−1) for ±2A, or 0. The bit is inverted for a negative digit.
This gives the one's complement. The +1 that would complete the negation
belongs at the row's LSB, in the discarded half, so the fixed-width array
never adds it. A full row has n+1 bits, because 2A needs one more bit than A.

**Sign-generate extension.** Extending the sign of every row to 2n bits
would cost many adders. Instead, each row's sign bit is inverted in place
at weight 2^(2i+n), and a constant 1 is placed just above it, at
2^(2i+n+1). One more constant 1 goes at 2^n. Together these constants equal
the sum of all the sign extensions, modulo 2^(2n).

## The compensation bias

Let m_i be row i's bit in the main column, S(i, n−1−2i). Let θ = Σ m_i,
which lies between 0 and n/2. The carry that the discarded half sends into
weight 2^n is about half the main column, plus half of everything below it.
Averaged over all inputs, that carry is close to θ itself, with one
exception: when every main bit is 1 (θ = n/2), the true carry is about one
less. For n = 8 the mean of (true carry − θ) is +0.02 when θ < 4, and −1.04
when θ = 4.

The hardware therefore does two things:

* It adds the main bits **one column higher**, at weight 2^n, which doubles
  their weight.
* In place of the sign-generate constant 1 at 2^n, it adds
  `comp = ~(m_0 & m_1 & … & m_(n/2−1))` (`fwb_comp`).

Compared with the exact upper half, the bias is then θ when θ < n/2, and
θ − 1 when θ = n/2. This is a threshold rule on a single index, rounded to
whole output LSBs. It costs n/2 − 1 two-input AND gates and one inverter,
and it adds no adders: the compensation bit fills the free carry input of
the lowest full adder in the final row.

Error of the multiplier over all operand pairs, with e = A·B − P·2^n:

| n | max \|e\| | mean \|e\| | variance of e | direct truncation, mean \|e\| (n = 8) |
|---|-----------|------------|---------------|---------------------------------------|
| 4 | 16        | 4.59       | 28.50         |                                       |
| 6 | 85        | 21.60      | 716.86        |                                       |
| 8 | 443       | 103.12     | 16376.65      | 384.25 (max 1024, variance 28510.19)  |

These are the figures published for this compensation scheme. The testbench
checks them exactly.

## The adder array

Only the columns 2^n … 2^(2n−1) are summed, plus the main column, which has
been moved up to 2^n. Row i keeps 2i+2 selectors: bits n−1−2i … n, where
bit n is the inverted sign. The rows are added in a carry-save array with
one level per row, and a ripple row finishes the sum (`fw_booth_mult`):

* Level 0 is row 0 alone. Column 2^n holds its inverted sign and its main
  bit.
* Level l (l = 1 … n/2−1) adds row l:
  * full adders in columns 2^n … 2^(n+2l−2);
  * one half adder in column 2^(n+2l−1), which absorbs row l−1's constant 1.

  Row l's main bit enters column 2^n through the free carry slot. Row l's
  inverted sign passes to the next level unchanged.
* The final row has full adders in columns 2^n … 2^(2n−2) and a half adder
  in column 2^(2n−1). The half adder absorbs the last row's constant 1. The
  compensation bit is the third input of the 2^n full adder. The carry out
  of the top column is dropped.

For n = 8 this is 1+3+5 full adders in the levels and 7 in the final row:
16 FA, 4 HA and 20 selectors. For comparison, the full-precision
sign-generate array has 28 FA, 12 HA and 36 selectors, and plain truncation
has 11 FA, 8 HA and 16 selectors. The multiplier is purely combinational.
Its longest path runs diagonally through the three carry-save levels and
then along the ripple row. For n = 8 that is about ten full-adder delays
plus one half-adder delay.

## FIR filter (`fwb_fir`, top)

The filter is a direct-form FIR with `TAPS` = 35 parallel taps. Its output is

    y[t] = Σ_k fw(x[t−k], h[k])

Each `fw` is an `fw_booth_mult`: the sample goes to A, and the coefficient to
the Booth-recoded B. The N-bit products are in units of 2^N. They are summed
exactly into N + ⌈log2 TAPS⌉ bits.

* A sample is taken when `in_valid` is high at a rising edge.
* `y_out` and `out_valid` follow one cycle later. The filter accepts one
  sample per cycle, and idle cycles may come at any time.
* Coefficients come in on the `coef` port.
* `rst_n` is a synchronous, active-low reset. It clears the delay line.
* Assertions check that every accepted sample, and only those, produces an
  output one cycle later.

The tap count comes from the speech low-pass filter used to evaluate the
multiplier. The coefficients, word widths, structure, handshake and reset
are choices of this design.

## Files

| file | contents |
|------|----------|
| `rtl/fwb_pkg.sv` | `booth_ctrl_t` control word |
| `rtl/booth_encoder.sv` | triplet → `{neg, two, one}` |
| `rtl/booth_sel.sv` | one partial-product bit |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | array cells |
| `rtl/fwb_comp.sv` | compensation bit, parameter `ROWS` = n/2 (default 4) |
| `rtl/fw_booth_mult.sv` | the multiplier, parameter `N` (even, ≥ 4, default 8) |
| `rtl/fwb_fir.sv` | top: FIR filter, parameters `N` = 8 and `TAPS` = 35 |
| `tb/fwb_ref_pkg.sv` | arithmetic reference model, independent of the array structure |
| `tb/*_tb.sv` | one self-checking testbench per module |

The reference model uses the fact that keeping only the columns at or above
weight 2^n of a two's-complement row is a floor division. The truncated
product is therefore Σ_i ⌊d_i·A·2^(2i) / 2^n⌋, where a negative row
contributes −|d_i|·A − 1. The compensated product adds θ − [θ = n/2] to
that sum.

## Verification

| testbench | what it checks |
|-----------|----------------|
| `booth_encoder_tb` | all 8 triplets against the table; the selected multiple equals the digit |
| `booth_sel_tb` | every control word with every pair of input bits |
| `fwb_comp_tb` | all inputs for 4 rows and for 8 rows |
| `fw_booth_mult_tb` | every operand pair for n = 4, 6, 8 against the reference, and the error statistics in the table above; 200 000 random pairs and the corner cases for n = 16 |
| `fwb_fir_tb` | default size (8 bits, 35 taps), see below |

`fwb_fir_tb` runs 1000 samples of a synthetic speech-like signal: a quiet,
noisy part, then a loud periodic part. The taps are a 35-tap Hamming
low-pass. Random idle cycles and a mid-stream reset are mixed in. A second
phase uses random coefficients whose Booth digits are all non-zero, so that
products with θ = 4 occur. The testbench checks:

* every output value, against the reference;
* the one-cycle latency;
* that the mean filter error is below that of a direct-truncation filter
  (on one run: 429 against 7505, in full-product LSBs);
* that each mechanism occurred: all five Booth digits, both θ classes, idle
  cycles and the reset.

To simulate with Verilator, run from the repository root:

    verilator --binary --timing -y rtl -y tb rtl/fwb_pkg.sv tb/fwb_ref_pkg.sv \
        tb/fw_booth_mult_tb.sv --top-module fw_booth_mult_tb -o sim
    ./obj_dir/sim

Replace `fw_booth_mult_tb` with any other testbench name. Each testbench
prints `TB_RESULT checks=… failures=…`. With `-Wall`, lint reports unused
bits for the carry out of the top column and for the unused carries above
each level's half adder. These carries are left unconnected on purpose.

## Where this departs from, or goes beyond, the published description

* **Sign of the compensation.** The published threshold rule reads
  "θ − 1 if θ < n/2, θ + 0 if θ = n/2". This RTL instead adds θ or θ − 1
  relative to the exactly sign-extended upper half. In other words, the
  complement of the AND chain replaces the constant 1 at 2^n. This choice
  reproduces the published error table exactly for n = 4, 6 and 8. The
  literal rule, measured the same way, gives a mean error of 262.6 at
  n = 8.
* **General n.** The general form is built and checked for n = 4, 6, 8 and
  16: the main bits are S(i, n−1−2i), the threshold is θ = n/2, and the array
  grows level by level. For n = 16 it gives a mean |e| of about 38 300,
  lower than the 62 501.62 that was published for that width. The scheme
  behind the published n = 16 figure is not known, so that figure is not
  reproduced.
* **Row width.** Rows are n+1 bits, with the inverted sign at weight
  2^(2i+n). That is what the sign-generate constants and the selector counts
  require.
* **Encoder signals.** The split of the encoder's control word into one-hot
  `one`/`two` selects, and the selector's gate structure, are this design's
  own.
* **FIR filter.** Everything about the filter except its 35 taps and its
  use of the multiplier is this design's own. The original speech samples
  and coefficients are not available, so the filter test uses synthetic
  ones.
* **Not included.** The full-precision and plain-truncation multipliers
  appear only as points of comparison. They exist in the testbench's
  reference model, not as RTL.
