# 28-region constant-compensation antilogarithmic converter

This design computes `B = 2^A`, the binary antilogarithm. It is the step that turns a result in
the logarithmic number system back into an ordinary binary number. The input is split into an
integer part `p` (the *level*) and a fraction `m`, so that `2^A = 2^p · 2^m`. Multiplying by `2^p`
is a shift. The hard part is `2^m` for `0 ≤ m < 1`.

Mitchell's classic approximation replaces `2^m` with the straight line `1 + m`. In fixed point
that costs nothing: you attach a leading one to the fraction. The line lies on or above the true
curve. The gap is zero at both ends and about 0.086 near `m ≈ 0.53`, so the result can be up to
6.15 % too high. This converter cuts the interval of `m` into regions. In each region it
subtracts a constant `c`, where `c` is a sum of a few powers of two between `2^-4` and `2^-9`:

    B ≈ 2^p · (1 + m − c(m))

The only arithmetic is one subtractor and one shifter. A small piece of decode logic picks `c`
from the top bits of `m`. The design has no multiplier, and it holds no table in memory.

## Data formats

| signal | format | meaning |
|---|---|---|
| `a_i[30:26]` | 5-bit unsigned | level `p`, 0..31 |
| `a_i[25:0]` | 0.26 unsigned | fraction `m`; bit 25 weighs 2^-1 (called `m_-1`), bit 0 weighs 2^-26 |
| `mant_o[26:0]` | 1.26 unsigned | corrected mantissa `1 + m − c`, always in [1, 2) |
| `b_o[31:0]` | 32-bit unsigned integer | `floor(2^p · (1 + m − c))` |
| `region_o[4:0]` | 0..27 | the correction region used |

The 26-bit fraction and the 32-bit result follow the source description. The 5-bit level is the
width that keeps the largest result inside 32 bits. Fraction bits that the shift leaves below the
binary point are truncated. If you need `2^A` for negative or fractional results, take `mant_o`
and apply the level yourself.

## The correction table and its 28 regions

The correction words come from two published 16-row tables. The first table covers `m < 0.25`
and the second covers `m ≥ 0.25`. Each word has 6 bits: bit 5 weighs 2^-4 and bit 0 weighs
2^-9. Below, each word is given as `c · 512`:

    rows  0..15 (m < 0.25):   0  2  4  6  9 11 13 15 17 18 20 22 25 28 28 28
    rows 16..31 (m ≥ 0.25):  28 28 31 33 36 40 39 35 32 28 24 20 16 11  6  0

Rows 13 to 17 carry the same word (`011100`, 28/512). Together they form a single region, so the
32 rows give 28 distinct regions. `region_o` numbers these regions 0 to 27.

The source does not pin down where each row starts and ends. The row labels of its tables do
not add up to a mapping of the whole of `[0,1)`. This design uses the following boundaries:

* **Below 0.25:** 16 rows, each 1/64 wide. The row is set by `m_-3 .. m_-6`.
* **From 0.25 up:** 16 rows, each 3/64 wide. Row boundaries fall at `(16 + 3k)/64`.

With this mapping, the table's peak (row 21, 40/512) lands at `m ≈ 0.51`, where the true gap
peaks. The last row's zero correction lands at `m → 1`, where the gap closes. Every boundary is a
multiple of 1/64. So the region is found by comparing the 7 MSBs of `m` with 31 constants and
counting how many it passes (`interpolation_counter`). Bit `m_-7` never changes the outcome.

**Accuracy.** This was measured by `tb_antilog_top` over 65,536 fractions, with `p = 0` and
26-bit `m`:

| | largest error above | largest error below | range |
|---|---|---|---|
| Mitchell, 1 region | +6.148 % | 0 % | 6.148 % |
| this design, 28 regions | +1.587 % | −0.239 % | 1.826 % |

The source reports +0.59 % / −0.01 % for its 28-region converter. These boundaries do not
reproduce that figure. A search shows that the same 32 words can reach about +0.6 % / −0.1 %,
but only if the region edges are placed unevenly. The source does not give those edges. If you
have the intended edges, change only `row_edge()` in `rtl/interpolation_counter.sv` and the
matching `ref_row()` in the testbenches.

## Blocks

The converter is purely combinational. It has no clock, no reset and no registers. A result is
valid one propagation delay after `a_i` changes.

```
a_i ─► log_level_checker ──m──► interpolation_counter ──row──► error_word_generator
           │   ▲                                                       │ c
           │   │ 1+m−c                                                 ▼
           │   └──────────────────────── alog_coder (1+m, then −c) ◄───┘
           └─► b_o = (1+m−c) << p, integer part
```

| module | does |
|---|---|
| `alog_pkg` | widths, the correction table `CORR_TABLE`, and the row-to-region map |
| `log_level_checker` | splits `A` into `p` and `m`; shifts the corrected mantissa left by `p`; truncates to 32 bits |
| `interpolation_counter` | 7 MSBs of `m` → row 0..31 and region 0..27 |
| `error_word_generator` | row → 6-bit correction word |
| `alog_coder` | `{1, m}` minus the correction word, aligned so that its LSB weighs 2^-9 |
| `antilog_top` | wires the four blocks together |

The block names follow the published block diagram. That diagram also draws two buffers between
the stages. Here they are plain wires. If you need throughput, you can add a register stage
between `alog_coder` and the shifter in `log_level_checker`.

## Departures from the source and choices made here

* The row boundaries and the 28-region count described above. This is the main uncertainty in
  the design. It is also the reason the measured accuracy differs from the published figure.
* The sign of the correction. The published formula writes `c` as `±Σ2^-i`. Every published
  word is non-negative, and `1+m` always lies above `2^m`, so the correction is subtracted.
* The level width (5 bits), and truncation rather than rounding of `b_o`.
* The level is applied with a shifter. The source states that no shifter is used. That claim
  holds for the correction path only: the correction is aligned by wiring.
* Only the antilog direction is built. The block diagram names a combined log/antilog coder, but
  nothing describes the log half.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing -Wall -Wno-fatal -Irtl -Itb \
    rtl/alog_pkg.sv tb/tb_antilog_top.sv -y rtl -y tb +libext+.sv \
    --top-module tb_antilog_top -o sim && ./obj_dir/sim
```

* **`tb_antilog_top`** runs the converter at its default sizes. It checks `mant_o`, `region_o`
  and `b_o` against a model written in the testbench, enforces the accuracy bounds above, and
  prints the measured worst errors. It also confirms that every region, every level, both
  zero-correction rows and the merged region were exercised.
* **`tb_interpolation_counter`** tries all 128 inputs.
* **`tb_error_word_generator`** checks all 32 words against a decimal copy of the table.
* **`tb_alog_coder`** and **`tb_log_level_checker`** test corner values and random values
  against 64-bit integer arithmetic.

To try other region boundaries or correction words, edit `row_edge()` and `CORR_TABLE`, and keep
`row_to_region()` consistent with any words that repeat.
