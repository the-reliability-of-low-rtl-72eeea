# ANT multiplier with a fixed-width reduced-precision replica

Lowering a multiplier's supply voltage below the level its critical path
needs saves a lot of energy, but the slow paths then miss the clock edge. The
resulting errors are rare, but they are large because the long carry chains
end in the most significant product bits. *Algorithmic noise tolerance* (ANT) accepts
these errors and catches them. Next to the full-precision *main block* runs a
small *reduced-precision replica* (RPR), which is short enough to be
error-free at the low voltage. Whenever the main result and the replica's
estimate disagree by more than a threshold, the main result is taken to be
corrupted and the estimate is output instead. The output is then slightly
inaccurate rather than badly wrong.

This design uses a **fixed-width** replica instead of a full-width one. The
replica multiplies only the top 8 bits of each 16-bit operand and keeps only
the top 8 bits of that 16-bit product. A small compensation term makes up for
the discarded low columns. This makes the replica roughly half the size of an
8 × 8 full-width multiplier.

```
  x,y ──┬──► main_block (16×16 array) ──⊕ vos_err──► [reg] ya ──┐
        │                                                      ├─► error_correction ──► y_hat, use_rpr
        └──► fixed_width_rpr (x[15:8] × y[15:8], 8-bit out) ─► [reg] yr ──┘
```

## Files

| file | content |
|---|---|
| `rtl/ant_pkg.sv` | default sizes: `ANT_N = 16`, `ANT_M = 8`, `ANT_BIAS = 3`, `ANT_TH = 2^26` |
| `rtl/full_adder.sv` | one-bit full adder, the main block's array cell |
| `rtl/main_block.sv` | N × N unsigned carry-save array multiplier |
| `rtl/fixed_width_rpr.sv` | M × M fixed-width replica with truncation compensation |
| `rtl/error_correction.sv` | subtractor, `|·| > TH` comparator and output multiplexer |
| `rtl/ant_multiplier.sv` | top level: the blocks above plus the two pipeline registers |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_ant_snr` |

## The fixed-width replica and its compensation

The replica multiplies `a = x[15:8]` by `b = y[15:8]`. It must deliver
`p ≈ a·b / 2^8`, so that `p` placed at bits 31..24 approximates the full
product `x·y`. Its 64 partial products `a[i]·b[j]` are sorted by column
`c = i + j`:

| group | columns | treatment |
|---|---|---|
| MSP, most significant part | 8 … 15 | summed exactly |
| ICV, input correction vector | 7 | each term added with its own weight 2^7 |
| MICV, minor input correction vector | 6 | each term added with its own weight 2^6 |
| LSP, least significant part | 0 … 5 | dropped |

In units of 2^6, the replica computes

```
total = Σ_{c≥8} a[i]b[j]·2^(c−6)  +  2·#ICV  +  #MICV  +  BIAS
p     = total >> 2          (saturates at 255; unreachable for M = 8)
```

Only two columns of the truncated part are kept, and they enter at their own
weight. This is the "direct injection" idea: the heaviest terms of the
discarded half carry most of its value, so adding them in costs only a few
adder cells at the low end of the sum. Those cells lie away from the path that
forms the top bits. The constant `BIAS = 3` (3·2^6 = 192) stands for the
average value of the dropped LSP (about 80 for random inputs) plus the
rounding offset of 2^7 = 128. It was chosen by trying every bias over all
65 536 input pairs:

| BIAS | min error | max error | mean error | RMS error |
|---|---|---|---|---|
| 2 | −128 | 385 | 48.25 | 100.7 |
| **3** | **−192** | **321** | **−15.25** | **89.5** |
| 4 | −256 | 257 | −80.25 | 119.9 |

The errors are `a·b − 256·p`, in units of the LSB of `a·b`. BIAS = 3 gives the
smallest RMS error and a near-zero mean.

Inside the module the sum is written as a loop over the partial products,
and synthesis builds the adder. The full-width main block, in contrast, is
built cell by cell.

## Decision stage and the threshold

`error_correction` aligns the replica output as `yr_al = {yr, 24'b0}`. It forms
`ya − yr_al` in 33 bits, takes the magnitude and sets `use_rpr` when that
magnitude is strictly greater than `TH`. The output is `yr_al` when `use_rpr`
is set and `ya` otherwise.

`TH` must exceed any difference an **error-free** main product can show, or
correct results would be thrown away. For 16-bit operands with the 8-bit
replica, that difference is bounded by:

* dropping the low operand bytes, `x·y − (x[15:8]·y[15:8])·2^16`, which is at
  most `255·256·(255+255) + 255² = 33 358 425`;
* the replica's own error times 2^16, which is −192·2^16 … +321·2^16.

The largest difference is therefore about 5.44·10^7, and the default
`TH = 2^26 = 67 108 864` sits just above it. An error in the main block is
caught when it moves the result by more than about 2^26 minus that margin.
Flips of product bits 27 and above are always caught. Flips of bits 23 and
below always pass through, and bits 24 to 26 depend on the operands. An error
passes only if the corrupted result stays within `TH` of the estimate, so a
passed error is at most `TH` plus the replica's worst-case error, about
1.2·10^8 (2^26.8). A lower `TH` catches more errors but starts to replace
correct results.

## Main block

`main_block` is a textbook unsigned array multiplier. Row 0 is the first
partial-product row. Each further row `i` is a line of N full adders that adds
partial-product row `i` to the previous row's sum and carry vectors. The lowest
sum bit of each row is a finished product bit. A final ripple-carry row of N
full adders forms product bits N … 2N−1. The critical path runs through N−1
array rows and the ripple row. This is the path that voltage over-scaling
breaks first.

## Interface and timing of `ant_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; clears both registers, so `y_hat = 0` |
| `x`, `y` | in | N | unsigned operands, one pair per cycle |
| `vos_err` | in | 2N | XOR mask applied to the main product before its register; models over-scaling timing errors, tie to 0 in use |
| `y_hat` | out | 2N | corrected product, one clock edge after its operands |
| `use_rpr` | out | 1 | set when `y_hat` is the replica estimate |

Parameters: `N` (16), `M` (8), `TH` (2^26). `M` must not exceed `N`. If you
change `N` or `M`, recompute `TH` from the bound above. If you change `M`,
re-tune `fixed_width_rpr`'s `BIAS`.

## Where this design goes beyond its source

The following points are this design's own choices:

* **Operands are unsigned.** The source describes the partial-product groups
  for an unsigned product but also mentions signed inputs. Signed
  (Baugh-Wooley) operands would change the partial-product array and the
  compensation statistics.
* **The replica sees the top M bits of each operand.** The output alignment
  `{yr, 24'b0}` follows from this.
* **The compensation formula** is this design's own: the source names the
  MSP/ICV/MICV/LSP split but gives no formula. So are the bias value and the
  threshold.
* **Array cells and adder structure.** The main block is a carry-save
  full-adder array, and the replica is summed behaviourally. The source shows
  both as cell arrays without naming the cells.
* **Registers, reset and latency.** There is one register on each path and no
  output register, giving a latency of one cycle. The reset is asynchronous.
* **The supply and its errors.** The reduced supply voltage itself is not
  logic. Its effect is the `vos_err` port, and nothing here models which bits
  fail at which voltage.
* **Not included.** The error-tolerant adder and the FFT image-processing
  application that the source mentions are not included, because their
  structure is not defined well enough to build. The full-width replica that
  this design replaces is not included either.

## Verification

Each testbench checks the design against values computed independently in
the testbench and prints `TB_RESULT checks=… failures=…`.

* `tb_main_block`: corners, all single-bit operand pairs and 20 000 random
  pairs, compared with `x*y`.
* `tb_fixed_width_rpr`: all 65 536 input pairs, compared with
  `(a·b − LSP + BIAS·2^6) >> 8`. It also checks the error range −192 … 321 and
  that the mean error is within ±16.
* `tb_error_correction`: differences of exactly TH−1, TH and TH+1 on both
  sides, extremes, and 20 000 random and near-equal pairs.
* `tb_ant_multiplier`: the full design at default sizes, 30 000 cycles. It
  checks the one-cycle latency and that reset clears the outputs. Error-free
  cycles must give the exact product. Large injected errors must be replaced
  by the replica estimate, and the replaced output must stay within the
  replica's error bound. Small errors must pass through. The test fails if any
  of these three cases never occurs.
* `tb_ant_snr`: 50 000 random products with single upper-bit errors on about
  5 % of cycles. It measures the signal-to-noise ratio of the corrupted main
  output (about 19 dB), of the replica alone (about 42 dB) and of the ANT
  output (about 51 dB), and requires the ANT output to beat both.

Simulating with Verilator (any testbench; package first):

```
verilator --binary --timing --assert -Irtl rtl/ant_pkg.sv tb/tb_ant_multiplier.sv \
          --top-module tb_ant_multiplier -Mdir obj && ./obj/Vtb_ant_multiplier
```

Lint: `verilator --lint-only -Wall -Irtl rtl/ant_pkg.sv rtl/ant_multiplier.sv`.
The remaining warnings are unused package constants, the final carry-out of
the main block (always zero) and the two low bits of the replica sum, which
the division by four drops.
