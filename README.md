# Reconfigurable multiplier-free 9/7 ⇄ 5/3 wavelet filters

The 9/7 wavelet filter that JPEG2000 uses has irrational coefficients. A
hardware version therefore needs multipliers or long approximate constants,
and it rounds. This design instead uses a small family of 9/7 biorthogonal
filters whose coefficients are all dyadic fractions (k/2ⁿ). Every product is
then an arithmetic shift, and the whole filter is a handful of adders.

The main structural idea is that **each 9/7 filter is written as the Le Gall
5/3 filter plus a small extension**. The 5/3 part is always running. The
extension adds a few shifted terms to the two 5/3 outputs to turn them into the
9/7 outputs. Turning the extension off gives a cheaper, lower-power 5/3 filter.
The same hardware therefore switches between 5/3 and 9/7 on the fly, sample by
sample, without reloading coefficients or flushing the pipeline.

The filters follow the paper *Design and Analysis of Efficient Reconfigurable
Wavelet Filters*: its coefficient tables, its 5/3-plus-extension
decompositions, its block diagrams and its adder counts. Everything the paper
leaves open is this design's own choice and is marked as such below: word
widths, pipelining, reset, boundary handling and the 2-D frame transform
around the filters.

## The filter family

Filters are symmetric, so each output uses pairwise sums of the 9-sample
window x(i−4)…x(i+4):

    w0 = x(i),  w1 = x(i−1)+x(i+1),  w2 = x(i−2)+x(i+2),
    w3 = x(i−3)+x(i+3),  w4 = x(i−4)+x(i+4)

    low(i)  = Σk h0(k)·wk          high(i) = Σk h1(k)·wk

The binary-coefficient members are named by the free parameter α of their
construction (α = −1.6848 would give the original CDF 9/7):

| low pass h0 (±k) | k=0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| A, α = −1.67 | 19/32 | 9/32 | −1/16 | −1/32 | 1/32 |
| B, α = −1.8  | 5/8 | 1/4 | −3/32 | 0 | 1/32 |
| C, α = −2    | 23/32 | 1/4 | −1/8 | 0 | 1/64 |
| Le Gall 5/3  | 6/8 | 2/8 | −1/8 | – | – |

| high pass h1 (±k) | k=0 | 1 | 2 | 3 |
|---|---|---|---|---|
| A and B | 9/8 | −9/16 | −1/16 | 1/16 |
| C, as built | 1/2 | −9/32 | 0 | 1/32 |
| Le Gall 5/3 | 1 | −1/2 | 0 | – |

For C the built high pass is **half** of the published coefficient table
(1, −9/16, 0, 1/16). The published decomposition of high_C, and the shifts in
the folded diagram, both give the half-scaled version, and that is what is
built. Scale the C high band by 2 if you need the table's normalisation.

## From 5/3 to 9/7: the extension datapaths

The 5/3 part (`rwf_core53`) computes, with four adder/subtractors:

    low53  = ((w0>>1) + (w0>>2)) + ((w1>>2) − (w2>>3))      = 6/8 w0 + 2/8 w1 − 1/8 w2
    high53 = w0 − (w1>>1)

With the four pre-adders that form w1…w4 (`rwf_tap_window`), that is 8 adders.
The extension (`rwf_ext97`, selected by the `VARIANT` parameter) then forms,
with l = low53 and h = high53:

    A:  low  = l/2 − h/4 − h/16 + w0/2 + w0/32 + w4/32 − w3/32      (6 adders)
        high = l/2 + h/2 + h/4 − w1/4 − w1/16 + w3/16               (5 adders)
    B:  low  = l/2 − h/4 + w0/2 + w4/32 − w2/32                     (4 adders)
        high = same as A                                            (5 adders)
    C:  low  = l − w0/32 + w4/64                                    (2 adders)
        high = h/2 − w1/32 + w3/32                                  (2 adders)

Totals: A 19, B 17, C 12 adders, the counts the paper reports. Expanding any
line in terms of w0…w4 gives exactly the coefficient table above. That is the
quickest way to check or modify a variant.

One of these forms is this design's own. The printed decomposition of B's
low pass does not reproduce B's published coefficients. The form above does
reproduce them, with the published adder count of 17 and the shift amounts in
the B diagram.

## Switching 5/3 ⇄ 9/7

Each sample carries its mode (`MODE_97` or `MODE_53`) down the pipeline, so
the mode can change on any sample. The output for that sample is already
computed in the new mode, and nothing is flushed. A sample in 5/3 mode does
three things:

- The extension's output registers and the register that carries w0…w4 to
  the extension are not enabled. A synthesis tool can turn these enables into
  clock gating.
- The 5/3 operands into the extension are forced to zero (operand isolation),
  so its adders do not toggle.
- The output multiplexer selects the 5/3 results, delayed by one register so
  that latency is the same in both modes.

The delay line and all four pre-adders stay active. This is what makes the
switch back to 9/7 instant, because w3 and w4 are always current.

## The folded α = −2 filter

For α = −2 the 9/7 low pass depends only on low53, and the high pass only on
high53. One datapath can therefore compute either, steered by a lo/hi select
(`rwf_folded_c`):

    out53 = mux(lo: (w0>>1)+(w0>>2)+(w1>>2), hi: w0) − mux(lo: w2>>3, hi: w1>>1)
    out_C = mux(lo: out53, hi: out53>>1) + (mux(lo: w4>>6, hi: w3>>5) − mux(lo: w0>>5, hi: w1>>5))

That is 4 pre-adders + 3 + 2 = 9 adders. The filter gives one output per
sample. If `in_lo_nhi` alternates 1, 0, 1, 0, … the output is the decimated
low band (even positions) and high band (odd positions), interleaved. In
other words it filters and downsamples by two in one step.

## Number format

Samples are signed `DATA_W`-bit integers (default 16). On entry they get
`FRAC_W` fraction bits (default 6, i.e. they are shifted left by 6) and 4 guard
bits, so the datapath is `IW = DATA_W+FRAC_W+4` = 26 bits. The deepest shift
is 6 places, so with `FRAC_W ≥ 6` **every shift is exact and the filters never
round**: an output word y stands for y/2^FRAC_W. If you reduce `FRAC_W` you
get truncating shifts. The testbenches assume 6.

## Timing

All filters take one sample per clock; `in_valid` may have gaps. A sample
accepted at clock edge n enters the delay line. The w registers load at n+1,
the 5/3 register at n+2, and the output register at n+3, when `out_valid` is
high. That output belongs to the window whose newest sample is the one
accepted at n, so it is centred four samples earlier. The delay line starts
from zeros after reset, and the 1-D filters do no boundary extension of their
own.

The paper says its design was pipelined, but not where; this split is
this design's. The paper reports about 390 MHz on a Virtex-5 for the folded
α = −2 filter. No timing closure has been done on this RTL.

## The 2-D transform (`rwf_dwt2d`)

A one-level 2-D DWT of a `ROWS`×`COLS` frame (default 1080×1440, an HD
frame). It filters and decimates the rows, then the columns, giving LL, LH,
HL and HH, each ROWS/2 × COLS/2. LH means row low pass then column high pass;
HL means row high then column low. The paper gives only this structure. The
arrangement below is the simplest one that does the job:

1. **LOAD**: the frame is written into buffer A in raster order. `in_ready`
   is high, and the mode is taken from the first pixel.
2. **ROW**: each row is read from A with 4 samples of symmetric extension at
   each end (x(−k) = x(k), x(N−1+k) = x(N−1−k)), COLS+8 reads per row. The
   reads go into a folded filter with lo/hi alternating. Its COLS kept
   outputs go to buffer B, low band in the left half and high band in the
   right half.
3. **COL**: each column of B is read the same way (ROWS+8 reads) into a second
   folded filter. Its kept outputs are the result stream: `out_band`
   (0 LL, 1 LH, 2 HL, 3 HH), `out_row`, `out_col` and `out_coef`.

The column filter takes the row pass's full-precision words, so the result
is exact and scaled by 2^(2·FRAC_W). A frame costs ROWS·COLS +
ROWS·(COLS+8) + COLS·(ROWS+8) cycles plus about 10 cycles of pipeline: 4.69 M
cycles for HD, or 12 ms at 390 MHz. The paper estimates 5 ms for an HD frame
but gives no schedule. Getting there would need overlapping the passes or a
line-buffer organisation, neither of which is built here.

The two frame buffers are plain arrays with a registered read. At HD size
that is 65 Mbit, which is on-chip only in name. In practice they map to
external or block memory, or you build a line-based variant.

## Files

| file | contents |
|---|---|
| `rtl/rwf_pkg.sv` | `variant_e` (A/B/C), `mode_e` (5/3, 9/7), tap constants |
| `rtl/rwf_tap_window.sv` | 9-sample delay line, pre-adders, w0…w4 registers |
| `rtl/rwf_core53.sv` | Le Gall 5/3 datapath |
| `rtl/rwf_ext97.sv` | 9/7 extension for α = −1.67 / −1.8 / −2 |
| `rtl/rwf_filter.sv` | complete reconfigurable filter (window + 5/3 + extension + output select) |
| `rtl/rwf_folded_c.sv` | folded α = −2 filter (9 adders) |
| `rtl/rwf_dwt2d.sv` | one-level 2-D transform with two folded filters |
| `rtl/rwf_top.sv` | all of the above side by side: the four filters on one input stream with a shared mode, and the 2-D transform with its own ports |
| `tb/rwf_tb_pkg.sv` | reference model: coefficient tables and direct 9-tap convolution |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example, the end-to-end run at full size
(two full HD frames plus a 12,000-sample filter-bank stream, well under a
minute):

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        --top-module tb_rwf_top rtl/rwf_pkg.sv tb/rwf_tb_pkg.sv tb/tb_rwf_top.sv
    ./obj_dir/Vtb_rwf_top

Replace `tb_rwf_top` with `tb_rwf_filter`, `tb_rwf_folded_c`,
`tb_rwf_dwt2d`, `tb_rwf_ext97`, `tb_rwf_core53` or `tb_rwf_tap_window` for
the block-level tests.

## What is verified

- Every filter output is compared with a direct convolution by the
  coefficient tables above. This is independent of the shift/add
  decompositions, and the match must be exact. The test streams are random,
  include full-scale extremes, and have random input gaps and random 5/3 ⇄ 9/7
  switches.
- The three-edge latency is checked for every output, in both modes.
- While a filter outputs 5/3 results, its extension's registers are checked
  to stay unchanged.
- The 2-D transform is compared coefficient by coefficient with a reference
  row/column transform with symmetric extension. This covers two frame sizes
  (18×12 and the full 1080×1440), both modes, each coefficient exactly once,
  and the per-frame cycle count.
- Assertions in the RTL check the constant latency and the lo/hi phase of
  every kept 2-D output.

Not verified: clock frequency, area, and the image quality (PSNR) of the
filters. Only the RTL's agreement with the coefficient tables is checked.

## Where this departs from, or goes beyond, the paper

- The α = −2 high pass is built half-scaled; see the filter family section.
- B's low-pass decomposition is this design's own; it matches the published
  coefficients and adder count.
- The paper also quotes shift-register counts (14, 13 and 10 for A, B and C).
  They are not reproduced: here the shifts are wiring.
- Word widths, the exact fixed-point format, reset (asynchronous, active low),
  the pipeline split and per-sample mode tagging are this design's own.
- The 2-D frame transform, its buffers, schedule and symmetric extension are
  this design's own. The paper shows only the row/column decomposition.
- Not built: the direct CDF 9/7 implementation with multipliers (a comparison
  baseline), and the inverse (synthesis) filters. The paper treats the inverse
  filters only as theory.
