# Approximate log multipliers and a log-multiplier convolution core

A multiplier is the most expensive part of a convolution datapath. CNN
inference tolerates a few percent of multiplication error well: large sums of
products average individual errors out, and a classifier only needs the order
of its output scores to survive. This RTL replaces exact multipliers with
*logarithmic* ones, based on Mitchell's approximation
log2(2^k (1 + x)) ≈ k + x. A product then becomes an addition of two
logarithms and an approximate antilogarithm, built from a leading-one
detector, shifters and one adder.

The design has three parts:

* **Stand-alone multipliers**:
  * a full-precision Mitchell multiplier;
  * *Mitch-w*, which keeps only w-1 mantissa bits and handles negative
    numbers cheaply with one's complement;
  * a truncated two-stage iterative log multiplier that corrects the first
    approximation with a second one.
* **A convolution core** built around *RMitch-w*, a reduced Mitch-w. The
  encoding (leading-one detection, normalisation) is moved out of the
  multiplier. Each input pixel is encoded once and broadcast to all K×K
  multipliers, and the weights are stored already encoded.
* **A multi-kernel accelerator**: NK convolution cores that share one encoder
  and one input stream, each computing one output channel.

`approx_log_top` holds one accelerator (16 cores, 3×3 RMitch-w4, Q16.16). Beside
it are one 32-bit Mitchell multiplier, one 32-bit Mitch-w6 with one's
complement sign handling, and one 16-bit iterative multiplier (n1 = 6, n2 = 2).
Each has its own ports. Everything is synthesizable SystemVerilog (IEEE
1800-2017) with no vendor primitives.

## Mitchell's approximation in hardware

For an unsigned N-bit operand A with its leading one at position k, write
A = 2^k (1 + x), where 0 ≤ x < 1. The fraction x is the bits below the leading
one. Mitchell approximates log2 A by k + x, exactly as a fixed-point number:
the integer part is k and the fraction is those bits. The hardware
(`mitchell_mult`) works in four steps:

1. **Leading-one detection** (`lod`). A log-depth OR prefix gives, for every
   bit, "some bit above me is set". The one-hot leading one is
   h[j] = z[j] & ~(any set bit above j). This is fully parallel, with no ripple
   chain.
2. **Encoding** (`lod_enc`). Bit i of k is the OR of every h[j] whose index has
   bit i set.
3. **Normalisation and addition**. A is shifted left by ~k, which is
   N-1-k, using the one's complement of k as the shift amount: no subtractor.
   This puts the fraction at the top. The log word is {0, k, fraction}, and
   the two log words are added. The sum's top bit says whether the
   characteristic reached N, that is, whether the product is ≥ 2^N.
4. **Antilogarithm** (`mitchell_dec`). 2^(c + f) ≈ 2^c (1 + f). If the top bit
   lr is set, {1, f} is shifted left by c+1. The extra place is built in by
   appending a zero, so no adder is needed for it. Otherwise {1, f} is shifted
   right by ~c. A multiplexer on lr picks the low half, and the high half is
   ANDed with lr.

The approximation can never be negative, so the result is always ≤ the exact
product. Its worst case is -11.1% (at x_a = x_b = 0.5), and it is exact when
both operands are powers of two.

**Zero.** Mitchell's formula has no representation for 0: A = 0 and A = 1 both
give k = 0, x = 0. `is_zero` tells them apart from the encoded characteristic
and the operand's LSB: an operand is zero when k = 0 and its LSB is 0. The
product is then forced to 0. This matters for CNNs, where ReLU makes many
activations exactly zero.

## Mitch-w: truncating the mantissa

The fraction x rarely needs all N-1 bits. `mitch_w` keeps only the top w-1 bits
of each normalised operand. The log adder then shrinks to w - 1 + log2 N bits,
and the decoder (`antilog_w`) to a w-bit right shifter plus a left shifter
whose low N-w output bits are constant zero.

* Truncating the operands only lowers them, so the error stays one-sided,
  and the worst case grows somewhat as w gets smaller.
* The mean error moves from about -3.9% (full Mitchell) to about -4.4% at
  16 bits with w = 8.
* Products below 2^(N-w) are lost completely, because the decoder keeps only
  w significant bits and places them by the characteristic. A product of two
  16.16 values with a 2^-16 result therefore comes out 0. This design decodes
  them that way on purpose. The w-bit right shifter receives the full
  complemented characteristic, and anything shifted out is dropped.

**Unbiased option** (`UNBIASED = 1`, off by default). Each truncated mantissa
gets its LSB forced to 1, which is the expected value of the discarded bits.
For w ≥ 5, 2^-4 is also added to the log sum. This moves the mean error to
about +0.4% (16 bits, w = 6). If the added constant carries the characteristic
past its top, the product saturates to all ones instead of wrapping; that
guard is this design's own.

## Negative numbers: one's complement (C1)

Two's complement negation needs an incrementer on both operands and on the
product. Mitch-w (with `SIGNED = 1`) uses one's complement instead:

* Each operand is XORed with its own sign bit, which gives |A| - 1 for
  negative A.
* The unsigned product is XORed with sign(A) ⊕ sign(B).

The result for a negative product is one below the two's complement value.
Together with using |A| - 1, this adds a small bias that is negligible for
CNNs.

Zero detection changes with this scheme. -1 becomes 0 after the XOR, but it
is not zero. `is_zero_c1` therefore calls an operand nonzero when k > 0, or
its sign bit is set, or its LSB is set.

A consequence of truncation combined with C1: a negative product too small to
represent becomes -1 (all ones), not 0.

## The two-stage iterative log multiplier

`iter_log_mult` follows the iterative scheme. It forms the exact identity

A·B = 2^(ka+kb) + (A - 2^ka)·2^kb + (B - 2^kb)·2^ka + (A - 2^ka)(B - 2^kb)

and approximates only the last term with a second log multiplication.

Each stage is a `log_stage`, and the first stage also produces the residues
A - 2^ka and B - 2^kb. The mantissas are truncated to n1 bits in the first
stage and to n2 bits in the second. They are added with a carry-in of 1, so
the truncated bits are rounded rather than dropped.

The carry out of the mantissa sum changes what the first stage has already
accounted for. `error_term_calc` supplies the right second-stage operand for
both cases:

* no carry: the residue;
* carry: the complement of the residue within the bits below the leading
  one.

The final product is stage 1 + stage 2, and it is 0 if either operand is 0.

With N = 16, n1 = 6 and n2 = 2:

* mean |error| ≈ 0.46%;
* errors fall between about -2.4% and +2.6%.

In this RTL the second stage is an N-bit stage with zero-extended residues.
A narrower stage would do, but sharing one module keeps the code small.

## RMitch-w and the Feature Extractor

In a convolution core the same input pixel meets K×K weights in the same
cycle, and the weights are known ahead of time. RMitch-w therefore splits
Mitch-w at the log domain.

The **Feature Extractor** (`feature_extractor`) turns an operand into the
tuple

    { A[0], A[N-1], k[log2 N - 1:0], mantissa[w-2:0] }     (log2 N + w + 1 bits)

that is, its LSB, its sign, its characteristic and its truncated mantissa,
after the C1 conditional inversion. For 32-bit Q16.16 data and w = 4 the
tuple is 10 bits, against 32 for the raw value. Weights are converted offline
and stored in this form.

**RMitch-w** (`rmitch_w`) has no leading-one detector, encoder or input
shifter left. It adds the two {k, mantissa} fields, decodes them with
`antilog_w`, applies the C1 output inversion with A[N-1] ⊕ B[N-1], and forces
zero with the k/sign/LSB test. Given the same operands, its result is
bit-identical to `mitch_w` with `SIGNED = 1`.

## The convolution core

`conv_core` computes one output channel of a K×K, stride-1, unpadded
convolution on an IMG_H × IMG_W map with up to MAX_CH input channels. It has
no window buffer: registers emulate the sliding window as the map streams
past.

**Dataflow.** Pixels arrive as tuples in raster order, one per `in_valid`
cycle, channel 0 first. Each pixel goes to all K×K multipliers at once.

* Multiplier (r, c) holds weight (r, c) of the current channel and feeds
  adder c of row r.
* Each row is a chain of K adders, each followed by a register, so a partial
  sum moves one column to the right per pixel. After K pixels, a row's chain
  holds the dot product of one filter row with K consecutive pixels.
* That row sum then waits IMG_W - K pixels in a line delay, which is a shift
  register. It then enters row r+1 just as the pixels of the next image line
  under the window arrive.
* When the lower-right pixel of a window has passed, the last register of the
  last row holds the complete K×K sum.

The product of two Q16.16 numbers is Q32.32. Bits FRAC+ACC_W-1 … FRAC are
kept, so the sums are Q16.16 and wrap at 32 bits.

**Channel accumulation through the Delayer.** Row 0 of the adder array does
not start from zero: it starts from the Delayer's output.

* The Delayer (`delayer`) is a circular buffer of depth
  IMG_H·IMG_W - (K-1)(IMG_W+1), which is 726 for 28×28 with a 3×3 filter.
* At each pixel the last row's output is written into it. Exactly one image
  (minus the window's own latency) later, in pixel time, it comes back and is
  read at the position where the same window starts again in the next
  channel.
* On channel 0 the feedback is replaced by zero.

The sums of all channels therefore build up in the array itself, with no
output buffer and no extra adder. Only after the last channel (`num_ch - 1`)
are the windows reported.

**Timing and protocol.**

1. After reset, pulse `w_clear`. Then write the pre-encoded weight tuples on
   `w_valid`, channel by channel, each channel's K×K weights in row-major
   order. `w_count` shows how many are stored. Writing more than MAX_CH·K·K
   tuples trips an assertion, and the extra tuples are dropped.
2. Set `num_ch` (1 … MAX_CH) and pulse `start` for one cycle.
3. Stream num_ch × IMG_H × IMG_W pixels with `in_valid`. `in_valid` may drop
   at any time. Every register, the counters and the Delayer hold while it is
   low.
4. For each valid window of the last channel, `out_valid` rises on the cycle
   after the one carrying the window's lower-right pixel, with the sum on
   `out_data`. The outputs come in raster order,
   (IMG_H-K+1) × (IMG_W-K+1) of them, and `out_last` marks the final one.
5. A new `start` begins the next map. Weights stay stored until `w_clear`.

**Weight storage** (`weight_storage`). The weights are held in a register
file filled in arrival order, with a combinational read of the K×K tuples of
the current channel.

## The multi-kernel accelerator and the top level

`conv_accel` instantiates NK cores and one `feature_extractor`. All cores get
the same input tuple and the same control, so a map is read once for NK
output channels. Throughput scales by NK, while the encoding cost is paid
once. Weights are loaded one core at a time: `w_sel` picks which core
receives `w_tuple`. `out_data` carries one output pixel per core. `out_valid`
and `out_last` are common and are taken from core 0.

`approx_log_top` exposes the accelerator on ports prefixed `cv_`. The
stand-alone multipliers use these prefixes:

| Prefix | Multiplier | Operands | Product |
|---|---|---|---|
| `mm_` | Mitchell, unsigned | 32-bit | 64-bit |
| `mw_` | Mitch-w6 with C1, signed | 32-bit | 64-bit |
| `il_` | iterative, n1 = 6, n2 = 2 | 16-bit | 32-bit |

The multipliers are purely combinational. The accelerator uses one clock,
`clk`, and an asynchronous active-low reset, `rst_n`.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `approx_log_top`, `conv_accel` | `NK` | 16 | parallel cores (output channels) |
| `conv_core` and above | `IMG_H`, `IMG_W` | 28, 28 | feature-map size, fixed at elaboration |
| `conv_core` and above | `MAX_CH` | 20 | input channels the weight store can hold |
| `conv_core` | `K` | 3 | filter size |
| `conv_core` | `N`, `W` | 32, 4 | data width and RMitch-w truncation |
| `conv_core` | `FRAC`, `ACC_W` | 16, 32 | product slice: Q16.16 |
| `mitch_w` | `N`, `W` | 32, 6 | width and truncation |
| `mitch_w` | `SIGNED`, `UNBIASED` | 1, 0 | C1 sign handling, unbiasing |
| `iter_log_mult` | `N`, `N1`, `N2` | 16, 6, 2 | width, stage-1 and stage-2 mantissa bits |

Shared constants are in `alm_pkg`. Each module checks its own legal parameter
range at elaboration:

* N a power of two;
* 2 ≤ W < N;
* K no larger than the map;
* FRAC + ACC_W ≤ 2N.

## What is this design's own choice

The multiplier datapaths follow the published structure. The following were
not specified there and were decided here:

* **Convolution timing.** The exact register timing of the core is this
  design's reading of the published block diagram. It comprises the line
  delay lengths, the Delayer depth, zero feedback on the first channel,
  output one cycle after the last window pixel, and stall-by-`in_valid`.
* **Fixed map size.** The map size and channel limit (28×28, 20) are
  assumptions: MNIST-sized, and 20 channels matches the first LeNet layer's
  kernel count. Only the channel count is programmable at run time. There is
  no padding and no stride.
* **Weight store.** The weight store is a write-port register file, not a
  ROM preloaded at synthesis.
* **Tuple packing.** The bit order {A[0], A[N-1], k, mantissa} is this
  design's choice.
* **Q16.16 slicing.** Products are cut to Q16.16 by taking bits 47…16, and
  partial sums wrap without saturation.
* **Loss of small products.** Products below 2^(N-w) come out 0 (or -1 when
  negative) in Mitch-w and RMitch-w.
* **Unbiased overflow.** The unbiased option's saturation on overflow is an
  added guard.
* **Iterative second stage.** The second stage is full width (N bits) rather
  than a narrower multiplier.

## What fits

At the defaults, the accelerator runs 3×3 convolutions on a 28×28 map with up
to 20 channels and 16 kernels at a time. The LeNet layers (5×5 filters:
28×28×1 → 20 maps, 12×12×20 → 50 maps) need `K = 5`. The second layer also
needs `IMG_H = IMG_W = 12`. Both are only parameter changes, and `tb_lenet_layers` runs the two layers that way. The number of
kernels must be a multiple of `NK`, with one pass per group of NK kernels.

Each core stores MAX_CH·K·K = 180 tuples of 10 bits, so a whole network's
weights (AlexNet's 3.7 M convolution weights would be about 4.6 MB as tuples)
must be streamed in layer by layer. CNN accuracy was evaluated on software
models; it is not something the RTL reproduces.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. It
compares the RTL against an independent arithmetic model in `tb_ref_pkg`,
which is written from the formulas, not the circuit. Each testbench ends by
printing `TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

* **Combinational blocks** are checked against the model with exhaustive or
  random operands (for 32-bit, tens of thousands of vectors), plus corner
  cases: zero, one, powers of two, all ones, the most negative value.
* **Convolution blocks** are checked against a full convolution computed from
  the model. `tb_conv_core` uses a 6×7 map with 3 channels, two maps in
  succession, random stalls, and checks output timing. `tb_conv_accel` uses 3
  cores on a 5×6 map with 2 channels.
* **`tb_approx_log_top`** is the end-to-end test. It runs the top with 4
  cores, an 8×9 map and 3 channels; the filter, arithmetic and multipliers
  are at their defaults.
  1. It loads every weight store full.
  2. It streams the map with random stalls, checks every output and its
     cycle, and restarts on a new map.
  3. It drives the three stand-alone multipliers with random operands.

  It fails if any of these mechanisms never occurred: stalls, channel
  accumulation through the Delayer, full stores, restart, zero and negative
  pixels, and all cores active.

* **`tb_approx_log_top_full`** runs the same test on the top at every
  default: 16 cores, a 28×28 map, 20 channels. That is 15680 input pixels and
  16 × 676 checked outputs.
* **`tb_lenet_layers`** runs both LeNet convolution layers with random data.
  It uses accelerators instantiated with K = 5 and each layer's map size.
  * conv1: 28×28×1 → 20 kernels, in 10 passes of 2 cores.
  * conv2: 12×12×20 → 50 kernels, in 25 passes of 2 cores.

  Each pass reloads the weight stores, and every output is checked against
  the model. Helper: `lenet_layer_run`.

The error statistics of these multipliers, measured on random operands,
agree with the published ones:

* Mitchell: worst case -11.1%.
* Mitch-w (16 bits, w = 8): mean -4.4%.
* Unbiased Mitch-w (16 bits, w = 6): mean +0.4%.
* Iterative (16 bits, n1 = 6, n2 = 2): mean |error| 0.46%.

## Simulating

With Verilator 5, any testbench builds and runs as follows (here the core
test):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_conv_core \
        tb/tb_ref_pkg.sv rtl/alm_pkg.sv tb/tb_conv_core.sv \
        $(ls rtl/*.sv | grep -v alm_pkg)
    ./obj_dir/Vtb_conv_core +verilator+rand+reset+2

* The testbenches are written for a two-state simulator with random initial
  values, and draw their stimulus from `$urandom`.
* To try another configuration, change the `localparam`s at the top of the
  testbench. Those values are passed to the module under test as parameters.
* `tb_lenet_layers` also needs `tb/lenet_layer_run.sv` on the command line.
* `alm_pkg` must be compiled before the modules that import it, and
  `tb_ref_pkg` before the testbenches.
