# Binary MAC array with squeezed partial-sum accumulators

In a binarized neural network (BNN) the multiplications become XNOR gates, so
most of the datapath cost is in additions: the popcount adder trees and,
for small tile sizes, the accumulators behind them. This RTL implements a
binary MAC array whose accumulators are cut down from the usual 16 bits to
as few as 4, using *partial-sum scaling*: every partial sum is divided by a
fixed power of two and rounded before it is accumulated. Because the scale
is a power of two and fixed at design time, the division is pure wiring
(bit selection), and the rounding is absorbed into the accumulator adder's
carry in. A saturating accumulator can be chosen instead of the ordinary
wrapping one; it degrades far more gracefully when the narrow accumulator
overflows.

The method follows the paper *Squeezing Accumulators in Binary Neural
Networks for Extremely Resource-Constrained Applications*. The default
configuration is the one with the smallest accumulator the paper reports
as acceptable: tile size 64, a 64x64 array, a 4-bit saturating accumulator
and a 3-bit effective partial sum (scale 8).

## Arithmetic

With weights and activations in {-1, +1}, encoded 1 for +1 and 0 for -1,
a dot product of length N is

    y = sum_i w_i * x_i = 2 * popcount(XNOR(w, x)) - N

The hardware handles T = 64 inputs per cycle (one *tile*), so a dot product
of any length is split into k = ceil(N/T) tiles. Each tile gives a
*partial sum* p_j = popcount of T XNORs, 0 <= p_j <= T, and
y = 2 * sum_j p_j - N.

Partial-sum scaling replaces p_j by round(p_j / D) with a scale factor

    D = T / 2^b

where b is the *effective partial-sum precision*. With T = 64 and b = 3,
D = 8: each partial sum is reduced to 0..8 before it enters the
accumulator, so a 4-bit accumulator spans a useful share of the range of
a multi-tile sum instead of overflowing on the first tile. The lanes
produce

    acc = round(p_1/D) + ... + round(p_k/D)        (wrapped or clipped)

and the layer output is approximately y ~ 2*D*acc - N. That multiply by D
and the subtraction of N are not built: they are constants per layer that
the next layer's input quantisation (its threshold) absorbs.

### Scaling by bit selection

The partial sum is PW = $clog2(T+1) bits wide (7 bits for T = 64, since
p = 64 must be representable). Dividing by D = 2^C with C = log2(T) - b
means dropping the C low bits: the addend is `p[PW-1:C]`, PW - C bits wide
(4 bits for the default, values 0..8). No logic is spent.

### Rounding through the carry in

Round-half-up of p / 2^C is `p[PW-1:C] + p[C-1]`. Rather than an
incrementer, `p[C-1]` is connected to the carry in of the accumulator
adder, which is otherwise unused. Example for the default (C = 3):
p = 45 = 0b0101101, addend 0b0101 = 5, carry in p[2] = 1, so 6 is
accumulated; 45/8 = 5.6 rounds to 6. With C = 0 (no scaling) the carry in
is 0.

No clip is placed before the adder: since D >= 1 the scaled value is never
wider than the partial sum. The addend keeps all its bits, so the one
value that needs the extra bit (p >= 60 rounds to 8 for the default) is
not lost.

### Ordinary versus saturating accumulator

* Ordinary (`ACC_ORDINARY`): `acc <- (acc + addend + cin) mod 2^a`. An
  overflow wraps, turning a large sum into a small one.
* Saturating (`ACC_SATURATING`): `acc <- min(acc + addend + cin, 2^a - 1)`.
  Partial sums are non-negative, so only the upper bound is needed.

Saturation is applied at every step; it is not the same as clipping the
final sum, because clipping does not commute with addition. The adder is
built one bit wider than its widest operand, and the saturating version
adds a compare-and-select on that result. In the paper's accuracy
results the saturating accumulator keeps a 4-bit (and even 3-bit)
accumulator within a few percent of the 16-bit baseline, where the ordinary
one collapses.

### Range of a squeezed accumulator

Partial sums count matching bits, so they are never negative and the
accumulator only grows along a dot product. With the default scale the
4-bit accumulator reaches its maximum of 15 once the rounded partial sums
add up to 15, i.e. after about 120 matching bits. A random-looking tile has
about 32 matches (4 after scaling), so a dot product of four or more such
tiles saturates. Saturation is monotone: a saturated lane still compares
correctly against any threshold below 15 in accumulator units. Whether a
trained network keeps its thresholds in that range is outside the
hardware. The workload testbench below reports how often lanes saturate
and how often the sign of 2*D*acc - N matches the exact dot product, for
random (untrained) weights. The numbers are not an accuracy measure for a
trained network.

## Structure

```
bnn_datapath (top)                         one per output channel, M = 64
  g_lane[m]
    xnor_popcount     64 XNORs, popcount_tree (balanced adder tree) -> p (7 bits)
    scaling_accumulator
      psum_scaler     bit selection p[6:C], carry in p[C-1] (or a shifter)
      acc_adder       ordinary or saturating, with carry in
      accumulator register, done and overflow flags
```

All 64 lanes share the input tile `x_i`; each lane has its own 64-bit
weight row `w_i[m]`. The default array has 4096 XNORs, 64 adder trees and
64 4-bit accumulators.

| File | Contents |
|---|---|
| `rtl/bnn_pkg.sv` | `acc_mode_e` (ordinary/saturating) and the default sizes |
| `rtl/popcount_tree.sv` | balanced adder tree counting ones, level by level |
| `rtl/xnor_popcount.sv` | one lane's XNOR row and popcount: the partial sum |
| `rtl/acc_adder.sv` | accumulator adder with carry in, wrapping or saturating |
| `rtl/psum_scaler.sv` | division by D and the rounding bit: wiring, or a shifter for run-time b |
| `rtl/scaling_accumulator.sv` | scaler, adder, accumulator register and control |
| `rtl/bnn_datapath.sv` | the M x T array (top) |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `T` | 64 | tile size: inputs per cycle, XNORs per lane; a power of two |
| `M` | 64 | output lanes (channels computed in parallel) |
| `ACC_W` | 4 | accumulator precision a |
| `PSUM_B` | 3 | effective partial-sum precision b, 1..log2(T); D = T / 2^b |
| `MODE` | `ACC_SATURATING` | `ACC_ORDINARY` or `ACC_SATURATING` |
| `RUNTIME_SCALE` | 0 | 1: b comes from the `psum_b_i` port instead of `PSUM_B` |

The paper's synthesis comparison (64x64 array) covers these settings, all
reachable by parameters:

| Case | `ACC_W` | `PSUM_B` | `MODE` |
|---|---|---|---|
| 16-bit ordinary, no scaling (baseline) | 16 | 6 | ordinary |
| 10-bit ordinary, no scaling | 10 | 6 | ordinary |
| 7-bit ordinary + scaling | 7 | 4 | ordinary |
| 5-bit ordinary + scaling | 5 | 3 | ordinary |
| 7-bit saturating + scaling | 7 | 4 | saturating |
| 4-bit saturating + scaling (default) | 4 | 3 | saturating |

`PSUM_B = log2(T)` gives D = 1, i.e. plain accumulation of exact partial
sums. Precisions b > log2(T) would need D < 1, which bit selection cannot
express; the design rejects them at elaboration, together with a `T` that
is not a power of two.

By default the scale is fixed per build, which costs no gates: right for
hardware dedicated to one network. Hardware that must run networks with
different optimal b sets `RUNTIME_SCALE = 1`. Each lane then gets a right
shifter and a multiplexer for the rounding bit, and b is read from
`psum_b_i` with each dot product. The scaled value is then 7 bits wide
(b = 6 keeps the whole partial sum). b may change only on a first tile.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous active-low reset |
| `valid_i` | in | 1 | a tile is presented this cycle |
| `psum_b_i` | in | 3 | b, 1..log2(T), when `RUNTIME_SCALE = 1`; ignored otherwise |
| `first_i` | in | 1 | with `valid_i`: the tile starts a new dot product |
| `last_i` | in | 1 | with `valid_i`: the tile ends the dot product |
| `x_i` | in | `T` | input tile, shared by all lanes |
| `w_i` | in | `M` x `T` | weight row of each lane |
| `acc_o` | out | `M` x `ACC_W` | accumulator of each lane |
| `done_o` | out | 1 | one-cycle pulse: `acc_o` holds finished results |
| `ovf_o` | out | `M` | lane wrapped or saturated at least once in the current sum |

One tile is accepted per cycle, with no back-pressure. The XNORs and the
adder tree are combinational and feed the accumulator register directly,
so `acc_o` includes a tile one clock edge after it is presented, and
`done_o` is high in the cycle after the last tile. A k-tile dot product
therefore takes k cycles; the next one may start in the cycle right after
the last tile, since `first_i` loads the accumulator from zero instead of
needing a clearing cycle. `valid_i` may drop in the middle of a dot
product; the accumulators then hold. Results stay in `acc_o` until the
next valid tile. A single-tile dot product has both `first_i` and
`last_i` set. An assertion in `bnn_datapath` flags a valid tile without
`first_i` after reset or after a last tile. With run-time scaling,
assertions also check that `psum_b_i` is in range and that it changes only
on a first tile.

## What is this design's own choice

The paper specifies the arithmetic (XNOR-popcount lanes, tile size 64, the
64x64 array, scaling by a power of two through bit selection, rounding
through the carry in, no clipping before accumulation, ordinary and
saturating accumulators, and the accumulator/partial-sum widths). It does
not give an interface, timing or reset, and these were chosen here:

* the valid/first/last handshake, the `done_o` pulse and the absence of
  pipeline registers between the adder tree and the accumulator;
* the asynchronous active-low reset;
* the `ovf_o` flags, added for observability;
* the run-time scale as a shifter with b given directly on `psum_b_i`;
* the adder tree as a zero-padded power-of-two tree, widening one bit per level;
* the saturating adder as a wider add followed by a compare-and-select;
* D = T / 2^b for the scale. The paper writes D = T / (2^b - 1) and
  rounds it to T / 2^b, the form bit selection needs.

Not part of this RTL: the weight and activation buffers and the sequencer
that walks a layer through the array (the design targets a layer-wise
architecture, with one datapath shared by all layers, but those parts are
not specified), the first and last network layers (these take non-binary
data), the output conversion y = 2*D*acc - N, and the training flow that
picks a and b.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values are
always computed independently of the RTL's bit selection: dot products
with signed integer multiplies, scaling with integer division
`(p + D/2) / D`, and wrapping or clipping with integer arithmetic.

| Testbench | What it covers |
|---|---|
| `tb_popcount_tree` | N = 64 and an odd N = 13; corner cases, each single bit, random vectors |
| `tb_xnor_popcount` | T = 64 and T = 16 against a signed +-1 dot product |
| `tb_psum_scaler` | every partial sum 0..64 for each b = 1..6, fixed and run-time builds, and T = 16 with b = 2 |
| `tb_acc_adder` | exhaustive 4-bit ordinary and saturating adders, and a wider addend |
| `tb_scaling_accumulator` | 20,000 random cycles on four configurations. One is T = 16 with D = 4 (5-bit partial sum, two dropped bits). One takes b at run time and changes it between sums. Checks every cycle, and counts round-ups, saturations, wraps, idle cycles, back-to-back restarts and changes of b |
| `tb_bnn_datapath` | end to end: 60 dot products of 1 to 12 tiles on four 64x64 arrays side by side (default 4-bit saturating; 7-bit ordinary with b = 4; 16-bit unscaled; 7-bit saturating with b changed at run time). The unscaled one must reproduce the exact dot product 2*acc - N. Checks `done_o` timing and requires every mechanism to occur |
| `tb_bnn_workload` | the default array on one output pixel of each 3x3 convolution shape of a ResNet-18-style network: 576, 1152, 2304 and 4608 inputs (9 to 72 tiles), with 64 to 512 output channels (1 to 8 passes), 15 passes back to back; every channel checked, the cycle count of each pass checked, and saturation and sign agreement reported |
| `tb_bnn_datapath_full` | the default array without overrides: one 3x3x64 convolution window (576 inputs, 9 tiles) on all 64 channels, then a back-to-back single tile; checks one tile per cycle and the one-cycle latency |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/bnn_pkg.sv tb/tb_bnn_datapath.sv --top-module tb_bnn_datapath
./obj_dir/Vtb_bnn_datapath
```

All testbenches pass. Verilator lint (`-Wall`) reports only that
`psum_b_i` is unused in fixed-scale builds, which is intended. The RTL has
not been through timing closure. The combinational path from `x_i`
through a 64-input adder tree into the accumulator is long, so a fast
clock may need a pipeline register after the popcount. That would make
the latency two cycles; the handshake would stay as it is.

## Workloads

The target networks are a binary ResNet-18 on CIFAR-10 and Bi-Real Net 18
on ImageNet, with T = 64. Their hidden layers are binary convolutions,
and the largest dot product is 3x3x512 = 4608 inputs, i.e. 72 tiles. The
accumulator takes any number of tiles, so every hidden layer runs on the
default array. A 512-channel layer needs 8 passes over the 64 lanes.
These layer sizes are those of the standard ResNet-18. `tb_bnn_workload`
runs one output pixel of each shape. With random weights most lanes
saturate in the larger layers (see *Range of a squeezed accumulator*).
Whether the 4-bit result is accurate enough is a training question, not a
hardware one: the paper reports 88.84% (CIFAR-10) and 52.95% (ImageNet)
for 4-bit saturating with b = 3, against 90.72% and 56.39% with a 32-bit
accumulator.
