# Pipelined 4-parallel 128-point FFT built by folding

A streaming FFT has to match the rate at which samples arrive. Take a
serial radix-2 feedforward pipeline, one butterfly per stage. Most of the
time its butterflies sit idle, waiting for the delay lines to bring them a
pair of samples. **Folding** assigns the nodes of an FFT flow graph to a small
set of hardware units, giving each node a time slot. The delays between units
then follow from the schedule instead of being hand-picked. If you pick the
folding sets so that no slot is left empty, you get a parallel pipeline with
full hardware utilisation. This design uses that idea to build:

* **`cfft128_r24`**: the main design. It is a 128-point complex FFT that
  takes **four samples per clock**. It has two identical 2-sample datapaths
  built on the radix-2^4 algorithm, and a final butterfly stage that joins
  them. There is one general (table-driven) complex multiplier per datapath
  every four stages. All other twiddle factors are either fixed-coefficient
  shift-add multipliers or trivial multiplications by -j.
* **`rfft128`**: a 128-point FFT for **real** input, also taking four samples
  per clock. It computes only the non-redundant half of the spectrum,
  X(0)..X(64), using about half the datapath.
* **`folded_fft8`**: the small worked example of the method. It is an
  8-point FFT whose twelve butterflies are folded onto three butterfly
  units, taking one sample per clock.
* **`fft_top`** places the three processors side by side. They share nothing
  but the clock and reset. Each has its own prefixed ports (`cfft_*`,
  `rfft_*`, `f8_*`).

Everything is SystemVerilog (IEEE 1800-2017) in `rtl/`, with one module or
package per file. A self-checking testbench for every module is in `tb/`.

## The 4-parallel complex FFT (`cfft128_r24`)

### Data flow

Per clock the block accepts `in[0..3] = x(4t), x(4t+1), x(4t+2), x(4t+3)`,
and a frame takes 32 clocks. Even samples `(x(4t), x(4t+2))` go to datapath 0
and odd samples `(x(4t+1), x(4t+3))` go to datapath 1. Each datapath
(`cfft_datapath`) is a chain of six stages. Each stage is a delay commutator
followed by a butterfly:

```
 stage        1      2      3      4      5      6        7 (shared)
 commutator   16     8      4      2      1      16       -
 before BF    -      W8     -j     full   -j     W16      -j (odd side)
```

A delay commutator of length L (`delay_commutator`) delays its lower input
by L clocks. It then either passes the two streams straight through or swaps
them, and delays the upper output by L. As a result, two samples that arrived
L clocks apart leave side by side. The swap control is one bit of the local
frame phase, bit log2(L).

After stage 6, each datapath on its own has computed a 64-point DFT of its
half of the input. The 64-point DFT of the odd samples is also already
multiplied by W128^k. Stage 7 is two butterflies that join the datapaths:

* the top butterfly combines the two upper outputs;
* the bottom butterfly combines the two lower outputs, with the odd side
  rotated by -j.

Together these give the four outputs of one clock.

### Where the twiddle factors sit

The butterflies pair samples in decimation-in-frequency order: stage s
combines inputs whose indices differ in bit 7-s. The twiddle factors of the
radix-2^4 decomposition are split so that the expensive ones are rare:

* **Before stage 2**: W128^(16·k0·(2·n5+n4)). These are all powers of W8.
  The unit is `csd_twiddle` with `FULL_W16=0`. It handles the odd powers of W8
  with two cos(pi/4) multipliers (on a+b and b-a), each a canonic-signed-digit (CSD)
  shift-add network, and the even powers as swaps and negations.
* **Before stage 3**: -j on the lower input in half of the slots. This is
  merged into the butterfly (`bf2`, input `rot_b`).
* **Before stage 4**: the only general multiplication, W128^(n·k) with a 4-bit
  n and a 3-bit k. The unit is `twiddle_cmult`: a 128-entry coefficient table
  and four real multipliers. The table is computed at elaboration time with
  `$cos`/`$sin`.
* **Before stage 5**: -j, merged into the butterfly.
* **Before stage 6**: W16^((2·lane+dp)·(2·tau4+tau0)), where lane is 0 for the
  upper stream and 1 for the lower, and dp is the datapath number. The unit is
  `csd_twiddle` with `FULL_W16=1`, using cos(pi/8), sin(pi/8) and cos(pi/4) as
  CSD networks.
* **Before stage 7**: -j on datapath 1's lower output, merged into the
  butterfly.

The exponents are derived in the header of `rtl/cfft_datapath.sv`, which also
tabulates which input index bit each local phase bit holds at each stage.

### Output order

Let tau be the 5-bit phase of an output word and
kb = bitrev4(tau[3:0]) + 16·tau[4]. The four outputs are then

```
out[0] = X(kb)   out[1] = X(kb+64)   out[2] = X(kb+32)   out[3] = X(kb+96)
```

`out_k` gives kb, and `out_sof` marks tau = 0. Bins come out in a
bit-reversed order inside each half frame. A consumer that needs natural
order must reorder them.

### Timing

* **Stalls**: `in_valid` is the clock enable of the whole block. A clock with
  `in_valid` low freezes every register, so input may stall at any point.
* **Frames**: the first valid word after reset is word 0 of frame 0. Frames
  follow each other with no gap.
* **Latency**: the first output word of a frame appears 55 accepted clocks
  after the frame's first input word. That is 47 clocks of commutator delay,
  the multiplier register and seven butterfly registers.
* **`out_valid`**: high for exactly one clock after each new output word is
  loaded. It stays low until the pipeline holds real data.

### Arithmetic

* **Width**: inputs are `DW` bits, 16 by default, two's complement. The first
  stage adds one guard bit, and each butterfly adds one bit, so nothing can
  overflow. Outputs are `DW+8` bits and unscaled, giving the plain DFT sum.
* **Coefficients**: the table multiplier uses `TW`-bit coefficients in
  Q(TW-2) format, with rounding. The CSD constants are Q15.
* **Error**: against a double-precision DFT, the error of a random full-scale
  frame is about 40 LSB at the 24-bit output. This is below 1e-4 of the
  largest bin.
* **Truncated bits**: `csd_twiddle` drops the top bit of some internal sums.
  A rotation cannot grow the magnitude, so the guard bit is never needed
  there. The module header explains this.

## The real-input FFT (`rfft128`)

If x is real, then X(128-k) = conj(X(k)), so half of a complex FFT is wasted.
The block packs two real samples into one complex sample:
z(2t) = x(4t) + j·x(4t+1) and z(2t+1) = x(4t+2) + j·x(4t+3). It runs one
2-parallel 64-point datapath, the same `cfft_datapath` as in the complex FFT.
It then recovers the real FFT from pairs of bins with `rfft_split`:

```
F = Z(k) + conj(Z(64-k))     G = Z(k) - conj(Z(64-k))     H = W128^k · G
X(k) = (F - jH) / 2          X(64-k) = conj(F + jH) / 2
```

Each datapath output word holds Z(kb) and Z(kb+32). The partner 64-kb of a
first-half word only arrives in the second half of the frame, so the 15
first-half words wait in a 16-entry buffer. Per frame:

| phase tau | bins produced |
|---|---|
| 0 | X(0), X(64), X(32) |
| 1..15 | none (buffered) |
| 16 | X(16), X(48) |
| 17..31 | four bins: X(kb), X(64-kb), X(32-kb), X(32+kb) |

The signals `out_valid[i]` and `out_k[i]` describe each lane. The latency is
56 accepted clocks from an input word to the datapath word it produces, and
outputs are `DW+8` bits wide. The block has two full complex multipliers in
its datapath, two in its split units and four constant multipliers. The
complex FFT has four full complex multipliers and eight constant ones.

**This block departs from the paper.** The paper proposes its own real-FFT
structure: a radix-2^4 flow graph with real and complex datapaths mapped onto
three specialised butterfly types. The internals of those butterflies and the
real-valued flow graph are not spelled out, so they are not reproduced here.
`rfft128` gives the same function at the same rate, but by the standard
packing method instead.

## The folded 8-point example (`folded_fft8`)

This block shows the method on an 8-point radix-2 DIF flow graph. The graph
has three columns of four butterflies, and the twiddles W8^0..3 after the
first column and W8^0, W8^2 after the second. Each column is folded onto one
butterfly unit that is busy four clocks out of eight. With cnt the input
phase:

| unit | active at cnt | work |
|---|---|---|
| BFI | 4..7 | combines x(j), delayed 4 clocks, with x(j+4); lower output × W8^j |
| BFII | 6, 7, 0, 1 | lower output × -j at cnt 7 and 1 |
| BFIII | 7, 0, 1, 2 | delivers (X(0),X(4)), (X(2),X(6)), (X(1),X(5)), (X(3),X(7)) |

A direct folding needs 16 registers between the first two units. Lifetime
analysis and forward-backward register allocation cut these to four: R1 and
R2 on the lower path, and R3 and R4 behind the upper multiplexer. One
register per path sits before BFIII. Utilisation is 50 %. Outputs are
registered and `DW+4` bits wide. X(0) and X(4) appear one clock after x(7) is
accepted.

## Departures from the paper, and choices it leaves open

* **Flow-graph direction.** The paper's text calls its 128-point flow graph
  decimation in time. However, its architecture diagram first pairs x(n) with
  x(n+64) through 16-word delays on natural-order input, which is the
  decimation-in-frequency pairing. The RTL follows the diagram: the delays
  16, 8, 4, 2, 1, 16, and a constant multiplier after stages 1 and 5 with the
  full multiplier after stage 3. The twiddle exponents were derived for that
  placement and checked against a direct DFT.
* **Output labels.** The diagram labels the four outputs X(k), X(k+8),
  X(k+4), X(k+12). The order this datapath produces is X(kb), X(kb+64),
  X(kb+32), X(kb+96), as given above.
* **Trivial rotations.** The -j factors have no separate unit. They are
  folded into the butterflies.
* **Sign convention.** The paper writes W8 = e^{+j2pi/8}. Here
  W_N = e^{-j2pi/N}, so the outputs are the usual forward DFT.
* **Constant multipliers.** The constants cos(pi/4), cos(pi/8) and
  sin(pi/8) are those the paper names. The exponent lists printed next to
  them are not self-consistent, so the exponents come from this design's
  derivation.
* **Real FFT** uses packing rather than the paper's structure (see above).
* **Hardware counts.** Table I of the paper gives N-4 = 124 delay elements
  for a 4-parallel radix-2^4 FFT. The delays drawn in its diagram, which this
  RTL follows, add up to 2 × (2 × (16+8+4+2+1+16)) = 188 complex words. The
  paper's count of 4·log2 N = 28 complex adders matches the 14 butterflies
  built here.
* **Not in the paper**: word lengths, coefficient precision, pipeline
  registers, reset, the valid/stall handshake, the `out_k` and `out_sof`
  outputs, and the real FFT's output format. All of these are this design's
  choices.
* **Fixed configuration.** The size (128 points), parallelism (4) and radix
  are fixed. The paper's general N-point, L-parallel formulation is not
  parameterised here.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | constants, CSD recoding function, twiddle functions |
| `rtl/bf2.sv` | radix-2 butterfly with optional -j on the lower input |
| `rtl/delay_commutator.sv` | delay / switch / delay reordering unit |
| `rtl/csd_const_mult.sv` | multiply by a constant through a CSD shift-add network |
| `rtl/csd_twiddle.sv` | multiply by W16^m (or W8 powers only) with constant multipliers |
| `rtl/twiddle_rom.sv`, `rtl/twiddle_cmult.sv` | W128 coefficient table and full complex multiplier |
| `rtl/cfft_datapath.sv` | one 2-sample, six-stage datapath |
| `rtl/cfft128_r24.sv` | 4-parallel complex FFT |
| `rtl/rfft_split.sv`, `rtl/rfft128.sv` | real-input FFT |
| `rtl/folded_fft8.sv` | folded 8-point FFT |
| `rtl/fft_top.sv` | the three processors side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Each testbench compares the RTL against a double-precision DFT or model
computed in the testbench. It prints a final line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary -Irtl rtl/fft_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top
./obj_dir/Vtb_fft_top
```

Use the same command pattern for any `tb/tb_<module>.sv`. Each testbench has
a watchdog.

`tb_fft_top` runs the top at its default parameters:

* **Complex FFT**: several frames, including back-to-back frames and random
  stalls.
* **Real FFT**: real frames.
* **8-point FFT**: 8-point frames.

It counts each mechanism it exercises: stalls, back-to-back frames,
self-paired and buffered real-FFT bins, and every slot of the 8-point
schedule. It fails if any of them never happened. The unit testbenches cover
the same paths in more detail: impulses, full-scale inputs, random data and
both polarities of every switch.

To change the width, set `DW` (and `TW` for coefficient width) on
`cfft128_r24`, `rfft128` or `fft_top`. All internal widths follow from these
two parameters.
