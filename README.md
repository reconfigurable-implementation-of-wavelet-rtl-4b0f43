# 9/7 integer lifting wavelet engine: 2-D DWT and IDWT for image compression

Wavelet image coders such as FBI WSQ (fingerprints) and JPEG2000 start by
splitting an image into subbands with the 9/7 biorthogonal wavelet. This RTL
does that transform, and its inverse, in hardware. It follows a published
FPGA design that targets a 200 MHz core working on images held in DDR SDRAM.

Three ideas carry the design:

* **Lifting instead of filtering.** The 9/7 filter pair is factored into four
  lifting steps (predict, update, predict, update) and a final scaling.
  Each step adds to one half of the samples a multiple of the sum of two
  neighbours from the other half.
* **Integer-to-integer, multiplier-free arithmetic.** Each lifting constant
  is replaced by a short sum of powers of two: a canonic signed digit
  shift-add network. Each product is floored to an integer. Samples stay
  16-bit throughout.
* **Streaming 2-D via transposition.** A 1-D engine takes one (even, odd)
  sample pair per clock. Rows are streamed through it and written back to
  memory as columns. Running the same pass twice transforms both directions
  and restores the orientation.

## The lifting data path

For a line `x[0..N-1]`, with `s = x[even]` and `d = x[odd]`:

```
d1[k] = d[k]  + floor(alpha * (s[k]  + s[k+1]))
s1[k] = s[k]  + floor(beta  * (d1[k] + d1[k-1]))
d2[k] = d1[k] + floor(gamma * (s1[k] + s1[k+1]))
s2[k] = s1[k] + floor(delta * (d2[k] + d2[k-1]))
low[k]  = floor(s2[k] / K)        high[k] = floor(d2[k] * K)
```

The constants are the shift-add networks, not the irrational CDF values:

| constant | network (x = neighbour sum)                          | value        | CDF 9/7 |
|----------|------------------------------------------------------|--------------|---------|
| alpha    | `(x>>1) - (x<<1)`                                    | -1.5         | -1.586  |
| beta     | `x>>4`                                               | +0.0625      | -0.053  |
| gamma    | `(x - x>>2) + (x>>4 - x>>6) + (x>>8 - x>>10)`        | 0.7998       | 0.883   |
| delta    | `(x>>1) - (x>>5)`                                    | 0.46875      | 0.444   |
| K        | `(x + x>>3) + (x>>7 + x>>12) - (x>>9 + x>>16)`       | 1.13109      |         |
| 1/K      | `(x - x>>3) + (x>>7 + x>>10) + (x>>12 + x>>14)`      | 0.88409      |         |

The published design takes these from a modified coefficient set, tuned for
fewer bits rather than for the exact CDF filter. Note that beta is positive.
The filter is therefore a close relative of CDF 9/7, not CDF 9/7 itself.

`csd_mult` first puts the operand on a grid with 16 fractional bits, in a
36-bit accumulator. No shift in the networks exceeds 16 places, so every
product is exact. The only rounding is the floor at the end of each step.

**Line ends.** The lifting steps use whole-sample symmetric extension:
`s[N/2] = s[N/2-1]` and `d[-1] = d[0]`. The published design does not say how
it treats borders. This is this design's choice.

**The inverse** (`dwt97_inv`) scales first (low by K, high by 1/K). It then
runs the four steps in reverse order with subtraction. Each floored product
is recomputed from samples the inverse already has, so the lifting steps
undo the forward ones exactly.

## Reversibility and its limit

The scaling step floors `s2/K` and `d2*K`, and that loses information. A
forward transform followed by the inverse therefore returns the image only
approximately. Measured on random 8-bit images:

| transform                    | worst pixel error |
|------------------------------|-------------------|
| 1-D line                     | 4                 |
| one 2-D level                | 11 to 13          |
| two 2-D levels               | 32                |

The error is biased: floor always rounds down, and the LL band carries it
into the next level. This matches the "bleaching" that the original authors
report for their reconstructions.

If you need lossless operation, remove the scaling (set K = 1) and keep only
the lifting steps. The lifting steps alone are exactly invertible.

## Pair streams and pipeline timing

The samples of a line travel as a stream of `pair_t` records:
`{valid, sol, eol, e, o}`. `sol` marks the first pair of a line and `eol`
the last. Gaps (cycles with `valid` low) are allowed anywhere. There is no
back-pressure.

`lift_step` implements one step in one of two forms:

* **UPDATE** (beta, delta) keeps the previous odd sample in a register. This
  is the feedback register of the data path drawings.
* **PREDICT** (alpha, gamma) needs the *next* even sample. It holds each pair
  until the next pair of the same line arrives. It releases the last pair of
  a line at once, using symmetric extension.

Every step has two register stages: the product, then the sum. PREDICT adds
its hold register on top.

With a gap-free input:

* Output pair k leaves `dwt97_fwd` 12 clocks after input pair k enters.
* That is 10 clocks after pair k+2, the last input it depends on. The
  source design quotes "an initial 10 cycle latency".
* After that, one pair (two samples) leaves per clock, so an N-sample line
  takes N/2 clocks.

`math_engine` holds both data paths as separate hardware. Its `mode` input
steers the stream to one of them.

## From rows to a 2-D level

`dwt2d_top` runs one 2-D level as two passes over external memory:

```
pass 0:  src (R x C) --rows--> shuffle --> engine --> transpose --> tmp (C x R)
pass 1:  tmp (C x R) --rows--> shuffle --> engine --> transpose --> dst (R x C)
```

* **Shuffle network.** Rows arrive as 128-bit words of eight samples. Two
  row buffers are used in turn; each has eight RAM lanes with two read ports.
  The network issues pairs `(x[2k], x[2k+1])` for the DWT. For the IDWT it
  issues `(x[k], x[N/2+k])`, which re-interleaves a row stored as lows then
  highs.
* **Transpose network.** There are eight 2048x16 RAMs, each split into two
  halves. Row r of a group of eight goes to RAM r: the first sample of each
  pair to half A, the second to half B. When the eighth row is complete, the
  group is drained as one 128-bit word per column.
  * DWT: column j reads A for the first half of the row and B for the rest.
    This writes lows before highs.
  * IDWT: even columns read A and odd columns read B. This interleaves the
    samples again.

  While the group drains, no new row is issued. This pause is why a level
  costs more than N/2 clocks per row (see Performance).
* **Memory layout.** Images are stored row after row in 128-bit words.
  The transposed words of group g, column j, go to `base + j*P + g`. After a
  DWT, dst holds LL in the top-left quarter, HL in the top-right, LH in the
  bottom-left and HH in the bottom-right. An IDWT expects that layout.
* **Further levels.** `pitch` gives the row length of the src and dst
  buffers in words. To compute the next level, run the engine again on the
  LL quarter in place: `n_rows/2`, `n_cols/2`, the full image's pitch, and
  `dst_base = src_base`. Invert the levels in reverse order. `tmp` is always
  stored compactly.

## Memory port and controller

The memory port is the user side of a DDR SDRAM controller:

* `mem_adr` addresses 128-bit words, 26 bits wide.
* One command per clock: `mem_rd` or `mem_wr`, never both. The controller
  takes a command in a clock where `mem_ready` is high.
* Read data return in order with `mem_rvalid`, after any latency.

`pass_ctrl` does three jobs side by side:

* **Fetch.** It fetches rows at most two ahead, one per free row buffer.
* **Issue.** It lets the shuffle network issue eight rows per group, then
  waits for the group to drain.
* **Arbitrate.** It gives transpose writes priority over fetch reads.

Pass 1 starts only after the last write of pass 0 has been accepted. It may
therefore safely read what pass 0 wrote.

## Performance

* **1-D.** One pair per clock, with 12 clocks of latency.
* **One 2-D level of a 1600 x 1000 image.** This is the largest WSQ image
  size. It takes 2.05 M clocks in simulation with a 90 %-ready memory,
  which is 10.2 ms at 200 MHz: about 98 levels per second. The time splits
  into:
  * about N/2 clocks per row;
  * N clocks per group drain, during which rows pause;
  * the second pass.

  The source design's figure of 1000 images per second is the memory
  bandwidth bound. This implementation does not reach it: draining does not
  overlap with row processing, and the engine moves two samples per clock.
* **Sizes.** Rows up to `MAX_N` = 2048 samples in both passes. `n_rows` and
  `n_cols` must be multiples of 8.

## Host data path (USB side)

Images reach memory from a host over a 16-bit USB interface that runs on its
own clock (`if_clk`, typically 48 MHz). Three blocks connect that side to
the 128-bit memory port:

* **`fifo_16to128`** packs eight 16-bit host words into one memory word, the
  first word in bits 15:0. It then carries the word across to the core clock
  through a dual-clock FIFO with Gray-coded pointers. `usb_in_ready` drops
  while the FIFO is full.
* **`fifo_128to16`** does the reverse: memory words cross to `if_clk` and
  leave as eight 16-bit words, bits 15:0 first. Its `space` output counts
  free entries as seen from the core side.
* **`usb_dma`** moves `dma_words` memory words, starting at `dma_adr`:
  * a load (`dma_dir` = 0) writes words from the input FIFO to memory;
  * an unload (`dma_dir` = 1) reads words from memory into the output FIFO.

  Memory read data cannot be held back, so an unload issues a read only when
  the reads already in flight are fewer than the free FIFO entries.

**Streaming from the host.** If `src_usb` is high at `start`, pass 0 does
not read `src` from memory. Instead it pops its rows from the input FIFO in
raster order: each row read becomes a FIFO pop whose data arrive in the same
clock. Pass 1 then runs from memory as usual. This saves the load, so the
host can stream an image straight into a DWT. The host must send exactly
`n_rows * n_cols` samples.

The memory port has two users. The wavelet engine owns it while `busy` is
high, and `usb_dma` owns it otherwise. `dma_start` is ignored while the
engine is busy, and `start` is ignored while a transfer runs. A typical
session therefore runs in this order:

1. load the image (or stream it with `src_usb`);
2. run one or more levels;
3. unload the result.

The host-side command protocol is not defined here. The `dma_*` ports and
the engine's command ports are where a command decoder would connect.

## Where this RTL departs from the source design

* **Configuration.** This is the prototype with 128-bit memory transfers,
  the 2048x16x8 transpose RAM and a shuffle network. The earlier 32-bit
  prototype with a 1024-deep transpose FIFO is not built.
* **Shuffle buffer.** The source design has a 256x16x6 FIFO after the
  shuffle network. Its organisation is not given, so it is replaced by the
  two-row buffer described above.
* **Input multiplexer.** The source design feeds the shuffle network from
  either the input FIFO or memory, but does not say when each is chosen.
  Here the choice is the `src_usb` command input, and it applies to pass 0
  only. The register drawn after that multiplexer is not built.
* **Pipeline cuts.** The shift-add networks are drawn with two to four
  pipeline cuts. Here each lifting step has exactly two register stages.
* **Sign of the IDWT odd scale.** The inverse data path drawing labels the
  odd scale `-1/K`. Here it is `+1/K`, which is what makes the subtracting
  inverse steps cancel the forward ones.
* **Design choices not specified at the source.** Symmetric extension at
  borders, the memory handshake and arbitration policy, the controller
  states and the 36-bit accumulator. The source design states "up to 32-bit"
  adders; the accumulator here is 36 bits so that every product is exact.

## Not included

* **USB chip pin interface.** The slave-FIFO pins of an external USB
  controller (FD, FIFOADR, SLOE_N, SLRD_N, SLWR_N and the full/empty flags)
  are not driven. Their protocol belongs to the chip. The top brings out a
  plain 16-bit word handshake on each side instead.
* **DDR SDRAM controller and PHY.** These are not included.
  `tb/ddr_user_model.sv` models the controller's user port and the memory
  behind it, with random stalls and a fixed read latency.
* **Other coefficient sets and the entropy coder.** Other filter sets, WSQ
  quantisation and entropy coding are outside the hardware.

## Files

| file | content |
|------|---------|
| `rtl/dwt_pkg.sv` | widths, `pair_t`, coefficient/mode enums |
| `rtl/csd_mult.sv` | the six shift-add constant multipliers |
| `rtl/lift_step.sv` | one predict/update lifting step |
| `rtl/scale_step.sv` | K / 1/K scaling |
| `rtl/dwt97_fwd.sv`, `rtl/dwt97_inv.sv` | 1-D forward and inverse data paths |
| `rtl/math_engine.sv` | mode-selected DWT/IDWT |
| `rtl/shuffle_network.sv`, `rtl/ram_1w2r.sv` | row buffer and pair ordering |
| `rtl/transpose_network.sv`, `rtl/sdp_ram.sv` | eight-row transpose RAMs |
| `rtl/pass_ctrl.sv` | pass sequencing and memory arbitration |
| `rtl/fifo_16to128.sv`, `rtl/fifo_128to16.sv`, `rtl/async_fifo.sv` | host-side width-converting, clock-crossing FIFOs |
| `rtl/usb_dma.sv` | load/unload between the host FIFOs and memory |
| `rtl/dwt2d_top.sv` | top level |
| `tb/dwt_ref_pkg.sv` | integer reference model (plain multiplications) |
| `tb/ddr_user_model.sv` | memory controller user-port model |
| `tb/tb_*.sv` | self-checking testbenches, one per module (`tb_dwt2d_top` loads the image over the host port, runs a DWT and an IDWT level, unloads the result, then streams a second image straight into a DWT), plus `tb_dwt2d_levels` (two levels) and `tb_dwt2d_full` (1600 x 1000 at default parameters) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dwt2d_top \
  -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_top.sv
./obj_dir/Vtb_dwt2d_top
```

Replace `tb_dwt2d_top` with any other testbench name. The simulator starts
uninitialised variables at random values; everything that is read is reset.
`tb_dwt2d_full` runs in a few seconds.

The expected values come from `dwt_ref_pkg`. It applies the same integer
equations with ordinary multiplications by the constants expressed in units
of 2^-16: alpha = -98304, beta = 4096, gamma = 52416, delta = 30720,
K = 74127 and 1/K = 57940. If you change a network in `csd_mult`, change the
matching number there.
