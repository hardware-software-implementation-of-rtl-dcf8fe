# MoVa: an MPEG-4 simple-profile video codec split between a controller and hardwired macroblock engines

MoVa encodes and decodes MPEG-4 simple-profile video (SQCIF, QCIF, CIF) at
27 MHz. The work is split by regularity. Everything above the macroblock
layer is software on an embedded ARM7TDMI controller: headers, rate control,
intra refresh, error resilience and the macroblock scheduler. Everything at
or below the macroblock layer, where the same arithmetic runs on every pixel,
is done by dedicated engines on the chip's buses:

- motion estimation in three steps;
- motion compensation;
- DCT and quantisation, with their inverses;
- variable-length coding and decoding;
- reconstruction and the deblocking filter.

The software does not move pixels itself. It schedules the engines in a
fixed-time-slot pipeline. For each macroblock slot it sets up the DMA
transfers between the SDRAM frame store and the engines' small local buffers,
writes each engine's parameters, and starts the engine through a command
register. Data that only goes from one engine to the next passes directly
between them, without a round trip through software.

This repository holds synthesizable SystemVerilog for the whole chip except
the licensed controller core, and a self-checking testbench for every module.
The top-level testbench drives one macroblock through the whole chip:

1. It loads the program from ROM.
2. It stores a frame window in SDRAM and moves it into the coarse motion
   estimator by 2-D DMA, then finds a planted motion vector.
3. It decodes a motion vector that drives motion compensation directly.
4. It transforms, quantises and entropy-codes a block into a byte stream.
5. It reconstructs and deblocks the macroblock.
6. It decodes the produced stream back through the VLD and the inverse
   transform. The result must equal the encoder's own reconstruction bit for
   bit.

## The macroblock pipeline and its budget

At QCIF, 30 frames/s means 99 × 30 = 2,970 macroblocks per second. At
27 MHz that leaves about 9,090 cycles per macroblock. The pipeline has four
stages when encoding and three when decoding. Each encoding stage must stay
under 4,500 cycles and each decoding stage under 3,600, so that one
macroblock leaves every slot. CIF at 7.5 frames/s is the same macroblock
rate, and CIF decoding at 15 frames/s allows 4,545 cycles per stage.

| Encoder stage | Engine work (one macroblock, luminance) | Cycles here |
|---|---|---|
| 1 | MEC coarse search, 225 candidates | 1,818 (about 20 with ME skip) |
| 2 | MEFMC ±1 integer search, ±½ half-pel search, MC pass | 1,794 (258 MC only) |
| 3 | DCTQ per 8×8 block: DCT, Q, IQ, IDCT | 322 per block, 2 when skipped |
| 3 | MVMVD vector prediction | 1 |
| 4 | VLC per block; REC per block | 64 + stalls; 65 (257 for a skipped MB) |

| Decoder stage | Engine work | Cycles here |
|---|---|---|
| 1 | VLD per block | about 64 + events + 64 |
| 2 | DCTQ decode (IQ, IDCT) per block; MC pass | 194; 258 |
| 3 | REC; DB | 65 per block; 256 load + 48 filter |

Software schedules by writing to the command registers (`cmd_regs`).
Writing a 1 to a module's bit in START gives that module a one-cycle start
pulse. The module's done pulse sets a sticky DONE bit, which software polls
or clears. CLKEN and SRST are the power-manager fields: a module whose clock
enable is off, or whose software reset is on, ignores start. The clock
enables also drive the gated clocks that `clk_ctrl` produces.

## Motion estimation in three steps

This is the most involved part of the design. It searches ±14 pels in three
steps: a coarse ±14 search at 2:1 subsampling, a ±1 integer refinement, then
a ±½ half-pel refinement.

### Coarse step: `mec`

The engine holds the current macroblock subsampled 2:1 in both directions,
as an 8×8 block. The reference area is held the same way, as a 22×22 window.
A ±14-pel search therefore becomes ±7 subsampled positions, or
15 × 15 = 225 candidates.

Eight processing elements each take the absolute difference of one pixel of
a candidate row. Their sum gives one row per cycle, so one candidate takes 8
cycles and the full search 1,800 cycles, plus setup. The first minimum in
raster order wins. The vector is reported in full pels (always even).

Before searching, the engine can test **ME skip**. It computes the SAD at
the predicted vector (8 cycles) and compares it with the largest of the SADs
of the left, upper and upper-right macroblocks, which software writes in. If
the SAD is not greater, all three steps are skipped and the predicted vector
stands. The `skip` status bit tells software it may skip the fine step too.

The engine also makes the inter/intra decision. It measures the mean
absolute deviation A of the current block and declares the block intra when
A < SAD − 128. This is the usual reference-encoder rule scaled to 64
samples.

Subsampling in both directions is a choice made here. The published
description mentions horizontal subsampling in one place, but also an 8×8
coarse block. Only subsampling in both directions gives an 8×8 block from a
16×16 macroblock, and it keeps the search well inside its stage.

### Fine step and motion compensation: `mefmc`

The reference window is 20×20 full pels. Its origin is the coarse vector
minus 2 pels, so the unmoved macroblock sits at offset (2,2). The search has
two passes:

- **Integer pass:** the nine integer positions within ±1 pel.
- **Half-pel pass:** the nine half-pel positions within ±½ pel of the best
  integer position.

Three processing elements each accumulate one candidate's SAD, one pixel per
cycle. Three candidates take 256 cycles, so each pass takes 768 cycles.
Half-pel samples are bilinear: (a+b+1)>>1 and (a+b+c+d+2)>>2.

A final 256-cycle pass writes the motion-compensated prediction into the
prediction buffer. The same pass computes the four 8×8 block SADs that the
DCTQ skip uses. Vectors are in half-pel units.

In **MC-only mode** (the decoder, or an encoder macroblock whose fine search
was skipped) only the final pass runs. It runs at the vector in MC_X/MC_Y or,
with MODE.bypass set, at the vector on the `byp_mv_x/y` inputs. Those inputs
are wired to the MVMVD result registers. This is the "bypass" of the
pipeline: the decoder's motion vector goes straight into motion compensation
without software copying it.

### Vector coding: `mvmvd`

The predictor is the component-wise median of the left, upper and
upper-right vectors, which software writes. Software also applies the MPEG-4
substitution rules at picture edges. When encoding, the engine computes
MVD = MV − predictor; when decoding, MV = predictor + MVD.

## Texture: DCTQ, VLC, the stream producer and the VLD

### DCTQ

The DCTQ transforms one 8×8 block at a time, with eight multipliers. The DCT
is separable. Rows come first, from the input buffer into a transpose buffer,
then columns. Each output coefficient is one dot product of eight samples
with 12-bit fixed-point cosines:

- c(k) = round(2048·cos(kπ/16));
- the DC basis is scaled by 1/√2 (1448).

Coefficients are rounded after each pass. Quantisation is H.263 style, with
QP from 1 to 31:

| Case | Level L |
|---|---|
| Intra DC | L = round(c/8) |
| Intra AC | \|L\| = \|c\| / 2QP |
| Inter | \|L\| = (\|c\| − QP/2) / 2QP |

Inverse quantisation gives \|c′\| = QP(2\|L\|+1), minus 1 when QP is even.
The inverse DCT then yields the reconstructed residual. The encoder and the
decoder therefore hold exactly the same residual, which `rec` reads directly.

The engine has three modes:

- **Encode:** 322 cycles.
- **Decode:** levels in, residual out; 194 cycles. The levels come from the
  VLD, which writes them straight into the level buffer.
- **DCTQ skip:** for an inter block whose SAD from the fine search is below
  SKIP_K·QP (SKIP_K = 16), the block is declared not coded. Its levels and
  residual are cleared in 2 cycles.

### VLC → SP

The VLC reads the levels in zigzag order. It counts zero runs and emits one
(last, run, level) event per non-zero level. It does not contain the MPEG-4
variable-length tables. Every event is sent in the standard's fixed-length
escape form: `0000011` `11` last run[6] `1` level[12] `1`, 30 bits. This
gives a legal but long stream. For an intra block, the DC is sent first as
an 8-bit value clipped to 1..254. A texture bit counter feeds rate control.

The stream producer (`sp`) packs two kinds of bit groups MSB first into a
64-byte output FIFO:

- **Header bits:** written by software over the peripheral bus, up to 32 per
  push. They take precedence over texture bits.
- **Texture bits:** from the VLC.

A "stuff" command appends a 0 and then 1s up to the next byte boundary.

### VLD

The VLD is the inverse of the VLC. Software keeps its 64-byte input buffer
filled, refilling it as it drains (the buffer level is readable). A 64-bit
shift register parses the optional DC byte and then escape events until
`last`. The rebuilt block is written in raster order into the DCTQ level
buffer, 64 cycles. A malformed code sets the error flag and ends the block.

## Reconstruction and deblocking

`rec` adds the prediction from the MEFMC buffer to the DCTQ residual, clips
to 0..255 and stores one pixel per cycle. It works per 8×8 block (BLK 0..3),
and intra blocks use a zero prediction. For a macroblock that rate control
skipped, it copies the co-located macroblock of the previous picture, which
has been loaded into its 'previous' buffer (256 cycles).

`db` copies the reconstructed macroblock from `rec` (256 cycles). It then
filters the luminance edges across the 16 rows and columns:

- the vertical edge at column 8, and at column 0 when a left macroblock
  exists (its last two columns are kept from the previous run);
- the horizontal edge at row 8.

It takes one 4-pixel segment per cycle, 48 cycles in all.

For pixels p1 p0 | q0 q1, a segment is smoothed when |p0−q0| < 2QP,
|p1−p0| < QP and |q1−q0| < QP. The update is p0 += d, q0 −= d, with
d = clip((4(q0−p0) + (p1−q1) + 4) >> 3, ±QP). The top edge of the macroblock
is not filtered, because no row memory of the macroblock above is kept.

## System bus, peripheral bus and address map

The buses are simplified, AMBA-like: a 16-bit system bus and an 8-bit
peripheral bus. They are defined in `mova_pkg` as structs.

**Masters.** A master raises `req` with `wr`, a 24-bit word address and
write data. The transfer completes in the first cycle where the master is
granted and the response's `stall` is low. Read data is valid in that cycle.

**Arbitration.** There are two masters: master 0 is the controller (or the
test pins), master 1 is the DMAC. The arbiter's grant is registered. The
owner keeps the bus while it requests; otherwise the highest-numbered
requester wins. With no request the grant parks on master 0, which is also
the default master during reset. An assertion checks that exactly one master
is granted.

**Slaves.** Slaves see `sel`, `wr`, a 12-bit local address and write data,
and answer combinationally with `rdata` and `stall`.

| System-bus word address | Slave |
|---|---|
| 0x000000–0x0FFFFF | SDRAM through `emi` (bank, row, column) |
| 0x101000 | command registers |
| 0x102000 | MEC |
| 0x103000 | MEFMC |
| 0x104000 | DCTQ |
| 0x105000 | VLD |
| 0x106000 | DB |
| 0x107000 | REC |
| 0x108000 | ISC (input stream) |
| 0x109000 | VIM (video in) |
| 0x10A000 | VOM (video out) |
| 0x10B000 | DMAC |
| 0x10C000 | APB bridge: peripheral in bits 11:8, register in 7:0 |
| 0x10D000 | reset controller |
| 0x10E000 | MVMVD |

The peripherals on the APB are:

| Index | Peripheral |
|---|---|
| 0 | remap/pause controller |
| 1 | interrupt controller |
| 2 | timers |
| 3 | host interface |
| 4 | VLC |
| 5 | stream producer |

The bridge spends one setup cycle and one strobe cycle per access and stalls
the system bus during setup. Each module's register map is in the comment at
the top of its file.

**Controller side.** The controller's memory port (`cpu_*`) reaches the
internal SRAM directly, at bytes 0x0000–0x1FFF, without using the bus. The
DMAC can therefore hold the bus while the controller keeps running from
SRAM; the top-level testbench checks this. Addresses from 0x4000_0000 go to
the system bus, with bus word address = cpu_addr[24:1] and one halfword per
access.

## SDRAM, DMA and program download

**`emi`.** This is the controller for one 16-bit SDRAM of 16 Mbit: 2 banks,
2,048 rows, 256 columns. After reset it:

1. waits INIT_CYC cycles (100 µs);
2. precharges all banks;
3. issues two refreshes;
4. sets CAS latency 2 and burst length 1.

It refreshes every REF_INT cycles. Rows stay open after an access. A
following access to the same row is a page hit, costing only the read or
write command: 3 cycles for a write, 4 + CL for a read. A different row costs
a precharge and an activate. The counter `sdram_row_opens` counts activates.

**`dmac`.** The DMAC moves a WIDTH × HEIGHT rectangle. Each word is one bus
read followed by one bus write. Source and destination advance by one word
along a line and by their own strides from line to line. A motion-offset
block cut from a frame in SDRAM therefore becomes a run of page hits per
line. It raises `dma_irq` at the end.

**`ext_wrapper` and `rst_ctrl`.** After power-on reset, `ext_wrapper` copies
8,192 bytes from the 8-bit ROM into the SRAM, at 4 cycles per byte
(32,768 cycles). Until it finishes, `rst_ctrl` holds the controller and every
module in reset. `int_sram` is four 2,048 × 8 banks, one per byte lane, so
byte and halfword accesses enable only the lanes they use.

## Controller peripherals, clocks and test access

- **`timers`**: three 16-bit timers with 8-bit prescalers. Each is one-shot
  or periodic, with a maskable time-out interrupt.
- **`intc`**: seven sources: three timers, an external input, and three soft
  interrupts set by software. It has one IRQ output and no FIQ. At the top,
  the external input is the OR of the `ext_irq` pin, the host interface and
  the video-input frame-start pulse.
- **`rpc`**:
  - a write sets `remap`, which stays set until reset;
  - a write to the pause register stops the controller (`cpu_pause`) until
    any enabled interrupt arrives;
  - a write to the sleep register holds the controller and stops every gated
    module clock. Interrupts do not end sleep; only the external `wake` pin
    does.
- **`hif`**: mailboxes of one byte in each direction, host to chip and chip
  to host. They are reached through a parallel port (Intel nCS/nRD/nWR, or
  Motorola nCS/R-nW/E) or an I²C slave at address 0x3A. A host byte raises
  an interrupt.
- **`isc`, `vim`, `vom`**: FIFOs for the incoming stream, for camera pixels
  (4:2:2 bytes paired into {Y,C} words, with a frame interrupt on vsync), and
  for display pixels (YUV, or RGB by BT.601 in fixed point).
- **`clk_ctrl`**: derives from a 54 MHz input:
  - 27 MHz and 13.5 MHz;
  - each of them delayed by a quarter period;
  - seven gated module clocks, using latch-based gates. MEFMC, DCTQ, VLC and
    DB are taken from 13.5 MHz.
- **`bus_watcher`**: in test mode the `tst_req`/`tst_rsp` pins replace the
  controller as master 0, so every bus module can be driven from outside. In
  normal operation each completed transfer is copied to the `mon_*` pins one
  cycle later.

## Where this RTL departs from the original chip

- **One clock.** All modules run on the single `clk`. The generated and
  gated clocks are produced and brought out, but the modules are not clocked
  by them. A module's CLKEN bit acts as its run enable. The original chip
  made its eight clocks from three external clocks; here `clk_ctrl` makes
  four free-running and seven gated clocks from one input.
- **No JTAG.** The controller core's JTAG debug port is not part of this
  RTL, because the core itself is not.
- **Luminance only.** Motion compensation, reconstruction and the decoder
  path work on luminance only. Chroma MC, the advanced-prediction
  (four-vector) mode and AC/DC prediction are not built.
- **Escape codes only.** The VLC and VLD use only the escape code form, not
  the MPEG-4 code tables.
- **Subsampling.** The coarse search subsamples in both directions (see
  above).
- **Unrestricted vectors.** The engines search only inside the window they
  are given, so vectors pointing outside the picture depend on software
  padding the window.
- **No bus preemption.** The DMAC keeps the bus for a whole transfer. The
  controller keeps running from SRAM meanwhile.
- **Assumed details.** Register maps, buffer sizes, SDRAM timings, the
  I²C address, the ROM wait and the download size are choices made here.

## Using the RTL

Every module is in `rtl/<name>.sv`. Shared types and constants are in
`rtl/mova_pkg.sv`, and the generic FIFO is `rtl/sync_fifo.sv`. The top is
`mova_top`. Testbenches are in `tb/`:

- `tb/tb_<module>.sv` for each module;
- `tb/tb_mova_top.sv` for the whole chip at default parameters;
- `tb/sdram_model.sv`, an SDRAM model that also checks the command protocol;
- `tb/tb_common.svh`, shared check and bus macros.

Run from the repository root, because the testbenches include
`tb/tb_common.svh` by that path:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -I. \
    rtl/mova_pkg.sv tb/tb_mova_top.sv --top-module tb_mova_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog
and checks cycle counts where a rate matters: search cycles against the
4,500-cycle stage, DMA at 2 cycles per word, download at 4 cycles per byte,
SDRAM hit and miss latencies.

The top-level test runs with every parameter at its default, including the
full 8 KB download and the 2,700-cycle SDRAM power-up. It counts 31
mechanisms (download, page hit and miss, refresh, 2-D DMA, ME skip, MVMVD
bypass, DCTQ skip, REC skip, stream round trip, test mode, clock gating,
pause wake-up, sleep and wake-up pin, and others). It reports a failure for any that never
happened. It finishes in well under a second of simulation time.
