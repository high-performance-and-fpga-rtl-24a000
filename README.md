# A macroblock-pipelined scalable video encoder core

This is the luma datapath of an H.264/SVC-style encoder. It has two spatial layers:
each 16x16 macroblock of the enhancement layer can be predicted in three ways. It can
use motion from a reference picture (inter). It can use its own already-coded
neighbours (intra). Or it can use the co-located 8x8 block of the half-size base
layer, upsampled 2x (inter-layer).

Every macroblock flows through nine pipeline stages. Each stage has a budget of 600
clock cycles. At 266 MHz that budget is enough for a 1920x1080 picture at 30 frames/s:
8160 macroblocks x 30 x 600 = 147 M cycles per second.

The encoder is a set of fixed-function engines. A small controller advances all of
them together, one macroblock step at a time. A single DMA channel on a 64-bit AHB
master port moves all pixel data between external memory and the engines. A host CPU
programs the encoder through a 32-bit AHB slave.

## The macroblock pipeline

`mb_pipe_ctrl` divides time into **slots**. At the start of a slot, macroblock *n*
enters stage 0 and every other macroblock moves one stage on. Up to nine macroblocks
are in flight at once. A slot ends when every stage that holds a macroblock has
reported `done`. So a slot is as long as its slowest stage. The controller records
each slot's length and counts slots longer than 600 cycles (`slot_cycles`,
`slot_overruns`).

| stage | name | work (engine) | typical cycles |
|---|---|---|---|
| 0 | parameter loading | macroblock index → column/row, QP | 1 |
| 1 | data loading | 32x32 reference area by DMA into the local memory; current macroblock from the image buffer | ~130 + waits |
| 2 | resampling | 12x12 base-layer block (8x8 plus 2-pixel border) by DMA | ~40 + waits |
| 3 | IME / upsampling | integer motion search (`ime`) and 2x upsampling (`upsample`) in parallel | 579 |
| 4 | FME / MC | half-pel and quarter-pel refinement, then motion compensation (`fme_mc`) | 576 |
| 5 | intra prediction | intra mode decision (`intra_md`); choice of prediction | 272 |
| 6 | transform / REC | per 4x4 block: residual → `tq4x4` → `vlc`, `itiq4x4` → `recon` | 16 x 18 |
| 7 | deblocking | `deblock`, then DMA write-back of the four rows above that it changed | 128 + ~10 |
| 8 | restore | DMA write-back of the finished macroblock (`restore`) | ~35 |

The longest stage is the motion search. Its 579 cycles set the slot length; the
end-to-end test measures slots of 583 cycles.

**Context registers.** Each stage has a context register. It holds the macroblock's
index and position, QP, current pixels, search window, base block, upsampled block,
vectors, costs, prediction, choice, non-zero flags and reconstruction. At every slot
boundary the contexts shift one stage along with their macroblocks. An engine reads
the context of its own stage and writes its results back into it. This takes the role
of the local memories that sit between the engines. The cost is size: about 9 x 2.3 KB
of registers.

**Neighbour storage.** Three line buffers span the picture width (`MAX_W_MB` = 120
macroblocks):

- **original pixels.** The intra decision uses neighbours from the input picture, so
  stage 5 never waits for stage 6.
- **unfiltered reconstruction.** Intra prediction in stage 6 uses the true
  reconstructed neighbours, before deblocking.
- **deblocked bottom four rows.** These are the upper edge for the deblocking filter.

A left column and a corner register go with each of these line buffers.

## Memory traffic

All external accesses go through one `dma` channel. It serves four jobs, in this
priority order:

| job | stage | shape (64-bit words) | address |
|---|---|---|---|
| reference area | 1 | 4 x 32 rows | `REF_BASE + (16·my − 8)·(16·W + 32) + 16·mx − 8` |
| base block | 2 | 3 x 12 rows | `BASE_BASE + (8·my − 2)·(8·W + 32) + 8·mx − 8` |
| rows above | 7 | 2 x 4 rows, write | `REC_BASE + (16·my − 4)·16·W + 16·mx` |
| restore | 8 | 2 x 16 rows, write | `REC_BASE + 16·my·16·W + 16·mx` |

In this table, W is the picture width in macroblocks, and (mx, my) is the macroblock
position.

The reference picture and the base-layer picture are stored with a **16-pixel border
on every side**, as an encoder normally pads its reference pictures. The base
registers point at pixel (0,0) inside the border. So every fetch, even at the picture
edge, is a plain rectangle. The reconstructed picture has no border.

The DMA does 1-, 2- and 3-D transfers of bytes, halfwords, words or doublewords. Its
address phase and data phase are pipelined: N elements take N + 1 cycles when there
are no wait states. It issues INCR bursts and starts a new burst (NONSEQ) at each row
and at every 1 KB boundary. It has no buffer, so data goes straight between the bus
and the local memory (`local_mem`, 128 x 64 bits). The local memory is a register
file, so stage 1 or 2 copies the whole area into its context in one cycle when the job
finishes.

The search window used by the motion engines is the centre (16 + 2·SR)² of the 32x32
reference area. So `SR` cannot exceed 8.

## The engines

**`sad_pe`** is the motion-search processing element. It takes eight 8-bit pixels of
the current block and eight of the candidate per cycle (one 64-bit word each). It has
three register stages:

1. eight absolute differences
2. two sums of four
3. the block accumulator

The SAD is ready three cycles after the last word.

**`ime`** runs four `sad_pe`s, one per 8x8 quadrant. It tests every integer position in
−SR..SR−1 (144 candidates for SR = 6) and compares every second row only
(subsampling). Adding the quadrant SADs gives the costs of all nine partitions: 16x16,
two 16x8, two 8x16 and four 8x8. Each partition keeps its own best vector. The search
takes 579 cycles. The rest of the pipeline uses the 16x16 result.

**`fme_mc`** refines the 16x16 vector hierarchically:

1. It tests nine half-pel candidates, the centre first.
2. It re-centres and tests eight quarter-pel candidates.
3. It builds the prediction at the winning vector.

Half-pel samples use the H.264 six-tap filter (1, −5, 20, 20, −5, 1). Quarter-pel
samples are rounded averages of neighbouring samples. Eight pixels are produced per
cycle, and the whole process takes 576 cycles.

**`intra_md`** scores the four Intra_16x16 modes (vertical, horizontal, DC, plane)
with `intra16_pred`. It then scores the nine Intra_4x4 modes of all sixteen 4x4 blocks
with `intra4x4_pred`, one mode per cycle. The cost is the SAD, and it takes 272 cycles.

**Choice of prediction (stage 5).** The choice is inter by default. Intra 16x16 wins if
its SAD is lower. Inter-layer wins if it is enabled and the SAD of the upsampled base
block is lower than both. The stream does not use the 4x4 decision, but it is
available at the `intra_md` ports.

**`prediction`** builds the chosen 16x16 prediction. For intra it regenerates the
Intra_16x16 prediction from the reconstructed neighbours with the mode chosen in
stage 5.

**`tq4x4` / `itiq4x4`** use the H.264 4x4 integer core transform with quantisation by
multiplication and shift. The rounding offset is 1/3 of a step for intra and 1/6 for
inter. The matching dequantisation and inverse transform round by (x + 32) >> 6. Both
modules also have the luma-DC 4x4 Hadamard and chroma-DC 2x2 paths (`dc_mode`). The
pipeline uses only the core path. **`recon`** adds the residual to the prediction with
clipping to 0..255.

**`vlc`** codes each 4x4 block as follows:

1. `ue(count of non-zero levels)`
2. for each non-zero level in zig-zag order, `ue(zeros before it)` and `se(level)`

Exp-Golomb codes are used throughout, and levels are clipped to ±2047. Bits are packed
MSB-first into 32-bit words. The coder takes one block every 18 cycles, and a flush at
the end of the picture emits the last partial word. This is a simple, self-contained
entropy code, not CAVLC.

**`deblock`** filters a macroblock in a 20x20 buffer. The buffer holds the macroblock,
four columns of its left neighbour and four rows of its upper neighbour. The filter
runs in this order:

1. the four vertical edges, left to right
2. the four horizontal edges, top to bottom

Each cycle it filters one 8-sample line across an edge (`dbf_line`: the H.264 luma
filter with the standard α, β and tc0 tables), so the whole macroblock takes 128
cycles.

Filtering changes pixels of the neighbours too:

- The left neighbour's right columns go back into its context, which is still in stage
  8 and not yet written out.
- The upper neighbour's bottom rows were already written out. They are rewritten by
  the "rows above" DMA job.

Boundary strength is one value per edge:

| macroblock | edge | strength |
|---|---|---|
| intra or inter-layer | macroblock edge | 4 |
| intra or inter-layer | inner edge | 3 |
| inter | edge with coefficients on either side | 2 |
| inter | macroblock edge, no coefficients | 1 |
| inter | inner edge, no coefficients | 0 |

Any edge next to an intra or inter-layer neighbour is also 4.

**`upsample`** makes the 16x16 inter-layer prediction from the 12x12 base block. It
uses the 4-tap dyadic phase filters (−1, 8, 28, −3) and (−3, 28, 8, −1), first
horizontally and then vertically. The result is rounded by (v + 512) >> 10. It
produces one row per cycle and takes 16 cycles.

**`image_buffer`** collects the input stream: 64-bit words of eight pixels, 32 words
per macroblock, in macroblock order. It has a valid/ready handshake and holds two
macroblocks, ping-pong. **`restore`** holds a finished macroblock and serves it to the
DMA as 64-bit words.

## Host interface

`host_if` is an AHB-Lite slave with 32-bit registers. It has no wait states and always
answers OKAY.

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start encoding |
| 0x04 | STATUS | R | bit 0 busy, bit 1 done since the last start, [31:16] macroblocks finished |
| 0x08 | QP | RW | QP, 0..51 (reset 28) |
| 0x0C | NUM_MB | RW | macroblocks in the picture |
| 0x10 | WIDTH_MB | RW | picture width in macroblocks (≤ `MAX_W_MB`) |
| 0x14 | REF_BASE | RW | address of reference pixel (0,0) |
| 0x18 | BASE_BASE | RW | address of base-layer pixel (0,0) |
| 0x1C | REC_BASE | RW | address of the reconstructed picture |
| 0x20 | BITS | R | bits written to the stream so far |
| 0x24 | MODE | RW | bit 0: allow inter-layer prediction |

Addresses must be 8-byte aligned.

The top module `svc_encoder` also has these ports:

- the AHB master (`m_*`)
- the input stream (`pix_*`)
- the output stream (`strm_valid`, `strm_word`)
- a one-cycle trace of each decision (`mbinfo_*`: macroblock index, choice, quarter-pel
  vector)
- the slot statistics
- `enc_done`

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `svc_encoder` | `MAX_W_MB` | 120 | widest picture in macroblocks (1920 pixels) |
| `svc_encoder`, `ime`, `fme_mc` | `SR` | 6 | search range −SR..SR−1; ≤ 8 |
| `ime` | `SUB` | 1 | compare every second row |
| `mb_pipe_ctrl` | `N_ST`, `SLOT` | 9, 600 | stages and per-stage budget |
| `intra16_pred` | `N` | 16 | 16 for luma, 8 for chroma |
| `local_mem` | `DEPTH` | 128 | 64-bit words |

`SR` = 6 is the largest range whose full search, with four processing elements and
row subsampling, stays inside the 600-cycle budget.

## Capacity against the target formats

At 600 cycles per macroblock and 266 MHz:

| format at 30 frames/s | macroblocks/frame | cycles/s | fits |
|---|---|---|---|
| 1920x1080 | 8160 | 146.9 M | yes |
| 1280x720 | 3600 | 64.8 M | yes |
| 720x480 | 1350 | 24.3 M | yes |
| three layers 720x480 + 1280x720 + 1920x1080 | 13110 | 236.0 M | yes |

The three-layer case assumes the layers are encoded one after another by the same
pipeline.

These figures cover luma only. The chroma planes (4:2:0) would need their own time or
hardware.

## What follows the source and what is this design's own

**Taken from the source:**

- the set of engines and their order
- the nine stage names and the 600-cycle budget
- the three-stage, eight-pixel SAD element
- variable block sizes 16x16 to 8x8
- subsampled integer search
- hierarchical half-pel and quarter-pel refinement
- the three transform types on 4x4 units
- the nine 4x4 and four 16x16 intra modes
- the deblocking edge order and its effect on the upper and left neighbours
- a single-channel 1/2/3-D DMA without buffering on an AHB 64-bit master
- an AHB 32-bit slave for the host
- the 266 MHz and 30 frames/s targets

**This design's own choices:**

- all arithmetic details where the source only names a function. These follow H.264
  and SVC practice: filters, tables, rounding, plane and DC rules.
- the search range and subsampling pattern
- SAD as the decision cost and the three-way choice rule
- the boundary-strength rule
- the Exp-Golomb block code
- the memory layout with borders
- the register map
- the context-register organisation of the local memories
- data-driven slot lengths (the budget is checked, not enforced)

**Where the structure differs:**

- In the source, the image buffer is one of the four DMA clients, next to the motion
  search, upsampling and restore. Here the image buffer takes the current pictures from
  a separate valid/ready pixel port. So the DMA serves only the reference area, the base
  block and the two write-backs.
- The source has luma and chroma intra prediction working in parallel. Only the luma
  half exists here.

**Not built:**

- chroma (prediction, transform, filtering, buffering)
- B slices, more than one reference picture and temporal scalability
- Intra 8x8, and the chroma intra modes
- the 8x8 transform
- motion refinement of the smaller partitions
- Intra 4x4 coding in the pipeline
- residual and motion resampling between layers
- CAVLC and slice/macroblock headers: the output is a residual bit stream, not a
  decodable H.264 stream
- DMA multibank interleaving and packet mode

## Verifying and simulating

Every module has a self-checking testbench in `tb/`. Each one compares the module with
a model written independently in the testbench:

- the per-mode intra equations
- a half-sample grid for motion compensation
- a direct 2-D filter for upsampling
- a byte-level AHB memory for the DMA
- round trips through the transform pair

Each testbench checks cycle counts where a stage has a fixed latency. Each prints
`TB_RESULT checks=N failures=M`.

The end-to-end test `tb_svc_encoder` runs the top module at its default parameters. It
uses `tb/ahb_mem_model.sv` as external memory. It builds a 3x2-macroblock picture in
which each column has a known best prediction:

- **column 0:** the reference moved by (2, 1). The expected result is inter with vector
  (8, 4) in quarter pixels.
- **column 1:** each row repeats the last pixel of column 0's row. The expected result
  is intra horizontal.
- **column 2:** the upsampled base layer. The expected result is inter-layer.

At QP 12 the reconstruction written back must equal the input exactly, and the stream
must be one bit per 4x4 block. A second run at QP 40 checks the decisions, a bound on
the error and that deblocking acts. The test also checks the following:

- every slot stays within 600 cycles
- no overrun is counted
- a picture of N macroblocks takes at most (N + 9) x 600 cycles

It reports how often each mechanism occurred: the three choices, DMA job kinds, burst
beats, wait states, input stalls and deblocked pixels.

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/svc_pkg.sv rtl/ahb_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/ahb_mem_model.sv tb/tb_svc_encoder.sv \
    --top-module tb_svc_encoder -Mdir obj && obj/Vtb_svc_encoder
```

For one block, list the package files, the block's module and the modules it
instantiates, and its testbench. For example:

```
verilator --binary --timing --assert -Irtl rtl/svc_pkg.sv rtl/sad_pe.sv \
    rtl/ime.sv tb/tb_ime.sv --top-module tb_ime
```

Reset is asynchronous and active low. Engine outputs hold until the next start.
Wide pixel arrays are unpacked arrays of `svc_pkg::pix_t` in raster order.
