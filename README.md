# H.264/AVC baseline decoder core with hybrid task pipelining

This is the SystemVerilog core of an H.264/AVC baseline-profile video decoder. It is
sized for 2048x1024 pictures at 30 frames/s with a 120 MHz clock. That gives a budget
of about 488 clock cycles per macroblock (MB).

The core's main idea is how it schedules work. The decoding tasks do not all run at
the same granularity:

* **4x4-block pipeline.** The residual decoder (CAVLD), inverse quantisation and
  transform (IQ/IT) and intra prediction are naturally 4x4-block tasks. They overlap on
  successive 4x4 blocks. Only a few blocks are ever in flight, so no macroblock-sized
  buffers are needed between them.
* **Macroblock pipeline.** Inter prediction is run one macroblock ahead, in its own
  block order, so that reference pixels shared by neighbouring blocks can be fetched
  once. Its results go through a ping-pong Inter-Predicted MB Buffer.
* **Deblocking per macroblock.** Vertical edges must be filtered before horizontal
  ones, so deblocking cannot follow the 4x4-block order. It works on a whole
  reconstructed macroblock, which is held in two dual-port SRAMs.

The throughput-critical engines work on four pixels per cycle:

* IQ/IT, intra prediction, inter prediction and reconstruction each produce four
  pixels per cycle.
* The CAVLD decodes several levels, or several run_before codes, in one cycle
  (multi-symbol decoding).
* The deblocking engine runs two 1-D edge filters side by side.

## Data path

```
 system bus --> Bitstream SRAM (bs_fifo) --> cavld ---------> iq_it ------+
   words           128 x 32                 (barrel shifter,  (4 residues |
                                              VLC tables)       / cycle)  v
 ip_* (mode syntax, neighbours) --> intramode_pred --> intra_pred4x4 --> sum_clip --> rec_*
 rf_* (partition) --> ref_fetch <--> mem_* (frame memory rows)                |
                        | 9x9 windows                                           |
                        +--> inter_pred_luma --> Inter-Pred MB buffer ------>   |
                                                 (2 x 16 blocks)                |
                                                                              v
                                       db_* bus port --> deblock_engine (2 x sram_dp 80x32,
                                                          8x4 pixel array, 2 x deblock_filter)
 mv_* (neighbour motion) --> mv_pred --> mv_pred_out
```

`h264_decoder_top` connects these parts. The luma 4x4 blocks of a macroblock pass
through it in the bitstream's double-z-scan order. For each block:

1. **Parse.** A `blk_*` command asks the CAVLD to decode one residual block. Command
   fields:
   * `nC`: selects the coeff_token table
   * `QP`
   * block index
   * intra/inter flag
   * which half of the inter buffer to use

   A command can instead ask for one Exp-Golomb symbol (`ue(v)`/`se(v)`), whose value
   comes back on `sym_*`. The core keeps a four-entry queue of block tags, so parsing
   can run up to four blocks ahead of reconstruction.
2. **Residue.** `iq_it` takes the 16 coefficients in one cycle. It emits four
   residues per cycle, one row of the block, and can take a new block every four
   cycles.
3. **Prediction.** The prediction row comes from one of two places:
   * Intra block: `intra_pred4x4`. The mode is derived by `intramode_pred` from the
     neighbours' modes and the parsed flag / remaining mode, and returned on
     `ip_mode`.
   * Inter block: the inter buffer, which `inter_pred_luma` filled earlier from the
     windows `ref_fetch` cut out of the reference frame.
4. **Reconstruction.** `sum_clip` adds the residue and the prediction and clips to
   0..255. A row is issued only when the residue row, the prediction row and the
   output stage are all ready, so a stall anywhere stops all three. Each finished row
   goes out on `rec_*` (valid/ready). It is also written into the deblocking SRAMs at
   its place in the macroblock; this write has priority over the `db_bus_*` host port,
   and `db_bus_gnt` shows when the host port is served.
5. **Deblocking.** When the macroblock is complete, the controller loads the
   neighbour rows and columns and the chroma through `db_bus_*`. It then gives the
   boundary strengths and QPs and pulses `db_start`. After `db_done` it reads the
   filtered words back. The strengths can come from `bs_calc`, which derives all 32
   luma values of a macroblock from the intra flags, non-zero-coefficient flags,
   vectors and reference indices of the blocks on either side of each edge (4 at an
   intra macroblock edge, 3 inside an intra macroblock, 2 for coefficients, 1 for a
   different reference or a vector difference of 4 quarter samples or more, else 0).
   It sits beside the core and is not instantiated in it, because the neighbour
   memories that would feed it are not built.

### What the outside controller has to do

The core has no macroblock-header state machine. An outside controller drives it
through the handshakes above, and the end-to-end testbench plays that role. The
controller must:

* Write the bitstream into the Bitstream SRAM whenever `bs_full` is low. After the
  last symbol it must add padding: the CAVLD decodes only while at least 64 bits are
  buffered.
* Send the commands in bitstream order, with the `nC`, `QP` and block index of each
  block.
* For an inter macroblock, send its partitions on `rf_*` (buffer half `m % 2`) and
  let all of them pass through inter prediction before sending that macroblock's
  first residual command. The frame memory behind `mem_*` answers row requests in
  order.
* Start the inter prediction of macroblock *m+1* (other half) while macroblock *m* is
  still being reconstructed.
* Offer the intra neighbours and mode syntax of each intra block on `ip_*`, in
  decoding order.
* Hold `rec_ready` low while the deblocking engine owns the SRAMs. Otherwise the next
  macroblock's rows would overwrite the one being filtered.

## Multi-symbol CAVLD

`cavld` decodes directly from a 128-bit window over the bitstream, which a barrel
shifter aligns to the next unread bit. Each state consumes its code or codes in one
cycle:

| state        | symbols consumed in one cycle                                   |
|--------------|-----------------------------------------------------------------|
| coeff_token  | one code: nC tables 0-2, 2-4, 4-8, 6-bit fixed code for nC >= 8, chroma DC table |
| trailing ones| all 0..3 sign bits                                               |
| levels       | `NSYM` level codes, chained with suffix-length adaptation       |
| total_zeros  | one code (skipped when TotalCoeff equals the block size)        |
| run_before   | `NSYM` run codes; levels that need no code are placed in the same cycle |

The level and run tables are the only ones replicated `NSYM` times. These are the
symbols that come in long runs. Taking several coeff_token or total_zeros codes per
cycle would need joint tables, which would be far larger.

A block with TotalCoeff *n*, *T* trailing ones and *R* coded runs takes
`1 + (T>0) + ceil((n-T)/NSYM) + (n<max) + max(1, ceil(R/NSYM))` cycles. The block's
16 coefficients then leave together, in raster order, already inverse-scanned.
`NSYM` = 1, 2 and 3 are the single-, two- and three-symbol engines. The default is 2:
at QP 0 it decodes a macroblock in roughly half the cycles of the single-symbol
engine, for about a fifth more area. Changing `NSYM` changes only how many levels or
runs are decoded per cycle; the tables stay the same.

The VLC tables are written out as `casez` matches in `cavld_tab_pkg.sv`. run_before
and total_zeros are in `h264_pkg.sv`. Each code set is a complete prefix code: the
sum of 2^-length over its code words is 1, or 1 minus one unused code. The testbench
encodes its stimulus with independent forward tables.

## Inter prediction: window fetch with reuse, and the ping-pong buffer

Inter prediction needs a 9x9 reference window for each 4x4 block, because the 6-tap
filter reaches 2 pixels before and 3 after. Fetching that window separately for
every block reads each reference pixel up to about five times.

`ref_fetch` instead takes a whole partition: 16x16, 16x8, 8x16, 8x8 or smaller, all
of whose blocks share one motion vector. It reads the union of the windows once, one
row per request, into a 21x21 window buffer:

* (4w + 5) x (4h + 5) pixels for a partition of w x h blocks
* no 5-pixel margin in a direction whose vector component is an integer; a fully
  integer vector reads just the pixels that are copied

A 16x16 partition then costs 441 pixels instead of 1296, and 256 for an integer
vector. The unit then hands `inter_pred_luma` the 9x9 window of each block of the
partition, one per cycle. `ref_fetched` counts the pixels read.

`inter_pred_luma` takes a 9x9 window of reference pixels and the quarter-sample
fraction (`dx`, `dy`) of one 4x4 block. It produces one row of four predicted pixels
per cycle:

* Half samples use the 6-tap filter (1, -5, 20, 20, -5, 1).
* The centre half sample is filtered from unclipped intermediate sums.
* Quarter samples average the two nearest integer or half samples.

Each window comes with its 4x4 position and a buffer half. The rows are
written into the Inter-Predicted MB Buffer, a 128 x 32-bit dual-port SRAM: two
macroblocks x 16 blocks x 4 rows. Because the block position is given with each
window, inter prediction can work in any order. A fetch unit can therefore order
blocks to reuse the overlapping reference pixels of one partition. During
reconstruction the buffer is read one row ahead. The synchronous read costs one
bubble cycle per inter block.

## Deblocking engine

Two 80-word x 32-bit dual-port SRAMs hold one macroblock with its 4-pixel margins:
160 words in all. A word is four horizontally adjacent pixels of one row.

| data                                   | SRAM (bank)      | word index        |
|----------------------------------------|------------------|-------------------|
| luma column c (0..3), rows -4..15      | c % 2            | (c/2)*20 + r + 4  |
| luma left neighbour, rows 0..15        | r / 8            | 40 + r % 8        |
| chroma k (Cb = 0, Cr = 1), column c (0..1), rows -4..7 | k  | 48 + 12c + r + 4  |
| chroma k left neighbour, rows 0..7     | k                | 72 + r            |

Neighbouring luma columns sit in different SRAMs. For every vertical edge, the p-side
and q-side blocks can therefore be read in the same cycle, one per SRAM port pair.
Horizontal edges take the p and q blocks from the same column, on ports A and B of
one SRAM.

The engine filters edges in the standard's order: luma vertical edges left to right,
then luma horizontal edges top to bottom, then Cb and Cr the same way. It works in
segments of four lines. Each segment either:

* is skipped in one cycle, when its bS is 0 or it lies on the picture border; or
* takes 11 cycles:
  * LOAD, 5 cycles: both 4x4 blocks go into the 8x4 pixel array, transposed for
    horizontal edges.
  * FILTER, 2 cycles: two `deblock_filter` instances do two lines per cycle.
  * STORE, 4 cycles: the blocks are written back.

`deblock_filter` is the standard's 1-D filter on p3..q3:

* alpha, beta and tC0 tables
* the bS 1..3 filter with a clipped delta
* the bS 4 strong filter
* the chroma variants

## Timing budget at 2048x1024, 30 frames/s, 120 MHz

* 8192 MBs per frame x 30 = 245,760 MB/s, so there are **488 cycles per MB**.
* Luma reconstruction: 16 blocks x 4 rows = 64 cycles, 80 for an inter MB because of
  the bubbles.
* CAVLD at QP 0 with `NSYM` = 2: 10 cycles per fully coded block. That is about 240
  cycles for the 24 blocks of a MB, plus header symbols.
* Deblocking: 48 segment visits + 11 cycles per filtered segment. Typically about 312
  cycles with half the segments filtered; **576 in the worst case** (every segment
  filtered). This schedule therefore does not meet the budget for MBs where every
  edge has bS > 0. Overlapping LOAD and STORE of successive segments would be the
  first improvement.

## How far it goes, and where it departs

Built and tested:

* the bitstream SRAM
* the complete CAVLC residual decoder, Exp-Golomb symbols
* IQ/IT with flat scaling
* all nine Intra4x4 modes, Intra4x4 mode prediction, motion vector prediction
* luma reference-window fetch with reuse, and quarter-sample interpolation
* reconstruction
* the complete deblocking engine for luma and chroma

Not built:

* Luma Intra16x16 and chroma intra prediction, chroma interpolation, and the
  reconstruction path for chroma and DC blocks. The CAVLD does parse chroma DC, AC
  and Intra16x16 blocks (`CMD_CDC`, `CMD_AC`), and `iq_it` has a `dc_pre` input for
  DC values from a separate DC transform. The reconstruction path through the top
  carries luma 4x4 blocks only.
* In the window fetch: reuse across different partitions of one macroblock, chroma
  windows, and padding for reference pixels outside the picture. The window must lie
  inside the picture.
* The macroblock-header state machine, the connection of `bs_calc` inside the core,
  and the neighbour-information memories: total-coefficient counts, upper pixels, intra
  modes, motion data, MB type and QP. Their contents are ports.
* The host processor, system and local bus interfaces, DRAM controller and display
  interface.

Choices this design makes where no source was available:

* All handshakes are valid/ready.
* Bitstream SRAM of 128 words, tag queue of 4 blocks, an inter buffer for two macroblocks.
* The deblocking SRAM word layout and segment schedule.
* Motion vector components of 14 bits.
* Exp-Golomb codes are limited to 15 leading zeros.

## Files

| file | contents |
|------|----------|
| `rtl/h264_pkg.sv` | shared types (pixel, coefficient, mode and command enums, motion vector), scan tables, total_zeros / run_before decoding, dequantisation scales, deblocking tables |
| `rtl/cavld_tab_pkg.sv` | coeff_token tables, chroma DC total_zeros, level decoding |
| `rtl/cavld.sv`, `rtl/exp_golomb_dec.sv` | PARSER symbol decoder |
| `rtl/bs_fifo.sv`, `rtl/sram_dp.sv` | Bitstream SRAM FIFO, dual-port SRAM |
| `rtl/iq_it.sv` | inverse quantisation and transform |
| `rtl/intra_pred4x4.sv`, `rtl/intramode_pred.sv` | intra prediction |
| `rtl/ref_fetch.sv`, `rtl/inter_pred_luma.sv`, `rtl/mv_pred.sv` | inter prediction |
| `rtl/sum_clip.sv` | reconstruction |
| `rtl/deblock_filter.sv`, `rtl/deblock_engine.sv`, `rtl/bs_calc.sv` | deblocking, boundary strengths |
| `rtl/h264_decoder_top.sv` | the core |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cavld_qp0.sv` | CAVLD cycles per macroblock for one, two and three symbols per cycle |

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Build and run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/h264_pkg.sv rtl/cavld_tab_pkg.sv \
          tb/tb_h264_decoder_top.sv --top-module tb_h264_decoder_top
./obj_dir/Vtb_h264_decoder_top
```

`tb_h264_decoder_top` runs the core at its default parameters on ten macroblocks,
mixing intra and inter. Inter macroblocks use random partitions in a 64x64
reference frame behind a memory model with random latency. It generates everything
it needs:

* a CAVLC encoder for the bitstream
* models of the intra modes, interpolation, dequantisation, inverse transform and
  clipping for the expected pixels
* random stalls on the output
* a deblocking pass after each macroblock

It checks:

* every reconstructed row
* every word that lands in the deblocking SRAMs
* the Exp-Golomb symbols
* the derived intra modes and motion vector predictors
* the number of filtered segments

It also counts how often each mechanism of the design occurred and fails if any
never did:

* intra and inter blocks, and switches between them
* output stalls, and a full Bitstream SRAM
* multi-level CAVLD cycles
* parsing overlapped with reconstruction
* inter prediction overlapped with reconstruction (ping-pong)
* integer-vector partitions, and partitions whose blocks share one fetched window
* missing top-right neighbours
* filtered and skipped segments, and bS 4 edges

It also checks that the number of reference pixels read equals the sum of the
partitions' union windows. On the default run this is 2335 pixels, where separate
9x9 windows would read 6480.

The unit testbenches check their modules against independent models:

* `tb_cavld` also checks the cycle count of every block against the formula above.
* `tb_cavld_qp0` decodes QP-0-like macroblocks (16 luma, 2 chroma DC and 8 chroma AC
  blocks, about 90% of the coefficients non-zero) with three decoders, `NSYM` = 1, 2
  and 3. It gets 548, 314 and 236 cycles per macroblock. The ratios 0.57 and 0.43 are
  checked against the published 276/471 = 0.59 and 212/471 = 0.45 for such engines.
* `tb_iq_it` checks the one-block-per-four-cycles rate.
* `tb_deblock_engine` filters random macroblocks on a pixel-plane model and checks
  all 160 words and the cycle bound.
