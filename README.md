# Error-concealed loop/post deblocking filter for H.264/AVC

Block-based video codecs leave visible seams along the 4x4 and 8x8 transform
block borders. This RTL removes them for 4:2:0 video, one 16x16 macroblock
(MB) at a time. Each MB command picks one of three behaviours, and all three
use the same memories, schedule and datapath:

* **Loop mode.** This is the H.264/AVC in-loop deblocking filter, bit-exact with
  the standard for frame-coded pictures. Boundary strength (bS), alpha, beta and
  tc0 come from the MB syntax.
* **Post mode.** A post-processing filter in the style of the MPEG-4 deblocking
  filter, for bitstreams that do not use the in-loop filter. It works only on
  8x8 edges. A count of flat pixel pairs (Eq_cnt) is compared against two
  thresholds T2 and T3 to pick skip, weak or strong. Strong uses the H.264
  bS = 4 filter. Weak uses a shift-only variant of the MPEG-4 default filter,
  with the kernel [2 -4 4 -2].
* **Corrupted MB (error concealment).** When the decoder flags an MB as lost,
  each 4x4 block is rebuilt from pixels that are already reconstructed:
  * The block's left, top-left, top and top-right neighbours are searched for a
    strong edge with Sobel operators.
  * The neighbour pixels are copied along the direction found: vertical,
    horizontal or one of the two diagonals.
  * Every edge of the MB is then filtered with bS = 4 and the pixel test forced
    on, which hides the seams of the copy.

The unit does not need to read the picture back. Pixels that are final for the
current MB go to the external frame buffer, which is write-only. Pixels that a
later MB still needs stay in an on-chip slice memory:
* the bottom row of 4x4 blocks, for the MB below;
* the right column of blocks, for the MB to the right.

## Data flow

```
 prediction + residual                                  syntax parser / error flag
        |                                                        |
  cm_we/cm_waddr/cm_wdata                               mb_start, mb_x/y, *_info,
        v                                               corrupted, post_mode, t2/t3
 +-------------------+     +------------------------------------v-----------+
 | content memory    |---->|  control unit (dbf_controller)                 |
 | 2 banks x 96x32   |     |  hybrid schedule, one line op per cycle        |
 +-------------------+     +-----+--------------------------+---------------+
                                 | stage-1 line op           | reads
 +-------------------+     +-----v--------------------------v---------------+
 | slice memory      |<--->|  pixel buffer: four 4x4 blocks (registers)     |
 | (2N+32) x 32, 1 RW|     |  row or column access                          |
 +-------------------+     +---+-----------------------------------+--------+
                               | 8-pixel line                      ^ rebuilt words
                               v                                   |
       bS -> smoothing -> threshold LUT -> mode decision    edge detection ->
                               |                            replacement
                               v                            (EC window of 3
                         edge filter  ---> P', Q'            blocks + 2 slots)
                               |
                  pixel buffer / slice memory / frame buffer ports P and Q
```

All memories hold **CoP words** (column of pixels). A CoP word is the four pixels
of one column of a 4x4 block: byte i is row i, and row 0 sits in the low byte. A
4x4 block is therefore four words, one per column. A vertical edge filters the
rows of a block, so rows are read by taking one byte from each of four words.
A horizontal edge filters columns, so a column is read as a single word. The
pixel buffer supports both kinds of access.

## The hybrid schedule and the pixel buffer

This is the part to understand before changing anything.

The standard filters all vertical edges of an MB first, then all horizontal
edges. A straightforward implementation would load the whole MB twice. The
control unit instead walks the MB column by column, which gives the same
result while loading each 4x4 block into the pixel buffer only once.

The MB is split into four **parts**. Each part is two block rows high:

| part | blocks (standard 4x4 index)   | columns |
|------|-------------------------------|---------|
| YU   | luma block rows 0 and 1       | 4       |
| YL   | luma block rows 2 and 3       | 4       |
| Cb   | the 2x2 Cb blocks             | 2       |
| Cr   | the 2x2 Cr blocks             | 2       |

For each column k of a part, left to right, the unit does three things:

1. It loads both blocks of column k into a free pair of pixel-buffer slots.
   Column 0's left partner is the previous MB's right column, read from the
   slice memory.
2. It filters **vertical edge k**: eight row lines that cross the edge between
   column k-1 and column k.
3. It filters the **horizontal edges of column k-1**. That column now has its
   final vertical-edge result on both sides. The edges are:
   * its top edge, with the top neighbour coming from the slice memory in YU
     and the chroma parts, or from the pixel buffer in YL;
   * then the edge between its two block rows.

After the last column, the horizontal edges of that column are filtered as
well. Every block therefore sees its left edge first and its lower edge last,
which is all the standard order requires.

The pixel buffer has four slots, each holding one 4x4 block. Two slots hold
column k-1 and two hold column k. The slot pair flips with the parity of k (see
`base_slot` in the controller), so no data is ever moved between slots.

### Where a filtered line goes

An edge filter output is written to up to three places in the same cycle:

* **Pixel buffer.** P' and Q' go back into the pixel buffer if another edge of
  this MB will still touch them.
* **Slice memory.** Rows a later MB needs are kept here. These are the bottom
  4x4 row of YL and the chroma parts, for the MB below, and the last column,
  for the MB to the right.
* **Frame buffer.** Final pixels go to one of the frame ports:
  * Port P carries the P side of the line at (x, y).
  * Port Q carries the Q side at (x, y+4).

Horizontal top-edge lines in YU and chroma read P directly from the slice
memory (`p_from_sm`). Their P' is final, so it goes to the slice memory or the
frame buffer and is not written back into the buffer.

### Steps and their lengths

Each part runs a fixed sequence of steps. The sequence is known from the MB
position and the flags before the MB starts.

| step   | cycles | what happens                                                          |
|--------|--------|-----------------------------------------------------------------------|
| LOADL  | 8      | left-neighbour blocks from the slice memory (skipped at picture x = 0) |
| LOADC  | 8      | column k from the content memory (correct MB)                          |
| ECLD   | 12 / 4 | concealment window from the slice memory (corrupted MB)                |
| REPL   | 4 + 4  | both blocks of column k rebuilt, one word per cycle                    |
| V      | 8      | vertical edge k, 8 row lines                                           |
| STOREL | 8      | left-neighbour blocks out to the frame buffer or slice memory          |
| H      | 8      | horizontal edges of a column, 4 lines each                             |
| STORER | 4      | the block that has to wait in the slice memory for the next MB         |

### Pipeline and the stall

The control unit is stage 0. Each cycle it issues the reads for one line
operation (`lineop_t` in `dbf_pkg`) and registers the operation. Stage 1 is the
datapath, which runs one cycle later as the synchronous memory data arrive.

The slice memory has a single port. A stage-0 read that collides with a stage-1
write-back has to wait: the control unit holds for one cycle and issues a
bubble. The assertion `a_no_port_clash` in the controller guards this rule.
These stalls cost a few cycles per MB and are visible on `mon_stall`.

### Slice-memory map

N is `FRAME_WIDTH`.

| words          | contents                                              |
|----------------|-------------------------------------------------------|
| 0 .. N-1       | luma: bottom row of 4x4 blocks of the MB row above    |
| N .. 3N/2-1    | Cb, same                                              |
| 3N/2 .. 2N-1   | Cr, same                                              |
| 2N .. 2N+15    | luma right column of the left MB (4 blocks)           |
| 2N+16 .. 2N+31 | Cb and Cr right columns of the left MB (2 + 2 blocks) |

A top-row word is overwritten by the current MB as soon as the old value has
been read. The schedule orders these reads and writes so that no word is
overwritten before its last read.

## Edge filter and mode decision

`dbf_threshold` computes indexA and indexB from the average QP and the filter
offsets, then looks up alpha, beta and tc0 in the H.264 tables. Chroma QP uses
the H.264 mapping with chroma_qp_index_offset = 0.

`dbf_bs` derives bS from the H.264 rules for frame coding:

| bS | condition                                                        |
|----|------------------------------------------------------------------|
| 4  | intra, on an MB edge                                             |
| 3  | intra, inside the MB                                             |
| 2  | non-zero coefficients                                            |
| 1  | different reference, or a motion-vector difference of 4 quarter samples or more |
| 0  | otherwise                                                        |

`ecdf_smoothing` replaces bS with 4 in a corrupted MB.

`dbf_mode_decision` chooses the mode of each line:

* **Loop mode.** The line is skipped for bS = 0 or when the alpha/beta test
  fails. Otherwise it is strong for bS = 4 and weak (normal) below that. The
  forced flag of a corrupted MB overrides the alpha/beta test.
* **Post mode.** Eq_cnt is the number of neighbouring pairs among the eight
  pixels p3..q3 that differ by at most `EQ_THR` (7 pairs). The mode is:
  * strong if Eq_cnt >= T2;
  * weak if T3 <= Eq_cnt < T2;
  * skip otherwise.

`dbf_edge_filter` is purely combinational: eight pixels in, eight pixels out.
* The H.264 normal filter changes p1/p0/q0/q1 and clips by tc.
* The strong filter changes up to three pixels per side.
* The post weak filter works like this:
  1. It computes the frequency terms a0 (across the edge), a1 (inside P) and
     a2 (inside Q) with [2 -4 4 -2] and `(x+4)>>3`.
  2. It shrinks a0 toward the smaller of |a1| and |a2|.
  3. It corrects p0/q0 by at most half their difference, and only when
     |a0| < QP.

  Because the kernel has only powers of two, the datapath needs no multipliers.

In post mode only the 8x8 edges are filtered. These are luma edges 0 and 2, and
the chroma MB edge.

## Error concealment

A corrupted MB is not read from the content memory. Instead, each column of a
part goes through these steps:

1. **ECLD.** The concealment window is loaded from the slice memory. It holds
   the top-left, top and top-right neighbour blocks of the column's upper block.
   After the first column the window shifts by one block, so only the new
   top-right block (4 words) is loaded.
2. **Edge detection.** For each of the four neighbours of the block being
   rebuilt, the unit applies the 3x3 Sobel masks at the four interior pixels and
   sums Gx and Gy. The four neighbours are:
   * left, which is the previous column in the pixel buffer;
   * top-left;
   * top;
   * top-right.

   A neighbour has a **real edge** when |Gx| + |Gy| > `GRAD_THR`. Its slope
   gives the direction:

   | condition                              | edge        | mode                      |
   |----------------------------------------|-------------|---------------------------|
   | \|Gx\| < 2/5 \|Gy\|                    | vertical    | copy vertically           |
   | \|Gx\| > 5/2 \|Gy\|                    | horizontal  | copy horizontally         |
   | in between, Gx and Gy of the same sign | diagonal    | copy diagonally down-right |
   | in between, opposite signs             | diagonal    | copy diagonally down-left  |

   The neighbours are tried in a fixed priority order:
   * in the top block row of the MB: top, top-left, top-right, left;
   * elsewhere: left, top-left, top-right, top.

   Without any real edge the block is copied vertically, or horizontally when
   there is no top neighbour.

   One neighbour is never used: the top-left of the first block of the upper
   luma half. Its slice-memory word has already been reused for the left MB's
   block row 1 by then, so that block is treated as unavailable.
3. **REPL.** `ecdf_replacement` builds the block from the neighbour pixels
   (named A..M as in H.264 intra 4x4 prediction) by plain copying. It writes
   the block into the pixel buffer one word per cycle. When a neighbour is
   missing:
   * a missing top-right repeats the last top pixel;
   * with no top and no left neighbour, the block is filled with 128.
4. The second block of the column is rebuilt the same way. Its top neighbour is
   the block just rebuilt.
5. The column is filtered as usual, but with bS = 4 everywhere.

## Interface and timing (`ecdf_top`)

| signals              | use                                                              |
|----------------------|------------------------------------------------------------------|
| `cm_we/cm_waddr/cm_wdata` | fill the content-memory bank named by `cm_wr_bank`. The address is 4 x block + column. Luma blocks are 0..15 in the standard 4x4 order, Cb 16..19, Cr 20..23. |
| `mb_start` + command | accepted while `mb_busy` is low. It takes the bank filled last and swaps the banks, so the next MB can be written at once. |
| `mb_x, mb_y`         | MB position, which drives the border handling.                   |
| `cur_info/left_info/top_info` | `mbinfo_t`: intra flag, QP, and per-4x4 nz/ref_idx/mv (raster order). |
| `corrupted, post_mode, t2, t3, offset_a, offset_b` | per-MB options, latched with the command. |
| `mb_done`            | one-cycle pulse after the last write.                            |
| `fbp_* / fbq_*`      | frame-buffer writes. Each carries one CoP word of component `comp` (0 Y, 1 Cb, 2 Cr) at column x, rows y..y+3. |
| `mon_*`              | what the datapath decided this cycle: filter mode, Eq_cnt, indexA, replacement mode, real edge, chosen neighbour, stall. |

MBs must be given in raster order, and the whole picture must use the same
`FRAME_WIDTH`.

Measured cycles from `mb_start` to `mb_done` for an MB inside the picture:

| MB        | cycles |
|-----------|--------|
| correct   | 380    |
| corrupted | 467    |

Border MBs take fewer cycles. At 100 MHz and 30 frames/s, 1920x1088 (8160 MBs)
allows 408 cycles per MB. Correct MBs fit in that budget. A picture made only of
corrupted MBs does not.

Parameters of `ecdf_top`:

| parameter      | default         | meaning                                     |
|----------------|-----------------|---------------------------------------------|
| `FRAME_WIDTH`  | 1920            | luma width; sizes the slice memory          |
| `FRAME_HEIGHT` | 1088            | luma height; bottom-border handling         |
| `EQ_THR`       | 2               | pair threshold of Eq_cnt (post mode)        |
| `GRAD_THR`     | 128             | real-edge threshold of the concealment      |
| `SLICE_DEPTH`  | 2*FRAME_WIDTH+32 | slice-memory words                         |

For CIF or QCIF, set `FRAME_WIDTH` and `FRAME_HEIGHT` to the picture size.

## Files

| file | module |
|------|--------|
| `rtl/dbf_pkg.sv` | types (`lineop_t`, `mbinfo_t`), the H.264 tables, helpers |
| `rtl/ecdf_top.sv` | top: memories, datapath, concealment window, frame ports |
| `rtl/dbf_controller.sv` | control unit: hybrid schedule, addresses, stall |
| `rtl/dbf_pixel_buffer.sv` | four-block register buffer, row/column access |
| `rtl/dbf_content_memory.sv` | two-bank 96x32 memory |
| `rtl/dbf_slice_memory.sv` | single-port neighbour memory |
| `rtl/dbf_threshold.sv`, `rtl/dbf_bs.sv`, `rtl/dbf_mode_decision.sv`, `rtl/dbf_edge_filter.sv` | filter decision and datapath |
| `rtl/ecdf_edge_detect.sv`, `rtl/ecdf_replacement.sv`, `rtl/ecdf_smoothing.sv` | concealment |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against a reference model written separately in the testbench, has a
watchdog, and ends with a `TB_RESULT checks=N failures=M` line.

* **`tb_ecdf_top`.** Runs a 48x48 picture (3x3 MBs) through seven scenarios:
  1. loop mode;
  2. post mode;
  3. loop and post mixed per MB;
  4. a flat picture with corrupted MBs holding garbage, which must come out flat;
  5. an all-corrupted picture, which must be all 128;
  6. striped content with corrupted MBs;
  7. random-direction stripes in every 4x4 block, with many corrupted MBs.

  Every picture is compared pixel by pixel against a reference model:
  * For correct MBs the reference filters in the standard edge order.
  * For corrupted MBs it rebuilds the blocks in the hardware's order. The
    neighbours a block is copied from are only partly filtered at that moment,
    so the order matters.

  The test also checks that:
  * every pixel is written exactly once;
  * correct MBs take at most 408 cycles;
  * each mechanism occurs at least once: stall, each loop and post mode, each
    replacing mode, real edge, mode switch, bank overlap, both frame ports,
    corrupted MB.
* **`tb_ecdf_top_full`.** Runs the same checks on whole 1920x1088 pictures
  (scenarios 3, 6 and 7) at the default parameters, about 11 s of simulation.
* **`tb_ecdf_top_cif`.** Runs the seven scenarios on a CIF picture (352x288)
  with the top built for that size. It checks every MB against the CIF budget
  of 4209 cycles, which is 30 frames/s on a 50 MHz clock.
* **`tb_dbf_controller`.** Checks the schedule on its own:
  * number of filtered lines;
  * which lines are enabled;
  * content-memory words read once;
  * frame words written once;
  * no slice-port clash;
  * bS and QP of each line;
  * cycle budget.

Running one with Verilator 5:

```
verilator --binary -Wno-fatal --top-module tb_ecdf_top \
    rtl/dbf_pkg.sv $(ls rtl/*.sv | grep -v dbf_pkg) tb/tb_ecdf_top.sv
./obj_dir/Vtb_ecdf_top
```

Field/MBAFF coding is not covered, because it is not built.

## Departures and limits

* **Speed.** The schedule takes 380 cycles per correct MB, against about 243
  for the original architecture, and 467 per corrupted MB, against 275. The
  original overlaps block loads and stores with filtering; here they are
  separate steps.
* **Slice memory.** It has 2N+32 words instead of the original 2N+20, so that a
  whole column of left blocks fits for every component.
* **Gradient.** The magnitude is |Gx|+|Gy| rather than the square root.
* **Top-left neighbour.** It is unavailable for the first block of the upper
  luma half, as described under error concealment.
* **Chosen constants.** The thresholds (`GRAD_THR`, the 2/5 and 5/2 slope
  limits, `EQ_THR`) and the priority of the two middle neighbours are this
  design's choices.
* **Post filter.**
  * The weak mode uses the current MB's QP.
  * T2, T3 and the filter offsets are inputs.
  * A corrupted MB always uses loop mode.
* **Not built.**
  * Field and MBAFF bS rules.
  * `chroma_qp_index_offset`.
  * A picture width that can change at run time: the width is a parameter.
* **Outside this unit.** Error detection, prediction and the frame buffer are
  left to the rest of the decoder.
