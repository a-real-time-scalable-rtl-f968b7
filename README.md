# Dual-core HOG object detector

This is synthesizable SystemVerilog for a low-power object detection accelerator. It detects objects such as pedestrians or cars with HOG features (histograms of oriented gradients) and a linear SVM.

A conventional detector slides a window over the image and recomputes the features of every window. This design never does that: it computes each piece of work exactly once.

- Each 8x8-pixel **cell** of the image is read once.
- Each **block** of 2x2 cells is normalised once.
- Each block feature is multiplied into **all** windows that contain it, at the same time.

With 64x128-pixel windows, one block belongs to up to 105 windows. A 15x8 array of multiply-accumulate units (MACs) holds the 105 running sums. Each window is also checked after every one of its block rows. A window that is already clearly a detection or clearly not one stops accumulating ("early classification").

The chip has two identical cores. They can:

- split one image between them;
- share one core's features, so the second core looks for a different object class without extracting features itself;
- chain their MAC arrays to handle square 128x128 windows.

At the default parameters, one HDTV frame (1920x1080) split over the two cores takes 1.40 million clock cycles in simulation. That is 30 frames per second at 42.9 MHz.

## One core, stage by stage

```
 memory bus ─► cell_line_buffer ─► cell_hist_gen ─► block_assembler ─► hist_normalizer ─► MUX ─► svm_classifier ─► result queue
 (32-bit words)  24 pixel rows      CORDIC + 4-way    working SRAM       2 x L2 stage      ▲         15x8 MACs,        (core_controller)
                                    shift voting                                          │         partial-sum SRAM
                                                                            features of the other core
```

**Line buffer** (`cell_line_buffer`). Pixels arrive as 32-bit words of four 8-bit pixels, in raster order, and are written into a ring of 24 rows.
- Row r is stored in slot r mod 24.
- While cell row `cy` is scanned (pixel rows 8cy-1 .. 8cy+8, including the gradient halo), rows up to 8cy+22 may be written. The next cell row is therefore complete before the scan reaches it.
- When the ring is full, `pix_ready` drops and the memory bus is held.

**Cell histograms** (`cell_hist_gen`, `cordic_vectoring`). Cells are visited in raster order, and pixels row by row inside a cell, at one pixel per clock.
- **Gradient.** For each pixel the central differences gx and gy go through an 8-iteration CORDIC in vectoring mode.
  - The angle is folded to 0..180 degrees, in units of 576 per half turn (64 per bin, 9 bins).
  - The magnitude keeps the CORDIC gain of about 1.647. Every vote carries it, so normalisation removes it.
- **Four-way histograms.** Each pixel votes into four histograms at once, one for each position the cell takes in the four 2x2 blocks that contain it (top-left, top-right, bottom-left, bottom-right). The weights use shifts only:
  - *Orientation:* the vote m is split between bin b and bin b+1 by the two fraction bits of the angle: (m, 0), (3m/4, m/4), (m/2, m/2), (m/4, 3m/4).
  - *Position:* for each of the four histograms, the vote is halved if the pixel is in the half of the cell away from the block centre horizontally, and halved again vertically.

A cell therefore leaves as 4 x 9 bins of 16 bits.

**Block assembly** (`block_assembler`, `sram_1r1w`). When cell (cx, cy) arrives, block (cx-1, cy-1) is complete. It is formed from:
- the top-left and top-right versions of the two cells above, kept from the previous cell row in a working SRAM with one entry per cell column;
- the bottom-left version of the cell to the left, kept in a register;
- the bottom-right version of the new cell.

The new cell's top-row versions overwrite its SRAM entry.

**Normalisation** (`hist_normalizer`, `l2_norm_stage`, `rsqrt_newton`). This is L2-Hys normalisation in two identical serial passes.
- Each pass takes one multiplier and 78 cycles:
  1. 36 cycles for the sum of squares;
  2. a reciprocal square root;
  3. 36 cycles of scaling.
- Pass 1 outputs Q0.12 values clipped at 0.2 (819).
- Pass 2 renormalises to 8-bit features (Q0.8, saturated at 255).
- **Reciprocal square root.** The sum S is written as m·4^e with m in [1, 4). The initial guess is 7/8 or 5/8, picked by one bit of the shift, and four Newton iterations follow (5 cycles in all).
- A zero block gives zero features.
- Each pass accepts the next block in its last scaling cycle. A stream of blocks therefore leaves every 78 cycles, and this is the core's throughput limit.

**Feature MUX** (in `hog_core`). The classifier takes features from its own normaliser, or from the other core's normaliser when the "peer features" flag is set. A core whose features the other core also uses waits until **both** classifiers can accept. The two classifiers therefore always see the same stream.

## The classifier array

This is the part that needs the most explanation (`svm_classifier`, `svm_mac`, `svm_coef_sram`).

**Simultaneous windows.** A window of W x R blocks has one 36-element coefficient vector per block position. When block (bx, by) arrives, it is at position (bx - wx, by - wy) of every window whose origin (wx, wy) covers it.

The array is organised as **chains** of MACs:

- Chain k handles window row k.
- Position j in chain k holds the running sum of the window whose block (row k, column j) is the current block, i.e. window (bx - j, by - k).
- The MAC at (k, j) always uses the coefficients of window row k, column j.

**Processing one block.** The 36 feature elements are broadcast one per cycle, and every MAC multiplies them with its own coefficient byte.

**Moving along.** When the scan moves one block to the right, every chain shifts its sums by one MAC.
- The sum leaving the end of chain k has finished window row k. It is stored in the *intermediate SRAM*, one entry per window column and chain.
- When the scan reaches the next block row, the stored sum enters the head of chain k+1.
- A new sum of zero enters chain 0.

**Dataflow modes.** The mode register bits select how the 120 physical MACs form chains:

| mode | window | chains x length | chains run along | note |
|------|--------|-----------------|------------------|------|
| 0 vertical | 64x128 (7x15 blocks) | 15 x 7 | array rows | 105 windows in flight; the 8th column is idle |
| 1 horizontal | 128x64 (15x7 blocks) | 7 x 15 | array columns | |
| 2 square head | 128x128, rows 0..7 | 8 x 15 | array columns | sums leaving the last chain go to the other core |
| 3 square tail | 128x128, rows 8..14 | 7 x 15 | array columns | chain 0 starts from the sums received from the other core |

In square mode the head core sends a sum, with an alive flag, for every window column of each block. The tail core parks these values in a small initial-value SRAM until its first chain needs them. Both cores must classify the same feature stream, so the tail core is set to take its features from the head core.

**Coefficient layout.** MAC p (0..119) reads byte p of coefficient word i when feature element i is broadcast. The host writes the coefficient of window row r, column c to MAC p, as follows:

| mode | MAC p |
|------|-------|
| vertical | p = 8r + c |
| horizontal | p = 8c + r |
| square, rows 0..7 | p = 8c + r, written to the head core |
| square, rows 8..14 | p = 8c + (r - 8), written to the tail core |

Feature element i of a block is `way*9 + bin`, with ways 0..3 = top-left, top-right, bottom-left, bottom-right.

**Early classification.** Every time a sum leaves a chain, the window has completed row r (r = 0..13; in the tail core the row numbers start at 8).
- If the sum is above `thr_det[r]`, the window is reported as an early detection.
- If the sum is below `thr_rej[r]`, the window is dropped.
- Either way the window is marked dead: its MACs stop accumulating (the clock-enable saving) and nothing more is reported for it.

The sum leaving the last window row is compared with the final SVM threshold. Windows that would extend past the frame enter the array already dead.

The reset thresholds never fire. Early classification can also be switched off by a control bit. With learned thresholds (for example mean ± 4 standard deviations of target and non-target partial sums), a window is dropped early only when it is well outside the range where it could still be misclassified.

**Timing.**
- One block takes 39 cycles: accept, load/shift, 36 MAC cycles, evaluate.
- Each report adds one cycle.
- Reports enter a 16-entry queue.
- The classifier is faster than the normaliser, so it seldom limits the rate.

## Using two cores

All three uses are set by writing each core's CTRL register. No wiring changes.

1. **One class, twice the speed.**
   - The frame source sends each core its own horizontal band of the image.
   - The bands overlap by one window height minus one cell row (15 cell rows for 64x128 windows), so every window lies wholly in one band.
   - For HDTV, core 0 gets cell rows 0..74 and core 1 cell rows 60..134.
   - Each pixel word carries a core tag (`mem_core`).
2. **Two classes, features computed once.**
   - Core 0 extracts features and classifies, for example pedestrians in vertical mode.
   - Core 1 has extraction off and the peer-features flag on. It classifies core 0's features with its own coefficients, for example cars in horizontal mode.
   - Set core 1 up first, then start core 0.
3. **Square windows.**
   - Core 0 runs in square-head mode.
   - Core 1 runs in square-tail mode, with extraction off and peer features on.
   - Early results can come from either core; final results come from core 1.

Splitting the frame, and merging overlapping detections afterwards, is left to the system around the chip.

## Programming interface

**CPU bus** (`cpu_if`). A simple synchronous bus:
- `cpu_cs`, `cpu_we`, a 16-bit word address, 32-bit data.
- Address bit 15 selects the core.
- Writes take effect in the next cycles.
- Read data is valid with `cpu_rvalid`, two cycles after the request.
- Reads may be issued back to back.
- `cpu_irq` is high while either core is done or has a result waiting.

Registers of one core (word address within the core):

| address | register | contents |
|---------|----------|----------|
| 0x000 | CTRL | [0] start (write 1), [2:1] mode, [3] features from the other core, [4] feature extraction enable, [5] early classification enable |
| 0x001 | SIZE | [7:0] cells per row, [23:16] cell rows |
| 0x002 | STATUS | [0] busy, [1] done, [2] result waiting |
| 0x003 | RES_POS | [31] early, [30] valid, [23:16] window row, [7:0] window column (in blocks) |
| 0x004 | RES_SCORE | signed 27-bit score; reading it removes the result |
| 0x005 | FINAL_THR | final SVM threshold (signed) |
| 0x006-0x008 | counters | early detections, early rejections, final detections |
| 0x010+r | THR_DET[r] | early detection threshold after window row r |
| 0x020+r | THR_REJ[r] | early rejection threshold after window row r |
| 0x4000 + 64p + i | COEF | signed 8-bit coefficient of MAC p, feature element i (write only) |

**Frame sequence**
1. Write the coefficients, the thresholds and SIZE.
2. Write CTRL with start = 1.
3. Stream `cells_x*8` x `cells_y*8` pixels on the memory bus: `mem_valid` / `mem_ready`, 4 pixels per word, 4-entry queue.
4. Poll STATUS, or wait for `cpu_irq`. Read RES_POS, then RES_SCORE, for each result.
5. Done sets once the last block has been classified.

The frame width is at most `IMG_W` pixels (default 1920). Both dimensions must be multiples of 8.

## Sizes and performance

| quantity | value |
|---|---|
| HDTV frame, both cores, 64x128 windows | 1,404,018 cycles (simulated, full size) |
| normaliser throughput | 78 cycles per block |
| blocks per core (HDTV, split) | 239 x 74 = 17,686 |
| one core, whole HDTV frame | about 2.5 M cycles (estimate: 32,026 blocks x 78) |
| memory bits, both cores (yosys) | 1.15 Mbit (575 Kbit per core) |
| flip-flop bits, whole chip (yosys) | about 19,300 |

The published chip's per-frame breakdown for the two-core HDTV case is:
- cell histograms: 0.67 M cycles;
- normalisation: 1.42 M cycles;
- SVM: 0.51 M cycles;
- overall: 1.43 M cycles.

Here the stages overlap in a pipeline, and their busy times per core for the same frame are:
- cell histograms: 1.15 M cycles (one pixel per clock, 64 per cell);
- normalisation: 1.38 M cycles (78 per block);
- classifier: 0.69 M cycles (39 per block plus reports).

Normalisation sets the frame time in both, and the total matches. The cell histogram and classifier stages are slower per item than the published ones but stay hidden behind normalisation.

With the split into overlapping bands, the 15 shared cell rows are sent twice: about 11% more memory traffic than reading each pixel once.

Per core, the memory bits are:
- the line buffer (24 x 480 words of 32 bits);
- the coefficient SRAM (36 words x 120 bytes);
- the cell SRAM of the block assembler;
- the partial-sum SRAMs.

Memories are written as plain arrays with registered reads, so a tool can map them to SRAM macros.

## Number formats

| signal | format |
|---|---|
| pixel | 8-bit unsigned |
| CORDIC magnitude | 12 bits |
| CORDIC angle | 11-bit signed, 576 = 180 degrees |
| histogram bin | 16 bits |
| normaliser pass 1 output | Q0.12, clip 0.2 |
| feature | 8-bit unsigned Q0.8 |
| coefficient | 8-bit signed |
| partial sums | 27-bit signed (enough for 225 blocks x 36 products) |

Thresholds and scores use the same units as the partial sums: the sum of feature x coefficient products.

## What is specified and what is chosen here

These follow the original design description:
- the dual-core organisation with a CPU interface, a memory interface, feature sharing through a MUX and partial-sum hand-over for square windows;
- cell-based scanning with 8x8 cells and 2x2 blocks;
- CORDIC for the gradient, and shift-only weighted voting with a four-way histogram;
- two-stage L2-Hys normalisation, with a reciprocal square root by Newton's method in four steps from a shift-based initial value;
- the 15x8 MAC array, with row-wise chaining for tall windows, column-wise for wide ones and an 8 + 7 row split for square ones, 105 simultaneous windows, and partial sums parked in SRAM between block rows;
- early classification with a pair of thresholds after each of the 14 non-final window rows, then a final threshold;
- the 1.43 M cycles per HDTV frame target.

These are choices of this implementation:
- all bit widths and fixed-point formats;
- the CORDIC iteration count and angle units;
- the exact shift weights;
- the 24-row line buffer and all memory organisations;
- the serial 78-cycle normaliser, the Newton initial values and the 39-cycle classifier schedule;
- the register map and the bus protocols, including the core tag on the memory bus;
- the valid/ready handshakes and the rule that the producer waits for both classifiers when features are shared.

Known limits:
- The chip does not split the frame between the cores, resize images for multi-scale detection or merge detections. The frame source and host must do this.
- "Feature extraction off" only idles the pipeline. There is no clock or power gating.
- Early classification saves MAC activity, not cycles: a block always takes the same time in the classifier.
- There are no 64x64 or other window shapes beyond the four modes. A 7x7-block window can be emulated in vertical mode with zero coefficients in rows 7..14 and both row-6 thresholds set to the final threshold. Windows within 8 block rows of the frame bottom are then not evaluated.
- Clock generation is outside: `clk` is an input.

## Files

`rtl/` holds one module per file. `hog_pkg.sv` holds the shared widths, types and modes.

| file | contents |
|---|---|
| `hog_vlsi.sv` | chip top: two cores, CPU and memory interfaces |
| `hog_core.sv` | one core and its feature MUX |
| `core_controller.sv` | registers, sequencing, result read-out |
| `cpu_if.sv`, `mem_if.sv` | bus interfaces |
| `cell_line_buffer.sv`, `cell_hist_gen.sv`, `cordic_vectoring.sv` | pixel front end |
| `block_assembler.sv`, `sram_1r1w.sv` | blocks from cells |
| `hist_normalizer.sv`, `l2_norm_stage.sv`, `rsqrt_newton.sv` | normalisation |
| `svm_classifier.sv`, `svm_mac.sv`, `svm_coef_sram.sv` | classifier |
| `sync_fifo.sv` | small FIFO helper |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each prints `TB_RESULT checks=N failures=M`.

`tb/hog_ref.svh` is a window-by-window software reference of the classifier. The core and chip tests use it. They record the features that leave the normaliser in a first frame, pick thresholds from the reference partial sums so that all three outcomes occur, then demand exactly the reference's reports.

- `tb_hog_vlsi` exercises the chip through its pins in all three two-core uses: split image, feature sharing, and square windows. It counts every mechanism, including bus back-pressure.
- `tb_hog_vlsi_hdtv` runs a full 1920x1080 frame at the default parameters and checks the cycle budget.

To simulate a testbench with Verilator 5, run from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl -Itb --top-module tb_hog_vlsi rtl/hog_pkg.sv tb/tb_hog_vlsi.sv
./obj_dir/Vtb_hog_vlsi
```

Replace the name to run another testbench. The full-size HDTV test takes about half a minute; the others take seconds.
