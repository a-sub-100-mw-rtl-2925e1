# Dual-core HOG feature extraction and SVM detection accelerator

This design finds objects such as pedestrians in gray-scale video. It computes
Histogram of Oriented Gradients (HOG) features and classifies every detection
window with a linear SVM. It is sized for 1920x1080 (HDTV) frames at 30
frames/s at a clock in the 40 MHz range. Every pixel is read from memory once.

Two ideas let it keep up with HDTV:

* **Cell-based pipeline.** The frame is processed cell by cell (8x8 pixels),
  not window by window. Each cell histogram is made once, and each 2x2-cell
  block is normalised once. Each block's 36 features are then multiplied into
  *every* window that contains the block, up to 105 windows at the same time.
  A window's score is built up as partial sums kept in on-chip memory.
* **Two cooperating cores.** The two cores can:
  * split one frame into two vertical strips;
  * share one core's features to look for two object classes; or
  * together classify a window too large for one core (128x128 pixels).

Each partial sum is also checked against a per-stage pair of thresholds
(early detection and early rejection). A window that is already clearly
positive or negative stops using its MACs.

## Data path of one core

```
pixels -> line buffer -> cell scan -> CORDIC gradient -> cell histogram
       -> block assembler (2 rows of cell histograms) -> L2-Hys normalizer
       -> feature MUX (own / other core) -> SVM MAC array -> result FIFO
```

| stage | module | what it does | rate |
|---|---|---|---|
| image buffer | `hog_line_buffer` | 16-row ring of pixel rows. It is written in raster order. Four combinational read ports give the left, right, up and down neighbours, repeating the edge pixel at the frame border. Writes are held off while they would overwrite a row still needed. | 1 pixel/cycle in |
| scan | `hog_addr_gen` | Cells in raster order, the 64 pixels of a cell in raster order. It waits until every row the cell needs, including the row below it, has arrived (`stall`). | 1 pixel/cycle |
| gradient | `hog_cordic_gradient` | Central differences, then an 8-step CORDIC in vectoring mode. Output is the magnitude (with CORDIC gain 1.647) and the unsigned orientation, 0..180° = 0..2303 units (256 units per bin). | 1/cycle, latency 1 |
| cell histogram | `hog_cell_histogram` | 9 bins. A pixel in the outer quarter of its bin gives 1/4 of its magnitude to the nearest other bin and 3/4 to its own (orientation anti-aliasing). Otherwise all goes to its own bin. | 1 histogram per 64 cycles |
| block assembly | `hog_block_assembler` | Keeps the last two cell rows. When cell (cx,cy) arrives it sends block (cx-1,cy-1) as four lanes: TL, TR, BL, BR. | 1 block per cell |
| normalisation | `hog_normalizer` + `hog_inv_sqrt` | L2-Hys on 36 values, all four cells in parallel: v/‖v‖, clip at 0.2, renormalise. 1/√S uses range reduction, a two-chord start value and 2 Newton steps. Output is 9 beats of 4 features, 8 bits each (value·256, saturating). | ~35 cycles per block, budget 64 |
| classification | `hog_svm_classifier` (`hog_svm_mac`, `hog_early_classifier`) | See below. | 9 beats per block |
| control | `hog_core_ctrl` | Latches the configuration at start. In feature-sharing mode it leaves the extraction path off. It pulses `done` 4 cycles after the last feature beat. | |

### Number formats
* Pixels are 8 bits. Gradients are 9-bit signed. Magnitudes are 11 bits
  including the CORDIC gain. Histogram bins are 16 bits.
* Features are 8 bits unsigned. SVM coefficients are 12 bits signed. Partial
  sums are 32 bits signed.
* A window score is Σ feature·coefficient over 3780 features (64x128
  window). Features are integers 0..255, so coefficients and thresholds must
  be scaled to match.

## The SVM array (the hard part)

Every block of the frame is part of up to 7x15 windows. When block (bx,by) is
normalised, it is multiplied at once by the coefficients of each of those
windows, one MAC per window position it can occupy.

The array has 15x8 MACs. Each MAC multiplies 4 features (one bin of the four
cells) by 4 coefficients per beat and accumulates over the 9 beats of a block.

MACs are chained into *classification cores*. A classification core covers
one row of blocks of a window. Its chain head starts from the partial sum
that the previous classification core left in the intermediate-result memory
for the same window. So the sum of window (wx,wy) flows:

* along block row wy+k inside classification core k, then
* through memory slot k to classification core k+1 when block row wy+k+1
  arrives.

The intermediate memory has one bank per classification core (16 banks of
`MAX_BW` = 239 entries). Each entry is `{flag, decision, sum}`.

| mode (`MODE[1:0]`) | window | array use | result |
|---|---|---|---|
| 0 vertical | 64x128 px (7x15 blocks) | 15 classification cores of 7 MACs | this core |
| 1 horizontal | 128x64 px (15x7 blocks) | 7 classification cores of 15 MACs | this core |
| 2 square, head | 128x128 px, block rows 0..7 | 8 classification cores of 15 MACs; the 8th row's sum goes to the other core | none |
| 3 square, tail | 128x128 px, block rows 8..14 | 7 classification cores of 15 MACs. Core 0 starts from the other core's sum. | this core |

**Coefficient addressing.** Coefficients are stored per physical MAC, since
each MAC only ever uses its own. A window's coefficients sit in different
MACs depending on the mode:

| window | block (row r, column c) uses MAC |
|---|---|
| vertical | `r*8+c` |
| horizontal | `c*8+r` |
| square, rows 0..7 | `c*8+r` in the head core |
| square, rows 8..14 | `c*8+(r-8)` in the tail core |

**Early classification.** After every classification core except a window's
last one, the partial sum is compared with that stage's thresholds:
* above `thr_det[g]`: decided as a detection;
* below `thr_rej[g]`: decided as a rejection.

There are 14 stages for a 15-row window. The flag and the decision are
stored with the sum. Later MACs of that window hold their value instead of
accumulating. This stands in for the clock gating a chip would use. The
`MAC_OPS` counter counts only the beats actually computed. The final
comparison is `hit = flag ? decision : (sum > SVM_THR)`.

## Using the two cores

* **Vertical division of one frame.** Give each core its own strip width:
  for HDTV, columns 0..991 and 936..1919. The strips overlap by 56 columns, a
  window width less one cell, so every 64-pixel-wide window lies wholly in
  one strip. Send each core its
  columns; a word can be sent to both cores at once with `mem_core = 2'b11`.
  Window x-positions of core 1 are relative to its strip: add 117 for HDTV.
  The system DMA should interleave the two strips' words. One core's buffer
  takes a word every 4 cycles, and the bus waits on it.
* **Horizontal division** (two 1920x600 frames overlapping by 120 rows) needs
  nothing extra: configure each core with a 1920x600 frame. Each core then
  has more pixels than with vertical division. The measured HDTV frame takes
  1,525,415 cycles, against 1,413,254 for vertical division.
* **Two object classes on one frame (feature sharing).**
  * Core A extracts and classifies as usual.
  * Core B gets `MODE[2]` (use the other core's features) and its own
    coefficients. Its line buffer and extraction path stay idle.
  * Start B before A.
* **Square windows.** Put core 0 in mode 2 and core 1 in mode 3 with
  `MODE[2]` set, starting core 1 first. Core 1 reports the results.

## Register map (CPU bus)

Byte addresses. Bit 19 of the address selects the core. A write takes effect
in the cycle `cpu_we` is high. Read data arrives one cycle after `cpu_re`,
with `cpu_rvalid`.

| address | access | contents |
|---|---|---|
| `0x000` CTRL | W | bit 0: start |
| `0x000` CTRL | R | bit 0: busy; bit 1: done; bit 2: result FIFO not empty |
| `0x004` SIZE | RW | [10:0] width, [26:16] height, in pixels (multiples of 8) |
| `0x008` MODE | RW | [1:0] window mode, [2] use other core's features, [3] early classification on, [4] report every window (not only hits) |
| `0x00C` SVM_THR | RW | signed |
| `0x010` RESULT | R, pops the FIFO | [31] valid, [17] early, [16] hit, [15:8] wy, [7:0] wx, in blocks |
| `0x014` SCORE | R | sum of the FIFO head; read before RESULT |
| `0x018` MAC_OPS | R | counter |
| `0x01C` EARLY_CNT | R | counter |
| `0x020` WIN_CNT | R | counter |
| `0x024` DROP_CNT | R | counter; cleared by start |
| `0x100+8g` | W | early detection threshold of stage g (0..13) |
| `0x104+8g` | W | early rejection threshold of stage g (0..13) |
| bit 18 set | W | coefficient: [14:8] MAC, [7:4] bin, [3:2] lane (cell TL/TR/BL/BR); data [11:0] |

Each core has a 16-entry result FIFO. A result that finds the FIFO full is
dropped and counted in DROP_CNT.

Memory bus: `mem_wdata` holds four pixels, lowest byte first, in raster
order of the core's frame. The word is taken when `mem_we && mem_ready`.

## How far to trust it

* **Measured on a full HDTV frame.** The full-size testbench runs the
  default-size design with two cores on 992- and 984-column strips. The frame
  finishes in **1,413,254 cycles**, against a 1.43·10⁶-cycle budget for
  30 frames/s at 42.9 MHz. Every window score of core 0 (14,040 windows)
  matches an independent computation exactly.
* **Frame time is set by the image buffer.** The scan needs rows up to 8 below
  the cell row start. A 16-row buffer therefore waits about 2 rows per cell
  row: about 1.32 cycles per pixel, with under 2 % margin on the budget. A
  larger `LB_ROWS` (a power of two) removes the wait at the cost of memory.
* **Features versus a floating-point HOG.**
  * Compared with a floating-point model of the same algorithm (central
    differences, the same voting rule, L2-Hys with clip 0.2), under 5 % of
    features differ by more than 3 LSB (of 256).
  * Nearly all larger errors come from pixels whose angle lies within the
    CORDIC's ~0.45° resolution of a vote-split boundary. On smooth images
    many neighbouring pixels share such an angle.
  * On the HDTV test frame, 0.05 % of features were more than 10 LSB off. The
    worst was 18.5 LSB.
* **Memory.** Each core's arrays total about 485 Kbit:
  * line buffer: 240 Kbit;
  * two cell-histogram rows: 68 Kbit;
  * coefficients: 51 Kbit;
  * intermediate results: 127 Kbit.

  The arrays are plain RTL arrays, not SRAM macros. The line buffer has
  four asynchronous read ports.

### Departures and gaps

* **Spatial anti-aliasing is not built.** Only the orientation vote weighting
  is. A pixel votes only into its own cell.
* **Normalisation is L2-Hys, not plain L2-norm.** Clipping happens at 0.2 in
  Q.12.
* **No coefficients are built in.** The CPU must load a trained model and
  scale it to the integer feature range.
* **Early classification stops accumulation with a hold enable, not clock
  gating.**
* **Only one feature-sharing direction needs to be used at a time.** The
  wiring is symmetric, so either core may be the extractor.
* **Widths and latencies are this design's own.** This includes every
  internal bit width, the CORDIC length, the Newton start value, the buffer
  depth, the register map and the bus handshakes.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build any of them with plain Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/hog_pkg.sv tb/tb_hog_core.sv \
          -y rtl -y tb --top-module tb_hog_core -o sim && obj_dir/sim
```

| testbench | covers |
|---|---|
| `tb_hog_line_buffer`, `tb_hog_addr_gen` | ring-buffer hold-off, neighbour clamping, scan order and waiting |
| `tb_hog_cordic_gradient`, `tb_hog_cell_histogram` | angle, bin and magnitude against real arithmetic; voting rule |
| `tb_hog_inv_sqrt`, `tb_hog_normalizer`, `tb_hog_block_assembler` | 1/√S accuracy and latency; L2-Hys; block lanes |
| `tb_hog_svm_mac`, `tb_hog_early_classifier`, `tb_hog_svm_classifier` | exact scores and MAC-operation counts in all four modes, with and without early classification |
| `tb_hog_core_ctrl`, `tb_hog_mem_if`, `tb_hog_cpu_if` | sequencing; word unpacking and back-pressure; registers, FIFO and drops |
| `tb_hog_core` | one core, 72x136 frame: features against the floating-point model, window scores, stalls, frame time |
| `tb_hog_accel_top` | both cores through the buses: divided frame with early classification, feature sharing with FIFO overflow, square windows. It counts stalls, early decisions, sharing, square windows, drops and mode switches, and fails if any is zero. |
| `tb_hog_accel_top_full` | default sizes, full 1920x1080 frame divided vertically (about 20 s) |
| `tb_hog_accel_top_hdiv` | default sizes, full 1920x1080 frame divided horizontally (about 20 s) |

`tb/tb_hog_ref_pkg.sv` holds the floating-point HOG model and the score
function the testbenches compare against.
