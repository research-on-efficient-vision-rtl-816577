# Cell-based object detection hardware: simplified SURF + NNS, and L1-norm + linear SVM

Sliding-window object detection (pedestrians, cars) normally builds a long feature vector
for every scan window and then classifies it. Neighbouring windows overlap heavily, so the
same image cells are processed again and again, and the window vectors need a lot of memory.
This design turns that around. Features are computed once per image **cell** (8x8 pixels) as
the pixels stream in from the sensor. Each finished cell is then handed straight to **every
overlapping scan window** that contains it. Each window keeps only a running partial result:
a partial squared distance, a partial dot product or a partial projection. A window is
classified the moment its last cell arrives. No integral image, no frame buffer and no
window-vector memory are needed. Only a few rows of cell and partial-result memories are
kept.

Two detection frameworks are built on this idea. They stand side by side in `vision_top`:

| framework | features | classifier | ports |
|-----------|----------|------------|-------|
| recognition coprocessor | simplified SURF (edge Haar-like responses) computed from raw pixels | nearest-neighbour search (NNS) against stored references, plus PLS projection to 8 dims and NNS on the reduced vectors | `s_*` |
| detector | externally computed cell histograms (e.g. HOG, 9 bins) | block-based L1 normalization, then linear SVM | `h_*` |

The window is 64x128 pixels: 8x16 cells, or 7x15 overlapping 2x2-cell blocks. Windows step
by 16 pixels, which is 2 cells or one non-overlapping block. A VGA frame therefore has
37 x 23 = 851 windows and an XGA frame 61 x 41 = 2501.

## 1. Simplified SURF cell extraction (`haar_cell_extractor`)

Each 4x4-pixel **sub-cell** yields two Haar-like responses:

- Dx = (sum of the left 2 columns) - (sum of the right 2 columns)
- Dy = (sum of the upper 2 rows) - (sum of the lower 2 rows)

The cell vector is {ΣDx, ΣDy, Σ|Dx|, Σ|Dy|} over the cell's 2x2 sub-cells. Each component is
16 bits.

Pixels arrive in raster order, so a sub-cell is only complete after four pixel rows. Nothing
is stored per pixel. Each pixel is added to or subtracted from its sub-cell's running Dx and
Dy, depending on which half of the sub-cell it lies in:

- `haar_pipeline_ctrl` decodes these add/subtract selects from column and row counters.
- `haar_subcell_calc` keeps the running sums in a *first storage* of w/4 words, one per
  sub-cell column.
- `haar_cell_accum` combines the sub-cells of a cell. It parks the upper half of the cell in
  a *second storage* of w/8 words until the lower half arrives.

Image width is a run-time input (a multiple of 8, up to `MAX_WIDTH` = 1024). Height is
unlimited. Extraction runs at one pixel per clock.

## 2. Parallel scan windows (`psw_window_addr_gen`)

For a cell at (x, y), the generator computes the range of windows that contain it. That is
up to 4 window columns x 8 window rows = 32 overlapping scan windows (OSWs). It then emits
one OSW record per cycle:

- the window index, with Eq. (3.4)-style addressing: first window + j + N·k;
- the cell's position inside the window;
- its reuse count **RRRT**. Inside a window the 2x2 blocks step by one cell, so a cell sits
  in 1 block (corner), 2 blocks (edge) or 4 blocks (interior).

The position is computed from coordinates. It is not read from a stored position look-up
table. Cells that belong to no window (the right or bottom margin) are dropped.

The same module is reused in block units by the SVM path: windows of 7x15 blocks.

A 512 x 64-bit FIFO (`sync_fifo`) sits between extraction and the window generator. At the
end of each cell row, 1 pixel/clock turns into bursts of cells, and each cell needs up to
32 OSWs. When the FIFO is nearly full, `s_pix_ready` drops and the pixel source must wait.

## 3. Nearest-neighbour search with partial distances (`nns_psed_engine`)

The engine has two memories:

- **Reference memory.** It holds `NUM_REF` = 4 references of 1680 components (105 blocks x
  4 cells x 4 components), 8 bits each. It is split into four banks by the cell's position
  in a block. A cell's up to four block slots are read in one cycle and up to 16 squared
  differences are summed.
- **PSED store.** It holds one 32-bit partial squared Euclidean distance per (reference,
  live window). The address is {ref, window row mod 8, window column mod 64}.

Each (OSW, reference) pair takes one cycle. Reads and writes form a two-stage
read-add-write pipeline. If a read hits the word being written in the same cycle, it takes
the written value (bypass).

After the window's last cell, the final distance goes to a running minimum. The winning
reference and its distance leave on `s_res_*`.

The input cell vector is shifted right by `IN_SHIFT` = 6 before the subtraction, to bring
16-bit cell sums into the 8-bit reference range.

## 4. PLS projection (`pls_projector`)

The same OSW stream also drives a partial-least-squares projector. Every cell is multiplied
by its slice of K = 8 projection vectors. The products are added into the window's 8
partial results, which are held in an accumulator memory organised like the PSED store.

- Weight memory: 4 position banks x 8 sub-banks of 64 x 105 words.
- All (position x component x K) products of one OSW are formed in parallel.
- When a window completes, each result is taken as d_i >>> 16 and saturated to 16 bits.
- The 8-D vector is then compared sequentially with 16 reduced references.

The OSW stream advances only when both the NNS engine and the projector accept it.

## 5. L1-norm block normalization (`bbnc_l1norm`, `block_addr_decoder`, `param_init`)

Cell vectors (9 x 16 bit) arrive in raster order. Every component of every cell is divided
by the same component summed over the 2x2-cell block:

    d'_i = (d_i << 12) / (|d_i(c0)| + |d_i(c1)| + |d_i(c2)| + |d_i(c3)|)

A zero sum gives 0.

- `param_init` turns the cell size (2, 4, 8, 16 or 32 pixels) and the image width into cells
  per row (cnh). It flags configurations over `MAX_CNH` = 128.
- `block_addr_decoder` produces the addresses of:
  - the four blocks a new cell belongs to (BA0..BA3), modulo cnh;
  - the loop address in a cell memory of cnh+1 words.
- One row of block sums is kept. When a cell completes a block, its four cells leave one per
  cycle, each through 9 parallel dividers.
- Timing: 6 cycles per cell, 10 when a block completes.

## 6. Linear SVM over overlapping windows (`svm_classifier`)

Four small FIFOs regroup the normalized cells into whole blocks. The window generator, in
block units, lists every window that contains the block.

- The 3780-D weight vector (105 blocks x 4 cells x 9 bins) sits in 9 SRAMs, one per bin.
- All 36 products of a block are formed in parallel and added into a 48-bit per-window
  accumulator, using the same read-add-write pipeline with bypass.
- After the window's last block, the score is w·x - b. Its sign is the decision: +1 object,
  -1 background.

`hog_l1_svm_detector` chains the normalizer and the classifier.

## Interfaces and timing

Every stream uses valid/ready. Memories are written through simple
write-enable/address/data ports before a frame:

- references: `s_ref_*`;
- PLS weights and references: `s_pls_w_*` and `s_pls_r_*`;
- SVM weights: `h_w_*`.

Bias `h_bias` is a static input. A `*_frame_start` pulse, with the image size, starts a frame.

Each rtl file opens with a comment giving its interface, cycle timing and which parts follow
the source design.

Measured in the end-to-end test at default parameters (1 clock = 1 cycle):

| run | cycles | at clock | frame rate |
|-----|--------|----------|------------|
| SURF + NNS + PLS, VGA, 4 references | 461,667 (first pixel to last window) | 200 MHz | ≈430 fps |
| SURF + NNS + PLS, XGA, 4 references | 1,325,475 | 200 MHz | ≈150 fps |
| L1-norm + SVM, 80x60 cells | 97,150 (≈20 cycles/cell, limited by the SVM) | - | - |
| L1-norm + SVM, XGA with 8x8 cells (128x96) | 279,532 | 25 MHz | pixel-limited, 31.8 fps |

For the detector, an XGA frame needs fewer cycles than the 786 k pixel clocks the sensor takes
to deliver it, so it keeps up with a one-pixel-per-clock sensor.

## Where this RTL departs from the source design

- **PSED store.** It keeps 8 window rows x 64 window columns per reference. That is more
  than the source's minimal per-window storage, but it makes addressing a plain bit
  concatenation.
- **Look-up tables.** The window look-up and cell-position look-up tables are computed from
  coordinates instead of being stored. The results are identical.
- **Dx scheme.** Dx uses the same add/subtract running-sum scheme as Dy. This is the
  source's memory-saving variant.
- **Chosen values.** The following are choices of this design:
  - the input scaling (`IN_SHIFT`);
  - the PLS output scaling and 16-bit saturation;
  - the number of PLS references (16);
  - sequential search over the reduced references;
  - all handshakes and word widths not stated in the source.
- **Window size.** The default top supports only the 64x128-pixel window. The source also
  uses 128x64, 96x64 and 64x64 windows. The window generator, NNS engine and SVM take
  `WIN_W`/`WIN_H` parameters, but the top does not expose them.
- **Detector width at small cells.** With `MAX_CNH` = 128, XGA images are handled with 8x8
  or larger cells only. 2x2 and 4x4 cells are limited to 256- and 512-pixel-wide images.
- **Not included:**
  - the image sensor;
  - the HOG cell-histogram extractor, whose output is the detector's input (`h_cell_fv`);
  - the chip's board and measurement I/O.
- **Unchecked claims.** Power, area and clock frequency cannot be checked in RTL simulation.

## Simulating

Each block has a self-checking testbench in `tb/`:

- It compares against a behavioural model with random stimulus (`$urandom`).
- It prints `TB_RESULT checks=N failures=M`.
- A watchdog stops it if it hangs.

`tb_vision_top` runs the whole design at its default parameters. It streams VGA, 88x136 and
XGA SURF frames, and detector frames of VGA with 8x8 cells, QVGA with 4x4 cells and XGA with
8x8 cells. It also counts each mechanism and fails
if one never occurred:

- pixel stall on a full FIFO;
- detector back-pressure;
- dropped margin cells;
- several winning references;
- object and background decisions;
- a configuration error;
- PLS results.

The simulation itself runs in a few seconds; building it with verilator takes a few minutes.

```sh
tb=tb_vision_top        # or any tb/tb_*.sv
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb +libext+.sv -Irtl -Itb --timescale 1ns/1ps \
  rtl/vision_pkg.sv tb/$tb.sv --top-module $tb -Mdir obj_$tb -o sim
./obj_$tb/sim +verilator+rand+reset+2
```

`rtl/vision_pkg.sv` holds the shared types: the Haar cell vector and the OSW record.
