# SA-FEMIP: self-adaptive feature extraction and matching in SystemVerilog

A camera on a landing spacecraft sends a stream of 1024x1024 grey-scale
frames with 10-bit pixels. To estimate motion, the on-board hardware must find
corners in each frame and pair them with the corners of the previous frame.
Two things make this hard in space:

- the noise level of the images changes during the descent;
- the terrain is often flat with a few rough patches, so one global corner
  threshold puts every feature in the same small area.

This RTL is a streaming pipeline with two adaptations between frames:

- **Noise-adaptive smoothing.** A noise estimator measures the noise of the
  frame. Between frames, the 49 coefficients of the 7x7 Gaussian smoothing
  kernel are replaced by one of five kernels, read from external memory.
  On the FPGA this replacement is a partial reconfiguration of the 49
  constant multipliers.
- **Per-cell corner thresholds.** The frame is split into 8x8 cells. Each
  cell has its own Harris corner threshold. After every frame these
  thresholds are adjusted, so that every cell yields about its share of an
  overall feature budget of 3,000.

The output is a list of matching points: the coordinates of a feature in the
previous frame, its partner in the current frame, and their correlation.

```
 pixels ─► reconfigurable Gaussian filter ─► adaptive Harris extractor ─► feature matcher ─► matches
           (NVE, manager, config port,        (Lx, Ly, corner response,   (feature buffer, NMS,
            row buffer, window, 49 mults)      cell thresholding)          NMS buffer, correlation)
                 │ write filtered frame   ▲ bitstream reads                   ▲ 11x11 window reads
                 ▼                        │                                   │
                 └──────────────── external memory interface ─────────────────┘
```

## Frame sequence

Pixels enter on `pix_valid`/`pix_word` in raster order, one pixel per cycle,
in bits 9:0 of a 32-bit word. `ready` is the backpressure signal. The top
counts the raster coordinates itself. One frame then goes through four
phases:

1. **Filtering and extraction.** The filter writes every filtered pixel
   (coordinates 3..1020) to the current frame slot of external memory. In the
   same pass, the noise estimator sums its mask responses and the Harris
   extractor thresholds the corner responses. Valid coordinates are 5..1018.
   Features are collected in the matcher's feature buffer.
2. **Threshold update.** After the last corner response, the cell thresholds
   and targets are recomputed. This takes 131 cycles.
3. **NMS.** The matcher runs non-maxima suppression. External memory is idle
   during this phase (`nms_phase`). The reconfiguration manager uses the slot
   to load the kernel chosen from the noise estimate of the frame just
   filtered. That kernel filters the next frame.
4. **Matching.** The matcher reads 11x11 windows of the previous and the
   current filtered frames from memory, and emits matches on `m_*`.

`ready` stays low from the end of a frame until the matcher and any
reconfiguration have finished. The next frame therefore starts only after
matching ends. At 60 MHz, phase 1 takes 17.5 ms for a full frame. Matching
costs about 250 cycles per candidate pair. That leaves room for about 3,000
candidate pairs within a 33 frames/s budget.

## Noise estimate and filter configurations

`nve` convolves the raw frame with the 3x3 mask

```
 1 -2  1
-2  4 -2
 1 -2  1
```

It sums the absolute responses over the frame and scales the sum by
sqrt(pi/2) / (6 (W-2)(H-2)). The result is the noise standard deviation
sigma_n, output as `sigma_q4` with 4 fractional bits. This is Immerkær's
fast estimator. The original design only says it follows a known
architecture, so the choice of estimator is this implementation's.

`reconfig_manager` compares sigma_n with four thresholds and picks a
configuration:

| cfg | sigma_f^2 of the kernel | chosen when sigma_n^2 is |
|-----|-------------------------|--------------------------|
| 0   | 0.5                     | < 100                    |
| 1   | 0.75                    | 100 .. 200               |
| 2   | 1                       | 200 .. 300               |
| 3   | 1.5                     | 300 .. 600               |
| 4   | 2 (reset kernel)        | >= 600                   |

The five variances come from the original design. The noise boundaries are
this implementation's choice; they are the parameters `TH0`..`TH3` of
`reconfig_manager`, in Q.4 units of sigma_n.

If the configuration changes, the manager waits for the idle slot. It then
reads the 49-word "bitstream" at `BS_BASE + 64*cfg` and passes it through
`config_port` into the coefficient registers of `gauss_rm`. If the
configuration stays the same, nothing is loaded. A real device would load a
166 KB partial bitstream through its configuration port instead. Here the
reconfigurable module is modelled as 49 writable coefficient registers.

Coefficients are 12-bit unsigned values that sum to 4096. They are computed
at elaboration by `femip_pkg::gauss_coef`. The filtered pixel is rounded,
shifted right by 12 and saturated to 10 bits. The 3-pixel border is not
filtered.

## Adaptive cell thresholding

This part (`acth` and its four sub-blocks) needs the closest reading.

**Storage.** Each cell has three values:

- a threshold TH: 32 bits, starting at the largest value;
- a feature count NF: 16 bits;
- a target TF: 16 bits, starting at 48.

TH and NF are kept in two `sh_vector`s. A `sh_vector` holds eight 8-entry
circular shift registers, one per row of cells. Its output is the head of the
register chosen by `sel`. A 2:1 multiplexer feeds the tail:

- `th_phase = 1` recirculates the head;
- `th_phase = 0` loads `data_in`.

**Thresholding pass.** Pixels arrive in raster order, so within one image row
the cells of a cell row come up one after another. `acth_controller`
generates the control signals:

- It pulses `en` at the last corner response of each cell, rotating that
  row's register by one. The threshold of the next cell then sits at the
  head.
- It advances `sel` after the last image row of a cell row.

`features_counter` compares R with the head threshold (`val_feat` = R > TH).
It accumulates the count of the current cell:

- At a cell's first response it restarts from the count stored for that cell
  (the NF head), because a cell is entered once per image row.
- At the cell end the running count is shifted into the NF vector, in the
  recirculating direction.

The TH vector recirculates unchanged during this pass.

**Update, between frames** (`th_tf_updater`, 1 + 64 + 1 + 64 + 1 cycles):

- *Pass A* visits the 64 cells in row-major order. For each cell it computes
  `Disp = NF - TF` and `Step = Disp * (0.5/OTF) * TH`. The factor 0.5/OTF is
  the constant round(2^32 * 0.5/OTF), and the product is shifted right by 32.
  - If `Disp > +15`, TH grows by Step, saturating.
  - If `Disp < -15`, TH shrinks by Step. If the result would be below the
    lower bound 15, TH is kept instead. The cell is then flagged, and |Disp|
    is added to `TF_slack`.
  - Otherwise TH is kept.

  The new TH is written through `data_in` (`th_phase = 0`). NF recirculates.
  `Curr_EF` sums the NF values.
- *Pass B* runs only if `TF_slack > 0`. It sets
  `TF_slack_cell = max(1, TF_slack / 64)`.
  - If `Curr_EF <= OTF`: an unflagged cell's target grows by
    `TF_slack_cell`, and a flagged cell's target becomes its NF.
  - Otherwise: every non-zero target drops by 1.

  The targets and flags live in 64-entry rotating registers inside the
  updater.
- A final cycle clears the NF vector.

The decrease by 1 sits inside the `TF_slack > 0` test, as in the reference
algorithm's listing. So while no cell is at its lower bound, targets do not
shrink even when `Curr_EF` exceeds OTF.

Corner responses must not arrive during the update; an assertion checks this.
In the pipeline they cannot, because the next frame is held back.

`lowth_events`, `tf_slack` and `curr_ef` are exported for observation.

**Cell geometry.** Cells are `2^CELL_LOG2` pixels wide, which is 128 at the
default size. Corner responses exist only for columns and rows 5..W-6, so the
first and last cells of each row and column are narrower. For images smaller
than 64x64 the border eats whole cells. Use `IMG_W >= 64` with
`CELL_LOG2 = log2(IMG_W/8)`.

## Corner response

Each filtered pixel goes through the following steps:

- `prewitt` computes Lx (right column minus left column) and Ly (bottom row
  minus top row) of the 3x3 Prewitt kernel.
- `corner_response` sums Lx², Ly² and LxLy over a 3x3 window, giving
  Sxx, Syy and Sxy.
- It computes `R = Sxx*Syy - Sxy^2 - ((Sxx+Syy)^2 >> 10) * 41`, that is,
  k = 41/1024 ≈ 0.04.
- It shifts R right by `R_SHIFT` (24) and saturates it to a signed 32-bit
  value.

The latency is 6 cycles after the derivative. The 3x3 unweighted window and
the scaling are this implementation's choices.

## Matching

`feature_matcher` works in four steps:

1. **Collect.** It stores up to `FEAT_DEPTH` (4096) features per frame:
   coordinates and R. Extra features are counted in `feat_drop`.
2. **NMS.** A feature survives if no other feature within ±1 pixel is
   stronger. When two responses are equal, the one earlier in raster order
   wins. Only features of rows y-1..y+1 are scanned, because the buffer is in
   raster order. Survivors go into one half of the NMS buffer (2 x 500
   entries). The halves alternate between frames, so the previous frame's
   survivors stay available. Overflow is counted in `nms_drop`.
3. **Candidates.** Every previous-frame survivor is paired with every
   current-frame survivor that lies within ±17 pixels in x and y (a 35x35
   neighbourhood).
4. **Correlation.** For each candidate pair it computes the un-normalised
   correlation Σ p1·p2 over the two 11x11 windows of filtered pixels, read
   from the two frame slots in external memory. The pair is emitted as a
   match when the correlation is **below** `CC_TH`. This follows the text of
   the original design literally. The default `CC_TH` accepts everything
   except a sum of all ones, so set it for the application.

## External memory

`ext_mem_if` drives a single-word port: `mem_en`, `mem_we`, `mem_addr`,
`mem_wdata`, plus read data returned in order with `mem_rvalid`.

Clients are served in this priority:

1. filtered-pixel writes;
2. bitstream reads;
3. matcher reads.

A small tag FIFO (8 entries) routes the read data back to the right client.

Word address map:

| address                        | contents                                     |
|--------------------------------|----------------------------------------------|
| 0 .. W·H-1                     | frame slot 0 (filtered pixel at y·W + x)     |
| W·H .. 2·W·H-1                 | frame slot 1                                 |
| 2·W·H + 64·c + t, t = 0..48    | coefficient t of configuration c (c = 0..4)  |

The slot in use toggles at each `frame_done`. The host must preload the five
coefficient tables.

## Where this departs from the original design

- **Partial reconfiguration.** It is modelled as register writes: 49 words
  per configuration instead of a 166 KB bitstream over the device's
  configuration port. The timing of the reload (only inside the NMS idle
  slot) is kept.
- **Noise estimator.** Its internals and the sigma_n boundaries of the five
  configurations are this implementation's choices.
- **No overlap between frames.** The matcher runs after filtering, and the
  input is stalled meanwhile.
- **Matches are streamed.** They leave on the `m_*` outputs instead of going
  into an internal buffer.
- **Number formats are this implementation's own:** coefficient format,
  derivative widths, `R_SHIFT`, k = 41/1024, the 32-bit correlation and its
  threshold, the NMS tie rule, the feature-buffer depth and the memory
  protocol.
- **Threshold start value.** The top's `TH_INIT` defaults to the largest
  threshold, as in the original design: no features until the thresholds
  have come down. Because Step is proportional to TH, this takes many frames.
  The testbenches start from small thresholds so that short simulations see
  features at once.

## Files

- `rtl/femip_pkg.sv`: widths, constants, kernel generation.
- Gaussian filter path:
  - `row_buffer`: K circular row memories, one column out per pixel;
  - `sliding_window`: KxK register window;
  - `gauss_rm`: 49 coefficient registers, multipliers and adder tree;
  - `gaussian_filter`: the three blocks above combined.
- Adaptation of the filter:
  - `nve`: the noise estimator;
  - `reconfig_manager`: picks the configuration and fetches the bitstream;
  - `config_port`: writes the coefficient registers;
  - `reconfigurable_filter`: the filter with its noise estimator and
    reconfiguration logic.
- Harris extractor:
  - `prewitt`: the Lx and Ly derivatives;
  - `corner_response`: R from the derivatives;
  - `sh_vector`, `features_counter`, `th_tf_updater`, `acth_controller`:
    the parts of the cell thresholding;
  - `acth`: the cell thresholding;
  - `ahfe`: the whole extractor.
- `feature_matcher`, `ext_mem_if`.
- `sa_femip`: the top.
- `tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:
  - `ext_mem_model.sv`: behavioural memory model;
  - `tb_alg1_pkg.sv`: reference model of the threshold update;
  - `tb_harris_pkg.sv`: reference corner response;
  - `tb_sa_femip_core.sv`: the end-to-end bench used at two sizes.

## Simulating

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and has a
watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/femip_pkg.sv \
    tb/tb_alg1_pkg.sv tb/tb_harris_pkg.sv tb/tb_acth.sv --top-module tb_acth
./obj_dir/Vtb_acth
```

For the end-to-end benches, add `tb/ext_mem_model.sv tb/tb_sa_femip_core.sv`:

- **`tb_sa_femip`** runs four 64x64 frames. The frames are moving bright
  rectangles with noise levels that force reconfigurations. It checks:
  - every filtered pixel in memory against a 7x7 reference convolution;
  - the filter rate of one pixel per cycle;
  - sigma_n, the chosen configuration and the loaded kernel;
  - the NMS and candidate counts;
  - each match's correlation.

  It also counts the following mechanisms and fails if any never occurred:
  - reconfiguration;
  - a skipped reconfiguration;
  - threshold update;
  - the lower bound reached;
  - NMS suppression;
  - pairs beyond ±17 pixels;
  - correlations accepted and rejected.
- **`tb_sa_femip_full`** runs the top with all defaults on two 1024x1024
  frames, in a few seconds.

Each block testbench compares against a model written independently in the
testbench. For the thresholding and Harris blocks these are the packages
above. Each has also been run against a deliberately broken copy of its
module, and it fails there.
