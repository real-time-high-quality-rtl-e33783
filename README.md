# Stereo matching core: AD-Census, cross-based aggregation and four-path semiglobal optimization

This core takes a rectified stereo pair of RGB images and computes a dense disparity map: for
every left-image pixel, how far the matching point in the right image is shifted to the left.
Depth is inversely proportional to that shift. Quality comes from three algorithm stages that
are usually too heavy for real-time hardware at HD resolution:

- a robust matching cost that combines colour difference (AD) with a census transform;
- aggregation of that cost over an adaptive, cross-shaped support region that follows object
  edges;
- semiglobal optimization along four scan directions.

The core reaches real-time rates by processing several rows and several disparities per cycle
(hybrid parallelism). It cuts every image row into segments, so the buffer between aggregation
and optimization scales with the segment width, not the image width.

The default build processes 1600x1200 pixels with 128 disparity levels. It handles 16
disparities (PD) of 4 rows (PR) per cycle, in segments of 400 columns (WSEG), with crosses of
up to 12 pixels per arm (LMAX). A frame takes 4,252,800 cycles. At a 180 MHz clock that is
42.3 frames/s.

All RTL is SystemVerilog-2017 in `rtl/`. The top module is `stereo_core`. Testbenches are in
`tb/`.

## Dataflow

```
pixels (valid/ready) ─► stereo_ctrl ─► line_buffer ─► cost_init ─┬─► cost_agg_unit ×PD ─► reorder_buffer
                         (bands,        NR rows,       census+AD, │      vertical then         ping-pong,
                          segments,     one column     PD costs   │      horizontal sums,      segment wide
                          passes)       per cycle      per row    └► arm_gen (cross arms)      │
                                                                                               ▼
   out_disp ×PR ◄── postproc ×PR ◄── wta_select ×PR ◄──────────── sgm_optimizer (PR lanes of sgm_lane,
   (L-R check,       (WTA, uniqueness,                              4 × sgm_path_unit each)
    outlier filling)  sub-pixel)
```

`stereo_pkg` holds the shared types and functions:

- the RGB pixel struct, the 8-bit cost type and the signed 16-bit coordinate;
- luma, absolute difference and the AD cost;
- the robust-function table generator.

## Bands, segments and passes

This scheduling is the core's main idea, and the key to reading the rest of the code.

- **Band.** The image is processed in bands of PR rows. Every stage handles all PR rows of
  the band in parallel.
- **Segment.** Each band is cut into W/WSEG segments of WSEG columns, processed left to right.
- **Pass.** Each segment is streamed through cost initialization and aggregation K = ND/PD
  times. Pass k produces disparities k·PD … k·PD+PD−1 for every column of the segment.

In pass k the controller reads the left image at column `rc` and the right image at column
`rc − k·PD`. The right pixels then go through a shift register of PD−1 stages, so that
disparity `k·PD + j` compares the current left pixel with the right pixel delayed by j cycles.

Every pass must first fill that delay line (PD columns). It must also fill the horizontal
aggregation window (LMAX columns on each side) and the 5x5 census window (3 more columns),
all before the segment's first column is due. A pass is therefore `WSEG + 2·LMAX + PD + 3`
cycles long and starts reading at column `xs − LMAX − PD − 1` for a segment starting at `xs`.
Columns outside the image read as zero; their costs are computed but never used.

One frame therefore takes

    (H/PR) · (W/WSEG) · (ND/PD) · (WSEG + 2·LMAX + PD + 3)   cycles.

The segment length sets the efficiency: WSEG / (WSEG + 2·LMAX + PD + 3) is 90% at the
defaults.

The line buffer holds NR = PR + 2·LMAX + 4 + PR rows. That is the window of the band being
read, which needs LMAX rows above and below for the vertical arms plus 2 more for census, and
PR extra rows for the next band to arrive. The input is stalled (`in_ready` low) when the next
row would overwrite a row the current band still needs. A band starts once every row it needs
has been written. Because a band takes K·(W/WSEG) passes to read but only PR rows to write,
the input is stalled most of the time. `in_stall` shows it.

## Matching cost (cost_init)

For each read column, `cost_init` holds a 5-column window of NWIN rows of both images.

- **Census.** It computes a 24-bit census vector for each pixel: a 5x5 neighbourhood compared
  with the centre on the luma value (R+2G+B)/4.
- **Cost.** For each of the PD disparities and NC = PR + 2·LMAX rows, it forms
  - AD = (|ΔR| + |ΔG| + |ΔB|) / 3;
  - the census Hamming distance;
  - cost = `lut_ad[AD] + lut_cs[hamming]`.
- **Robust tables.** The two tables hold round(127·(1 − e^(−c/λ))) with λ_AD = 10 and
  λ_census = 30. They are built at elaboration time by `stereo_pkg::robust_lut`: a
  fixed-point recurrence e ← e·round(65536·e^(−1/λ)) / 65536, so no real arithmetic is
  needed. Their sum is at most 254, so the cost fits in 8 bits.
- **Left edge.** A disparity that would look left of the right image's edge costs 255.

The outputs are combinational on the window registers, one cycle after the line-buffer data.

## Cross-based aggregation (arm_gen, cost_agg_unit)

**Arms (`arm_gen`).** Every left pixel gets four arms: up, down, left and right. An arm
extends while the next pixel's largest RGB channel difference from the centre is below TAU = 20.
It stops at LMAX and at the image border.

- Vertical arms are computed for the column currently streaming.
- Horizontal arms are computed for the column LMAX behind it, from a 2·LMAX-column history of
  the band's centre rows.

**Aggregation (`cost_agg_unit`).** It runs vertical first, then horizontal.

1. It sums the costs of each column along that column's own vertical arm, using prefix sums
   over the NC rows.
2. It keeps the last 2·LMAX+1 column sums and pixel counts. The support region of a pixel is
   therefore the union of the vertical arms of all pixels on its horizontal arm.
3. The final cost is the region's sum divided (floor) by the region's pixel count, so it
   stays an 8-bit average.

With this order only pixels, not costs, have to be buffered across rows, which is what makes
the line buffer small. The core has PD instances, one per disparity of the pass, each handling
PR rows. Results leave one cycle after the cost, for column `cl − LMAX`.

## Reorder buffer

Aggregation produces a segment pass by pass: all columns for disparities 0..PD−1, then all
columns for PD..2PD−1, and so on. Optimization needs the whole disparity vector of one pixel
at a time. `reorder_buffer` holds one segment, PR × WSEG × ND costs. It has two banks, so one
segment is written while the previous one is read. The bank alternates with every segment in
the frame.

Writes put PD disparities × PR rows at `(column, k·PD + j)`. Reads give each row lane 2·PD
disparities of one column per cycle.

## Semiglobal optimization (sgm_optimizer, sgm_lane, sgm_path_unit)

This is the part that needs the most care. Each pixel's path cost in direction r is

    L_r(p,d) = C(p,d) + min( L_r(p−r,d), L_r(p−r,d±1) + P1, min_k L_r(p−r,k) + P2 ) − min_k L_r(p−r,k)

with P1 = 10 and P2 = 60. The final cost is C_final = Σ L_r. Four directions are used, all
of which point backwards along the scan order, so no backward pass is needed:

| path | previous pixel | restarts (L = C) when                                  |
|------|----------------|--------------------------------------------------------|
| r0   | upper-left     | x = 0 or y = 0                                         |
| r1   | above          | y = 0                                                  |
| r2   | upper-right    | y = 0, x = W−1, or x is the last column of its segment |
| r3   | left           | x = 0                                                  |

**Disparity parallelism and the minimum.** Each term needs min_k L_r(p−r,k) over all ND
disparities of the previous pixel. For r3 that previous pixel is the one just before in the
same row. The optimizer therefore works on G = 2·PD disparities per cycle, twice the
aggregation's rate. A pixel's ND disparities take K/2 cycles, and the other K/2 cycles of its
K-cycle slot are free.

Each `sgm_lane` works in slots of K cycles:

| cycle      | what happens |
|------------|--------------|
| 0          | reads the first cost group and the upper row's path costs |
| 1 … K/2    | four `sgm_path_unit`s each produce G path costs; running minima and C_final build up in registers |
| K/2+1      | the pixel is complete. The r0/r1/r2 vectors and minima go to the next row. r3's vector becomes "previous pixel". C_final goes to disparity selection. |

The schedule needs K even and at least 4. This holds for every configuration listed under
"Workloads and sizes".

**Row parallelism.** The optimizer has PR lanes, one per row of the band. Lane i works on
segment column `slot − 2i`, two pixels behind the lane above. That is late enough that the
upper-right pixel (for r2) is finished, and every upper-row value arrives exactly when needed.

Each lane has memories for the upper row's r0/r1/r2 vectors and minima, written by the lane
above.

- Lane 0's upper row is the last row of the previous band, so its memory spans the whole image
  width.
- The other lanes' memories span one segment.

A slot reads the upper row at columns x and x+1 only. The r0 input (upper row at x−1) is the
value read in the previous slot, kept in a register.

A segment takes WSEG + 2·(PR−1) slots, so the optimizer finishes well before the next
segment's K passes are done. An assertion checks that no segment arrives while it is busy.

**Segment seams.** r0, r1 and r3 run across segment borders, because the values they need from
the left segment and from the row above are already complete. r2 at a segment's last column
would need the upper-right pixel, which is in the next segment and not yet computed for the
lower rows. It restarts there instead. This is the only place where segmenting changes the
result.

**Saturation.** Path costs saturate at 255 and stay 8-bit. C_final is kept exactly, in 10 bits.

## Disparity selection and outlier handling (wta_select, postproc)

**Selection (`wta_select`).** It finds the smallest C_final (lowest d on ties) and the second
smallest among disparities more than one level away.

- *Unique:* the pixel is unique when `min·100 < second·(100 − UNIQ_PCT)`, with UNIQ_PCT = 5.
- *Sub-pixel value:* a parabola through the minimum and its two neighbours gives an offset of
  `(c[d−1] − c[d+1])·8 / (c[d−1] + c[d+1] − 2c[d])` sixteenths, truncated.
- *Output format:* disparities leave with 4 fractional bits.

**Outlier handling (`postproc`).** One instance per row lane.

- *Right-view disparity.* D_R is taken along the diagonal of the left cost volume: the d that
  minimises C_final(xr + d, d). A sliding window of ND candidates tracks it as pixels arrive.
- *Outliers.* A pixel is an outlier when it is not unique or when |D_L(x) − D_R(x − D_L(x))| > 1.
- *Filling.* An outlier gets the smaller of the nearest reliable sub-pixel disparities to its
  left and to its right in the same row. It gets 0 when the row has none.

Because the right neighbour can be anywhere in the row, `postproc` buffers each row (ping-pong)
and works it off in two scans once the row is complete: right to left to note the nearest
reliable pixel on the right, then left to right to emit. Each row is output within 2·W+1
cycles after its last pixel arrives.

## Interface and timing (stereo_core)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the control state |
| `start` | in | pulse to begin a frame |
| `in_valid`, `in_ready`, `in_left`, `in_right` | in/out | one RGB pair per accepted cycle, raster order, H·W pairs |
| `in_stall` | out | `in_valid` high while `in_ready` is low |
| `out_valid[PR]`, `out_x`, `out_y`, `out_disp`, `out_outlier` | out | PR result streams. Stream i carries row `band·PR + i` in column order. `out_disp` has log2(ND)+4 bits, 4 of them fractional. `out_outlier` marks filled pixels. |
| `frame_done` | out | pulses after the W·H-th result |

Data flows from a line-buffer read to an aggregated cost in 3 cycles. The optimizer runs one
segment behind aggregation, and postprocessing one row behind the optimizer.

## Workloads and sizes

The parameters W, H, ND, PD, PR, WSEG and LMAX are elaboration-time constants. W must be a
multiple of WSEG, H a multiple of PR, and ND/PD even and ≥ 4.

| image | ND | WSEG | PD×PR | cycles / frame | fps at 180 MHz |
|-------|----|------|-------|----------------|----------------|
| 640×480 | 64 | 160 | 4×1 | 5,867,520 | 30.7 |
| 640×480 | 64 | 160 | 4×2, 8×2 | 2,933,760 / 1,497,600 | 61.4 / 120.2 |
| 1024×768 | 96 | 256 | 4×2, 8×2, 8×4 | 10,579,968 / 5,363,712 / 2,681,856 | 17.0 / 33.6 / 67.1 |
| 1600×1200 | 128 | 400 | 8×2, 8×4, 16×4 | 16,704,000 / 8,352,000 / 4,252,800 | 10.8 / 21.6 / 42.3 |

The default build is the last row. The other rows need their own builds.

On-chip memory of the default build is about 15 Mbit:

- line buffer 2.8 Mbit;
- reorder buffer 3.3 Mbit;
- optimizer upper-row memories 8.6 Mbit;
- postprocessing row buffers 0.4 Mbit.

## Choices made in this implementation

These are the main points where this RTL departs from the published design, or fills in
detail that the published design leaves open.

- **Census.** Census vectors are computed from the line-buffer window, 5x5 on luma. The
  original stores census vectors in the line buffer next to the pixels. The pass gets 3 extra
  preheating cycles for it, so a frame takes 0.7% longer than WSEG + PD + 2·LMAX per pass
  would.
- **Constants chosen here.** λ_AD = 10 and λ_census = 30; the arm rule with TAU = 20;
  P1 = 10 and P2 = 60; uniqueness at 5%; L-R tolerance 1; the parabola sub-pixel fit with 4
  fractional bits; cost 255 left of the image.
- **Final cost width.** C_final is 10 bits, not 8, to avoid choosing a scaling.
- **Right-view disparity.** It is taken from the diagonal of the left cost volume rather than
  from a second matching pass.
- **Order of sub-pixel refinement and filling.** Sub-pixel refinement is applied to every
  pixel before outlier handling, so an outlier takes a neighbour's refined value. In the
  original flow, refinement is the last step, after outliers are filled.
- **r2 at segment seams.** The r2 path restarts at every segment's last column (see above).
- **Input interface.** The input is a plain valid/ready stream. The host, PCIe link, cameras
  and rectification that surround the core in a full system are not part of this RTL.
- **Memory modelling.** Memories are arrays with register outputs where a block RAM would have
  them. They are not split into vendor RAM primitives.

## How far it can be trusted

Every module has a self-checking testbench that compares it with values computed
independently. For each testbench, a deliberately broken copy of its module was also run, to
show that the checks catch real faults.

- `tb/stereo_ref_pkg.sv` is a plain software model of the whole algorithm, written with loops
  over whole images. It knows nothing of bands, segments or pipelines, except for the r2 seam
  rule.
- `tb_stereo_core` pushes two 32×24 frames with ND = 16, PD = 4, PR = 2, WSEG = 16 and LMAX = 3
  through the core with `in_valid` held high. The scene is a random texture with a foreground
  rectangle at a different disparity, plus noise. The test then checks:
  - every output pixel, both disparity and outlier flag, against the model (4,617 checks);
  - the frame time against the band/segment/pass schedule;
  - that each mechanism occurred: input stall, several passes and segments, uniqueness and
    L-R failures, filled outliers, fractional outputs.
- The unit tests cover:
  - the line buffer's row wrap and edges;
  - the cost tables and census;
  - arm limits;
  - aggregation counts;
  - reorder addressing;
  - eq. (8) in isolation, including saturation;
  - the lane's slot schedule;
  - the optimizer across segments and bands;
  - WTA ties and the uniqueness edge;
  - outlier filling at row ends;
  - the controller's read sequence and its stall rule.

- `tb_stereo_core_wl` uses the default datapath: ND = 128, PD = 16, PR = 4 and LMAX = 12. Only
  the image (192×48) and the segment width (48) are smaller. It checks every pixel of two
  frames against the model (55,305 checks). Disparities reach 100, so the high passes carry
  the winners.
- `tb_stereo_core_k16pr1` and `tb_stereo_core_k12pr2` run the shapes of the smaller
  configurations in the table below, on 128-column images with arms of up to 12:
  - ND = 64, PD = 4, PR = 1 (K = 16). Here the single optimizer lane feeds its own upper-row
    memory.
  - ND = 96, PD = 8, PR = 2 (K = 12).

  Each checks every pixel of two frames against the model.
- `tb_stereo_core_full` runs one whole 1600×1200 frame through `stereo_core` with every
  parameter at its default. It takes about 3 minutes with Verilator. A model of the whole image
  would not fit in memory, so the test checks in three ways:
  - rows 0–9 pixel by pixel, against the model run on the top 24 rows, which is exact for
    those rows;
  - every one of the 1.92 M pixels is produced exactly once;
  - in the rest of the image, at least 90% of the output disparities are within one level of
    the scene's true disparity (95.2% measured).

  The measured frame time is 4,288,351 cycles. That is the 4,252,800-cycle schedule plus the
  initial fill of 18 rows and the output tail.

No synthesis timing or resource results are claimed. Some wide combinational blocks, such as
the WTA over 128 costs and the NC-row prefix sums, would need pipelining to reach a high clock.

## Simulating

Every testbench needs the package files first. For example, the end-to-end test:

```
verilator --binary --timing -Wno-fatal rtl/stereo_pkg.sv tb/stereo_ref_pkg.sv rtl/*.sv \
    tb/tb_stereo_core.sv --top-module tb_stereo_core -o tb
./obj_dir/tb
```

The packages go first. Verilator accepts `rtl/stereo_pkg.sv` appearing a second time through
`rtl/*.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and ends. A watchdog ends it with a failure if it hangs. The other testbenches build the same way, with their own file and top-module name. To try
another size, change the `localparam`s at the top of `tb_stereo_core.sv`. Keep W a multiple of
WSEG, H of PR, and ND/PD even and ≥ 4.

| file | contents |
|------|----------|
| `rtl/stereo_pkg.sv` | types, constants, cost and table functions |
| `rtl/stereo_ctrl.sv` | bands / segments / passes, input flow control |
| `rtl/line_buffer.sv` | NR-row image store with column reads |
| `rtl/cost_init.sv` | census, AD, robust tables, right-image delay line |
| `rtl/arm_gen.sv` | cross arms |
| `rtl/cost_agg_unit.sv` | vertical-then-horizontal aggregation for one disparity |
| `rtl/reorder_buffer.sv` | ping-pong segment cost buffer |
| `rtl/sgm_path_unit.sv` | eq. (8) for 2·PD disparities |
| `rtl/sgm_lane.sv` | one row's four paths and C_final |
| `rtl/sgm_optimizer.sv` | PR lanes, upper-row memories, restarts |
| `rtl/wta_select.sv` | WTA, uniqueness, sub-pixel |
| `rtl/postproc.sv` | L-R check, outlier filling |
| `rtl/stereo_core.sv` | top level |
| `tb/stereo_ref_pkg.sv` | whole-image reference model |
| `tb/tb_*.sv` | one testbench per module |
| `tb/tb_stereo_core_wl.sv`, `tb/tb_stereo_core_k16pr1.sv`, `tb/tb_stereo_core_k12pr2.sv` | end-to-end tests in the shapes of the evaluated configurations |
| `tb/tb_stereo_core_full.sv` | one full 1600×1200 frame at the default parameters |
