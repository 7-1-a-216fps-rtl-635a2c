# Free-viewpoint view synthesizer for a 3DTV set-top box

This is synthesizable SystemVerilog for the view-synthesis half of a 3DTV set-top box chip. The
input is two decoded reference views of a scene. Each view has a colour image and a per-pixel
depth map, and both sit in external memory. From them the design draws *virtual* views: the
scene as seen from camera positions that were never filmed. The camera may move in all six
degrees of freedom, so it can translate and rotate. The main configuration targets 4096×2160
frames: nine virtual views at 24 frames/s each, or 216 frames/s in total, at a 240 MHz clock.

The central idea is how the work is scheduled. With a general camera rotation, two neighbouring
reference pixels can land far apart in the virtual view. A raster-scan warper therefore cannot
use its memory regularly. Epipolar geometry helps. The pixels on one epipolar line of the virtual
view come only from the matching epipolar line of the reference view. The design walks the
reference image along those lines, one 8×8 block at a time. Each block is skewed to follow the
local line slope. It is straightened into a regular 8×8 block, warped, hole-filled, and then
skewed back on its way out to memory.

## Processing of one block

A *job* names three 8×8 block origins:
- a source block in reference view 1, the main reference;
- a source block in reference view 2;
- the virtual block to produce.

It also gives an access pattern and a scan-order flag. The top module `fvvs_top` runs each job
through these stages:

1. **Texture reorder** (`texture_reorder`, `texture_reorder_cache`, `access_pattern`). The
   reorder stage reads the 64 pixels of the slanted source block. It reads one pixel per cycle
   through a 16-line cache. Each cache line holds one 4×2-pixel memory unit: 64 bits of luma,
   16 of U, 16 of V and 64 of depth. The stage writes the pixels into a regular 8×8 block.
2. **Warping** (`warping_engine` with eight `warp_pe`). The engine projects one block column
   (8 pixels) per cycle into the virtual view. It then keeps the closest pixel where several
   land on the same position.
3. **Second reference view (DWRFS).** The name stands for dynamic warping reference frame
   selection, and the controller `fvvs_ctrl` carries it out. The block from view 2 is read and
   warped only if view 1 left holes. This second pass fills holes only and never overwrites a
   pixel from view 1. When view 1 covers the whole block, the second read is skipped entirely.
   Skipping it saves most of the memory traffic in smooth regions.
4. **Inpainting** (`inpaint_engine`). This stage fills the remaining holes in a single pass of
   24 cycles (details below).
5. **Inverse reorder** (`inverse_reorder`). This stage places the finished block in a 16×24
   buffer at its true, skewed position. It then writes the buffer out as 4×2-pixel units with a
   per-pixel byte mask.
6. **Bus interface** (`bus_if`). This block turns unit reads and writes into 64-bit beats on two
   buses. Bus 0 is the view-synthesis bus. Bus 1 is the decoder bus, which the video decoder
   leaves free in full-utilization mode.

The stages run one after another for each block. A block pipeline, with one block per stage at
once, is not built; see *Departures* below.

## Slanted blocks: access patterns and rotation

Seven patterns approximate the slope of the epipolar line: 0°, ±11.25°, ±22.5° and ±45°. In an
8×8 block, column *i* (along the line) is shifted vertically by an offset:

| pattern | offset of column i |
|---|---|
| 0° | 0 |
| ±11.25° | ∓⌊i/4⌋ |
| ±22.5° | ∓⌊i/2⌋ |
| ±45° | ∓i |

A positive angle means the line rises to the right, which gives a negative offset. For slopes
steeper than ±45°, the `transpose` flag swaps the roles of x and y. That rotates the scan order,
so any line direction maps onto one of the seven patterns. `access_pattern` computes the frame
position of element (i, j) for a block origin, a pattern and the flag. The same function is
used at three points:
- on the way in (`texture_reorder`);
- in the warping engine, to find where a virtual position sits inside the skewed virtual block;
- on the way out (`inverse_reorder`).

The discrete patterns only choose which pixels are read together. The warp itself is exact, so
the true line slope can lie anywhere between the patterns.

## Warping arithmetic (`warp_pe`)

Each processing element maps a source pixel (x_s, y_s) with depth Z through a 3×3 homography
H(Z), whose last element is 1:

    [x' y' w'] = H(Z) · [x_s y_s 1],   (x_v, y_v) = (x'/w', y'/w')

The exact H differs for each of the 256 depth values. Storing all 256 would be costly, so the
PE interpolates linearly between three matrices, at Z = 0, 128 and 255. These are kept as two
base/increment pairs:

    H(Z) = base[Z[7]] + inc[Z[7]] · Z[6:0]

The coefficients are signed Q16.16 in 32 bits. The pipeline has six register stages:
1. interpolation;
2. the matrix–vector product;
3. four stages of restoring division.

The division returns round-half-up quotients of 13 bits, enough for 4096 columns. A PE accepts
one pixel per cycle, and its results come out six cycles later with a tag carried alongside.
`out_ok` is low when w' ≤ 0 or the result falls outside the 13-bit range.

In **parallel** and **full-utilization** modes the camera only translates sideways. The warp
then reduces to a horizontal shift:

    x_v = x_s − scale · disp[Z]

Here `disp` is a 256-entry host-written disparity table (through `dt_*`). The `scale` differs
for each virtual view: `scale = disp_off[r] + disp_step[r] · k` for virtual view *k* (1…9) and
reference view *r*. One source block is then warped into three virtual block buffers in the
same pass. Full-utilization mode runs nine views as three groups of three. All its writes go on
the decoder bus, while reads stay on bus 0.

## Depth select and the block window (`warping_engine`)

Each cycle the engine issues one block column to the eight PEs. Six cycles later it has eight
warped positions. Each one is checked against the skewed virtual block:
- The column index *wi* is the distance along the line from the virtual origin.
- The row index *wj* is the perpendicular distance minus the pattern offset of that column.

A pixel that lands inside the block competes for its position with *depth select*. The larger
depth value (nearer to the camera) wins. On a tie, the pixel that arrived first stays. Pixels
that land outside the block are dropped. A job takes 16 cycles from `start` to `done`:
- 8 issue cycles;
- 6 pipeline cycles;
- 2 cycles of write and handshake.

## Single-pass inpainting (`inpaint_engine`)

Holes have different causes, and each cause wants a different fill. The engine decides from the
neighbourhood of each hole and fills every hole exactly once. The block is addressed as column
i (along the line) and row j.

| cycles | pass | rule |
|---|---|---|
| 0–7 | gradient padding, one row per cycle | A hole with valid pixels on both sides within 3 positions, whose depths differ by at most TH = 16, lies inside one surface (a crack). It gets the distance-weighted mean of the two. |
| 8–15 | foreground padding, one column per cycle | A hole with a valid pixel within 3 positions above or below takes the nearest one. If both exist, it takes the closer surface (larger depth). |
| 16–23 | depth-based raster scan | Each remaining hole copies the farther (background) of its left and upper neighbours, which are already final. The first position of the block falls back to the farthest valid pixel of the block. |

`done` comes 25 cycles after `start`. Counters record how many pixels each pass filled. An
iterative software inpainter needs several hundred cycles per block. The thresholds, the search
order and the interpolation weights in the table are this design's reading of the three mode
names. The gradient-vector calculator and its look-up table are not built.

## Write-back (`inverse_reorder`)

A finished block is skewed again, so it covers up to 8 + 7 = 15 rows or columns. The 16×24
buffer is addressed as follows:
- Its column is the frame x modulo 16.
- Its row is the frame y relative to the first even row of the block.
- Both are swapped for transposed blocks.

The buffer is filled in one cycle. It is then drained unit by unit over every 4×2 unit the
block touches. Units with no pixel of the block are skipped. Each write carries a byte mask, so
the neighbouring blocks' pixels in memory stay intact. The U and V of a 2×2 group are taken from
the first masked pixel of that group.

## Memory layout and buses

Unit (ux, uy) of a view is at `base + 32 · (uy · 1024 + ux)`. It is moved in three beats:
1. luma;
2. depth;
3. `{32'b0, V, U}`.

Inside the luma and depth fields, pixel p = 4·(y mod 2) + (x mod 4) sits at bits 8p+7:8p.
`src_base[0..1]` and `dst_base[0..8]` place the views.

A request is `bus_req_t` (valid, we, addr, wdata, wstrb). It is held until `ready`. Read data
returns in order with `rvalid`. Reads have priority beat by beat on bus 0. A cache line fill
completes one cycle after its third beat.

The cache is direct-mapped with index {uy[1:0], ux[1:0]}. Its tag is {view, uy, ux}, 22 bits:
enough for two views of 1024×1080 units. A miss blocks the cache until its line arrives.
`cache_flush` invalidates every line, which is needed when the host rewrites a reference frame.

## Using the top module

- Set `mode` (GENERAL, PARALLEL, FULL), `dwrfs_en`, `hset[0..1]` (one interpolation set per
  reference view), `disp_off`/`disp_step`, the memory bases, and the disparity table through
  `dt_*`. Keep these static while jobs run.
- Give jobs with `job_valid`/`job_ready`. `job_t` holds `src1`, `src2` and `virt` (13-bit x/y
  block origins), `pat` and `transpose`. `busy` stays high until the last write beat of the job
  has been accepted.
- Status counters: blocks, second-view loads and skips, cache hits and misses, beats per bus,
  and pixels filled per inpainting pass.

Deriving the jobs from camera geometry is left to the host: which blocks, which pattern and
which matrices. So is decoding the reference views.

### Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| fvvs_top | FRAME_W, FRAME_H | 4096, 2160 | frame size (reads are clamped to it) |
| fvvs_top | CACHE_LINES | 16 | texture reorder cache lines |
| fvvs_top | IRB_W, IRB_H | 16, 24 | inverse reorder buffer |
| warping_engine | NPE, NV | 8, 3 | warping PEs, parallel virtual views |
| inpaint_engine | TH, SEARCH | 16, 3 | same-surface depth threshold, search range |
| warp_pe | QW | 13 | quotient width |

## Departures and limits

Where this design follows the chip it is modelled on:
- the stage order;
- eight warping PEs, three interpolation matrices and four division stages;
- the 16-line cache of 4×2-pixel lines;
- the 16×24 write-back buffer;
- the DWRFS policy;
- the three modes and their view counts;
- the use of the decoder bus for output;
- 24 cycles per block for inpainting.

It departs in these ways:

- **No block pipelining.** The stages run one after another for each block, so throughput is
  well below the target. The warping array peaks at 8 pixels/cycle, which at 240 MHz would match
  the 1.91 GPixel/s needed for 9 × 4096×2160 × 24 fps. But the end-to-end test measures about
  270–380 cycles per block in general mode, 600 in parallel mode and 2000 in nine-view mode. At
  240 MHz that is roughly 6 frames/s for one view, or 0.9 frames/s for nine, against the target
  of 30 and 24.
- **One source block per reference view per virtual block.** The original tracks warped pixels
  across neighbouring blocks with a scan-line status buffer, location buffers and flush control.
  These are not built. Pixels that land outside the current virtual block are dropped, and
  inpainting fills the gap.
- **DWRFS per block.** View 2 is read for a whole block when view 1 leaves any hole. It is not
  read per occluded region.
- **Inpainting rules** are this design's own, and no gradient-vector calculator is built.
- **Cache tag** is 22 bits, {view, uy, ux}, where the original line format has a 20-bit address
  field.
- **Not included:** the H.264/MVC decoder (entropy decoding, prediction, deblocking), inter-view
  colour calibration, the on-chip SRAM macros as separate parts, and the display path. The two
  buses are ports, and a memory model in the testbenches stands in for DRAM.
- Chroma is treated as 4:2:0 and depth as 8 bits, where larger means nearer.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a `TB_RESULT checks=…
failures=…` line and has a watchdog. The testbenches compare against reference models written
independently in `tb/tb_ref_pkg.sv`. Among these are a real-valued homography, a pixel-by-pixel
inpainting model and a memory image. `tb/tb_dram.sv` is a two-port memory model with random
stalls and read latency. It reads source pixels from a synthetic scene of depth steps and
texture ramps, and it records every byte written.

`tb_fvvs_top` runs the complete design at its default parameters (4096×2160 frame addressing).
It runs 21 jobs in four phases:
- general mode with DWRFS;
- a stretching warp with depth steps and DWRFS off;
- parallel mode;
- full-utilization mode.

It checks every pixel of every virtual block, including the chroma of each 2×2 group, against
the reference, on the bus it should have been written to. It also counts each mechanism and fails if any never happened:
- cache hits and misses;
- bus stalls;
- second-view loads and skips;
- each inpainting pass;
- parallel and nine-view jobs;
- decoder-bus writes;
- rotated blocks.

It runs in well under a second. Running it with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/fvvs_pkg.sv \
        tb/tb_ref_pkg.sv tb/tb_dram.sv tb/tb_fvvs_top.sv --top-module tb_fvvs_top
    ./obj_dir/Vtb_fvvs_top

For a unit test, replace the testbench file and the top module name, e.g. `tb/tb_warp_pe.sv`
and `tb_warp_pe`. `tb_bus_if` also needs `tb/tb_dram.sv`.
