# Streaming ORB feature extractor

This is synthesizable SystemVerilog for a hardware unit that extracts ORB
features from a grayscale camera stream. ORB features are the keypoints used by
visual SLAM systems such as ORB-SLAM. Each keypoint is a FAST corner with an
orientation and a rotated 256-bit BRIEF descriptor. In software this
pre-processing step takes a large share of the tracking time.

The unit reads every pixel exactly once, in raster order. It keeps only a few
image lines on chip. The pixel stream goes through a set of sliding windows
that are aligned so that, when a pixel becomes the centre of the corner
detector, every other unit holds the neighbourhood around that same pixel.
When non-maximal suppression keeps a corner, the pipeline stalls. The
descriptor unit then computes the orientation and the descriptor from the
window it already holds. Results are held per 30x30 tile until the tile's
threshold has been decided: ORB-SLAM's "dynamic threshold" retries a tile
with a lower FAST threshold when the normal threshold finds nothing.

Top module: `orb_accelerator` (`rtl/orb_accelerator.sv`).

## Data flow

```
            +--> gauss_unit (7x7, sigma 2) --filtered--> rbrief_unit (37x37 window x REPL copies)
 pixel  ----|                                                    |  descriptor
 stream     +--> delay_fifo (17*W+17) --> fast_nms_unit           v
                                          (7x7 FAST, 3x3 NMS) --> control --> orb_store_buffer --> out
                                                                    |         (one FIFO per tile)
                                                              dyn_threshold (dirty bit per tile)
```

Only two units see the input stream: the Gauss filter directly, and the FAST
detector through a Delay FIFO. The descriptor window is fed by the Gauss output.
The NMS window is fed by the FAST scores.

## Keeping the windows aligned

This is the part that needs the most care. Every window moves by exactly one
pixel on every *push*, and all windows share one push signal, so a fixed
number of pushes separates any two window centres. With a line length of
`W` pixels (including the border):

| stage | its centre is this many pushes behind the newest input pixel |
|---|---|
| Gauss 7x7 window | `3W + 3` |
| rBRIEF 37x37 window (filtered value registered one push later, then 18 rows / 18 columns) | `3W + 3 + 1 + 18W + 18 = 21W + 22` |
| FAST 7x7 window, after the Delay FIFO of `D` pixels | `D + 3W + 3` |
| NMS 3x3 window (score registered one push later) | `D + 3W + 3 + 1 + W + 1` |

Setting the NMS centre equal to the rBRIEF centre gives `D = 17W + 17`. The
Delay FIFO length therefore depends on the run-time `width` input. After each
push, the centre pixel is the one pushed `21W + 22` pushes earlier. The
control tracks its image position with a pair of counters.

The border that the host adds must cover the largest reach of any window.
That reach is 18 pixels for the rBRIEF window, measured on *filtered* pixels,
plus 3 pixels for the Gauss window that produces them. The border is
therefore 21 pixels (`orb_pkg::BORDER`). Features are only reported for
centres inside the unpadded image. Windows that wrap across a line edge only
ever hold border positions, and their results are ignored.

The centre lags the input by `21W + 22` pushes, so the last image pixel
reaches the centre one push after the last input pixel. After the last pixel
of an image, the control makes one extra push of its own with no input.

## Corner detection and the dynamic threshold

`fast_nms_unit` compares the 16 pixels of the radius-3 Bresenham circle with
the centre pixel against both thresholds at once (`ini_thr`, `min_thr`). This
gives four 16-bit strings: brighter and darker, for each threshold. A
corner needs 9 consecutive ones, found by an AND tree of sixteen 9-input ANDs
(`fast_segment_test`). The score is the sum of absolute differences to the 16
circle pixels. A 3x3 window of scores does non-maximal suppression separately
for the IniThr and for the MinThr corners. The centre must be strictly greater
than all 8 neighbours.

The image is cut into 30x30 tiles. For a kept position the control:

* computes a descriptor if it is an IniThr feature, or a MinThr feature in a
  tile that has not yet seen an IniThr feature;
* marks the tile *dirty* (`dyn_threshold`) when it is an IniThr feature;
* stores the descriptor, tagged with both flags, in the FIFO of its tile
  (`orb_store_buffer`; one FIFO per tile across the line, `MAX_WIDTH/30` of
  them).

When the centre reaches the last pixel of a band of 30 rows (or of the
image), the pipeline stalls and the buffers are flushed tile by tile. A dirty
tile releases only its IniThr-tagged entries. A clean tile releases its
MinThr entries. This reproduces the software's "try IniThr, and if the cell is
empty retry with MinThr" on a stream, without a second pass. A full tile
FIFO drops further descriptors and counts them in `drop_count`.

## Orientation and descriptor (`rbrief_unit`)

The 37x37 window of filtered pixels is stored as 37 line-long Delay FIFOs
that share one pointer (`rbrief_window`). A window pixel is read by address,
not shifted out. The window is replicated `REPL` times (8 by default). Each
copy has two read ports. On `start` the unit runs four phases:

1. **Moments**: `m10 = sum dx*I` and `m01 = sum dy*I` over the disc
   `dx^2 + dy^2 <= 15^2`. The pass goes row by row using all `2*REPL` ports,
   which takes 62 cycles.
2. **Square root**: `r = floor(sqrt(m01^2 + m10^2))`, bit-serial, 24 cycles.
3. **Division**: `sin = m01*2^14/r` and `cos = m10*2^14/r` in signed Q1.14,
   truncated toward zero, with restoring division (16 cycles). A flat patch
   (`r = 0`) gives angle 0.
4. **BRIEF**: in cycle `j`, copy `k` takes pattern pair `k*32 + j`. It
   rotates both points (`col = round(x*cos - y*sin)`,
   `row = round(x*sin + y*cos)`), reads them and sets the bit to
   `I(p1) < I(p2)`. This takes 256/REPL = 32 cycles.

One descriptor costs 136 cycles from `start` to `done` with 8 copies. During
that time the whole pipeline is stalled. In general the latency is
`31 * ceil(31 / (2*REPL)) + 42 + 256 / REPL` cycles: 794 for one copy, 230
for four, 89 for sixteen. The window storage grows linearly with `REPL`.

The fixed 256-pair sampling pattern is generated in `orb_pkg::gen_pattern`
from an integer hash. Each coordinate is the sum of two values in 0..12
minus 12, so rotated points stay within radius 17. **This is not the
pattern of the ORB/ORB-SLAM software.** Descriptors from this unit are
therefore not interchangeable with OpenCV's. To match them, replace
`brief_coord` with the published table. Its coordinates, in -13..12, also
fit the 37x37 window.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `in_val`, `in_rdy`, `in_pix` | in/out/in | 1/1/8 | pixel stream, padded image in raster order; a pixel moves when both are high |
| `width`, `height` | in | 16 | padded size; `width <= MAX_WIDTH`; constant during an image |
| `ini_thr`, `min_thr` | in | 8 | FAST thresholds (ORB-SLAM uses 20 and 7) |
| `out_val`, `out_rdy` | out/in | 1 | feature record handshake |
| `out_desc`, `out_x`, `out_y` | out | 256/16/16 | descriptor (bit i = pair i) and position in the unpadded image |
| `frame_done` | out | 1 | pulse after the last record of an image has been taken |
| `drop_count` | out | 32 | descriptors lost to full tile buffers since reset |

The host pads each image by 21 pixels on every side. ORB-SLAM uses OpenCV
`BORDER_REFLECT_101`. Images wider than `MAX_WIDTH - 42` pixels are cut into
vertical strips. Each strip carries its own border, so neighbouring strips
overlap by 42 pixels, and each strip is streamed as a separate image.
Coordinates are local to the strip. For a 1241-pixel-wide KITTI frame and
the default 210-pixel buffers, that is 9 strips of 150 columns, which keeps
each strip a whole number of 30-pixel tiles.

Output records appear only during band flushes. Input is not accepted while
a descriptor is computed or a band is flushed. The unit keeps one pixel per
cycle otherwise.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MAX_WIDTH` | 210 | longest padded line; sizes every line buffer. The medium configuration; 90 and 420 are the small and large ones |
| `REPL` | 8 | copies of the rBRIEF window (must divide 256) |
| `TILE_DEPTH` | 32 | descriptors held per tile |

Storage at the defaults: 8 x 37 x 210 bytes for the rBRIEF windows, a
3587-byte FAST Delay FIFO, 14 line buffers for the 7x7 and 3x3 flip-flop windows, and
7 x 32 x 290 bits of descriptor store.

## Where this design departs from the ORB-SLAM software

* Single scale only: the image pyramid (8 levels, factor 1.2) is not built.
  The host can stream each level as its own image.
* BRIEF pattern: generated, not the published table (see above).
* Corner score: sum of absolute differences, not OpenCV's largest-threshold
  score. NMS uses strict `>`.
* Moments are taken on the Gauss-filtered image over a 15-pixel disc.
  ORB-SLAM uses the unfiltered image.
* Gauss filter: the kernel is scaled by 16 and kept with 4 fraction bits,
  i.e. integer weights `round(k*256)`. Those weights sum to 240, so the
  filtered image is about 6% darker than an exactly normalised filter. BRIEF
  tests compare pixels with each other, so this barely matters.
* Tiles are exactly 30x30. The software stretches cells to divide the image
  evenly.
* Corner test: FAST-9 on the 16-pixel circle, as ORB-SLAM uses, rather than
  the 12-of-16 variant.

## Verification

Every module has a self-checking testbench in `tb/` that compares against an
independent software model written in the testbench:

| testbench | what it checks |
|---|---|
| `tb_delay_fifo` | delay equals `len` for 1, 5 and 16, random push gaps |
| `tb_fifo` | random val/rdy traffic against a queue model; flags and data |
| `tb_sliding_window` | every window position of 7x7 and 3x3 windows |
| `tb_gauss_unit` | every filtered pixel, kernel rebuilt from the real sigma-2 coefficients |
| `tb_fast_nms_unit` | both scores and both NMS decisions at every position |
| `tb_dyn_threshold` | tile index and dirty bits against a model |
| `tb_orb_store_buffer` | released entries, their order and the drop count under back-pressure |
| `tb_rbrief_unit` | sin/cos, all 256 bits and the 136-cycle latency at several dozen window positions, including flat patches |
| `tb_rbrief_repl` | the same model and the latency formula at `REPL` = 1, 2, 4, 16 and 32 |
| `tb_orb_accelerator` | end to end at default parameters: three 60x40 images (with border 102x82), record-for-record against a full model of filter, FAST, NMS, dynamic threshold, buffer overflow and descriptors; the third has no corners and must stream at one pixel per cycle apart from the band flushes |
| `tb_orb_kitti_strip` | one full-height strip of a 1241x376 KITTI-sized frame (150x376, 192x418 with border), same model; synthetic content |
| `tb_orb_acc_configs` | the small (`MAX_WIDTH` 90), medium and large (420) configurations on one 48x30 image release the same records in the same order |

The end-to-end test also counts each mechanism and fails if any never
happened: input stalls, rBRIEF runs, MinThr descriptors discarded by a dirty
tile, tiles kept at MinThr, buffer overflow, band flushes, the end-of-image
drain push and output back-pressure. Its images are synthetic, built to
trigger those cases. No real camera data has been run through the design.

The shared bench body is `tb/orb_tb_core.sv`. On the KITTI-sized strip, 80,256
pixels and 2,462 descriptors took 430,611 cycles. Descriptor stalls dominate
(about 137 cycles each). The synthetic tiles are denser in corners than a
street scene.

Run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/orb_pkg.sv \
    tb/tb_orb_accelerator.sv --top-module tb_orb_accelerator -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M`.

## Files

* `rtl/orb_pkg.sv`: constants, the kernel, the FAST circle, the BRIEF pattern generator and the store entry type.
* `rtl/orb_accelerator.sv`: top level and control.
* `rtl/gauss_unit.sv`, `rtl/fast_nms_unit.sv`, `rtl/fast_segment_test.sv`: the filter and the corner detector.
* `rtl/rbrief_unit.sv`, `rtl/rbrief_window.sv`: orientation and descriptor.
* `rtl/dyn_threshold.sv`, `rtl/orb_store_buffer.sv`: dynamic threshold.
* `rtl/sliding_window.sv`, `rtl/delay_fifo.sv`, `rtl/fifo.sv`: shared building blocks.
