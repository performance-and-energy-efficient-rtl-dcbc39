# Traffic video analytics accelerator

A city that watches its roads with many fixed cameras can either process
each camera's video next to the camera or ship all of it to a data centre.
This design is the data-centre side: an FPGA accelerator that takes the
1280x720, 8-bit grayscale, 25 frames/s video of road cameras and, for each
frame, reports two numbers per road region:

* **how much road surface is covered by moving vehicles** (traffic density),
  from a background-subtraction unit, and
* **how fast the vehicles move towards or away from the camera** (traffic
  speed), from a Lucas-Kanade optical-flow unit.

Both are per-pixel image algorithms whose only neighbourhood is small and
fixed, so each is built as a streaming pipeline that takes one pixel per
clock and keeps the few image rows it needs in on-chip line buffers. Several
copies of each unit ("compute units") sit side by side in the top level; the
default is 3 background-subtraction units and 6 optical-flow units, which is
the configuration the design was originally sized for on a Virtex-7 class
device at 200 MHz.

At one pixel per clock a 1280x720 frame takes about 0.92 M cycles, 4.6 ms at
200 MHz, so a single unit of either kind keeps up with eight cameras at
25 frames/s.

## Road description

Each camera is fixed, so everything the units need to know about the scene
is computed once per camera and streamed alongside the pixels:

| field     | width | meaning |
|-----------|-------|---------|
| `road`    | 1     | pixel lies on the monitored road surface |
| `area`    | 16    | road area covered by the pixel (background subtraction) |
| `dist_mm` | 16    | ground distance, along the camera axis, covered by one pixel step (optical flow) |
| `region`  | 2     | which total the pixel counts towards (carriageway side or lane) |

The units only add up these numbers; their unit (cm², mm, ...) is the
host's choice. The default is two regions, one per direction of traffic;
more regions (one per lane) only need a larger `NUM_REGIONS`.

All shared types live in `rtl/sc_pkg.sv` (`bgs_in_t`, `bgs_out_t`,
`lk_in_t`, `lk_out_t` and the derivative and window-sum structs).

## Background subtraction unit (`bgs_core`)

The unit sees, for each pixel position, the previous, current and next
frame, the reference background image and a per-pixel counter, and returns
the foreground pixel, the updated background pixel and counter, and a
moving flag. Background and counter are kept by the host in DRAM and simply
travel with the stream.

**Motion measure.** For a road pixel `p` the change across the three frames
is `d(p) = next[p] - prev[p]`. It is combined with the same change 10 pixels
before and 10 pixels after `p` in raster order:

    lat = | 1*d(p-10) + 2*d(p) + 1*d(p+10) |        (0 for pixels off the road)

Neighbours beyond the frame contribute 0. The sign of the sum follows the
direction of motion; only its magnitude is used. The weights 1, 2, 1 are this
design's choice; the offsets of ±10 pixels are the original algorithm's.

**Background update.** If `lat < lat_threshold` and the pixel's counter has
reached `n_frames`, the current pixel becomes the new background pixel;
otherwise the counter is incremented (it saturates at 255 and is never
cleared). So a pixel must be seen in `n_frames` frames before the background
may follow it, and after that it follows whenever the pixel is still.

**Foreground and area.** A pixel is moving if `|cur - bg| > bg_threshold`
and `lat > lat_threshold`. A moving pixel is passed to the output image
(others become 0) and its `area` is added to its region's total
(`region_accum`). At the end of the frame the unit pulses `frame_done` with
the per-region area sums and moving-pixel counts, and clears them.

**How the ±10 neighbours are found.** The stream runs through a 20-entry
shift register. When pixel `p+10` arrives, `p` sits in the middle and
`p-10` at the far end, so all three are available in the same clock.
After the last pixel of a frame nothing follows it, so the unit lowers
`in_ready` for 10 cycles and shifts in empty entries to finish the last 10
pixels. A frame therefore takes `WIDTH*HEIGHT + 10` cycles. The result of a
pixel leaves one clock after it reaches the middle of the register.

## Optical-flow unit (`lk_core`)

The unit receives two consecutive frames as one stream of pixel pairs and
solves, for every pixel, the Lucas-Kanade equations over the 15x15 window
centred on it:

    G = Σ [Ix²  IxIy; IxIy  Iy²],   b = Σ [Ix·It; Iy·It],   v = -G⁻¹ b

with central differences `Ix = (right - left)/2`, `Iy = (down - up)/2` in
the first frame and `It = frame1 - frame0`. `vy` is the motion along the
camera axis (positive = down the image = towards the camera). The pipeline
has four stages.

### Line Buffer 1 and derivatives (`line_buffer`, `lk_gradient`)

Two rows of frame 0 and one row of frame 1 are held in line buffers (one word
per image column, holding that column's last rows). Together with the
incoming pixel they give the 4-neighbourhood of the pixel one row and one
column behind the input. `lk_gradient` forms `2·Ix`, `2·Iy` and `It`.
Keeping the doubled values keeps everything in exact integers; the solver
removes the factor. At the image border the missing neighbour is replaced
by the pixel itself.

### Line Buffer 2 and the separable window sum (`lk_window_sum`)

This is the part that makes the unit fast. Summing 15x15 = 225 products per
pixel is wasteful because neighbouring windows share 210 of them. The unit
keeps the *derivatives* of the previous 14 rows in a second line buffer
(27 bits per column and row), and:

1. **vertical pass**: for the current column, the five products `gx²`,
   `gx·gy`, `gy²`, `gx·gt`, `gy·gt` of the 15 rows of that column are formed
   and summed in parallel. This gives one column sum per clock.
2. **horizontal pass**: the last 15 column sums are kept in a shift
   register and added. This gives the full window sums of the pixel 7 columns
   and 7 rows behind.

This turns a 15x15 loop into 15 + 15 work. Window pixels outside the image
count as zero.

### Solver (`lk_solver`, `pipe_divider`)

The 2x2 system is solved in closed form:
`det = Σgx²·Σgy² - (Σgxgy)²`, and
`vx = -2·(Σgy²·Σgxgt - Σgxgy·Σgygt)/det`, with `vy` likewise. The factor 2
undoes the doubled spatial derivatives. The products are 64-bit. The two
divisions run in fully pipelined restoring dividers, one quotient bit per
stage. The result is signed Q7.8 pixels per frame, saturated at
±127.996. Where `det <= DET_MIN` (65536 by default), the window has too
little texture to trust and the flow is set to 0. The latency is 18 clocks
and the solver takes one pixel per clock.

### Speed, debug colour and raster timing

A road pixel counts as moving when `|vy| >= v_min` (a run-time input) and
`vy != 0`. Its speed contribution `vy · dist_mm` is added to its region's
total. Average speed = sum / count / 256 in distance units per frame; multiply
by the frame rate for speed.

`flow_color_map` gives every pixel a debug colour without trigonometry.
Still pixels are white. Each direction removes colour in proportion to
`|v| >> 2`, saturating at 255:

| direction        | hue    |
|------------------|--------|
| towards the camera | green |
| away from it     | blue   |
| left             | cyan   |
| right            | red    |

This shows motion along the camera axis well and sideways motion only
roughly. That is enough for monitoring.

The window of a pixel is complete only 7 rows and 8 columns after the pixel
arrives. So the unit walks an extended raster of
`(WIDTH+8) x (HEIGHT+9)` positions. At positions outside the image it lowers
`in_ready` and runs on its own, which finishes the right and bottom edges and
empties the pipeline before the next frame. At 1280x720 that is 938,952
cycles per frame, 1.9 % more than the pixel count. The road description of
each pixel waits in a FIFO (`sync_fifo`, 11,520 entries) until its flow
leaves the solver. Assertions check that the FIFO never overflows and stays
aligned with the flow.

## Accelerator top (`smart_city_top`)

`NUM_BGS_CU` background units and `NUM_LK_CU` flow units, each with its own
stream and result ports. Port `x[i]` of each array belongs to unit `i`. The
thresholds (`bgs_lat_threshold`, `bgs_bg_threshold`, `bgs_n_frames`,
`lk_v_min`) are shared by all units of a kind. The host, the DRAM burst
transfers and the PCIe shell are not part of the RTL. The units' stream
ports are where the DMA engines of a board shell would connect. Which camera
or frame each unit processes is up to the host.

| resource (defaults) | value |
|---|---|
| on-chip memory | 4.47 Mbit: per flow unit 3 image rows, 14 derivative rows, road FIFO |
| per background unit | 20-entry shift register, no RAM |
| throughput | 1 pixel/clock per unit |
| frame time, 1280x720 | 921,610 cycles (background), 938,952 cycles (flow) |

### Interface timing

* Input: `valid`/`ready` handshake. One transfer carries one pixel position
  with all its images and its road description. The units accept on every
  clock except the cycles between frames described above.
* Output: a single-cycle `out_valid` per pixel, in raster order, with no
  back-pressure. The receiver must keep up.
* `frame_done` pulses once per frame with the per-region totals, which are
  then cleared.
* Reset `rst_n` is asynchronous and active low. Line buffers are not reset.
  Their stale contents are masked at frame borders.

## Where this design departs from the original description

* The original optical-flow kernel refines its result with an image pyramid
  and iterations. Neither the number of levels nor the number of iterations
  is known, so this unit computes single-level, single-pass Lucas-Kanade.
  It is accurate for motions up to about a pixel per frame: a textured
  pattern moving uniformly by 1 pixel is measured as 0.98 pixel/frame.
  Windows that straddle moving and still areas give smaller values, and
  large motions are underestimated.
* The background algorithm is described in two slightly different ways:
  * update after "N-1 still frames", or once a counter that is incremented
    on every non-updating frame reaches N;
  * a signed background difference, or any change from the background.

  This design uses the counter rule and the absolute difference.
* The weights of the three-frame difference, all bit widths, the
  determinant threshold, the motion test on `vy`, the colour formula and the
  border handling are this design's choices.
* The units stream the background image and counters through the pipeline
  instead of holding them in local buffers of a work group. The data flow is
  the same.
* Per-frame totals are sums and counts. Turning them into m² and km/h is
  left to the host, because the camera geometry lives there.

## Files

| file | content |
|---|---|
| `rtl/sc_pkg.sv` | shared widths and stream structs |
| `rtl/smart_city_top.sv` | the accelerator |
| `rtl/bgs_core.sv` | background-subtraction unit |
| `rtl/lk_core.sv` | optical-flow unit |
| `rtl/line_buffer.sv` | row buffer (Line Buffer 1 and 2) |
| `rtl/lk_gradient.sv` | derivatives of one pixel |
| `rtl/lk_window_sum.sv` | separable 15x15 window sums |
| `rtl/lk_solver.sv`, `rtl/pipe_divider.sv` | 2x2 solve and divider |
| `rtl/flow_color_map.sv` | debug colour |
| `rtl/region_accum.sv` | per-region frame totals |
| `rtl/sync_fifo.sv` | FIFO for the road description |
| `tb/sc_ref_pkg.sv` | whole-frame reference models of both algorithms |
| `tb/sc_top_checks.svh` | drivers, monitors and checks shared by the top-level tests |
| `tb/tb_*.sv` | one self-checking test per module, plus `tb_smart_city_top` (reduced size) and `tb_smart_city_full` (defaults) |

## Verification and simulation

Every testbench compares with values computed independently in the
testbench and prints `TB_RESULT checks=N failures=M`. The reference models
in `sc_ref_pkg` run the per-pixel algorithms with plain loops over whole
frames. The flow model solves each window with exact integer arithmetic.

* `tb_bgs_core`: 16x6 frames with the full ±10 offset, 6 frames back to
  back, with and without input gaps. It checks every output pixel, the totals
  and the frame time `WIDTH*HEIGHT+10`.
* `tb_lk_core`: 24x24 frame pairs, 15x15 window, textured regions moving
  towards and away from the camera and a flat region. It checks every flow
  vector, the colours, the totals and the frame period `(W+8)(H+9)`.
* `tb_lk_window_sum`, `tb_lk_solver` (latency 18, zero and saturated
  flow), `tb_lk_gradient`, `tb_flow_color_map`, `tb_line_buffer`,
  `tb_region_accum`: unit tests.
* `tb_smart_city_top`: all 3 + 6 units on 32x24 frames, with input stalls.
  It counts each mechanism and fails if one never happened: background
  updates, counter saturation, moving pixels, zero and non-zero flow in both
  directions, and the units holding input off.
* `tb_smart_city_full`: the top with all default parameters (1280x720,
  15x15 window, 3 + 6 units), two frames per unit, every pixel checked. It
  runs about 2.8 M cycles, roughly 4-5 minutes in Verilator.

To run one test with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sc_pkg.sv tb/sc_ref_pkg.sv tb/tb_lk_core.sv \
        --top-module tb_lk_core -Mdir obj_lk -o sim
    obj_lk/sim +verilator+rand+reset+2

Lint of the RTL: `verilator --lint-only -Wall -Irtl -y rtl rtl/sc_pkg.sv
rtl/smart_city_top.sv`. The remaining warnings are:

* a package constant unused by some modules;
* `rst_n` being read both by flops and by the `disable iff` of the
  assertions.

To change the frame size, the window or the number of units, override the
top's parameters. `WIN` must be odd. `WIDTH` sets the depth of every line
buffer.
