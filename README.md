# Bottle-cap inspection pipeline

Caps travel past a camera on a conveyor. Shipping every raw 640 x 480 RGB
frame (7,372,800 bits) to a server takes too long and costs too much bandwidth.
This pipeline works next to the camera instead. It turns each frame into a
one-bit edge image and finds the cap in it. It then sends on only the cap's
box of that edge image: about 25,600 bits for a 160 x 160 cap. It also decides
whether the cap shows its printed front or its plain back, and for a back it
signals an actuator to turn the cap over.

Every stage takes one pixel per clock and never stalls. A 640 x 480 frame
therefore takes 307,200 clocks of processing, 3.07 ms at 100 MHz, plus a
latency of a few dozen clocks.

```
 stored camera frame
        |  pix_rd_* / pix_rgb
   image_gen ──> rgb2gray ──> median_filter ──> sobel_edge ──┬──> position_detect ──┐ box
   (video timing)  (Y)        (3x3 median)      (1-bit edges) │                     v
                                                              └──> pingpong_fb <── cut_control ──> crop stream
                                                                   (2 banks)          │            side_front
                                                                                      └──────────> flip_req
```

## The pixel stream

Pixels travel with three timing signals, bundled as `cap_pkg::vsync_t`:
vertical sync `vs`, horizontal sync `hs` and data enable `de`. Each stage
delays the bundle by exactly its own latency, so timing and data stay aligned.
The stages that need coordinates get them from `pix_counter`:

- the column counts the `de` pixels on a line;
- the row counts the falling edges of `de`;
- `vs` resets both.

Because of this, a stage never depends on the blanking lengths, and the
testbenches can use short blanking.

`image_gen` produces the stream. It reads the stored camera frame through a
simple port: it raises `rd_en` with a column and a row, and the data comes back
on `pix_rgb` one clock later. It emits the frame with 640 x 480 VGA-style
timing of 800 x 525 clocks per frame. Between frames there are 45 lines of
vertical blanking. The clearing of the count registers and the crop start both use that gap.

| stage | latency (clocks) | notes |
|---|---|---|
| `image_gen` | 1 | memory read |
| `rgb2gray` | 3 | products, 18-bit sum, upper ten bits; saturation is combinational |
| `median_filter` | 4 | window, row sort, column sort, final sort |
| `sobel_edge` | 15 | window, gradients, Gx²+Gy², 11-stage square root, compare |
| `position_detect` | 1 after the frame | box tracked during the frame |

From the read of a frame's last pixel to `frame_done` is 24 clocks.

## Grey conversion

Y = 0.299 R + 0.587 G + 0.114 B, computed with integer coefficients. Each
weight is scaled by 256 and truncated, giving 76, 150 and 29. Bits 17:8 of the
18-bit weighted sum form a ten-bit value. If either of its top two bits is
set, the result saturates to 0xFF. R is bits 23:16 of the input, G bits 15:8
and B bits 7:0.

The truncated weights sum to 255, so the saturation cannot fire for 8-bit
inputs. It is there in case someone changes the coefficient parameters.

## 3 x 3 neighbourhoods, and what happens at the image border

`window3x3` serves both filters. Two line-long delay lines are written as
column-addressed arrays, which is how an FPGA maps a shift-register tap. With
the incoming pixel they give one column of three pixels, which is shifted into
a 3 x 3 register window. (The classic form chains three image-wide shift
registers; the third is not needed here, because its row is the incoming
pixel itself.) For the incoming pixel (x, y), the window covers
columns x-2..x and rows y-2..y. Its centre is therefore the pixel **one column
left and one line up**.

The stream keeps its timing, so each 3 x 3 stage moves its image one pixel
right and one pixel down. After the median and the Sobel stages, an edge at
stream position (x, y) belongs to camera pixel (x-2, y-2). The frame store and
the position registers work in stream coordinates. The top subtracts the shift
of 2 before it outputs the box and crop coordinates, so those are in camera
coordinates.

A window that reaches outside the image holds stale data. `window3x3` raises
`border` for such a window, and `outside` when even its centre lies outside
the image. What each filter does with them:

- `median_filter` passes the centre pixel unfiltered on `border`, and outputs 0
  on `outside`.
- `sobel_edge` outputs 0 in the first `MARGIN` columns and lines.
- The top sets `MARGIN = 4`, so a gradient only ever sees median-filtered
  pixels. With a smaller margin, impulse noise on the first camera line or
  column passes the median stage unfiltered. It then creates edges at the
  image border and stretches the cap's box to the border.

In camera coordinates, edges can appear in columns 2..W-3 and rows 2..H-3.

## Median by sorting

`sort3` is a combinational compare-and-swap sorter that puts three values in
descending order. `median_filter` uses it in three pipeline stages:

1. It sorts each row of the window. Column 0 then holds the row maxima,
   column 1 the row medians and column 2 the row minima.
2. It sorts each of those columns, and keeps the smallest maximum, the median
   of the medians and the largest minimum.
3. The middle value of those three candidates is the median of all nine
   pixels.

Impulse noise survives only where five or more of the nine pixels are hit.
`tb_median_noise` streams a 160 x 120 cap image with 0, 5, 15, 25 and 50 %
salt-and-pepper noise through the filter. The share of pixels that end within
20 grey levels of the clean image is about 0.998, 0.995, 0.987 and 0.89 for
the noisy levels. At 1-3 % noise, the end-to-end tests find the same box, and
edge counts within a few pixels, as on clean images.

## Sobel magnitude

Gx and Gy are computed with the usual 3 x 3 kernels, as 11-bit signed values.
Their squares are summed into 22 bits, and `isqrt` takes the square root. The
root is a restoring digit-by-digit method that produces one result bit per
pipeline stage. A pixel is an edge where floor(sqrt(Gx²+Gy²)) > 125, that is,
where Gx²+Gy² ≥ 126². The threshold is the `EDGE_THRESH` parameter.

The threshold decides what counts as a boundary. `tb_sobel_thresholds` runs
one image through detectors set to 40, 125, 200 and 450. The test cap has a
bright rim and a printed ring of lower contrast. At 125 both show; at 200 and
above only the rim survives. At 40 the ring's lines grow thicker (432 edge
pixels on it instead of 312).

## Finding the cap: count registers

`position_detect` finds the cap's box with two `boundary_profile` count
registers:

- one register has an entry per column (depth W);
- the other has an entry per row (depth H).

Each edge pixel increments the entry for its coordinate. The entry is read,
one is added, and the sum is written back one clock later at the delayed
address. Along a row, every edge pixel hits the same row entry while the
previous write is still pending. A one-entry bypass forwards that pending
value, so the counts stay exact. The `bypass` output shows when it is used.

The first and last non-zero entries give left/right and top/bottom. They are
extracted while the frame runs: an entry read as zero is a coordinate that
holds an edge for the first time in this frame, and it widens the running
extent. When the frame ends, the extent is latched, so `pos_valid` pulses on
the clock after the data enable falls at the end of the last line. A frame
without any edge reports `found = 0`. Both registers are then cleared at one
entry per clock, in max(W, H) clocks, well within the vertical blanking.

Any stray edge pixel anywhere in the frame widens the box. The box is only as
good as the edge image.

## Ping-pong store, crop and front/back judgement

`pingpong_fb` holds two W x H one-bit banks. Frame *n* is written to bank
*n* mod 2, and `last_bank` names the bank that holds the last complete frame.

When the box of frame *n* arrives, `cut_control` records the box and that
bank. It then reads the box out while frame *n+1* is being written to the
other bank. The read order is:

1. A horizontal counter runs from `left` to `right`.
2. It returns to `left`, and the vertical counter steps down one row.
3. This repeats until the bottom-right pixel has been read.

Each pixel leaves as `crop_valid`/`crop_bit`, with its coordinates and
first/last markers.

A side counter adds up the crop's edge pixels. `judge` rises as soon as the
count reaches `SIDE_THRESH` (3000). After the last pixel, `side_valid` pulses
with `side_front = judge`. A printed front has many more edges than a plain
back. For a back, `flip_req` pulses at the same time; it is the command to
the actuator.

A worst-case crop (the whole frame) takes 307,200 clocks. That is less than
one frame period, so the crop always ends before its bank is overwritten. Two
cases are not expected in normal use and are flagged instead:

- A box that arrives while a crop is still running is dropped, and `overrun`
  pulses.
- A report without a box starts nothing, and `empty` pulses.

## Sizes

| item | size |
|---|---|
| frame | 640 x 480, 24-bit RGB in, 1-bit edges out |
| line buffers | 4 x 640 x 8 bits (two per 3 x 3 stage) |
| count registers | 640 x 9 + 480 x 10 bits |
| ping-pong store | 2 x 640 x 480 x 1 bits = 614,400 bits |
| crop output | box area x 1 bit; a 160 x 160 cap is 25,600 bits |

The ping-pong store stands in for two areas of external SDRAM. It is an
on-chip array with one read port and one write port. At 614,400 bits it is
larger than the block memory of a small FPGA such as a Cyclone IV EP4CE10
(423,936 bits). Without it, the design needs about 31,000 memory bits. To
target such a device, replace `pingpong_fb` with an SDRAM controller that
keeps the same two ports and the one-clock read latency, or the crop's
handling of read latency has to change.

## Where this RTL makes its own choices

- **Frame store.** On-chip memory stands in for SDRAM. The SDRAM controller,
  the buffering of raw camera frames and the link to the host PC are not part
  of this RTL. The stored camera frame is reached through the `pix_rd_*` port,
  and the results leave as plain ports.
- **Frame timing.** The porch and sync lengths are standard VGA values.
- **Position extraction.** How the first and last entries are found is not
  spelled out in the design. Here they are tracked as entries first become
  non-zero, and a sweep clears the registers after each frame.
- **Border rules and coordinate shift.** Described above.
- **Extra logic.** The read-after-write bypass in the count registers, the
  square-root method, the pipeline register placement, and the `overrun` and
  `empty` flags.

## Files

- `rtl/cap_pkg.sv`: stream type, default frame size and thresholds.
- `rtl/pix_counter.sv`: column/row recovery from the timing signals.
- `rtl/image_gen.sv`, `rtl/rgb2gray.sv`, `rtl/window3x3.sv`, `rtl/sort3.sv`,
  `rtl/median_filter.sv`, `rtl/isqrt.sv`, `rtl/sobel_edge.sv`: the pixel
  pipeline.
- `rtl/boundary_profile.sv`, `rtl/position_detect.sv`: the cap position.
- `rtl/pingpong_fb.sv`, `rtl/cut_control.sv`: the store, the crop and the
  judgement.
- `rtl/cap_inspect_top.sv`: the whole pipeline.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_median_noise.sv`: the median filter at five impulse-noise levels.
- `tb/tb_sobel_thresholds.sv`: the edge detector at four thresholds.
- `tb/cap_top_bench.sv`: scenario, reference model and checks for the
  end-to-end tests.
- `tb/tb_cap_inspect_top.sv`: the end-to-end test at 64 x 48.
- `tb/tb_cap_inspect_full.sv`: the end-to-end test at full size.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Build and run
one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cap_pkg.sv tb/tb_cap_inspect_top.sv --top-module tb_cap_inspect_top -Mdir build -o sim
./build/sim
```

Replace the name for any other testbench. Each one has a watchdog.

- **Unit tests.** Each drives its module with random and directed data and
  compares the outputs with values the testbench computes itself. Where a
  latency is fixed, the tests check the exact clock count.
- **End-to-end tests.** `tb_cap_inspect_top` (64 x 48, short blanking, front
  threshold 400) and `tb_cap_inspect_full` (all defaults, 640 x 480, caps of
  radius 80) each run five synthetic frames: a front cap, a back cap, an empty
  belt, a noisy front cap and a back cap. The testbench computes the expected
  edge image for each frame with an independent reference model of every
  stage. It checks the box, every crop pixel, the edge count, the judgement,
  the flip request, the frame latency and the box report one clock after
  the frame. It also counts, and requires, the
  row-count bypass, crops from both banks, front and back judgements, flip
  requests and the empty frame.
- **Run time.** The full-size test takes about half a minute.

## How far to trust it

- **What the tests cover.** The test images are synthetic: a disc with printed
  rings on a dim gradient belt. The tests show that the RTL computes exactly
  what the reference model computes. They say nothing about how well threshold
  125 or 3000 work on real camera images.
- **Untested paths.** The saturation path of the grey conversion is
  unreachable with the default weights. The `overrun` path is reached only by
  the crop controller's unit test.
- **Throughput.** The pipeline has no back-pressure. The consumer of the crop
  stream must take one pixel per clock.
