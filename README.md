# Streaming Viola-Jones face detector, with a Sobel filter example

This is RTL for a face detection accelerator built on the Viola-Jones method.
A 24x24 detection window slides over a grayscale image, one pixel at a time.
Each window position is scored by a cascade of Haar-feature classifiers. The
features are read from the window's integral image. Every feature threshold
is scaled by the window's standard deviation, so the result does not depend
on lighting. Most windows fail one of the first stages and cost only a few
cycles. A window that passes every stage is reported as a face.

The hardware is a chain of concurrent tasks. Pixels stream in, a line buffer
assembles image columns, and a pipelined integral-image unit keeps the integral
image of the current window. A fixed-point normalization unit computes the
lighting factor of the next window while a parallel cascade classifier is
still working on the previous one. Beside the detector sits a streaming 3x3
Sobel edge filter. It is the smaller window-based design the same style was
first shown on, and it shares the line buffer module.

The design follows a published accelerator: a Viola-Jones detector built with
C-based high-level synthesis for a Zynq-7000 board, running at 125 MHz. That
description gives the division into tasks, the two-stage integral image, the
fixed-point normalization, the parallel classifier and the 320x240 and 640x480
image sizes. It does not give widths, handshakes, table formats or the internal
circuits. Those are this design's own, and each source file's header says
which parts are which.

## Files

| file | contents |
|---|---|
| `rtl/fd_pkg.sv` | word sizes, fixed-point format, `rect_t`, `weak_t`, `stage_t` |
| `rtl/line_buffer.sv` | row buffer that returns the image column ending at each pixel |
| `rtl/integral_image.sv` | sliding-window integral image, sum and squared sum |
| `rtl/image_normalization.sv` | serial fixed-point `sqrt(N*sqsum - sum^2)` |
| `rtl/haar_classifier.sv` | one weak classifier (combinational) |
| `rtl/cascade_classifier.sv` | window snapshot, cascade tables, PAR classifiers, stage control |
| `rtl/face_detector.sv` | the detector pipeline |
| `rtl/sobel_filter.sv` | 3x3 Sobel filter |
| `rtl/vj_accel_top.sv` | top: detector and Sobel filter side by side |
| `tb/fd_ref_pkg.sv` | pixel-level reference model, cascade and image generators |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two end-to-end ones |

## Dataflow of the detector

```
 pix stream ──► line_buffer ──column of 24──► integral_image ──window──► cascade_classifier ──► detections
 (valid/ready)  (23 rows x MAX_W)             stage 1: vertical sums      (snapshot, 4 classifiers
                                              stage 2: horizontal slide    per cycle, early exit)
                                                   │ sum, sqsum                    ▲
                                                   └──► image_normalization ──────┘
                                                        (factor of the waiting window)
```

One pixel per cycle enters while the classifier keeps up. Each pixel at
column >= 23 and row >= 23 completes a window, and every such window is
classified. Window positions are reported as the window's top-left corner in
the image being streamed. Detection runs at one scale only. To find faces of
other sizes, the host streams the same frame resized.

## The sliding integral image

A window's integral image `ii[r][c]` is the sum of the window pixels in rows
`0..r` and columns `0..c`. It is kept in 24x24 registers of 18 bits. It is not
rebuilt for each window. When the window moves one column right, the
integral image is updated in two accumulation stages:

1. **Vertical.** The incoming column of 24 pixels is summed top-down into
   `vp[r]`. The sum of its squares is formed at the same time.
2. **Horizontal.** Every entry drops the column that leaves the window and
   moves one column left: `ii[r][c] <= ii[r][c+1] - ii[r][0]`. The new last
   column is `ii[r][23] - ii[r][0] + vp[r]`.

In terms of column differences, each step shifts the differences left by one
and appends the new column. After 24 steps the array is therefore exact,
whatever it held before. The arithmetic is modular in 18 bits and every true
value fits in 18 bits, so no wrap-around can corrupt a result. This is why the
window can run straight on from the end of one image row into the next without
clearing. Windows that straddle two rows are simply never flagged valid. The
squared sum is kept as a running sum over a 24-deep shift register of column
square sums. The pixel sum is `ii[23][23]`.

Both stages sit behind one valid/ready handshake. The window of a column is
available two cycles after the column is accepted. While a finished window
waits for the classifier, the whole unit holds and so does the pixel stream.

## Normalization in fixed point

With N = 576 pixels and window variance sigma², a feature compared with
`t * sigma` after dividing by the window area is the same as comparing the raw
feature with `t * N * sigma`. This design uses the integer form:

```
stddev = floor( sqrt( N*sqsum - sum^2 ) )      (36-bit radicand, 18-bit root)
```

The radicand is exact, so nothing is rounded before the root. The root is
taken one bit per cycle by the digit-by-digit method (compare, subtract,
shift, with no multiplier in the loop). It takes 20 cycles from `start` to
`done`. This trades speed for area. The unit starts on the window waiting at
the integral-image output, so its latency overlaps the classification of the
window before.

## Haar classifiers and the cascade tables

A weak classifier (`weak_t`, 156 bits) has three rectangles, a threshold and
two votes. A rectangle is `x, y, w, h` (5 bits each, window coordinates) and a
signed 16-bit weight. A zero weight switches a rectangle off. The unit computes

```
F = Σ weight_i * RectSum_i           (RectSum from 4 integral-image reads)
vote = (F < thr * stddev) ? left : right
```

Weights, thresholds and votes are 16-bit signed with 12 fraction bits. A
weight of -1 is `-4096`, 2 is `8192` and 3 is `12288`. A stage threshold
(`stage_t.thr`, 20 bits) is on the same scale as the votes. With this
scaling, the thresholds of a conventional trained cascade apply directly. Such
a cascade uses integer rectangle weights and compares the area-normalised
feature with `threshold * sigma`.

The cascade is data. The host writes it into two tables:

- **Weak table.** `PAR` banks of `MAX_GROUPS` entries. Group `g` holds one
  classifier in each bank, and the `PAR` classifiers of a group are evaluated
  in the same cycle. A stage whose size is not a multiple of `PAR` is padded
  with entries whose two votes are zero. Write with `cfg_weak_we`,
  `cfg_lane` (bank) and `cfg_group`.
- **Stage table.** `MAX_STAGES` entries of `{first group, group count,
  threshold}`. Write with `cfg_stage_we` and `cfg_stage_addr`. The
  `num_stages` input sets how many stages are used.

The tables have no read port to the host and no reset. Load them before
streaming pixels, and change them only while `idle` is high.

### Stage control

The classifier copies the window's integral image (a second 24x24 register
array) and its factor. Then, for each stage:

- it reads one group per cycle from the weak table (one cycle of read latency);
- it adds the `PAR` votes to the stage sum;
- it compares the sum with the stage threshold.

A stage of G groups costs G + 2 cycles. A sum below the threshold rejects the
window at once. Passing the last stage raises `det_valid` with the window's
corner, which holds until `det_ready`. After every window, `done_valid` pulses
with `done_stages` (stages passed) and `done_face`.

## Throughput and stalls

The classifier takes the waiting window when both of these hold:

- it has finished the previous window;
- the normalization factor of the new window is ready.

Until then the integral image, the line buffer and the pixel stream stall
(`pix_ready` low). A window thus costs about max(22, 2 + Σ(G+2)) cycles. A
window rejected by a two-group first stage is limited by the normalization,
which needs about 22 cycles per window. In the end-to-end simulation with a random 10-stage cascade, one scale took
1.67 M cycles for a 320x240 frame (about 75 frames/s at 125 MHz) and
7.27 M cycles for a 640x480 frame (about 17 frames/s). Real cascades reject
most windows in the first two stages, so the normalization rate is the bound.
The published design reaches 61 frames/s at 320x240 and 14 frames/s at
640x480 over all scales. Matching that here would take a faster root (for
example two bits per cycle or a pipelined root) or a larger `PAR`.

## Sobel filter

`sobel_filter` streams an image with run-time size `img_w x img_h`. It keeps two
rows in a `line_buffer` and a 3x3 register window. For each pixel at row and
column >= 2 it outputs `min(255, |Gx| + |Gy|)` for the window centred one row
up and one column left. Border pixels give no output, so a W x H image gives
(W-2) x (H-2) results in raster order. The result appears two cycles after the
pixel is accepted, at one pixel per cycle.

## Top-level interface (`vj_accel_top`)

Parameters and their defaults: `MAX_W = 640`, `MAX_H = 480`, `PAR = 4`,
`MAX_GROUPS = 1024` (4096 weak classifiers) and `MAX_STAGES = 32`.

| port group | signals | notes |
|---|---|---|
| image size | `fd_img_w[9:0]`, `fd_img_h[8:0]` | 24..MAX_W, 24..MAX_H; change only while `fd_idle` |
| pixels | `fd_pix_valid`, `fd_pix_ready`, `fd_pix[7:0]` | raster order, frames back to back |
| tables | `fd_num_stages`, `fd_cfg_*` | see above |
| detections | `fd_det_valid`, `fd_det_ready`, `fd_det_x`, `fd_det_y` | window top-left corner |
| per window | `fd_done_valid`, `fd_done_face`, `fd_done_stages` | status pulse, no handshake |
| status | `fd_idle` | no pixel or window in flight |
| Sobel | `sb_img_w`, `sb_img_h`, `sb_in_*`, `sb_out_*` | valid/ready streams |

All logic runs on one clock with a synchronous active-high reset. The host
processor, its register interface and DMA are outside this RTL. They connect
to these plain ports.

## Verification

Each module has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
(`tb/fd_ref_pkg.sv`) works from raw pixels, not from integral images:

- rectangle sums are added pixel by pixel;
- the factor is found by binary search;
- the cascade is evaluated stage by stage.

Cascades are random balanced two- and three-rectangle features. Their stage
thresholds are tuned on the test image so that windows leave at every stage.
The test images mix a gradient, noise, a flat block (variance zero) and a
bright square.

| testbench | what it covers |
|---|---|
| `tb_line_buffer` | column output over three frames with idle cycles |
| `tb_integral_image` | every entry of every window integral image, squared sum, position, 2-cycle latency, stalls |
| `tb_image_normalization` | root of random, flat and extreme windows; 20-cycle latency |
| `tb_haar_classifier` | votes and branch for 400 random features |
| `tb_cascade_classifier` | stages passed, decisions, detection handshake, G+2 cycles per stage |
| `tb_face_detector` | two frames at reduced size, every window and detection, mechanism counts |
| `tb_sobel_filter` | every output of two frames, saturation, stalls, latency |
| `tb_vj_accel_top` | default-parameter top, small frames of two sizes plus a Sobel frame |
| `tb_vj_accel_full` | default-parameter top, a 320x240 and then a 640x480 frame (about 350,000 windows), plus a 640-wide Sobel frame |

The end-to-end tests count stalls, rejections after each stage, detections,
held detections, flat windows, the change of frame size and Sobel
saturation. A mechanism that never occurs counts as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --assert -Irtl -Itb --top-module tb_face_detector \
    rtl/fd_pkg.sv tb/fd_ref_pkg.sv tb/tb_face_detector.sv
./obj_dir/Vtb_face_detector
```

For `tb_vj_accel_top` and `tb_vj_accel_full`, also list `tb/tb_vj_accel_run.sv`.
The full-size run takes about a minute.

## Limits and departures

- **Trained cascade.** None is included. The tests use random cascades, so
  detection accuracy on real faces has not been measured here.
- **One scale.** There is no image scaler. Multi-scale detection needs the
  host to stream resized frames.
- **Throughput.** Per scale, the rate is bounded by the serial square root, as
  described above. The published frame rates are not reproduced.
- **Parallelism.** `PAR = 4` classifiers per cycle, the table layout, the Q12
  fixed-point format and the three-rectangle limit are choices of this design.
  `PAR` is a parameter. Each lane adds twelve 625-to-1 read multiplexers on
  the window snapshot, and these dominate the logic.
- **Sobel filter.** The standard kernels and the |Gx|+|Gy| magnitude are
  assumed.
