# Streaming ORB feature extractor

ORB (Oriented FAST and Rotated BRIEF) finds corners in an image and gives each
one a 256-bit binary descriptor that stays the same when the image is rotated.
Feature matchers and visual SLAM systems use these descriptors. This RTL does
the extraction in one pass over a video frame as the frame streams through an
FPGA:

- One pixel enters and one pixel leaves per clock.
- Only line buffers are stored; there is no frame buffer.
- Each keypoint leaves as a record holding its position, its orientation and
  its descriptor.

The design models a high-level-synthesis ORB accelerator that sits between
two AXI4-Stream video ports in a Zynq UltraScale+ system. Around it, a video
DMA moves frames between DDR memory and the streams, and the ARM processor
starts the accelerator over AXI4-Lite. Those surrounding parts are vendor IP
and are not included here. What is here is the accelerator itself:

```
 INPUT_STREAM (24-bit RGB, AXI4-Stream video)
   -> axis_video_in   start-of-frame sync, drops beats before tuser
   -> rgb2gray        Y = (77R + 150G + 29B + 128) >> 8
   -> gauss_filter    5x5 binomial smoothing, two line buffers' worth of rows
   -> patch_window    31x31 window over the smoothed image (30 line buffers)
   -> fast_detect     FAST-12 test on the window centre, radius-3 circle
        |-> axis_video_out   smoothed grey image, keypoints painted red -> OUTPUT_STREAM
        '-> kp_engine        copy of the 31x31 patch when the centre is a keypoint
              -> ic_angle    intensity-centroid orientation, 30 bins of 12 degrees
              -> rbrief      steered BRIEF, 256 tests
              -> kp_* record stream (x, y, bin, descriptor)
 axil_ctrl: AXI4-Lite registers (start/done/idle/ready, rows, cols, threshold, interrupt)
 orb_core: the pipeline and its handshake; orb_top: orb_core + axil_ctrl
```

## The pipeline and its one control signal

All streaming stages (grey conversion, smoothing, window and FAST) move
together, gated by a single enable, `adv`, in `orb_core`. Each clock in which
`adv` is high, one pixel enters the smoothing stage and every stage shifts by
one. `adv` is high only when all three of these hold:

1. **Input.** The input stream has a pixel. After the last pixel of the frame,
   the core feeds zero padding instead.
2. **Output.** The output register can take the pixel leaving the window
   centre. This is AXI4-Stream backpressure.
3. **Keypoint engine.** The window centre is not a keypoint arriving while the
   keypoint engine is still busy with the previous one. This is the *keypoint
   stall*.

The third condition is what makes a simple engine possible. The engine
describes one keypoint at a time, in 67 to 96 cycles. In most of an image,
keypoints are much further apart than that, so the engine never holds up the
stream. Inside a dense cluster of corners, the whole pipeline waits. No
keypoint is lost, and no FIFO of 31x31 patches is needed.

Every pixel carries a signed (row, column) *tag* through the stages, in
`orb_pkg::tag_t`. So position is never worked out by counting latencies:

- The smoothing stage knows where the image edge is.
- The window knows which position its centre holds.
- The output stage knows when to raise tuser and tlast.

The window centre trails the input by 17 rows and 17 columns, plus three
register stages:

- 2 rows and 2 columns of that come from the 5x5 filter.
- 15 rows and 15 columns come from the 31x31 window.

So after the last input pixel, the pipeline runs on padding for another
17 × cols + 20 cycles: the *flush*. During the flush `ap_ready` has already
pulsed, and the next frame's pixels are not yet taken.

## Corner test (FAST-12)

`fast_detect` looks at the 7x7 centre of the window. The 16 circle pixels at
radius 3 are numbered clockwise, starting straight above the centre:

- 1 is at (0,-3).
- 5 is at (3,0).
- 9 is at (0,3).
- 13 is at (-3,0).

For each circle pixel the block forms two bits:

- *bright*: `I_x >= I_p + t`
- *dark*: `I_x <= I_p - t`

The centre is a corner when 12 consecutive circle pixels, counted around the
circle with wrap-around, are all bright or all dark. The hardware checks this
by AND-ing each of the 16 possible 12-bit windows of the bright bits and of
the dark bits.

The threshold `t` is a register, 10 after reset. Keypoints are accepted only
where the whole 31x31 patch lies inside the image, so at least 15 pixels from
every edge. Non-maximum suppression and the Harris ranking of the software ORB
are not done. The number of keypoints is controlled by the threshold alone.

## Orientation without an arctangent

`ic_angle` works on a copy of the patch.

**Moments.** It first sums the two moments `m10 = Σ x·I` and `m01 = Σ y·I`
over the disc `x² + y² ≤ 225`, one patch row per cycle, so 31 cycles. Here x
points right and y points down.

**Angle bin.** The orientation `atan2(m01, m10)` is only needed as one of
30 bins of 12°, because the descriptor pattern is turned by multiples of 12°.
Bin k covers [12k − 6°, 12k + 6°). The block never computes the angle.
Instead, it tries the sectors k = 0, 1, … one per cycle. The moment vector
lies in sector k exactly when both of these are true:

- It is on or counter-clockwise of the sector's lower edge.
- It is strictly clockwise of the sector's upper edge.

Each edge test is the sign of one cross product with a unit vector (cos, sin)
of a multiple of 6°. These unit vectors are Q2.14 constants: a sixteen-entry
first-quadrant table in `orb_pkg::sin6_q1`, with the other quadrants taken by
symmetry. The search takes at most 30 cycles and uses no divider and no
CORDIC. A zero moment vector gives bin 0.

The bin is exact except when the true angle lies within a few hundredths
of a degree of a bin edge. There the fixed-point edge vectors can
decide for the neighbouring bin.

## Steered BRIEF

`rbrief` evaluates 256 point-pair tests, `BITS_PER_CYCLE` (8) per cycle, so
32 cycles plus one.

1. Both points of test i are turned by the keypoint angle θ = 12° × bin:
   - `x' = round(x cos θ − y sin θ)`
   - `y' = round(x sin θ + y cos θ)`

   The products use the same Q2.14 constants, rounded with `(v + 8192) >>> 14`.
2. The two intensities are read from the patch copy.
3. Descriptor bit i−1 is `I(p1) < I(p2)`.

The 256 point pairs come from `orb_pkg::brief_pattern()`. It is a fixed
pseudo-random set made by an integer hash. Every point lies within radius 13,
so a turned point never leaves the 31x31 patch. This is **not** the learned
pattern of the original ORB method. Descriptors from this core therefore match
each other, but they do not match OpenCV's. To use another pattern, replace
`brief_point()`. Each test is packed as {x1, y1, x2, y2}, 5-bit two's
complement each.

## Control and streams

`orb_top` exposes what an HLS-generated IP block would:

**AXI4-Lite control bus** (`s_axi_control_*`, 6-bit address):

| offset | register |
|---|---|
| 0x00 | bit 0 ap_start (write 1; clears when the core has taken the frame unless bit 7 auto-restart is set), bit 1 ap_done (sticky, cleared by reading), bit 2 ap_idle, bit 3 ap_ready, bit 7 auto_restart |
| 0x04 | global interrupt enable |
| 0x08 | interrupt enable: bit 0 done, bit 1 ready |
| 0x0C | interrupt status, write 1 to toggle |
| 0x10 | rows (12 bits, reset 1080) |
| 0x18 | cols (12 bits, reset 1920) |
| 0x20 | FAST threshold (8 bits, reset 10) |

The core samples rows, cols and threshold when it starts. They must stay
stable for the whole frame.

**Video streams** (`input_stream_*`, `output_stream_*`) are AXI4-Stream with
24-bit tdata and the usual side signals: tkeep, tstrb, tuser, tlast, tid and
tdest.

- **Input:** tuser marks the first pixel of a frame, and beats before it are
  dropped. Each input pixel is {R, G, B}, with R in bits 23:16.
- **Output:** each pixel is the smoothed grey value in all three bytes, or
  `PAINT_COLOR` (24'hFF0000) on a keypoint. tuser is set on the first pixel
  and tlast at the end of every line.
- **Pixels next to the edge:** pixels within 2 of an image edge are passed
  through unsmoothed.

**Keypoint records** leave on `kp_valid`/`kp_ready`/`kp` (`orb_pkg::kp_rec_t`,
285 bits), in raster order:

- x and y, 12 bits each
- bin, 5 bits (angle = 12° × bin)
- descriptor, 256 bits

A record is held until it is taken. The pipeline stalls behind it if needed.

**Handshake:**

- `ap_ready` pulses with the last input pixel.
- `ap_done` pulses when the last output pixel and the last record have both
  left.
- The interrupt follows ap_done (or ap_ready) when it is enabled.

## Throughput and size

Without keypoint stalls, a frame takes rows × cols + 17 × cols + 20 cycles.

| frame | cycles | at 100 MHz | at 121 MHz |
|---|---|---|---|
| 1920x1080 | 2,106,260 | 21.1 ms, 47 frames/s | 17.4 ms, 57 frames/s |
| 640x480 | 318,100 | 3.2 ms | |

Each keypoint that finds the engine busy adds up to about 96 cycles. For
example, 2000 keypoints that all stall would add 192,000 cycles in the worst
case: 1.9 ms at 100 MHz, for 23.0 ms per 1920x1080 frame in all. Sixty 1080p frames per second would need about 126 MHz.

**Parameters:**

- `MAX_COLS` = 1920 and `MAX_ROWS` = 1080 set the frame store.
  - `gauss_filter` holds 1920 × 4 bytes of line buffer.
  - `patch_window` holds 1920 × 30 bytes of line buffer.
  - Together these are about 520 kbit of RAM.
- The frame size is set at run time, up to the maximum.
- `BITS_PER_CYCLE` trades rbrief sampling logic against engine time.

The rest of the logic is small. The largest parts are:

- the 31x31-byte window and its copy in the engine;
- the 8 × 2 sample multiplexers of rbrief.

## Where this design departs from the accelerator it models

- The original accelerator uses the vendor's HLS video library for the
  Gaussian filter and FAST. Here both are written out, with these choices of
  their own:
  - the 5x5 binomial kernel with rounding;
  - the unsmoothed 2-pixel border;
  - the FAST compare on smoothed pixels.

  Output images therefore match the original only approximately.
- Harris scoring is not in hardware, as in the original. There is no image
  pyramid either: one scale only.
- The original accelerator shows no output for descriptors, beyond an "output
  descriptor" step in its flow. Here they leave on the extra `kp_*` record
  stream.
- Register addresses, reset values and the record format are this design's.
  So are these mechanisms:
  - the stall;
  - the flush;
  - the edge rule;
  - the sector search;
  - the BRIEF pattern.
- The 1920x1080 default comes from the original's cycle count (about
  2.11 million cycles per frame at one pixel per clock). It is not a stated
  frame size.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

- compares the module's outputs against a model written independently in the
  testbench;
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

`tb/orb_ref_pkg.sv` holds the shared reference functions: grey conversion,
FAST, moments, the atan2-based bin, and BRIEF.

| testbench | what it checks |
|---|---|
| tb_rgb2gray | the eight corner colours and 2000 random pixels |
| tb_gauss_filter | two frames of random pixels, random stalls, every smoothed pixel and the output lag |
| tb_patch_window | every window position against the image, the centre tag |
| tb_fast_detect | random windows, windows with a planted run of 11, 12 or 13, flat windows: every bright/dark bit and the corner flag |
| tb_ic_angle | 90 ramp directions (every bin) and random patches: moments exactly, bin, cycle count |
| tb_rbrief | random patches at every bin: all 256 bits and the 33-cycle latency |
| tb_kp_engine | patch capture, busy, record contents, record backpressure |
| tb_axis_video_in | drop before start of frame, order, idle tready |
| tb_axis_video_out | data, paint, tuser/tlast, held beats under backpressure |
| tb_axil_ctrl | every register, start/auto-restart, sticky done, interrupt enable/status |
| tb_orb_core | two frames of different size and threshold through the core's ap_ctrl ports |
| tb_orb_top | the same through AXI4-Lite and the interrupt |
| tb_orb_top_full | a 1920x1080 frame, then a 640x480 frame, with every parameter at its default (about 2.9 M cycles) |

The three system testbenches feed a synthetic scene: faint texture with bright
3x3 dots, which give clusters of keypoints. They compare:

- every output pixel;
- every keypoint's position, bin and descriptor.

The only exception is a keypoint whose angle lies within 0.002 of a bin width
from a bin edge. For those, the bin and descriptor are not compared.

Each system testbench also counts the core's mechanisms and fails if any
never happened:

- keypoint stall
- output backpressure
- record backpressure
- input starvation
- dropped pre-frame beats
- flush
- ap_ready
- done or interrupt

They also check the frame timing. Each frame must take exactly
rows × cols + 17 × cols + 20 pipeline advances. For 1920x1080 that is
2,106,260, within the 2,111,641-cycle latency of the accelerator this design
models.

The full-size run covered 3600 keypoints, 15 of them near a bin edge.

To simulate with Verilator (5.x), list the package first, then the modules:

```
verilator --binary --timing --assert --top-module tb_orb_top \
  rtl/orb_pkg.sv rtl/*.sv tb/tb_orb_top.sv
./obj_dir/Vtb_orb_top +verilator+rand+reset+2
```

Testbenches that use the reference functions also need `tb/orb_ref_pkg.sv`
ahead of the testbench file. These are tb_rgb2gray, tb_fast_detect,
tb_ic_angle, tb_rbrief and tb_kp_engine. The reduced testbenches set
`MAX_COLS`/`MAX_ROWS` to 64 and finish in seconds. The full-size one takes
under a minute.
