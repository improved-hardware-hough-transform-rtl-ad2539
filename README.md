# Streaming Hough-transform line detector

This design finds straight lines in a live 640 x 480 video stream. It
processes one pixel per clock and stores no frame. Every pixel of the edge
image votes for all sampled line angles in the same clock. This works
because the Hough space is split into one small memory per angle: the
memories never compete for a port, so the throughput does not depend on how
finely the angle is sampled. At 90 angles (2 degree steps) the voting array
uses 90 memories of 1024 x 10 bits (921,600 bits).

A line is written in normal form. The normal from the image centre to the
line has angle `a` and length `rho`, and a pixel `(x, y)` lies on the line
when

    rho = sin(a) * (y - 240) + cos(a) * (x - 320)

Each edge pixel adds one vote to the cell `(a, rho)` of every line that
could pass through it. Cells with many votes are lines in the image.

## Processing path

```
camera ──> cam_capture ──> edge_extract ──> hough_transform ──> draw_line x N ──> img_mx ──> overlay stream
 (vsync,     posX/posY,      Prewitt,         N x single_angle_    strongest rho     lines painted
  href,      colour, grey    binary image     hough (voting,       per angle,        over the colour
  RGB565)                                     read-out, clear)     drawn next frame  image
```

`hough_ips` is the top level. It brings out three video streams for a
display stage, which is not part of this RTL:

* the camera image (`cam_*`);
* the binary edge image (`ee_*`), 2 clocks behind the camera image;
* the image with the lines drawn in (`mx_*`), 3 clocks behind.

It also brings out the detected line of each angle (`line_on`, `line_rho`,
`line_votes`).

## The pixel stream

Every block sees the image as a stream of `(posX, posY)` coordinates, one
per clock. The value 0 has a special meaning in each coordinate:

| posX   | posY   | meaning |
|--------|--------|---------|
| 1..640 | 1..480 | image pixel |
| 0      | any    | horizontal blanking (no vote) |
| any    | 0      | vertical blanking: the voting blocks read out and clear their memories |

`cam_capture` produces this stream from the sensor's `vsync`/`href`
signals:

* `posY` is 0 from `vsync` until the first line of the frame.
* `posY` counts up at the start of each line and holds its value through
  that line's horizontal blanking.
* Pixels beyond the 640th of a line, and lines beyond the 480th, are
  reported as blanking.

**Timing requirement.** Each vertical blanking (`posY = 0`) must last at
least 1027 clocks, so that every memory can be read out in full. The
VGA-like timing used in the testbench (784 clocks per line, 20 lines from
`vsync` to the first image line) gives 15,680 clocks.

## Voting for one angle (`single_angle_hough`)

This block holds most of the design's logic. Each instance gets two signed
9-bit constants, `sin_q = floor(sin(a)*128)` and `cos_q = floor(cos(a)*128)`.

### Fixed-point rho

The block computes `P = sin_q*(y-240) + cos_q*(x-320)`, which is rho scaled
by 128. The memory address is `P[16:7]`, the integer part of rho as a
10-bit two's-complement number. Measuring from the image centre keeps
`|rho| <= 400`:

* positive rho uses addresses 0..400;
* negative rho wraps to addresses 624..1023.

So one memory covers both angle `a` and `a + 180` degrees. No adder or
subtractor is needed to form the address. About 220 of the 1024
words are never used. A 10 kbit embedded RAM block holds the array in either case.

### Pipeline

The block takes one pixel per clock and never stalls:

| cycle | voting (posY != 0) | read-out (posY == 0) |
|-------|--------------------|----------------------|
| 0 | pixel on the inputs; a vote if `edge_bin` and `posX != 0` | address counter k |
| 1 | `rho` registered; RAM read issued | RAM read of word k |
| 2 | RAM word + 1 written back | word k captured, 0 written back |
| 3 | — | `vote = {sin_q, cos_q, k, count}`, `vote_valid = 1` |

**Forwarding.** Neighbouring edge pixels often fall into the same rho cell.
For example, every pixel of a horizontal line has the same rho at 90
degrees. The RAM returns the old word when a read and a write hit the same
address at the same edge, so the block keeps the word it just wrote. If the
next read-modify-write targets the same address, it uses that word instead
of the RAM output. With a one-cycle RAM this single register is enough, and
no vote is ever lost.

**Read-out.** Read-out starts with the first `posY = 0` clock. Word `k`
appears on `vote` exactly `3 + k` clocks later, on 1024 consecutive clocks,
and every word read is written back as 0. The read-out runs once per
blanking period and restarts only after `posY` has left 0.

**Counter width.** Counters are 10 bits and saturate at 1023. At 640 x 480
no cell can collect more than about 960 votes (the densest case is near 45
degrees), so saturation only matters for other inputs.

**Reset.** The memory is not reset. The first vertical blanking after reset
clears it. The read-out during that first blanking carries meaningless
counts.

## Angle resolution (`hough_transform`)

`hough_transform` places `N_ANGLES` voting blocks side by side, one per
angle. Block `k` gets angle `a_k = k * 180 / N_ANGLES` degrees. The
constants are computed at elaboration as `floor(trig(a_k) * 128)` with
`$sin`/`$cos`. A bias of 1e-9 is added before the floor, so that exact
values such as 64 for 30 degrees survive floating-point rounding. Some
values:

| angle | sin_q | cos_q |
|-------|-------|-------|
| 0     | 0     | 128   |
| 30    | 64    | 110   |
| 90    | 128   | 0     |
| 120   | 110   | -64   |

All blocks run in lock step. Their read-outs come out together on
`votes[k]` / `vote_valid[k]`.

| N_ANGLES | step | voting memory |
|----------|------|---------------|
| 180 | 1 deg  | 1,843,200 bits |
| 90 (default) | 2 deg | 921,600 bits |
| 36  | 5 deg  | 368,640 bits |
| 12  | 15 deg | 122,880 bits |

Throughput is one pixel per clock at every size: 307,200 image clocks per
frame. At 275 MHz that would be about 895 frames/s. The clock rate is a
property of the implementation technology and is not checked by the
simulations here.

## Timeline of a frame

1. **Frame n.** Edge pixels vote in all angle memories.
2. **Vertical blanking after frame n.** Each memory streams its 1024 counts
   and clears itself. The `draw_line` block of each angle keeps the cell
   with the most votes (the first one on ties). When the read-out ends, it
   publishes that cell's rho, but only if the cell has at least `MIN_VOTES`
   votes.
3. **Frame n+1.** Each `draw_line` block evaluates the same rho formula for
   every pixel, using the sin/cos constants carried in the vote record. It
   marks the pixels whose rho equals the published one, which are the
   pixels that would have voted for that line. `img_mx` ORs the marks of
   all angles and paints those pixels in `LINE_COLOR`.

So the lines drawn over a frame are the ones found in the previous frame,
with at most one line per angle.

## Edge extraction (`edge_extract`)

Edges are found with the Prewitt operator:

* Two 640-byte line buffers and a 3 x 3 register window hold the
  neighbourhood of each pixel.
* `Gx` is the right column sum minus the left column sum.
* `Gy` is the bottom row sum minus the top row sum.
* A pixel is an edge when `|Gx| + |Gy| >= EDGE_THRESHOLD` (default 120).

The window that ends at input pixel `(x, y)` is centred on `(x-1, y-1)`.
Its result is reported at `(x, y)`, two clocks later. This keeps the
blanking positions of the stream intact, but the binary image is shifted by
one pixel to the right and down. The detected lines therefore sit up to
about 1.4 pixels from the true edges. Pixels with `x < 3` or `y < 3` are
never edges.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| hough_ips, hough_transform | N_ANGLES | 90 | angles sampled over 180 degrees |
| hough_ips, edge_extract | EDGE_THRESHOLD | 120 | Prewitt magnitude threshold |
| hough_ips, draw_line | MIN_VOTES | 120 | fewest votes for a line to be drawn |
| hough_ips, img_mx | LINE_COLOR | 16'h07E0 (green) | RGB565 colour of drawn lines |

Image size (640 x 480), centre (320, 240) and operand widths are constants
in `hough_pkg`. The 10-bit rho address assumes `|rho| < 512`.

## What is fixed and what is chosen

These parts follow the published architecture:

* one voting block per angle, fed the same stream;
* trig constants `floor(x*128)` fixed before synthesis;
* coordinates measured from the image centre;
* the 10-bit rho address taken from the scaled product;
* 1024 x 10 memories;
* voting while `posY != 0`, and read-out with clearing while `posY = 0`;
* a 38-bit vote record `{sin, cos, rho, count}`;
* 90 angles at 2 degrees as the main configuration;
* the chain camera -> edge extraction (Prewitt) -> Hough -> line drawing ->
  overlay.

These are this design's own choices:

* the one-cycle RAM with forwarding (the published pipeline is three stages
  deep and does not say how back-to-back votes to one cell are handled);
* counter saturation;
* the reset scheme;
* the sensor interface (one RGB565 pixel per clock with `vsync`/`href`) and
  the grey conversion `(77R + 150G + 29B) / 256`;
* the Prewitt threshold, magnitude form and one-pixel shift;
* everything inside `draw_line` (peak search, threshold, one line per
  angle);
* the OR-and-paint rule and colour of `img_mx`;
* the `line_*` result ports.

**Not included.** The whole path runs on one clock input. Producing the
pixel clock from the camera, assembling the sensor's bytes into pixels, and
the video output stage are outside this RTL. The output stage runs on its
own clock, and its stream selection and encoding are not specified here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one computes its
expected values independently, mostly in real arithmetic, and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it covers |
|-----------|----------------|
| tb_vote_ram | random read/write against a model, read-during-write returns the old word |
| tb_single_angle_hough | random pixels, long same-rho runs (forwarding), >1023 votes (saturation), all 1024 words with exact timing, clearing |
| tb_hough_transform | 180, 90, 36 and 12 angles (1, 2, 5, 15 degree steps) on the same full 640 x 480 frame, every word of every angle, lock step, one pixel per clock |
| tb_cam_capture | two frames of sensor timing, clipping of long lines and extra lines, grey values |
| tb_edge_extract | two frames of a noisy checkerboard, every output bit against a software Prewitt |
| tb_draw_line | planted peaks, ties, below/at threshold, negative rho, every drawn pixel |
| tb_img_mx | random pixels and line bits over 8 angles |
| tb_hough_ips | the full design at default size (90 angles) over three frames (see below) |

The full-design test, `tb_hough_ips`, runs three frames with VGA-like
timing showing two different polygons. It rebuilds edges, Hough tables,
peaks and overlay in software, and checks:

* all 90 detected lines after each read-out;
* every overlay pixel;
* the 3-clock overlay latency;
* the frame time.

It also counts how often forwarding, read-out, detection, rejection and
painting happened, and fails if any of them never did. It runs in a few
seconds.

Each testbench has been shown to fail when its module is broken in one
relevant way (for example, with forwarding removed, or the colour stream
misaligned by one clock).

## Simulating

With Verilator 5 (packages first, modules found through `-y`):

```
verilator --binary --timing -Irtl -y rtl rtl/hough_pkg.sv tb/tb_hough_ips.sv \
          --top-module tb_hough_ips
./obj_dir/Vtb_hough_ips
```

Replace `tb_hough_ips` with any other testbench name to run it. To see
that nothing depends on power-up values, add `+verilator+rand+reset+2` to
the compile and a seed (`+verilator+seed+N`) at run time.

## Files

* `rtl/hough_pkg.sv`: constants, types, trig and rho functions
* `rtl/vote_ram.sv`: 1024 x 10 dual-port memory
* `rtl/single_angle_hough.sv`: voting, read-out and clearing for one angle
* `rtl/hough_transform.sv`: array of voting blocks
* `rtl/cam_capture.sv`: sensor stream to coordinates
* `rtl/edge_extract.sv`: Prewitt edge detection
* `rtl/draw_line.sv`: per-angle peak search and line drawing
* `rtl/img_mx.sv`: overlay
* `rtl/hough_ips.sv`: top level
* `tb/tb_*.sv`: testbenches
