# Recursive augmented-reality video pipeline

A camera looks at a scene in which four coloured markers (blue, green, red,
yellow) outline a quadrilateral, for example the corners of a sheet of paper
or a picture frame. The hardware finds the four markers in every video frame,
and pastes a shrunken, perspective-skewed copy of the picture that is on the
monitor *right now* into that quadrilateral. The result goes back to the
monitor. Because the pasted picture already contains the previous paste, the
output is recursive: a picture inside a picture inside a picture, like
pointing a camera at its own monitor, but with the geometry under the
markers' control.

All of it is a single-clock pipeline around a frame store of three 640x480
images held in two external ZBT SRAMs:

```
 BT.656 bytes ─► ntsc_capture ──(pixels)──► capturing image ─┐
                    │  (marker pixels)                       │ rotate every frame
                    ▼                                         ▼
            object_recognition ──corners──► arbi_skew ──► processing image
                    │                          ▲              │
                    └──► lpf_factor ──M──► arbi_lpf ◄── displaying image ──► vga_write ─► VGA
```

Every captured frame the three images change roles:
processing → displaying, displaying → capturing, capturing → processing.
So the image the skew has just finished drawing goes on screen, the image
that was on screen is overwritten by the camera, and the freshly captured
camera frame becomes the background the next overlay is drawn onto.

## Pixel format and colour handling

Pixels are stored as hue/saturation/value, 8 bits each (`hsv_t` in
`ar_pkg`). Hue runs 0..255 for a full turn: red 0, yellow 43, green 85,
blue 171. HSV makes marker detection a simple window on hue plus minimum
saturation and value, independent of how bright the room is.

* `ycrcb_to_hsv` — 3-cycle pipeline. BT.601 studio-range Y/Cb/Cr to R/G/B
  with Q8 coefficients, then the hexcone HSV formulas (43 hue steps per
  sector, one division each for S and H in the last stage). Accurate to
  ±2 counts against a floating-point reference.
* `hsv_to_rgb` — combinational, at the VGA output. The sector is taken from
  `h*6` (bits 10:8) so that the six sectors split the 256-step wheel evenly.

## Capture (`ntsc_capture`)

The input is the 8-bit ITU-R BT.656 stream that a video decoder chip
produces from the composite camera signal (`tv_valid` marks a byte,
`tv_data` holds it). The block finds the FF 00 00 XY timing codes, takes the
F, V and H bits from XY, pairs Cb Y Cr Y bytes into pixels, and keeps 640 of
the 720 active samples per line starting at `H_START`. The two interlaced
fields are woven together: row = 2·line + F. Each pixel is converted to HSV
and written to the capturing image through the frame store's write port.

Pixels whose saturation is at least `S_MIN`, value at least `V_MIN`, and hue
within `HUE_TOL` of one of the four marker hues are reported on
`det_valid/det_color/det_xy`. `frame_done` pulses when vertical blanking
starts after the second field; this pulse rotates the frame store and ends
the object-recognition frame.

The camera cannot be stalled. If the frame-store write port has not accepted
the previous pixel by the time the next one arrives, the pixel is dropped
and the sticky `overrun` flag is set. With the arbitration below this does
not happen; the top-level tests check the flag stays low.

## Marker centres (`object_recognition`)

For each colour the block keeps a pixel count and the sums of x and of y
over one frame. At `frame_done` the sums are latched and one shared
restoring divider computes the eight averages (29 cycles each, about 240
cycles in total, negligible against a frame). The four corners and the
`found` mask are published together with a one-cycle `coords_valid`; a
colour that had no pixels keeps its previous corner and has its `found` bit
cleared. The colours map to the corners as

| colour | corner | position |
|--------|--------|----------|
| blue   | A'     | top left |
| green  | B'     | top right |
| red    | C'     | bottom right |
| yellow | D'     | bottom left |

## The frame store (`zbt_memory`)

This is the hub of the design and the part that sets its throughput.

**Layout.** The three images live in two SRAMs of 512K 24-bit words. Even
pixels go to SRAM 0 and odd pixels to SRAM 1, at word
`image·(W·H/2) + index/2`, so each chip holds half of every image and the
two chips can serve two pixels in one cycle. Clients use relative pixel
indices (`y·W + x`) and never see which physical image they touch:
`role_buf` maps the roles capture/process/display to physical images and
rotates on `frame_swap`.

**Clients.** Five ports compete for each chip:

| port | role | image |
|------|------|-------|
| `cap_wr_*` | camera pixels | capturing |
| `prw_*` | skewed pixels from `arbi_skew` | processing |
| `prr_*` | read port for the processing image (no internal user; brought out at the top) | processing |
| `vga_*` | display reads | displaying |
| `lpf_*` | 16-pixel windows for `arbi_lpf` | displaying |

Each chip has its own round-robin arbiter, so no port can starve another.
`ack` is the combinational grant: a request is accepted in the cycle `ack`
is high, and must be held with the same index until then (assertions check
this and that grants are one-hot).

**Timing.** The SRAMs are pipelined ZBT parts: the address goes out at
clock edge *k*; write data is driven and read data returns two cycles later.
A four-deep tag pipeline records who issued each access so that returning
data is routed back. A single read's `rvalid` pulse comes on the fourth edge
after the accepting edge.

**Windows.** The filter port asks for 16 pixels at once (8 per chip when
the window is evenly split). `lpf_ack` goes high in the cycle the last of
its accesses is granted, so `arbi_lpf` can put the next window up while the
previous one is still coming back; `lpf_rvalid` pulses once per window, in
order, with all 16 pixels in `lpf_rdata`.

## Low-pass filter (`arbi_lpf`)

Shrinking an image by a factor M without filtering aliases badly, so each
source pixel is low-pass filtered with a cutoff of about π/M before it is
skewed. The 2-D kernel is the outer product of a symmetric 4-tap filter
`[a b b a]`, so it has only four distinct weights (a², ab, b², with ab
appearing twice). Pixels sharing a weight are added first; each of H, S and
V then needs four multiplications, 12 per pixel.

The taps for M = 1..8 are 4-tap equiripple (Parks–McClellan) low-pass
designs with band edges at 0.5/M ∓ 0.15 cycles/sample, rounded so that
2a + 2b = 128. The 2-D gain is therefore exactly 2¹⁴ and the result is
bits 21:14 of the accumulator.

| M | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| a | 0 | 14 | 21 | 23 | 26 | 27 | 29 | 30 |
| b | 64 | 50 | 43 | 41 | 38 | 37 | 35 | 34 |

The window covers rows y−1..y+2 and columns x−1..x+2, clamped at the image
border, so it is centred half a pixel right of and below the pixel. The
filtered pixel appears two cycles after the window returns. `busy` is high
while a window is waiting for its grant; the next pixel can be requested in
the cycle the current window is granted, so windows follow each other
without a gap. A pixel then costs 8 clock cycles when the memory is
otherwise idle (16 reads on two SRAMs), 12 in the first and last columns,
where clamping puts 12 of the reads on one SRAM. A whole 640x480 frame
takes 2.46 M cycles, 8.0 per pixel, inside a budget of 9 per pixel
(30.7 ms at 90 MHz).

`lpf_factor` chooses M from the corners: the smallest M in 1..8 with
M × w ≥ 640 and M × h ≥ 480, where w is the larger horizontal extent of the
top and bottom edges (A'B', D'C') and h the larger vertical extent of the
left and right edges (A'D', B'C').

## Skew (`arbi_skew`)

The skew walks the whole source image once per frame and writes every
source pixel (o_x, o_y) to a point inside the quadrilateral, using three
iterator points:

* I_A starts at A' and moves along A'D' by (D'−A')/480 per source row;
* I_B starts at B' and moves along B'C' by (C'−B')/480 per source row;
* I_C starts at I_A each row and moves by (I_B−I_A)/640 per source pixel.

Source pixel (o_x, o_y) is asked from the filter and written at
round(I_C). The steps are vectors, so no angles, sines, cosines or square
roots are needed; the divisions by 640 and 480 are multiplications by
24-bit reciprocals, two per row. All points carry 16 fraction bits.
Destinations outside the screen are skipped. The walk writes one
destination per source pixel, so it assumes every side of the quadrilateral
is shorter than the original image's side; a larger quadrilateral is drawn
with gaps.

Requests to the filter go out combinationally (`lpf_req`/`lpf_xy`) whenever
the filter is not busy and a slot is free in a four-entry queue; each slot
holds the destination index until its filtered pixel returns and has been
written. `done` pulses after the last write.

Measured at full size (640x480, with the camera and the display running at
the same time) a frame takes 3.09 M cycles, about 10.1 cycles per pixel:
25.8 ms at a 120 MHz clock, which fits in the 33.4 ms of one NTSC frame
(the clock must be at least about 93 MHz for this).
The skew starts when `coords_valid` arrives with all four markers found;
the frame store rotates at the next `frame_done`.

## Display (`vga_write`)

Standard 640x480 at 60 Hz timing (16/96/48 horizontal and 10/2/33 vertical
porch/sync/porch, 800x525 total) driven by `pix_ce`, an enable at the
25.175 MHz pixel rate. A 16-entry FIFO prefetches pixels of the displaying
image through the frame store's VGA port, so memory contention does not
disturb the picture; it is flushed at the end of the visible area and
refilled from pixel 0 during vertical blanking. `underflow` is a sticky
flag for a visible pixel that found the FIFO empty.

## Top level (`ar_system`)

`ar_system` connects the blocks as in the diagram above. Its ports are the
camera byte stream, the VGA signals (with `vga_pix_ce` as input), the two
SRAM buses, the unused processing-image read port, and status outputs
(`frame_done`, `display_buf`, `corner`, `corners_found`, `lpf_m`,
`skew_busy`, `skew_done`, `capture_overrun`, `vga_underflow`). Parameters
`IMG_W`, `IMG_H`, `RAM_AW`, `H_START` and the VGA porches default to the
full-size values.

## Where this design departs from the original proposal

* **One clock.** The proposal runs the memory at about 120 MHz and the
  processing at about 90 MHz with a separate VGA clock. Here everything is
  one clock; the camera and VGA rates come in as enables (`tv_valid`,
  `vga_pix_ce`). A multi-clock build would need FIFOs at those two edges.
* **HSV, not RGB, in memory.** The proposal speaks both of RGB images and of
  converting to HSV; HSV is stored, and `hsv_to_rgb` sits in front of the
  DAC.
* **The filter reads the displaying image.** This is what makes the output
  recursive; the processing-image read port has no internal user.
* **Vector steps instead of trigonometry.** The proposal moves the iterator
  points by distances along lines using sine/cosine/arctangent tables and a
  square root. Stepping by (end − start)/N gives the same points with two
  multiplications per row.
* **Step size.** As in the proposal the steps divide by the full width and
  height, so the last column and row land one step short of the far edges.
* **Forward mapping.** Source pixels are pushed to rounded destinations;
  occasionally a destination pixel receives no source pixel (about 3 of
  139 000 in the full-size test) and keeps its camera content.
* **Filter details the proposal leaves open:** the coefficient values, the
  range 1..8 of M, how M is chosen (from the corners), the half-pixel window
  offset, border clamping, and linear filtering of hue across the red
  wrap-around (a marker-free picture is not affected much, but hue near red
  can smear).
* **Pixel interleaving** across the two SRAMs by pixel parity, the ZBT
  pipelining and the round-robin arbiters are this design's own.
* **VGA pixel clock** is the standard 25.175 MHz.

## Simulating

Everything runs with Verilator 5 (`--timing` is needed for the testbench
delays). The package must come first. For block `X`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ar_pkg.sv tb/tb_X.sv --top-module tb_X
./obj_dir/Vtb_X
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops; it
also has a watchdog that fails the run if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_ycrcb_to_hsv` | conversion against a floating-point reference (±2), latency 3 |
| `tb_ntsc_capture` | a small BT.656 stream: pixel writes, field weave, detections, `frame_done` |
| `tb_zbt_memory` | all five ports, data routing, window reads, role rotation, latency (with `zbt_ram_model`) |
| `tb_object_recognition` | centres of random blobs over several frames, a missing colour |
| `tb_arbi_lpf` | impulse response against the kernel, random images, window indices, latency |
| `tb_arbi_skew` | every write against a model of the iterator walk, four quadrilaterals |
| `tb_vga_write` | sync/blank timing on a small raster, pixel order, colour conversion |
| `tb_arbi_lpf_full` | the filter at 640x480 over the real frame store: every pixel of two frames (M = 3, 8) against the convolution, and the frame time |
| `tb_ar_system` | whole system on a 16x8 image: rotations, corners, M, overlay content, recursion, no overrun/underflow, skew time |
| `tb_ar_system_full` | the same at 640x480 with all defaults, about 20 s of simulation |

`tb/zbt_ram_model.sv` is a behavioural model of one pipelined ZBT SRAM
(two-cycle read and write latency) used by the memory and system tests.

The end-to-end tests draw four coloured blobs into a synthetic camera
stream. They check that after the second rotation the pixels inside the
quadrilateral come from the previous displayed image (black at first),
that later frames contain the nested copy, and that everything outside
the quadrilateral is the camera picture unchanged.
