# Still-frame image processing unit: histogram equalisation, Sobel edges, Harris corners

This unit takes one 640x480 grey-level snapshot from a camera and does three things with it.

- **Histogram equalisation** spreads the grey levels over the full 0..255 range, so the later
  stages see similar contrast in dim and bright scenes.
- **Sobel edge detection** gives an edge-strength image.
- **Harris corner detection** marks the pixels where the image changes strongly in two
  directions at once.

A VGA output shows one of four images: the captured frame, the equalised frame, the edge image,
or the captured frame with corners painted white. Every corner found is also reported on a
coordinate stream.

The structure comes from a student project proposal: a camera, two input buffers, an internal
frame memory, a histogram equaliser with its buffer memory, a source multiplexer, the Sobel and
Harris filters, and a display multiplexer. The arithmetic of each stage also follows the
proposal. That includes the decoder-based cumulative histogram, the gradient masks and the
three-stage cornerness pipeline. The proposal leaves many points open: interfaces, sequencing,
memory organisation, the Harris constant k, the threshold, and VGA timing. Those choices are this
implementation's own, and they are listed under "Departures and open points".

## Data flow and sequence

```
camera ──► obtain_image ──► internal memory ──► hist_eq_unit ──► buffer memory
          (2 line buffers,   (banked_frame_  (histogram,       (frame_ram)
           ping-pong)         ram, 4 banks)  LUT, image)
                                 │                                     │
                                 └─────────► source mux ◄──────────────┘
                                                 │  (src_eq)
                                            window_gen (5x5)
                                           ┌─────┴──────┐
                                  sobel_edge (inner 3x3)  harris_corner
                                           │                  │
                                     Sobel memory       corner map memory + corner stream
                                           └──────┬───────────┘
          internal memory, equaliser LUT ────► vga_display (mode mux, 640x480 timing)
```

`ipu_top` is the top module. A pulse on `snap` starts one sequence, with `busy` high throughout
and a one-clock `done` pulse at the end:

1. **Capture.** `obtain_image` waits for the camera's next start of frame (`cam_sof`). It writes
   the W x H frame into the internal memory at address `row*W + col`.
2. **Equalise.** `hist_eq_unit` reads the frame once to build the histogram, four pixels per
   clock. It then spends 256 clocks filling the lookup table (LUT), reads the frame again one
   pixel per clock, and writes the mapped pixels to the buffer memory. This stage takes
   N/4 + 256 + N clocks plus a few.
3. **Filter.** The raw frame or the equalised frame, chosen by `src_eq` (sampled at `snap`), is
   read at one pixel per clock into a 5x5 sliding window. The Sobel result of each pixel goes to
   the Sobel memory, and the Harris decision goes to a 1-bit corner map. This stage takes
   N + 2W + 2 clocks plus the pipeline depth.

With N = 307,200, one sequence takes about 3.25N clocks, which is about 40 ms at 25 MHz. The
display runs all the time, independently of the sequence. It reads the memories through their
second read port.

## Histogram equalisation with a switching decoder

This is the least obvious part. A textbook equaliser first builds the histogram n(k) and then
forms the cumulative sum S(k) = n(0) + ... + n(k) in a second pass. `hist_builder` gets S(k)
directly:

- Each incoming pixel value p is decoded into a 256-bit thermometer code that is 1 for every
  bin j >= p.
- Each of the 256 counters adds its bit of that code.

After one pass over the frame, counter k holds S(k). The hardware is 256 incrementers and a
comparator per bin, with no adder chain across bins.

The `LANES` parameter takes several pixels per clock. Each lane has its own decoder, and each bin
adds the number of lanes whose pixel is <= the bin. The unit uses `LANES = 4`. To feed four
lanes, the internal memory (`banked_frame_ram`) is split into four interleaved banks: pixel a
lives in bank a mod 4 at word a / 4. One read returns the pixel at the address and the aligned
group of four pixels that holds it, so the histogram pass steps the address by four.

`hist_equalizer` then walks k = 0..255, one entry per clock, and stores

    LUT[k] = min(255, floor(256 * S(k) / (W*H)))

which is 256 times the normalised cumulative distribution. One divider by the constant frame size
serves all 256 entries. The clamp is needed because 256 * C(255) = 256.

`image_builder` maps every pixel through the LUT on its way to the buffer memory. The display's
"equalised" mode does not use the buffer memory. It looks up each captured pixel in the LUT's
second read port.

Counters are 19 bits wide, enough for 307,200 pixels. `clear` is issued automatically at the
start of each equalisation.

## Harris corner detector

`harris_corner` is a five-clock pipeline that accepts one pixel per clock. Its stages are:

| stage | module | what it computes | clocks |
|---|---|---|---|
| gradients | `derive` (9 x `derive_pixel`) | Ix, Iy of the 3x3 pixels around the centre, each from its own 3x3 neighbourhood, so a 5x5 pixel window is needed | 1 |
| matrix | `harris_window` | sxx = ΣIx², syy = ΣIy², sxy = ΣIxIy over the 3x3 gradients | 1 |
| cornerness | `corner` | c = sxx·syy − sxy² − k·(sxx+syy)² | 3 |
| decision | `threshold` | c > THRESH | 0 |

`derive_pixel` computes

    Ix = (p2 − p0) + 2(p5 − p3) + (p8 − p6)
    Iy = (p6 − p0) + 2(p7 − p1) + (p8 − p2)

with the neighbours numbered row by row (p4 is the centre). The factor 2 is a wired shift. The
results are 11-bit signed values (|I| <= 1020).

`corner` follows a three-register arrangement:

1. The first register holds sxy², sxx·syy and sxx+syy.
2. The second register holds the squared trace.
3. The third register holds k times the squared trace.
4. A three-input add/subtract after the third register produces c.

k is the fixed-point constant `K_NUM / 2^K_FRAC`, 3/64 ≈ 0.047 by default. The product is
truncated by an arithmetic shift.

Widths: the sums need 25 bits signed, because 9 x 1020² = 9,363,600 is reachable. c is 52 bits
signed.

The threshold is a build-time parameter, `THRESH`, with a default of 10¹². That value was chosen
against an integer reference model. At that threshold, the corners of a rectangle with 180 grey
levels of contrast give c ≈ 1.3 to 2.0·10¹² and pass. Straight edges give negative c and fail.
Lower `THRESH` to find weaker corners.

For each pixel the detector outputs `(x, y)` when the pixel is a corner and `(0, 0)` otherwise.
It also outputs the pixel's own coordinates and c. Pixels within two lines or columns of the
frame edge are never corners, because their 5x5 window leaves the frame.

## Sobel edge filter

`sobel_edge` uses the inner 3x3 of the same window. It computes

    Gx = [-1 0 1; -2 0 2; -1 0 1]
    Gy = [1 2 1; 0 0 0; -1 -2 -1]

and outputs min(255, |Gx| + |Gy|), which can be shown directly as a grey level. It has two
pipeline registers and accepts one pixel per clock. Real-time 640x480 video at 30 frames/s needs
9.2 Mpixel/s, so any clock above 9.2 MHz is fast enough for this stage. The outermost ring of
pixels is written as 0.

## Sliding window and borders

`window_gen` turns the raster stream into a 5x5 window:

- Four line buffers hold the previous lines.
- Each new pixel, with the four pixels above it, forms a new column that shifts in on the right.
- The window's centre lags the newest pixel by two lines and two columns.

After the last pixel of a frame, the generator feeds itself 2W + 2 zero pixels and holds `busy`
high meanwhile. As a result, every frame pixel becomes a window centre exactly once, in raster
order, with its coordinates. The filter results can then be written straight to memory at the
centre's address.

Windows that wrap around a line end or reach past the frame contain stale data. They are only
produced for border pixels, which are masked: `out_inside` for Harris, and a one-pixel border
check in `ipu_top` for Sobel.

## Capture with two input buffers

`obtain_image` alternates between two one-line `input_buffer`s:

- While the camera fills one buffer, the other is copied into the internal memory through the
  output multiplexer, one pixel per clock.
- The camera may deliver at most one pixel per clock, so a copy always ends before the next line
  is complete. An assertion checks this.

The camera is assumed to deliver 8-bit grey levels with `cam_valid` and a start-of-frame marker
`cam_sof` on the first pixel. No colour conversion is done.

## Display

`vga_display` generates standard 640x480 at 60 Hz timing: 800 x 525 clocks, sync pulses active
low, 25 MHz pixel clock assumed. It reads the memories one clock ahead and registers all outputs.
Pixel, `vga_de` and both syncs appear two clocks after the scan counters. `disp_mode` selects:

| mode | `ipu_pkg::disp_mode_e` | pixel shown |
|---|---|---|
| 0 | `DISP_RAW` | captured frame |
| 1 | `DISP_EQUALISED` | captured pixel looked up in the LUT |
| 2 | `DISP_SOBEL` | edge image |
| 3 | `DISP_CORNERS` | captured frame, corners in white |

The mode is sampled at the start of each display frame. Porch and sync lengths are parameters.

## Departures and open points

- **Gradient sign.** The original block diagram of the gradient unit shows left-minus-right
  differences and an absolute value at the output. The text gives the masks above and calls Ix
  and Iy signed. This design follows the text. Signs matter for the ΣIxIy term.
- **Sum widths.** The proposal gives 20 bits for the window sums in one place and 22 bits in
  another. Both overflow on strong edges, so 25 bits are used.
- **Window weights.** The proposal mentions a "weighted window" without weights. Unit weights are
  used.
- **Constants.** k, the threshold, the VGA timing and the Sobel pipeline depth are not given.
  Values are chosen as stated above.
- **Memory.** The size and organisation of the input buffers and memories, and the separate
  result memories for edges and corners, are this design's choice. So is the decision that the
  three equaliser stages run as sequential passes over a stored frame.
- **Parallel histogram.** The proposal suggests parallel counter copies but gives no number.
  Four lanes and a four-bank internal memory are this design's choice.
- **Grey conversion.** The proposal leaves open whether the camera image is converted from RGB.
  Here the camera delivers grey levels.
- **Display inputs.** The display multiplexer has an extra raw-image input.
- **Still frames only.** The unit processes one snapshot per request. It is not a continuous
  30 frames/s video pipeline.
- **Not included.** The camera and the monitor are external devices and are not included.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ipu_top` | `W`, `H` | 640, 480 | frame size (all memories are W·H words) |
| `ipu_top`, `harris_corner`, `corner` | `K_NUM`, `K_FRAC` | 3, 6 | Harris k = K_NUM / 2^K_FRAC |
| `ipu_top`, `harris_corner`, `threshold` | `THRESH` | 10¹² | corner threshold on c |
| `ipu_top`, `hist_eq_unit`, `banked_frame_ram` | `LANES` | 4 | histogram pixels per clock, memory banks (power of two dividing W·H) |
| `hist_builder` | `LANES` | 1 | pixels counted per clock (set to 4 by `hist_eq_unit`) |
| `window_gen` | `N` | 5 | window size (odd, >= 3) |
| `vga_display` | `H_FP`, `H_SYNC`, `H_BP`, `V_FP`, `V_SYNC`, `V_BP` | 16, 96, 48, 10, 2, 33 | VGA blanking |

Shared types and constants (`pixel_t`, `grad_t`, `disp_mode_e`, frame size) are in `ipu_pkg`.
Reset `rst_n` is asynchronous and active low. Memory contents are not reset.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv` (`ipu_pkg` is a
package, not a module). Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. Run one from the project
root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -I. -y rtl -y tb +libext+.sv \
    rtl/ipu_pkg.sv tb/tb_ipu_top.sv --top-module tb_ipu_top
./obj_dir/Vtb_ipu_top
```

Two end-to-end benches share `tb/ipu_tb_core.sv`:

- `tb_ipu_top` runs a 16 x 12 frame with an irregular camera.
- `tb_ipu_full` runs `ipu_top` at its default 640 x 480 size. It finishes in a few seconds.

Both take two snapshots, one filtering the raw frame and one the equalised frame. After each, an
integer reference model recomputes all four memories (captured, equalised, Sobel, corner map) and
the corner stream, and the bench compares them. It then checks a full VGA frame in every display
mode. It also counts how often each mechanism occurred: swaps of both line buffers, the window
flush, the LUT clamp, Sobel saturation, corners, both filter sources and every display mode. A
mechanism that never occurred is a failure.

Both benches also check the two stage durations:

- The equaliser stage must take N/4 + 256 + N clocks plus at most 12.
- The filter stage must run at one pixel per clock: N + 2W + 2 clocks plus the pipeline depth.

`tb_ipu_thresholds` builds three copies of the unit with thresholds 10⁹, 5·10¹⁰ and 10¹². It
shows them a scene with three rectangles of decreasing contrast. Each copy's corner count must
match the reference model, and the counts must fall as the threshold rises. The three copies
report 96, 52 and 16 corners.

The block benches compare against independent integer models and check the stated latencies:

| block | latency checked |
|---|---|
| `derive` | 1 clock |
| `harris_window` | 1 clock |
| `corner` | 3 clocks |
| `harris_corner` | 5 clocks |
| `sobel_edge` | 2 clocks |
| `image_builder` | 1 clock |
| `hist_equalizer` | 256 clocks for the LUT |
| `hist_eq_unit` | N/4 + 256 + N clocks |

## How far it can be trusted

- Every module passes lint with Verilator and elaborates with the slang front end of Yosys.
- The top level synthesises to coarse cells with the memories kept as memory blocks.
- All block testbenches and both end-to-end testbenches pass.
- Each block testbench has also been shown to fail against a deliberately broken copy of its
  module.
- The design has not been run on an FPGA.
- The threshold default has only been tuned on synthetic scenes.
