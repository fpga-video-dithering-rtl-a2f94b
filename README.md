# Real-time error-diffusion dithering of live video

This design takes a 320 x 240 camera feed and turns each frame into a
1-bit image in real time. It uses Floyd-Steinberg or Jarvis-Judice-Ninke
(JJN) error diffusion, and shows the result on a 1280 x 720, 60 Hz HDMI
monitor. A bit per pixel takes an eighth of the room of 8-bit gray. Error
diffusion keeps the image readable anyway: the rounding error of each
pixel is handed on to neighbours that have not been quantised yet.

Error diffusion normally needs random access to a whole frame. Here it is
done with four 320-byte lines of block RAM. The incoming stream is never
stopped: one pixel per clock can be taken.

The design is written in SystemVerilog (IEEE 1800-2017) and targets an
FPGA board. It has switches, buttons, a seven-segment display and LEDs, an
OV7670 camera on the I/O pins and an HDMI port.

## Data path

```
camera pins -> camera -> recover -> color_mod --+
                                                 +-> sd_pixel_source -> line_buffer <-> dither_fs / dither_jjn
SD-card FIFO (AXI-stream, 8-bit gray) ----------+          |                               |
                                                           v                               v
                                                  8-bit frame buffer              1-bit frame buffer
                                                           \                               /
video_sig_gen -> scale -> rotate -> address --------> sw[0] mux -> 3 x tmds_encoder -> tmds_serializer -> hdmi_tx
```

Everything from the camera pins to the frame buffers runs on one 74.25 MHz
clock (`clk_pixel`). The display side runs on the same clock. Only the TMDS
serializers also use a 10x bit clock (`clk_bit`). The frame buffers are
what separate the two rates: the camera delivers pixels at its own rate,
and the display reads them at its own rate.

| block | file | what it does |
|---|---|---|
| camera | `rtl/camera.sv` | synchronises `pclk`, `href`, `vsync` and data with two flip-flops; pairs two bytes into an RGB565 pixel on rising `pclk` edges |
| recover | `rtl/recover.sv` | attaches a column (`hcount`) and a row (`vcount`) to each pixel |
| color modification | `rtl/color_mod.sv`, `rtl/rgb_to_ycrcb.sv` | 8-bit gray from RGB565, chosen by `sw[4:2]` |
| SD pixel source | `rtl/sd_pixel_source.sv` | `sw[1]`: takes gray bytes from an SD-card FIFO, one per camera pixel, in place of the camera |
| line buffer | `rtl/line_buffer.sv`, `rtl/line_bram.sv` | four 320 x 8 lines with rotating roles |
| ditherers | `rtl/dither_fs.sv`, `rtl/dither_jjn.sv` | one column per cycle; updated pixels go back to the line buffer |
| threshold | `rtl/threshold_buttons.sv`, `rtl/threshold_calibrator.sv`, `rtl/debouncer.sv` | user threshold and automatic sweep |
| frame buffers | `rtl/frame_buffer.sv` | 76800 x 1 (dithered) and 76800 x 8 (gray) |
| display | `rtl/video_sig_gen.sv`, `rtl/scale.sv`, `rtl/rotate.sv`, `rtl/tmds_encoder.sv`, `rtl/tmds_serializer.sv` | 720p60 DVI output |
| seven-segment | `rtl/seven_segment_controller.sv` | eight hex digits |
| top | `rtl/fpga_dither_top.sv` | wires it all together |

Shared types and the dithering arithmetic are in the package
`rtl/dither_pkg.sv`.

## The two dithering kernels

A pixel becomes 1 when its gray value is at or above the threshold, and 0
otherwise. Its error is the value minus 255 (for a 1) or minus 0 (for a 0).
That error is split among the neighbours below with these weights:

```
Floyd-Steinberg (/16)          Jarvis-Judice-Ninke (/48)
      A  B                            A  F  G
   C  D  E                      H  I  J  K  L
  B=7 C=3 D=5 E=1               M  N  O  P  Q
                                F=7 G=5
                                H..L = 3 5 7 5 3
                                M..Q = 1 3 5 3 1
```

Each share is `error * weight / denominator`, truncated toward zero. Each
neighbour's new value is clamped to 0..255.

The hardware holds a small window of registers. For Floyd-Steinberg these
are A, C, D and the arriving B and E. For JJN they are a 5-wide window on
three rows. When a column arrives from the line buffer, the window shifts
one column left and the pixel in position A is quantised. The pixels that
leave the window are treated as follows:

- The finished A goes to the 1-bit frame buffer at (row, column).
- The left-most pixel of each lower row is complete for this row. It is
  written back to the line buffer, to be read again when its row is
  dithered. This is C for Floyd-Steinberg, and H and M for JJN.

Floyd-Steinberg quantises a pixel 2 cycles after its column leaves the line
buffer: one cycle to move from B to A, one to quantise. JJN takes 3 cycles,
because its window reaches two columns ahead.

## The line buffer: roles, rotation and write-back

This is the part that makes the design work, and the part that is easiest
to get wrong.

Each of the four lines (`line_bram`, a 320 x 8 RAM with a read/write port
and a write port) has one *role* at a time. All roles are addressed by the
column of the incoming pixel, `bw_hcount`:

| role | Floyd-Steinberg (3 lines) | JJN (4 lines) |
|---|---|---|
| 1 | write the new pixel `bw` | write the new pixel `bw` |
| 2 | read B, the row to dither | read G, the row to dither |
| 3 | read E, the row below; take C back at `bw_hcount - 2` | read L; take H back at `bw_hcount - 4` |
| 4 | unused | read Q, two rows below; take M back at `bw_hcount - 4` |

After column 319 of an incoming line has been written, the roles rotate:

- The line just written becomes the lowest read line (role 3 or 4).
- Each read line moves up a row.
- The role-2 line has been fully dithered, so it becomes the next write
  line.

In hardware this is one 2-bit pointer `p`, the physical line of role 1.
Role *k* is line `(p + k - 1) mod N`, with N = 3 or 4. Each rotation adds 1
to `p`.

The naive form of this scheme has two problems, and this design fixes both.

**Write-backs after a rotation.** A write-back leaves the ditherer a few
cycles after its column was read. By then the roles may already have
rotated. So every column read carries the physical line numbers of its
role-3 and role-4 lines, and the row and column it belongs to. The
ditherer returns these tags with each write-back, and the write goes to the
line the pixel came from, whatever the roles are now.

**Frame and line edges.** The ditherer only diffuses error to a neighbour
that is really adjacent: same row or the row below, a column that exists,
a row below the last one excluded. So pixels at the left and right edges
never take error from the other side of the image. The dithered row lags
the incoming row by 2 (FS) or 3 (JJN) lines. That means the last rows of a
frame are finished while the first rows of the next frame are written.
Rows wrap modulo 240, and every frame is dithered completely and exactly as
a software raster-order reference would do it.

The line buffer delivers a column 2 cycles after the pixel is written: one
cycle of RAM read and one output register. One pixel per cycle can be
sustained. The camera gives one pixel every few cycles.

**Glitch mode (`sw[14]`).** This mode keeps a known bug as a feature: the
roles rotate on every clock cycle in which `bw_hcount` sits at 319, whether
or not a new pixel came in. Lines are then skipped and mixed, and the
output is a compressed video with its own artefacts rather than true
dithering.

## Threshold control

Three sources set the threshold:

- **Buttons**: `btn[2]` adds and `btn[3]` subtracts the step on
  `sw[11:5]`. Buttons are debounced for 5 ms, and the threshold saturates at
  0 and 255.
- **Debug link**: the `manta_threshold` input stands in for a host-written
  register. Any change of its value loads it.
- **Calibrator**: `btn[1]` loads the calibrator's suggestion.

If several happen in the same cycle, the load button wins, then the debug
link, then the buttons. All act on the same register, which resets to 128.

**Calibrator.** After reset (`btn[0]`) it sweeps X_FRAMES = 16 frames. Trial
*k* dithers a frame at threshold `k * 256 / 16`. For each trial it counts
horizontal transitions: dithered bits that differ from their left
neighbour. The trial with the most transitions becomes the suggestion.
During the sweep the trial threshold drives the ditherer.

The frame boundary for the sweep is taken from the line buffer's read side,
one column before pixel (0, 0) is quantised. This way each trial threshold
applies to exactly one frame. The last one or two bits of the previous
frame are counted with the next trial. Many transitions do not always mean
the best picture, so treat the suggestion as a starting point.

## Display

`video_sig_gen` produces standard 720p60 timing: 1650 x 750 total at
74.25 MHz, with active-high syncs. The stored image is shown turned by 90
degrees and doubled: `scale` divides the counters by 2, and `rotate` maps
screen (x, y) to stored row `239 - x`, column `y`. The image is 480 pixels
wide and 640 high, in the top-left corner; the rest of the screen is black.

`sw[0]` selects the source: 1 shows the dithered buffer (0 or 255 on all
three lanes), 0 shows the gray buffer. Sync and active are delayed 4 cycles
to stay aligned with the pixel. The three `tmds_encoder`s implement DVI 1.0
TMDS coding, with running disparity and control tokens. The serializers
shift out the 10-bit symbols LSB first on `clk_bit`. The clock lane sends
`0000011111`. The outputs are single-ended; the board's differential output
buffers are outside this design.

## Inputs and outputs of the top

| port | use |
|---|---|
| `btn[0]` | reset (also restarts calibration) |
| `btn[1]` | load the calibrator's suggestion |
| `btn[2]`, `btn[3]` | threshold up and down |
| `sw[0]` | 1 shows the dithered image, 0 the gray image |
| `sw[1]` | 1 takes pixels from the SD FIFO |
| `sw[4:2]` | gray flavour: 0 average, 1 R, 2 G, 3 B, 4 Y, 5 Cr, 6 Cb, 7 average |
| `sw[11:5]` | button step |
| `sw[13]` | 0 Floyd-Steinberg, 1 JJN |
| `sw[14]` | glitch mode |
| `ss_cat`, `ss_an` | from left: step, trial threshold, suggestion, threshold in use (hex) |
| `led` | [7:0] suggestion, [11:8] frame count, [12] calibrating, [13] done, [14] glitch, [15] algorithm |
| `sd_fifo_*` | AXI-stream from an SD-card reader FIFO (one gray byte per pixel) |

## Latency and sizes

| stage | cycles at 74.25 MHz |
|---|---|
| color modification | 3 |
| line storage | 2 lines (FS) or 3 lines (JJN) of camera time |
| line buffer read | 2 |
| ditherer | 2 (FS), 3 (JJN) |

Memory:

- line buffer: 4 x 320 x 8 bit
- frame buffers: 76800 x 1 and 76800 x 8 bit

Every module's parameter defaults are the full size: 320 x 240 frames and
1280 x 720 video.

## How far it can be trusted, and where it departs

What has been simulated:

- Every block has a self-checking testbench in `tb/`, compared against
  values computed independently in the testbench.
- The ditherers are checked bit-for-bit against a raster-order software
  model, over whole 320 x 240 frames.
- `fpga_dither_top_tb` runs the whole chain at a reduced size: 16 x 8
  frames, a small video raster and a short debounce.
- `fpga_dither_top_full_tb` runs the whole chain with every default: 320 x
  240, 720p, 16-frame calibration, 5 ms debounce. It takes about 2 to 3
  minutes in Verilator.
- Both top-level tests drive a camera model and an SD FIFO model. They
  check each dithered FS and JJN frame bit for bit, using the threshold
  in force at each pixel. Frames during which the algorithm or glitch mode
  was switched are skipped. The tests also check the calibration sweep,
  the buttons, the debug-link load, the suggestion load, every gray
  flavour, the seven-segment digits, and that glitch mode changes the
  output. Finally they decode the TMDS symbols of a full video frame for
  each display source and compare them with the frame buffers.

Where it departs from a straightforward reading of the original design, or
fills gaps:

- Edges are handled exactly, with no garbage at the start or end of lines
  and frames. This is done with the tags carried through the line buffer.
- The ditherer's rounding is chosen here: truncation toward zero, clamping,
  and a threshold test of `>=`.
- The JJN write-back offset (4 columns) and its 3-cycle latency follow from
  the 5-wide window.
- The gray-flavour switch codes, `sw[0]`, `sw[1]` and the use of `btn[0]`
  as reset are choices made here.
- The seven-segment and LED layouts are chosen here, apart from the step on
  the display and the suggestion on the LEDs.
- RGB565 is widened by repeating its top bits. Y/Cr/Cb use BT.601
  full-range coefficients scaled by 1024.
- The debug core, the SD-card controller, the FIFO IP and the differential
  output buffers are vendor or third-party parts and are not included.
  Their signals are brought out as ports instead. The SD path matches the
  intended interface (AXI-stream FIFO, one byte per camera pixel, position
  from a running byte count) but has not been tried on hardware. If the
  FIFO runs empty, a pixel is dropped rather than waited for.
- The TMDS serializer is a plain shift register, not a vendor serializer
  primitive.
- A testbench that sees only the top's pins cannot check the ditherer, so
  the top-level tests read internal signals (the ditherer output, the
  threshold and the frame-buffer contents) by hierarchical name.

## Simulating

Every testbench is a self-contained top module. It prints
`TB_RESULT checks=N failures=M` and then calls `$finish`. With Verilator
5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module fpga_dither_top_tb rtl/dither_pkg.sv tb/fpga_dither_top_tb.sv
./obj_dir/Vfpga_dither_top_tb
```

Replace the testbench name for any other test:

- `dither_fs_tb`, `dither_jjn_tb`, `line_buffer_tb`, `camera_tb`,
  `recover_tb`, `color_mod_tb`, `rgb_to_ycrcb_tb`
- `threshold_buttons_tb`, `threshold_calibrator_tb`,
  `seven_segment_controller_tb`, `frame_buffer_tb`
- `video_sig_gen_tb`, `scale_tb`, `rotate_tb`, `tmds_encoder_tb`,
  `tmds_serializer_tb`, `sd_pixel_source_tb`
- `fpga_dither_top_full_tb` for the full-size run

The top-level testbenches share their body,
`tb/fpga_dither_top_tb_body.svh`. Each including module only sets the
sizes.

To change the frame size, set `W` and `H` on the top. The package's
`COL_BITS` and `ROW_BITS` must be wide enough for them. The video timing
parameters `H_*` and `V_*` set the raster.
