# Image browser and editor for an FPGA with an XGA monitor

This design shows still images on a 1024x768, 60 Hz monitor and lets the user
look through them and edit them with the buttons and switches of a lab board.
A host computer converts each picture to 256 colours. It sends the 8-bit pixel
indices and the picture's three colour tables (red, green and blue) over a USB
adapter. On the FPGA, up to four pictures are kept as indices plus tables.
Every frame is redrawn from those, one pixel per 65 MHz clock, into the back
half of a double frame buffer, while the front half is shown. There are two
views:

* **browse**: a horizontal film strip of half-size copies of the loaded
  pictures. Holding left or right slides the strip across the screen.
* **transform**: the selected picture alone, full size, which the user can
  zoom in or out and rotate about its centre. It is drawn either with the
  nearest source pixel or by bilinear interpolation of the four around each
  sample position.

Because the whole frame is redrawn every 1/60 s, scrolling, zooming and
rotating need no incremental screen updates. Each frame is computed
directly from the stored pictures and the current controls.

## Structure

```
usb pins ─► usb_reader ─► image_decoder ─┬─► image_ram (pixel indices)  ─┐
                                          └─► color_lut (RGB tables)      │
buttons/switches ─► user_input ─┐                                         │
xvga (timing) ──────────────────┼─► display_fsm ◄─► transformer           │
                                │      │  ▲  reads 4 pixels, then colours ◄┘
                                │      │  └── bilinear_blend
                                │      ▼
                                │  frame_buffer 0 / frame_buffer 1
                                └────► video_out (select front buffer) ─► monitor
```

| Module | Role |
|---|---|
| `image_browser_top` | wires everything; brings out the USB, control, VGA and status pins |
| `usb_reader` | two-flop synchroniser for the adapter's data and strobe; one byte per strobe edge |
| `image_decoder` | routes each byte to a colour table or to the pixel array of the current slot |
| `image_ram` | 4 slots x 1024x768 x 8-bit pixel indices, one write port, four read ports |
| `color_lut` | 4 slots x 3 tables x 256 x 8 bit; turns four (slot, index) pairs per clock into 24-bit RGB |
| `xvga` | 1024x768@60 timing (1344x806 clocks), syncs, blank, start-of-vertical-blank pulse |
| `user_input` | synchroniser and 10 ms debounce for buttons and switches, press pulses |
| `display_fsm` | browse/transform state, frame loop, three-stage pixel pipeline, buffer swap |
| `transformer` | per-output-pixel source position for a scale and an angle |
| `bilinear_blend` | weights four colours by the bilinear weights of two 8-bit fractions, per channel |
| `cordic_sincos` | cosine and sine of the angle, used once per frame by the transformer |
| `frame_buffer` | one 1024x768 x 24-bit frame; the top uses two |
| `video_out` | scan address, front-buffer multiplexer, blanking, sync alignment |
| `img_pkg` | shared types (`rgb_t`, `mode_t`), button and switch indices, formats |

Everything runs from the one 65 MHz pixel clock with a synchronous,
active-high reset. The USB pins are the only asynchronous inputs apart
from the buttons and switches.

## Loading pictures: the byte stream

The host sends each picture as one stream of 768 + 1024*768 = 787,200 bytes:

1. 256 bytes of the red table, entry 0 first,
2. 256 bytes of the green table,
3. 256 bytes of the blue table,
4. 786,432 pixel indices in raster order (row 0 left to right, then row 1, ...).

Pictures fill slots 0, 1, 2, 3 in turn and then wrap back to slot 0. While a
slot is being overwritten, its `slot_loaded` bit is clear, and the browse view
shows that slot as empty (background). The reload button sends the decoder
back to the first byte of slot 0, to recover from a broken transfer.
Every slot is a full 1024x768. A smaller picture must be padded by the host.

USB pin handshake (this design's own choice; the adapter's real protocol
was not available): put a byte on `usb_data`, then raise `usb_strobe` while
the data is stable. Keep the strobe high for at least 3 clocks and low for at
least 3 clocks. The byte is taken on the synchronised rising edge, 2 to 3
clocks later.

## Drawing a frame

`xvga` pulses `vblank_start` at the first clock after the last visible line.
At that pulse, `display_fsm`:

1. swaps the buffers (`front_sel` toggles, `frame_swap` pulses) if the back
   buffer holds a complete frame;
2. applies the controls gathered since the previous frame (scroll, select,
   back, scale steps, rotation);
3. starts the transformer on the new scale and angle, then draws all
   786,432 pixels of the new frame into the back buffer, one per clock.

A frame lasts 1,083,264 clocks. Drawing takes 786,432 clocks plus 21 setup
clocks (transform view) and 3 clocks to empty the pipeline, so every frame is
new. The swap happens only during vertical blank, so the picture never tears.
`video_out` reads the front buffer at the pixel the timing counters give, and
the monitor sees the result two clocks later, together with the delayed
syncs.

Each pixel passes through a three-stage pipeline:

| stage | work |
|---|---|
| 0 | raster position → up to four source taps (slot, row, column, valid) and two fractions; addresses the four `image_ram` ports |
| 1 | 8-bit colour indices return; address that slot's `color_lut` |
| 2 | 24-bit colours return; `bilinear_blend` weights them; the result is written to the back buffer |

Browse and nearest-pixel drawing use tap 0 only, with both fractions zero, so
the blend passes tap 0 through unchanged (black where it is not valid).

The frame buffers hold 24-bit colour rather than indices. Each thumbnail in
the film strip has its own colour table, and one frame can show two or three
of them side by side.

## Browse view: the film strip

The strip places the loaded pictures side by side at half size
(`BROWSE_SHIFT` = 1: every second pixel of every second row). Each one
takes a 512-pixel pitch, with an 8-pixel black border on each side, and the
row of 384-line thumbnails sits in the vertical middle of the screen.
`scroll_pos` is the strip coordinate under the centre of the screen:

```
strip x  = scroll_pos - 512 + screen x
slot     = strip x / 512          column = strip x mod 512
source   = (row - 192) * 2, column * 2
```

Holding right or left moves `scroll_pos` by `SCROLL_STEP` (8) pixels per
frame. That is 480 pixels per second: pictures come in at one edge, cross the
screen and leave at the other. `scroll_pos` is clamped to 256 ... 1792, so at
each end the first or last slot sits in the centre. Select enters the
transform view with the slot under the centre, but only if that slot is
loaded.

## Transform view: scaling and rotation

This is the least obvious part of the design. The transformer does not move
source pixels to the screen. It works backwards: for every screen pixel, in
raster order, it computes which source position lands there. The display FSM
then fetches the source pixel that contains that position. This is the
nearest-pixel method; bilinear drawing, below, fetches the four around it.
Each screen pixel gets its own fetch, so the view has no holes at any angle
or zoom.

**Parameters.**

* `scale` is a signed 5-bit number of quarter octaves: zoom = 2^(scale/4).
  It ranges from 1/16 (scale -16) to about 13.5 (scale 15). Zero is the
  original size and +4 is 2x.
* `angle` is unsigned radians in Q3.13 (13 fractional bits), from 0 up to,
  but not including, 2π = 51472.

**Mapping.** Let m = 2^(-scale/4) be the inverse zoom, A = m·cos(angle)
and B = m·sin(angle). Take the centre of screen pixel (x, y), relative to
the screen centre:

```
dx = x + 0.5 - 512      dy = y + 0.5 - 384
u  = 512 + A*dx + B*dy  (source column)
v  = 384 - B*dx + A*dy  (source row)
```

Source pixel k covers [k, k+1), so the fetched pixel is (floor u, floor v).
If that lies outside the picture, the screen pixel is black. With y down the
screen, a growing angle turns the picture clockwise.

**Hardware.** On `start` (once per frame):

1. `cordic_sincos` folds the angle into ±π/2 and runs 16 CORDIC
   micro-rotations with 18 fractional bits, giving cos and sin in Q2.16.
   This takes 18 clocks, with an error below 2^-13.
2. m comes from a four-entry table of 2^(-j/4) (j = scale mod 4), shifted
   by whole octaves. A = m·cos and B = m·sin are formed in Q.16.
3. The position of screen pixel (0, 0) is computed with two multiplies per
   coordinate.

`ready` rises 21 clocks after `start`. After that, each `step` only adds:
(+A, -B) along a row, and (+B, +A) from one row start to the next. Positions
are kept as 36-bit Q20.16 numbers. `src_u`/`src_v` give the full fractional
position, and `src_x`/`src_y`/`in_image` give the pixel to fetch.

**Bilinear drawing.** With switch 1 on, the sample position (u, v) is
taken relative to pixel centres, which lie at k + 0.5. Then u - 0.5 splits
into an integer part x0 and a fraction, and v - 0.5 into y0 and a fraction.
The four taps are the source pixels (x0, y0), (x0+1, y0), (x0, y0+1) and
(x0+1, y0+1). The top 8 bits of each fraction, fx and fy in 1/256ths, give
the weights (256-fx)(256-fy), fx(256-fy), (256-fx)fy and fx·fy, which always
sum to 65536. Each of red, green and blue is summed by its own datapath,
divided by 65536 and rounded to nearest. A tap outside the picture counts
as black, so the picture's edge fades out over one pixel instead of being
cut off. All four taps are read in the same clock, through four read ports
on the picture store and on the colour tables. That keeps bilinear drawing
at one pixel per clock, so it costs no frame time. On a device whose block
RAM has two ports, one of them taken by the loading writes, four read ports
means four copies of the picture store.

**Accuracy.** Tested against floating point, the position is within
0.005 + 0.004·m pixels everywhere on a 40x30 test screen. Only pixels whose
exact position is within that distance of a source-pixel edge can round the
other way.

**Controls.** Switch 0 off: each press of right or left changes `scale` by
±1. Switch 0 on: while right or left is held, `angle` changes by
`ANGLE_STEP` = 201 (0.0245 rad) per frame, wrapping at 2π, so a full turn
takes about 4.3 s. Entering the view resets both to zero. Switch 1 chooses
nearest pixel (off) or bilinear (on). It is read at every vertical blank and
can be flipped at any time. Back returns to browse.

## Controls summary

| input | browse | transform |
|---|---|---|
| `btn[0]` left | hold: scroll left | press: zoom out (sw0 off) / hold: rotate back (sw0 on) |
| `btn[1]` right | hold: scroll right | press: zoom in (sw0 off) / hold: rotate on (sw0 on) |
| `btn[2]` select | show the centred picture in transform | - |
| `btn[3]` back | - | return to browse |
| `btn[4]` reload | restart USB loading at slot 0 | same |
| `sw[0]` | - | off: scale, on: rotation |
| `sw[1]` | - | off: nearest pixel, on: bilinear |

Buttons are active high here; invert an active-low board button before
`btn`. Status outputs (`mode`, `sel_slot`, `bilinear`, `slot_loaded`, `load_slot`,
`scroll_pos`, `scale`, `angle`, `frame_swap`) are meant for a hex display
or logic analyser.

## Sizes and what fits

| quantity | value |
|---|---|
| picture store | 4 x 1024 x 768 x 8 = 25,165,824 bits |
| colour tables | 4 x 3 x 256 x 8 = 24,576 bits |
| frame buffers | 2 x 1024 x 768 x 24 = 37,748,736 bits |
| total | 62,939,136 bits |
| draw time per frame | 786,456 of 1,083,264 clocks |

Four pictures at the largest size, with their tables, take 25.2 Mbit, and the
picture store holds exactly that. The frame budget is met with 27% to spare.
The board the design was planned for offers about 40 Mbit of memory,
though, and with two 24-bit frame buffers the total is 62.9 Mbit. To fit that
board, the frame buffers would have to shrink, for example to 8-bit
indices plus a slot number, with the colour tables moved to the scan-out
side. This version keeps full colour in the frame buffers so that the
drawing and scan-out paths stay simple.

## Where this design departs from or adds to the original plan

Built as planned: the block structure (USB reader, image decoder, RAM,
XVGA, buttons and switches, display controller with browse and transform
states, transformer, two frame buffers and an output multiplexer), the
65 MHz clock and XGA output, 256-colour pictures with per-picture RGB
tables, four 1024x768 slots, one pixel per clock into the frame being built,
a signed scale, an unsigned angle in radians, nearest-pixel and bilinear
drawing, and separate datapaths for the red, green and blue channels of the
blend, merged at the end.

Not built:

* area-weighted interpolation, where each source pixel is weighted by how much
  of the screen pixel it covers. When zoomed out 16 times, one screen pixel
  covers up to 16x16 source pixels, which cannot be fetched in one clock.
  Shrinking a picture is therefore filtered only by the 2x2 bilinear blend,
  and fine detail can alias.
* camera gesture control (only an idea in the plan);
* the colour-bar test pattern for bring-up of an external SRAM.

This design's own choices, where the plan gives no detail: the USB strobe
handshake; the order of the four parts in the byte stream; fixed-size slots;
half-size thumbnails with borders; the button assignment, step sizes and
clamping; the switch that chooses bilinear drawing; four read ports with
8-bit fractions and black outside the picture; the quarter-octave scale code; the Q3.13 angle format and CORDIC;
swapping at vertical blank; black background; the VESA porch and sync widths
with active-low syncs; and the debounce.
The memories are plain synchronous arrays. Whether they map to on-chip block
RAM or to the board's external SRAM is left to the implementation (the plan
mentions both).

## Simulating

All sources are SystemVerilog 2017 with no vendor primitives. Compile
`rtl/img_pkg.sv` first. Each testbench in `tb/` checks itself and ends with a
line `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/img_pkg.sv tb/tb_image_browser_top.sv --top-module tb_image_browser_top
./obj_dir/Vtb_image_browser_top
```

| testbench | what it shows |
|---|---|
| `tb_image_browser_top` | end to end at 32x16 pictures and screen: USB loading, slot wrap, reload, scrolling and clamping, a frame taken while scrolling, select, zoom, rotation, back; bilinear drawing; ten frames compared pixel by pixel at the VGA pins with a model |
| `tb_image_browser_full` | all defaults: one 1024x768 picture over USB, a film-strip frame and a transform frame checked at the VGA pins (about 13 M clocks, some seconds) |
| `tb_display_fsm` | controller with a real transformer and modelled memories: 56 frames, buffer swaps, every control rule, every pixel; bilinear frames within 3 of a floating-point blend |
| `tb_bilinear_blend` | the blend against an integer reference, plus pass-through, mean and flat-area cases |
| `tb_transformer` | 16 scale/angle pairs against floating point, setup latency, stalls |
| `tb_xvga` | line, frame, sync and blank timing at 1024x768 |
| `tb_image_decoder`, `tb_usb_reader`, `tb_user_input`, `tb_image_ram`, `tb_color_lut`, `tb_frame_buffer`, `tb_video_out` | each block against a reference model (all four read ports of the memories) |

To try other sizes, override the parameters of `image_browser_top`:
`IMG_W`, `IMG_H`, `NUM_IMAGES`, the eight `H_*`/`V_*` timing numbers,
`DEBOUNCE_CYCLES`, `BROWSE_SHIFT`, `BORDER`, `SCROLL_STEP` and `ANGLE_STEP`.
The reduced test uses a 42x21-clock raster. The thumbnail pitch is
`IMG_W >> BROWSE_SHIFT`, which should be a power of two so that the slot
division is a shift.
