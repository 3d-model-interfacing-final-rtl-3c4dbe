# A hardware triangle renderer for low-polygon 3D models

This is a small fixed-function graphics pipeline. It holds a 3D model (a
list of triangles) in on-chip ROM, turns it in real time under the control
of three buttons and twelve switches, and draws it with flat gray shading
and hidden-surface removal into a 240 x 240 image. The image is shown,
enlarged three times, on a 1280 x 720 video output. All of it is plain
synthesizable SystemVerilog. There is no processor and no floating-point
core: every step from the vertex to the pixel is a hardware unit.

The design targets an FPGA board with a 74.25 MHz pixel clock, and the
whole pipeline runs in that one clock domain.

## How one frame is made

```
 buttons/switches ─► input_ctrl ──pose──────────────┐
                                                    ▼
 get_vertices ──triangle──► transformation ×3 ──► projection ×3 ──┐
 (model ROM)                (one per vertex)    └► pixel_shader ──┤
                                                                  ▼
                                      rasterizer ◄──── triangle + colour
                                          │  read/modify/write with Z test
                                          ▼
                                     pingpong_fb ──display buffer──► pixel_gray
                                          ▲
                     video_sig_gen ──► scale (3×3 → 1 image pixel)
```

1. **get_vertices** reads the model ROM and offers one triangle (three
   vertices plus the model's centre of mass) at a time. The list repeats
   forever, so the model is redrawn again and again. A flag marks the last
   triangle.
2. Three **transformation** units, one per vertex, work in lockstep. Each
   one moves the vertex so the centre of mass sits at the origin, appends
   w = 1 and multiplies by three 4x4 rotation matrices from **rot_lut**:
   roll about z, then pitch about x, then yaw about y. It then scales the
   result and moves it to (tx, ty, distance) in front of the camera.
3. Three **projection** units, again one per vertex, multiply by a
   perspective matrix, divide x and y by w = z, and map the range (-1, 1)
   onto pixels 0..240. Each unit also produces an 8-bit depth.
4. At the same time, **pixel_shader** computes one gray level for the
   whole triangle from the angle between its normal and the light.
5. **rasterizer** scans the triangle's bounding box. It keeps the pixels
   that pass the inside test, and writes colour and depth wherever the
   triangle is nearer than what the buffer already holds.
6. After the last triangle, the rasterizer raises `obj_done`. The two
   frame buffers then swap roles: the finished picture goes on screen, and
   the other buffer is erased and drawn again with the current pose.

Each stage talks to the next with valid/ready. A stage made of parallel
units accepts a triangle only when all of its units are ready. It hands the
triangle on only when all of them have finished. The per-vertex units have
equal latency, so they never drift apart.

## Number formats

| quantity | format |
|---|---|
| model and camera coordinates, scale, translation | signed Q16.16 in 32 bits (`gfx_pkg::fx_t`) |
| angles | 4-bit index, one step = 22.5°, 16 steps per turn |
| screen positions | signed 16 bits with 4 fraction bits, 1/16 pixel (may lie off screen) |
| depth | 8 bits, one step = 1/16 unit of z, saturating at 255 |
| frame-buffer word | 16 bits: colour in [15:8], depth in [7:0] |

Fixed point replaces the 32-bit floating point of the original scheme.
The buses keep their 32-bit width. The accuracy is more than enough for a
240-pixel screen: on random tests, vertices agree with a floating-point
model to within 1/256 unit, and screen positions to within 1/16 pixel.

## The rasterizer

This is the least obvious part of the design. It is a state machine with
six states.

- **ERASE / NEXT.** After every swap, the buffer about to be drawn still
  holds the picture shown before. The rasterizer walks it word by word:
  ERASE writes black with depth 255, and NEXT advances the address. This
  takes 2 × 57,600 = 115,200 cycles, about 1.6 ms.
- **RECEIVE.** `ready_out` is high here. On a triangle, the unit clips the
  bounding box to the screen. It forms the side vectors v1 = p1 − p0 and
  v2 = p2 − p0, and computes D = det(v1 v2), det(p0 v2) and det(p0 v1).
  It drops the triangle if D = 0, if the box is empty, or if any vertex was
  at or behind the near plane.
- **ITER.** For the current pixel v, the unit uses the barycentric
  coefficients

  a = (det(v v2) − det(p0 v2)) / D,  b = −(det(v v1) − det(p0 v1)) / D

  The pixel is inside when a > 0, b > 0 and a + b < 1. No division is
  needed: the hardware compares the two numerators, and their sum, against
  0 and D. It flips all the signs when D < 0, which happens for the other
  winding order. The point tested is the pixel centre, (x + ½, y + ½).
  The vertices are on a 1/16-pixel grid, so every product is an integer
  and the test is exact. A pixel that fails the test costs one cycle. A pixel inside
  issues a frame-buffer read and moves to CHECK.
- **CHECK.** The stored word has arrived. If the triangle's depth is
  strictly lower than the stored depth, the new colour and depth are
  written. The scan then moves on, one or two cycles per pixel in all.
- **DONE.** This state is left after the last triangle. It pulses
  `obj_done` for one cycle, and the buffers swap on that pulse.

The inside test is strict, so a pixel centre exactly on an edge belongs to
neither triangle. With whole-pixel vertices this happens all the time: on a
finely divided mesh the shared edges run through rows of pixel centres, and
the surface is left full of holes. That is why the projection keeps four
fraction bits. It now happens only for centres on an exact diagonal, such
as the 80 centres on the diagonal shared by the two halves of a cube face
at the rest pose. Such pixels show whatever lies behind them. Each triangle has a single
depth: the mean of its three vertex depths. Faces that meet at an angle are
therefore resolved by their average distance, not pixel by pixel.

## Shading

The light points out of the camera, along (0, 0, −1). For a triangle with
normal n = <a, b, c> = (v1 − v0) × (v2 − v0):

cos²θ = c² / (a² + b² + c²)

Squaring both sides removes the square root. The shader rounds 16·cos²θ
to an index from 0 to 15; a value of 16 is folded onto 15. The index
selects a gray level from a 16-entry table, gray[k] = round(255·2^((k−15)/4)),
which runs from 19 to 255. A face turned away from the camera (c ≥ 0) is
black. The sign test assumes the model's triangles wind counter-clockwise
when seen from outside.

The shader's state machine takes one step per cycle: RECEIVE, VECTOR_CALC,
NORMAL_CALC_MULT, NORMAL_CALC_ADD, SQUARE_NORMAL, MAGNITUDE (one adder used
twice), RECIP, COS_SQUARED, ROUND and COLOR. RECIP is a 76-bit sequential
division of 16·c² by |n|², so a lit triangle takes 87 cycles.

## Frame buffers and the Z buffer

`pingpong_fb` holds two memories of 240 × 240 words. The depth byte of each
word is the Z buffer, so there is no separate depth memory. At any time,
one memory is the *draw* buffer. The rasterizer reads and writes it through
a read-first port with one cycle of read latency. The other memory is the
*display* buffer, which the video path reads through its own port. `swap`
exchanges the two roles. The video path never sees a picture that is still
being drawn. The swap is not timed to the vertical blank, so a new picture
can appear partway down the screen.

## Video

`video_sig_gen` produces standard 1280 x 720 60 Hz timing from the 74.25 MHz
clock: 1650 clocks per line, 750 lines, and active-high syncs.
`scale` maps columns 280..999 and lines 0..719 onto the image: each image
pixel covers 3 × 3 screen pixels, and the image is centred in the line.
Outside that square the output is black. `gfx_top` delays the syncs and
`active_draw` by one cycle to line them up with the frame-buffer read.
`pixel_gray` is meant for an external TMDS/HDMI encoder, which is not part
of this RTL.

## Controls

| input | effect |
|---|---|
| `btn[0]`, `btn[1]`, `btn[2]` | roll, pitch, yaw +22.5° per press (two-flop synchroniser and edge detect, no debounce filter) |
| `sw[1:0]`, `sw[3:2]` | {decrease, increase} x and y translation, 1/16 unit per video frame |
| `sw[5:4]`, `sw[7:6]`, `sw[9:8]` | {decrease, increase} pitch, roll, yaw, one step per frame |
| `sw[11:10]` | {decrease, increase} scale, 1/64 per frame, held between 1/16 and 4 |

The object sits at a fixed depth of 4 units (the `DISTANCE` parameter of
`input_ctrl`). A new pose takes effect from the next triangle fetched, so
a picture drawn while the pose changes can mix the old and new poses.

## The model ROM

`get_vertices` loads `rtl/cube_model.mem` with `$readmemh`. The file has
one 32-bit hex word per line:

- word 0: the triangle count N;
- words 1–3: the centre of mass (x, y, z) in Q16.16;
- then 9 words per triangle: v1.xyz, v2.xyz, v3.xyz.

The file shipped here is a 2 × 2 × 2 cube with corners at 0 and 2 on each
axis, so its centre of mass is (1, 1, 1). It has 12 triangles, wound
counter-clockwise when seen from outside. Any model up to `MAX_TRIS` =
3000 triangles fits: that is about a 1500-vertex closed mesh. To use
another model, convert it to the same layout and point `MODEL_FILE` at the
new file. Each ROM word takes two cycles to read, so a triangle is ready 18
cycles after the previous one was taken.

## Top-level interface

`gfx_top` runs entirely on one clock, `clk_pixel`.

| port | direction | meaning |
|---|---|---|
| `clk_pixel` | in | 74.25 MHz pixel clock of 720p60 |
| `sys_rst` | in | synchronous reset, active high |
| `btn[2:0]` | in | roll, pitch and yaw step buttons |
| `sw[11:0]` | in | six {decrease, increase} switch pairs |
| `hor_sync`, `vert_sync`, `active_draw` | out | 720p timing, active high, one cycle behind the counters |
| `pixel_gray[7:0]` | out | gray level of the current raster pixel, 0 outside the image |
| `new_frame`, `frame_count[5:0]` | out | frame strobe and frame number modulo 64 |
| `obj_done`, `buffer_sel`, `erasing` | out | status: model drawn (buffers swap), buffer being drawn, erase pass running |

An HDMI encoder would take the three timing signals and drive
`pixel_gray` onto all three colour channels.

## Timing summary

| unit | latency (accept → valid) |
|---|---|
| transformation | 5 cycles |
| projection | 52 cycles (48-bit sequential divider); 3 if the vertex is clipped |
| pixel_shader | 87 cycles lit, fewer for black faces |
| rasterizer | 1 cycle per pixel outside, 2 inside; erase 115,200 cycles |
| get_vertices | 18 cycles per triangle |

For the cube at the default pose, one picture (erase plus drawing) takes
about 155,000 cycles (2.1 ms), most of it the erase pass. A 2960-triangle
sphere takes about 327,000 cycles (4.4 ms), well inside one 16.7 ms video
frame.

## Differences from the original scheme, and limits

- **Fixed point instead of floating point.** All floating-point multiplier,
  adder, reciprocal and conversion cores are replaced by fixed-point
  operators and two kinds of sequential divider. Latencies therefore
  differ: for example, one matrix product takes one cycle here, not the
  multi-cycle latency of a floating-point multiplier.
- **Word width.** Frame-buffer words are 16 bits (8 colour, 8 depth).
- **Depth.** There is one depth per triangle, and no per-pixel
  interpolation.
- **No FIFO.** The stages are coupled directly by valid/ready. There is no
  triangle FIFO between them.
- **Not included.** The clock generator, the HDMI encoder and serialiser,
  and the offline tool that turns an .obj file into the ROM image are not
  included.
- **Memory size.** The memory adds up to 230,400 bytes of frame buffers
  plus 108,016 bytes of ROM at `MAX_TRIS` = 3000, which is 338,416 bytes.
  That is slightly more than the 337,500 bytes of block RAM on the target
  board. Lower `MAX_TRIS` for a real build.
- **Resolution.** The image size is 240 × 240 throughout (the `SCREEN`
  constant in `gfx_pkg`). `scale` has 8-bit outputs, so a larger image
  needs wider coordinates there.

## Simulating

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl rtl/gfx_pkg.sv tb/tb_gfx_top.sv \
          --top-module tb_gfx_top -o sim
./obj_dir/sim
```

Run from the directory that holds `rtl/`, because the model ROM is read as
`rtl/cube_model.mem`. Simulation is two-state, so every register that is
read is reset. The units carry concurrent assertions for their handshake
rules: an output held until taken, the two dividers of a projection unit
in lock step, writes only in the erase and Z-test states. Pass `--assert`
to have them checked.

| testbench | what it establishes |
|---|---|
| `tb_gfx_top` | full-size end-to-end run of the cube. It captures three pictures from the video outputs and checks them against geometry: a white 80..160 square at the rest pose, two gray-76 faces after a 45° yaw, and a shift to the right after x translation. It also checks that erase, swap, Z-test rejection and acceptance, black back faces and handshake stalls all occur. It runs in about 10 s. |
| `tb_workload_sphere` | full-size top with a 1482-vertex, 2960-triangle sphere generated into the model ROM by the testbench. After three renders it reads the shown buffer and checks a closed disc (at least 95 % lit inside, nothing outside), white at the centre and darker towards the rim. |
| `tb_rasterizer` | random triangles, with vertices in 1/16 pixel, on a 16×16 screen against a reference Z buffer built with three edge functions; erase timing; `obj_done` |
| `tb_pixel_shader` | random triangles against a floating-point cos² model; latency |
| `tb_projection`, `tb_transformation` | random vertices against floating-point models; latency and back-pressure |
| `tb_rot_lut` | all 48 matrices against `$sin`/`$cos` |
| `tb_pingpong_fb` | roles of the two buffers before and after swaps |
| `tb_get_vertices` | cube geometry, `obj_done`, wrap-around, fetch time |
| `tb_input_ctrl`, `tb_video_sig_gen`, `tb_scale` | controls, 720p timing, mapping of the whole raster |

## Files

- `rtl/gfx_pkg.sv` holds the types, Q16.16 helpers and sine table.
- `rtl/udiv_seq.sv` is the shared sequential divider.
- `rtl/fb_bram.sv` is one frame-buffer memory.
- Every other file in `rtl/` is one unit named above.
- `gfx_top` is the top level.
