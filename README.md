# Landscape generator: a rotating wireframe terrain on VGA

This design draws a fractal landscape as a wireframe on a 640 x 480 VGA
monitor and turns it on command. A processor generates a 32 x 32 height map
with the diamond-square method. The hardware then does the 3-D work: it
rotates every grid point by a view angle and tilts it 60 degrees toward the
viewer. It then removes faces that point away from the viewer and rasterises
the edges of the rest with Bresenham's line method into a 320 x 240 frame
buffer. A second frame buffer is scanned out to VGA at the same time, with
every pixel doubled. The two buffers swap at the end of each displayed
frame. Everything runs on one 25 MHz clock.

The RTL is SystemVerilog (IEEE 1800-2017). It models the design of a
student FPGA project written for an Altera DE2 board with a Nios II soft
processor. The processor, its bus fabric and its software are not part of
this RTL. The hardware side of their interface is: a small register block,
on an Avalon-MM slave port brought out of the top module.

## The frame loop

`system_fsm` runs the whole system through four states, once per displayed
frame:

| state    | what happens                                                                 | leaves when |
|----------|------------------------------------------------------------------------------|-------------|
| Generate | `gen_start` is high; the CPU writes a new height map over the Avalon port     | CPU sets `gen_done` |
| Draw     | `draw_faces` draws the height map into the hidden frame buffer                | `draw_done` |
| Wait     | the display finishes the frame it is showing                                 | `frame_done` from the VGA unit; the buffers swap |
| Clear    | the buffer that is now hidden is zeroed, one pixel per clock (76 800 clocks)  | done; go to Generate if *animate* is on, else to Draw |

When animate is off, the same landscape is drawn again every frame. That is
how the view turns without generating a new landscape. A frame lasts
800 x 525 = 420 000 clocks (16.8 ms). A draw pass takes 23 000 to 58 000
clocks and a clear takes 76 800, so a new picture is ready for every frame.
Reset enters Generate with buffer 1 displayed.

## The face drawer (`draw_faces`)

This is the core of the design. One pass goes through these steps:

1. **Angle.** The pass reads sine and cosine of the current view angle `phi`
   (0..359 degrees) from two 180-entry ROMs (`trig_rom`). Angles of 180 and
   more read entry `phi-180` and negate it.
2. **Grid sort.** The pass visits the 31 x 31 faces of the height map in one
   of four orders, picked by the quadrant of `phi`. Faces far from the
   viewer come first. Face (c, r) has corners (c,r), (c+1,r), (c,r+1) and
   (c+1,r+1):

   | quadrant | first face | inner loop | outer loop |
   |----------|-----------|------------|------------|
   | 0-89     | (0, 0)    | r + 1      | c + 1      |
   | 90-179   | (0, 30)   | c + 1      | r - 1      |
   | 180-269  | (30, 30)  | r - 1      | c - 1      |
   | 270-359  | (30, 0)   | c - 1      | r + 1      |

3. **Projection.** For each face, the four corner heights are read and
   passed through `vertex_rotator`. The reads are pipelined: issue, RAM
   latency, rotator latency. The rotator uses ground position
   `gx = -96 + 6c`, `gy = -96 + 6r`, and height `z`:

       x_screen = gx cos(phi) - gy sin(phi)                                + 160
       y_screen = cos(60) (gx sin(phi) + gy cos(phi)) - z sin(60)          + 180

   Screen y points down, so height lifts a point up the screen.
4. **Backface cull.** `face_normal` forms `u = TR - TL` and `v = BL - TL`,
   then computes `normal_z = ux*vy - uy*vx`. If `normal_z < 0`, the face
   points away and is skipped (when `backface_on` is set). A flat face
   always has a positive normal. Only slopes that face away from the viewer
   are culled.
5. **Edges.** The drawer draws four edges, TL-TR, TL-BL, TR-BR and BL-BR,
   with `line_drawer` at one pixel per clock. Pixels that fall outside the
   320 x 240 frame are dropped.
6. **Colour.** Faces are numbered in drawing order and cut into six bands of
   160 faces. The bands get colour index 1, 2, 3, 1, 2, 3. Far faces and
   near faces therefore differ in colour. Each band can be switched off with
   a bit of `z_section`.
7. **Rotation.** After the last face, the angle moves one step up or down if
   a rotate key is held. It wraps between 0 and 359.

Timing of a pass: the pass starts in the clock in which `start` is seen.
From then until the clock in which `done` is high, it takes
`3 + 9*961 + sum over drawn edges of (pixels + 2)` clocks. Each face costs
4 issue clocks, 3 clocks to drain the pipeline, 1 cull clock and 1 clock to
step to the next face. `done` is decoded from the final state. The
controller holds `start` high through Draw, and `start` is already low when
the drawer is idle again.

### Number formats

Heights are signed fixed point with 36 bits: 18 integer bits and 18
fraction bits. The original design picked 36 bits to fit the FPGA's 9-bit
multipliers. Sine and cosine use 20 bits with the same 18 fraction bits, so
1.0 is `0x40000`. The tilt constants are 0.5 and 0.866 (`0x20000`,
`0x376CF`). The rotator computes every product exactly in 64 bits and
rounds down to whole pixels. Screen coordinates are 11-bit signed.

### Line unit (`line_drawer`)

The line unit uses the integer, all-octant form of Bresenham's method. The
error is `err = |dx| - |dy|`. Each clock it compares `2*err` with `-|dy|`
and with `|dx|`, and steps x, y or both. A pulse on `start` latches both end
points. `plot` is high for exactly `max(|dx|,|dy|) + 1` clocks. The pixels
run from p0 to p1 inclusive. `done` follows the last pixel by one clock.

## Memories

| memory               | size              | organisation |
|----------------------|-------------------|--------------|
| `heightmap_ram`      | 1024 x 36 bits    | word `row*32 + col`; x and y come from the address |
| `framebuffer_ram` x2 | 76 800 x 2 bits   | word `y*320 + x`; 0 = background; power-up contents zero |
| `trig_rom` x2        | 180 x 20 bits     | word `a` = sin or cos of `a` degrees, built at elaboration from `$sin`/`$cos` |

All of them read synchronously, with one clock of latency. The top writes
the hidden frame buffer and reads both at the scan position. It picks the
shown buffer with a select delayed one clock, so a swap never mixes the two
buffers within one pixel.

## CPU interface (`hmap_avalon_ctrl`)

Avalon-MM slave, 32-bit words, one clock of read latency:

| offset | name  | access | meaning |
|--------|-------|--------|---------|
| 0      | x     | R/W    | grid column of the next height |
| 1      | y     | R/W    | grid row of the next height |
| 2      | data  | R/W    | height in 18.18 fixed point; each write also writes RAM word `y*32+x` with the value zero-extended to 36 bits |
| 3      | start | R      | 1 while the controller is in Generate |
| 4      | done  | R/W    | bit 0 is `gen_done`; software writes 1 then 0 |

Software side: wait until `start` reads 1. Then write x, y and data for all
1024 points and pulse `done`. Height map writes are ignored outside the
Generate state.

## VGA output (`fb_to_vga`)

The VGA unit uses standard 640 x 480 timing at 25 MHz:

- horizontal: 96 sync, 48 back porch, 640 active and 16 front porch clocks;
- vertical: 2 sync, 33 back porch, 480 active and 10 front porch lines.

Sync is active low. The read address is `(line/2)*320 + col/2`. RAM data
returns one clock after the address. The colour is registered one clock
later, and hs, vs and `blank_n` are delayed two clocks to match.
`frame_done` pulses once per frame. `color_options` picks a colour table. In
the tables, index 0 is a background whose red value ramps with the line
count. The count starts at the first vertical sync line, so the visible
ramp runs from 35 to 514:

| color_options | index 0              | index 1        | index 2          | index 3 |
|---------------|----------------------|----------------|------------------|---------|
| 000           | (line, 0x080, 0)     | cyan           | magenta          | white   |
| 001           | (line, 0x080, 0)     | (0, max, line+200) | same as 1    | white   |
| 010           | (line, 0x080, 0)     | cyan           | cyan             | cyan    |
| 100           | black                | white          | white            | white   |
| others        | (line, 0x080, 0)     | cyan           | cyan             | white   |

## Top level and controls (`landscape_top`)

The top level takes the 50 MHz board clock and halves it; the 25 MHz clock
comes out on `vga_clk` and also clocks the Avalon port. `reset` is active
high. Controls pass through `input_debounce`: a two-flop synchroniser, then
an input must hold a new value for 500 clocks before the output follows it.

| input   | function |
|---------|----------|
| `sw[0]` | animate: a new landscape every frame |
| `sw[7:5]` | colour table |
| `key[1]` (low) | turn the view angle one degree up per frame |
| `key[2]` (low) | turn the view angle one degree down per frame |
| `ledr[3:0]` | controller state, one-hot: Generate, Draw, Wait, Clear |

Parameters: `BACKFACE_ON` (1), `Z_SECTION` (all bands on) and
`DEBOUNCE_CYCLES` (500). Lower-level parameters are listed in each file's
header; their defaults are the original design's sizes.

## Where this RTL departs from the original design

- **Rotation formula.** The original write-up gives the rotation with the
  tilt applied to the other screen axis. The form above, which its own
  hardware used, is the one implemented.
- **Cull rule.** The cull rule is: cull when `normal_z < 0`. One statement
  of the original culls at zero as well, and its hardware drew only faces
  with `normal_z > 0`.
- **Angles above 179.** These negate the table value exactly (two's
  complement), not bitwise, and the angle wraps at 359, not 360.
- **Face drawer timing.** The face drawer's `done` is a state decode. Its
  corner reads are pipelined. Off-frame pixels are dropped instead of
  wrapping into other rows.
- **Line unit.** It uses `>=`/`<=` comparisons, so every line ends exactly
  on its end point.
- **Avalon data.** The height map data comes straight from the Avalon write
  data. Chip select is required, and only the five used registers exist.
- **Debouncing.** Each input has its own debounce counter, where the
  original shared one counter between inputs.
- **Animate control.** Animate is a switch (`sw[0]`), as the original
  describes it, though its hardware read push button 0.
- **Colour bands.** Bands count faces from zero, so each band holds exactly
  160 faces. The original counted from one, which made its first band one
  face shorter.
- **Reset and power-up.** A reset input is added, and the controller starts
  in Generate, where the original started in Draw. A Clear lasts exactly
  76 800 clocks. Frame buffers power up zero, as FPGA block RAM does.
- **VGA blanking and frame_done.** `vga_blank_n` marks the active picture.
  `frame_done` is a single clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_line_drawer`: lines in all octants and 200 random lines, compared
  pixel by pixel with a software Bresenham. The plot cycle count is checked.
- `tb_vertex_rotator`: the exact integer formula and real-valued
  trigonometry, checked over 3000 random vertices.
- `tb_draw_faces`: eight full passes over diamond-square maps. The passes
  cover all quadrants, both wrap-arounds, culling off and masked bands. Each
  pass compares all 76 800 pixels, the numbers of drawn and culled faces,
  the exact clock count and the new angle against a software renderer.
- `tb_fb_to_vga`: five whole frames, every clock checked for sync, blanking
  and colour, across five colour tables.
- `tb_landscape_top`: the whole system at default parameters, with a
  behavioural model of the CPU software on the Avalon port. After each
  buffer swap it decodes the entire VGA frame back to colour indices and
  compares it with a reference render. It also counts each mechanism:
  every state, both swap directions, both Clear exits, angle up and down,
  culling, clipping, colour-table switch and debouncing.
- The remaining tests cover the memories, the register block, the debouncer
  and the controller.

Run one test with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/lg_pkg.sv tb/tb_landscape_top.sv --top-module tb_landscape_top
    ./obj_dir/Vtb_landscape_top

The full-system test simulates five frames (about 2.5 million clocks) and
takes a few seconds.

## Not included

- The Nios II processor, its Avalon fabric and SRAM, and the C program that
  builds the landscape. The testbench contains a model of the program's bus
  traffic.
- The VGA DAC and other board parts.
