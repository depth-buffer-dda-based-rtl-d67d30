# 3D-DDA line scan converter with a depth buffer

A classic Digital Differential Analyzer (DDA) draws a straight line by
stepping one pixel at a time along the longer axis and adding a constant
fractional increment to the other coordinate. That gives x and y for every
pixel, which is enough for a plain frame buffer. Hidden-surface removal with a
depth buffer (Z buffer) also needs the depth of every pixel, so that a pixel is
only written when it is nearer to the viewer than whatever is already stored
there.

This design carries the DDA into three dimensions. z is interpolated with its
own increment, exactly like y, so each generated pixel comes with a depth at the
cost of one more divider and one more adder. The pixel then goes through a
read–compare–write depth test against a 128 x 128 buffer that holds one
intensity byte and one depth byte per pixel. After one setup clock per line,
the unit produces one pixel per clock.

## The algorithm in fixed point

All coordinates are unsigned **8.8 fixed point**: 8 integer bits and 8 fraction
bits, so `0f.00h` is 15.0 and `01.a5h` is 1.645. For end points
V1 = (x1, y1, z1) and V2 = (x2, y2, z2):

1. `dx = x2 - x1`, `dy = y2 - y1`, `dz = z2 - z1`. These are signed, 17 bits (9.8).
2. `Length = max(|dx|, |dy|)`. On a tie x is the major axis.
3. `xinc = dx / Length`, `yinc = dy / Length`, `zinc = dz / Length`. Each is signed 8.8,
   **rounded to nearest** (see below). One of xinc and yinc is ±1.0.
4. Start at V1. Then, for `Length + 1` clocks, output
   `(round(x), round(y), round(z))` and add the increments.
   `round(v)` is the integer part plus the first fraction bit, so halves round up.

The first pixel is V1 itself and the last one is V2 (up to rounding error), so
both end points are drawn. For integer end points, the number of pixels is
`Length + 1`, where Length is the integer part of `Length`.

Worked example: the line from (1, 1, 0) to (15, 10, 4).
`dx = 0e.00`, `dy = 09.00`, `dz = 04.00`, and `Length = 0e.00` (14).
The increments are `xinc = 01.00`, `yinc = 00.a5` and `zinc = 00.49`.
9/14 = 0.6429 is 164.6/256: it rounds to a5h, where truncating would give a4h.
Over the 15 pixels, the unrounded y runs 01.00, 01.a5, 02.4a, 02.ef, …
The pixels are:

| x | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| y | 1 | 2 | 2 | 3 | 4 | 4 | 5 | 6 | 6 | 7  | 7  | 8  | 9  | 9  | 10 |
| z | 0 | 0 | 1 | 1 | 1 | 1 | 2 | 2 | 2 | 3  | 3  | 3  | 3  | 4  | 4  |

A line with a negative slope works the same way, through two's-complement
increments. From (1, 15, 0) to (5, 5, 5), `dy = -0a.00`, so `yinc = ff.00` (−1.0).
The other increments are `xinc = 00.66` (≈0.4) and `zinc = 00.80` (0.5).

### Why the rounding and wrap-around are safe

* The accumulators are 16 bits wide and wrap modulo 2^16. Adding a signed
  increment is then plain binary addition.
* The divider keeps only the low 16 bits of its quotient. For x and y the
  quotient never exceeds ±1.0. For z it can: a short line with a large depth
  change, such as dz = 200 over Length 1, overflows signed 8.8. The truncated
  quotient is still right modulo 256. The z accumulator wraps modulo 256 as
  well, so z still reaches z2.
* Rounding the increments to nearest halves the per-step error compared with
  truncation. At most 255 steps fit on the 8-bit axes, so the error that
  builds up stays below half a pixel for integer end points.
* Coordinates of 255.5 or more round to 0. These lie off the 128 x 128 screen
  anyway.

## Block structure

```
 start, intensity, V1, V2
          │
   ┌──────▼───────┐ dx,dy,dz  ┌──────────────────┐
   │ dda_control  │──────────►│ dda_divider  x3  │ xinc,yinc,zinc
   │ differences, │ |dx|,|dy| │                  │──────┐
   │ sequencing,  │──┐        └──────▲───────────┘      │
   │ depth test   │  │  ┌────────────┴──────┐           │
   └─▲───┬────▲───┘  └─►│ dda_length_select │ Length    │
     │   │    │         │ comparator + mux  │           │
     │   │    │         └───────────────────┘           │
     │   │ load/enable, V1                              │
     │   └─────────────►┌───────────────────────────┐◄──┘
     │                  │ dda_line_increment        │
     │ zo               │ 3 adders + 3 x dda_round  │
     ├──────────────────┤ xs,ys,zs -> xo,yo,zo      │
     │                  └─────────┬─────────────────┘
     │                     xo,yo  │
     │                  ┌─────────▼──────┐
     │ addr, on-screen  │ dda_addr_gen   │ (yo << 7) + xo
     ├──────────────────┤ shifter+adder  │
     │                  └─────────┬──────┘
     │ Zb                         │ read address
     │                  ┌─────────▼──────┐
     └──────────────────┤ depth_buffer   │◄── WE, address, {intensity, z}
                        │ 16384 x 16 bit │      from dda_control
                        └────────────────┘
```

| File | Contents |
|------|----------|
| `rtl/dda_pkg.sv` | Widths (8.8 format, 128 x 128 screen, 8-bit intensity and depth), `vertex_t` and the other shared types |
| `rtl/dda_control.sv` | The subtractors, the absolute values, the state machine, the pixel counter, and the depth-test stage that drives the write enable |
| `rtl/dda_length_select.sv` | The comparator \|dy\| > \|dx\| and the multiplexer that gives Length |
| `rtl/dda_divider.sv` | A combinational restoring divider with round-to-nearest (instantiated three times) |
| `rtl/dda_line_increment.sv` | The xs/ys/zs accumulators and increment registers, the three adders and the registered rounded pixel |
| `rtl/dda_round.sv` | Rounds 8.8 to the nearest integer |
| `rtl/dda_addr_gen.sv` | `address = yo*128 + xo`, plus the on-screen flag |
| `rtl/depth_buffer.sv` | The memory, with its write port, registered read port and initialisation sweep |
| `rtl/dda3d_top.sv` | Wires everything together and shares the read port between the depth test and read-back |

## Timing of one line

| clock | state | what happens |
|-------|-------|--------------|
| 0 | IDLE | `start_i` is high. The subtractors, comparator, multiplexer and dividers all settle from the vertex inputs. `load` stores V1 and the three increments. The intensity and the step count are latched |
| 1 … 1+L | RUN | `enable`: the current position is rounded into the pixel register, then stepped |
| 2 … 2+L | | `pix_valid_o` shows the pixel. Its address goes to the buffer's read port |
| 3 … 3+L | | Zb arrives. `we` is set if the pixel is on screen and z < Zb |
| 4+L | IDLE | `done_o` pulses. A new `start_i` is accepted in this same clock |

L is the integer part of Length. The vertex and intensity inputs need to be
valid only in the start clock. The first pixel appears two clocks after start,
and a line of N pixels takes N + 3 clocks from start to done. The throughput is
one pixel per clock. The single setup clock matches the method's own
implementation. The price is a long combinational path: subtract, absolute
value, compare, then a 26-row divider, all between the input pins and the
increment registers. If a higher clock rate is needed, the first thing to do is
to register the differences, which adds one setup clock.

If `clear_i` and `start_i` arrive in the same clock, the clear is taken and the
start is dropped.

## The depth test and its hazards

The buffer's read port has one clock of latency. Each pixel is therefore read
in the clock it appears and written, if it passes, in the next clock, while the
following pixel is being read. A read could miss a write that has not yet
happened only if two pixels in a row had the same address. Within one line that
cannot happen, because the major coordinate changes by exactly one every step.
Between lines, the DRAIN clocks and the setup clock separate the last write of
one line from the first read of the next, so a vertex shared by two lines is
tested against the updated depth. No forwarding path is needed.

The test is strict (`z < Zb`). A second line at the same depth therefore does
not overwrite the first. Smaller z means nearer.

Pixels with x ≥ 128 or y ≥ 128 are produced, but they are not written. Without
this check the address would wrap onto another row.

## Buffer initialisation and read-back

Before an image is drawn, every word must hold the background intensity and the
maximum depth. A one-clock pulse on `clear_i` (taken only while no line is
active) starts a sweep that writes `{bg_intensity_i, 8'hff}` to one word per
clock. The sweep takes 16384 clocks, and `buf_busy_o` is high throughout. Starts
wait until it ends.

`rd_addr_i` / `rd_intensity_o` / `rd_z_o` give read access to the buffer, with
one clock of latency, while `busy_o` is low. A display controller or a host
would connect here. No display timing is part of this design.

## Interface of `dda3d_top`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | Clock, asynchronous active-low reset |
| `start_i` | in | 1 | Start a line. Taken when `busy_o` and `buf_busy_o` are low |
| `intensity_i` | in | 8 | Intensity written for every visible pixel of the line |
| `v1_i`, `v2_i` | in | `vertex_t` (3 x 16) | End points, 8.8 unsigned |
| `busy_o`, `done_o` | out | 1 | Line in progress / one-clock end pulse |
| `clear_i`, `bg_intensity_i`, `buf_busy_o` | in/in/out | 1/8/1 | Buffer initialisation |
| `pix_valid_o`, `xo_o`, `yo_o`, `zo_o` | out | 1/8/8/8 | Generated pixel stream |
| `xs_o`, `ys_o`, `zs_o` | out | 16 | Unrounded position (for observation) |
| `y_major_o`, `zpass_o`, `zfail_o` | out | 1 | \|dy\| > \|dx\| for the vertices on the inputs; a pixel written / hidden |
| `rd_addr_i`, `rd_intensity_o`, `rd_z_o` | in/out/out | 14/8/8 | Read-back |

## Where this design makes its own choices

These points follow from the description of the method but were not fixed by
it:

* **Pixel count.** The textbook loop `i = 1 .. Length` would draw Length
  pixels. This unit draws `Length + 1`, ending on the second vertex. That
  matches the hand-computed pixel tables of the method.
* **Divider rounding.** Round half up on the magnitude, then the sign is
  applied. This reproduces every increment of the worked examples
  (00.a5, 00.49, 00.66, ff.00, 00.80). A Length of 0 gives zero increments and a
  single pixel.
* **Non-integer end points.** The hardware accepts them. The step count is then
  the integer part of Length, so the last pixel can fall short of V2 by up to
  one pixel.
* **Divider structure.** The divider is combinational, so that all three
  increments are ready within the start clock. Its delay therefore sets the
  clock period. A faster clock would need a pipelined or iterative divider. That
  would add setup clocks but would not change the pixel rate.
* **Pixel counter.** 9 bits, enough for 255 steps. A wider counter would change
  nothing at 8-bit coordinates.
* **Maximum depth** is `8'hff`. The start/done handshake, the clear/busy sweep,
  the read-back port and the on-screen check are also this design's own.
* Intensity is constant along a line.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT checks=N failures=M` line and stops itself with a watchdog if it
hangs.

| Testbench | What it checks |
|-----------|----------------|
| `tb_dda_round` | All 65536 inputs, against floor(v + 0.5) |
| `tb_dda_length_select` | The worked examples, ties, and random magnitudes |
| `tb_dda_divider` | The six published increments, then random cases against a real-arithmetic model |
| `tb_dda_line_increment` | Both worked examples, step by step: unrounded traces, rounded pixels, one-clock latency |
| `tb_dda_addr_gen` | All 256 x 256 inputs |
| `tb_depth_buffer` | Sweep length and contents, ignored writes during the sweep, random writes, read-before-write |
| `tb_dda_control` | Differences, load/enable/done timing, the depth-test write decision on a random pixel stream, and start blocked during the sweep |
| `tb_dda3d_top` | The full-size unit end to end (see below) |

`tb_dda3d_top` runs the full-size unit with no parameter overrides. It clears
the buffer and draws both worked examples, with their printed values checked.
It draws the second example again behind the first, then a single point, a line
leaving the screen, and 300 random lines. It checks every pixel and its timing
against a reference model of the algorithm, then reads all 16384 words back and
compares them with the model's buffer. It also counts how often each mechanism
occurs (x-major, y-major, negative increments, depth pass and fail, off-screen
pixels, single-pixel lines, clear, read-back), and fails if one never occurs.
Finally it checks that a clear and a start in the same clock take the clear.
It runs in well under a second.

To run it with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -Irtl rtl/dda_pkg.sv tb/tb_dda3d_top.sv --top-module tb_dda3d_top
./obj_dir/Vtb_dda3d_top
```

Replace `dda3d_top` with a module name to run that module's testbench. Verilator
reports two kinds of lint warning:

* `SYNCASYNCNET`: the assertions in `dda_control` sample the asynchronous reset
  synchronously.
* `UNUSEDSIGNAL`: the fraction bits of Length are not used by the step counter.

## Synthesis notes

The design is plain synthesizable SystemVerilog. The buffer is a single array
of 16384 x 16 bits with one write port and one registered read port, which maps
onto block RAM (on a Spartan-3-class part, 16 blocks of 18 Kbit). The three
dividers are the largest logic: about 26 rows of 17-bit subtract-and-select
each. The unit uses no multipliers.
