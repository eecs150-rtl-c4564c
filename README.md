# Line drawing engine

A small memory-mapped accelerator that draws straight lines into a frame
buffer, so that a processor does not have to store every pixel itself. The
processor writes two end points and a color into a few registers. One register
write starts the line. The engine then issues one frame-buffer write per clock
cycle, computed with the integer Bresenham algorithm, while the processor goes
on with other work. Clearing an 800 x 600 screen takes at least 480,000 store
instructions on the processor. With the engine it takes 600 line commands of a
few register writes each, and the pixels are streamed at one per cycle.

The engine sits between three parties:

- the processor, which programs it over a memory-mapped word bus;
- the SRAM arbiter, which takes its pixel write requests and can refuse one
  for a cycle with `stall`;
- the frame buffer behind the arbiter, which holds one 16-bit color per pixel.

The processor, arbiter and frame buffer are not part of this RTL. Their
connections are the ports of `line_engine_top`.

## Programming model

All registers are 32-bit words. Coordinates use the low 10 bits of the written
value, so they range over 0..1023. The color uses the low 16 bits.

| Address       | Access | Register                      |
|---------------|--------|-------------------------------|
| `0x8040_0040` | W      | x0                            |
| `0x8040_0044` | W      | y0                            |
| `0x8040_0048` | W      | x1                            |
| `0x8040_004c` | W      | y1                            |
| `0x8040_0050` | W      | x0, and start a line          |
| `0x8040_0054` | W      | y0, and start a line          |
| `0x8040_0058` | W      | x1, and start a line          |
| `0x8040_005c` | W      | y1, and start a line          |
| `0x8040_0060` | W      | color                         |
| `0x8040_0064` | R      | control: bit 0 is **Ready**   |

Each coordinate has two addresses that write the same register. The lower one
only stores the value. The upper one (the *trigger* alias) stores it and starts
a line with the four coordinates and the color as they then stand.

The drawing sequence is:

1. Ready is set by reset.
2. Poll Ready until it reads 1.
3. Write whichever coordinates and color changed, using a trigger address for
   the last write.
4. Ready reads 0 from the cycle after the trigger write until the last pixel
   of the line has been accepted by the arbiter.

The processor should not write the registers while Ready is low. If it does,
the values are stored but the line in progress is not disturbed, because the
engine copied its inputs when the line started. A trigger write made while
Ready is low starts nothing.

Because the registers keep their values, lines that share everything but one
coordinate need a single write each. For example, a fan of lines from one
point needs one trigger write to x1 or y1 per line. The 800 x 600 clear needs
only a write to y0 and a trigger write to y1 per row.

Reads of the control register return `{31'b0, Ready}`. Other addresses read
as 0. The read path is combinational: `cpu_rdata` follows `cpu_addr` in the
same cycle.

## The Bresenham pipeline (`bresenham_core`)

The algorithm draws a line by walking its *major* axis one step per pixel and
deciding, with an integer error term, when the *minor* coordinate should move
by one. Reduced to the first octant and then generalised, it works like this:

1. **Steep test.** If |y1 − y0| > |x1 − x0|, the line is steep. x and y swap
   roles: y becomes the major axis. The swap is undone when a pixel is output.
2. **Ordering.** If the major coordinate of the first point is larger than
   that of the second, the two points are exchanged. The walk then always
   counts up.
3. **Set-up.** dx = major span (≥ 0). dy = |minor span|. The error starts at
   dx / 2, rounded down. The minor step is +1 if the minor coordinate rises
   towards the end point, otherwise −1.
4. **Walk.** For each major coordinate from start to end inclusive: output
   the pixel; subtract dy from the error; if the result is negative, step the
   minor coordinate and add dx back.

A line therefore has exactly dx + 1 pixels. The error stays within [0, dx]
between steps and within [−1023, 1023] just after the subtraction, so a
12-bit signed register holds it.

In hardware, these steps are spread over three stages and an output register:

| State / stage | Work done in the cycle                                                        |
|---------------|-------------------------------------------------------------------------------|
| `IDLE`        | On `start`: the steep test, then the end points latched in (major, minor) order |
| `SETUP`       | Point ordering, dx, dy, initial error, step direction                         |
| `DRAW`        | One iteration: the next pixel goes to the output register, and the error and coordinates are updated; leaves for `IDLE` after the end point |
| output reg    | `pix_valid` plus `pix = {x, y, color}`, the write request to the arbiter       |

The steep test needs two subtractions and a compare. The ordering needs a
compare and four muxes. Each DRAW iteration needs one subtraction, a sign test
and one add. Keeping these in separate cycles keeps every stage to roughly one
10/12-bit carry chain plus a mux.

### Stall

The write request `pix_valid`/`pix` is committed on a rising clock edge where
`pix_valid` is high and `stall` is low. While `stall` is high, the request
stays on the port unchanged. The `SETUP` and `DRAW` stages also hold, so no
pixel is dropped or repeated, and the engine continues where it stopped once
`stall` falls. An assertion in the core checks that a stalled request does not
move.

One thing ignores `stall`: capturing a new `start` in `IDLE`. It writes no
memory, and the single-cycle start pulse would otherwise be lost.

### Timing

With `stall` low, for a line of N pixels:

| Cycle   | Event                                                      |
|---------|------------------------------------------------------------|
| W       | Processor writes a trigger register                        |
| W+1     | `start` pulse; Ready reads 0 from here on                  |
| W+4     | First pixel on the write port                              |
| W+3+N   | Last pixel on the write port                               |
| W+4+N   | Ready reads 1                                              |

So throughput is one pixel per cycle, and a line costs 4 cycles beyond its
pixel count. Each cycle of `stall` while a pixel is waiting adds one cycle.

## Files

| File                         | Contents                                                        |
|------------------------------|-----------------------------------------------------------------|
| `rtl/line_engine_pkg.sv`     | Widths (`COORD_W` = 10, `COLOR_W` = 16), `pixel_t`, register offsets, base address |
| `rtl/line_engine_regs.sv`    | Address decode, coordinate/color registers, trigger pulse, Ready read-back |
| `rtl/bresenham_core.sv`      | The pipeline described above                                    |
| `rtl/line_engine_top.sv`     | The two joined; processor bus and pixel write port as ports     |
| `tb/tb_line_engine_regs.sv`  | Random writes in and around the register window against a software copy of the register map |
| `tb/tb_bresenham_core.sv`    | Directed lines (all octants, points, horizontal, vertical, diagonals, 0..1023 extremes) and random lines against a reference Bresenham model; exact cycle counts without stall; 40% and 90% random stall |
| `tb/tb_line_engine_top.sv`   | Whole engine driven only through the memory map at default parameters: timed lines, an 800 x 600 screen clear under 20% stall, 300+ random lines and fans under 35% stall, and a comparison of the whole 1024 x 1024 frame with a reference frame |

`line_engine_top` has one parameter, `BASE` (default `32'h8040_0040`), which
moves the register window. The widths are package constants.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
end-to-end test also reports how often each behaviour occurred: stalled
cycles, Ready seen low while polling, each trigger register, repeated trigger
writes, and steep, reversed and falling lines. It fails if any of them never
happened. In the screen-clear run with 20% stall, the 480,000 pixels took
603,702 cycles.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl \
  rtl/line_engine_pkg.sv rtl/line_engine_regs.sv rtl/bresenham_core.sv \
  rtl/line_engine_top.sv tb/tb_line_engine_top.sv \
  --top-module tb_line_engine_top -o sim
./obj_dir/sim
```

For the unit tests, swap in `tb/tb_bresenham_core.sv` or
`tb/tb_line_engine_regs.sv` and the matching top module. Each test runs in
about a second.

## Design choices and limits

The register map, the trigger-alias scheme, Ready, the 10-bit and 16-bit
widths, the one-pixel-per-cycle target, the stall behaviour and the pixel
sequence come from the engine's specification. The following are this
implementation's own choices:

- **Bus.** A plain word bus: 32-bit address, 32-bit write data, write enable,
  combinational read data. There are no byte enables, and every write is a
  word write. Unused upper bits of written words are ignored.
- **Reset.** Synchronous and active high. It clears all registers and sets
  Ready.
- **Pipeline depth.** Two set-up stages plus the output register, which gives
  4 cycles of start latency. The stages may be merged if timing allows.
- **Ready.** Stays low until the last pixel is *accepted*, not just issued.
  A processor that sees Ready high therefore knows the line is in the frame
  buffer, or at least past the arbiter.
- **Pixel port.** Carries (x, y, color), not a memory address. Mapping a pixel
  to an SRAM address depends on the frame buffer's layout, so it belongs to
  the arbiter or frame buffer side.
- **Coordinate range.** Coordinates are not clipped to the visible screen.
  Values up to 1023 are drawn as given, and whatever lies beyond the frame
  buffer's size has to be discarded downstream.
