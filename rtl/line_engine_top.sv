// Line drawing engine: a memory-mapped accelerator that draws straight lines
// into a frame buffer at one pixel per clock cycle.
//
// The processor writes the end points and color through the register
// interface (line_engine_regs); a write to any of the four trigger registers
// starts the Bresenham pipeline (bresenham_core), which emits one frame buffer
// write request per pixel to the memory arbiter. The arbiter holds stall high
// in any cycle where it cannot take the write; the engine then freezes with the
// pending pixel on its port. Ready, read at 0x8040_0064, is high after reset
// and whenever no line is in progress.
//
// Interface and timing: processor bus with word address, 32-bit write data,
// write enable and a combinational read data path. The pixel port carries
// pix_valid and a {x, y, color} word; a write is committed on a rising edge
// with pix_valid high and stall low. A trigger write in cycle W raises start in
// W+1, the first pixel is on the port in W+4, and an unstalled line of N
// pixels finishes with Ready high again in W+4+N. Translating (x, y) into a
// frame buffer address is left to the arbiter side, whose layout is not part
// of this block. Synchronous active-high reset.
module line_engine_top
  import line_engine_pkg::*;
#(
  parameter logic [31:0] BASE = LINE_ENGINE_BASE
) (
  input  logic        clk,
  input  logic        rst,
  // processor memory-mapped I/O
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic        cpu_we,
  output logic [31:0] cpu_rdata,
  // frame buffer write port towards the SRAM arbiter
  output logic        pix_valid,
  output pixel_t      pix,
  input  logic        stall
);

  coord_t x0, y0, x1, y1;
  color_t color;
  logic   start, ready;

  line_engine_regs #(.BASE(BASE)) u_regs (
    .clk, .rst,
    .addr (cpu_addr),
    .wdata(cpu_wdata),
    .we   (cpu_we),
    .rdata(cpu_rdata),
    .ready,
    .x0, .y0, .x1, .y1, .color,
    .start
  );

  bresenham_core u_core (
    .clk, .rst,
    .start,
    .x0, .y0, .x1, .y1, .color,
    .stall,
    .ready,
    .pix_valid,
    .pix
  );

endmodule
