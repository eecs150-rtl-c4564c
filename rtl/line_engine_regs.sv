// Memory-mapped register interface of the line drawing engine.
//
// The processor sees ten word registers starting at BASE (0x8040_0040 by
// default). Writes to the four non-trigger coordinate registers (x0, y0, x1,
// y1 at +0x00..+0x0c) and to the color register (+0x20) only store the value.
// Writes to the four trigger registers (+0x10..+0x1c) store the coordinate in
// the same register as its non-trigger alias and also start a line. Reads of
// the control register (+0x24) return Ready in bit 0; other addresses read 0.
//
// Interface and timing: a write is taken on the rising clock edge when we is
// high; the address must be word aligned and the value sits in the low bits of
// wdata. start is a registered one-cycle pulse in the cycle after a trigger
// write, when the new coordinate is already visible on the outputs. Reads are
// combinational (rdata follows addr in the same cycle), as a processor's I/O
// read path usually expects. Synchronous active-high reset clears all values.
//
// The register map follows the engine's programming model; the bus signals,
// the combinational read and the reset values are this design's choices.
module line_engine_regs
  import line_engine_pkg::*;
#(
  parameter logic [31:0] BASE = LINE_ENGINE_BASE
) (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        we,
  output logic [31:0] rdata,
  // engine side
  input  logic        ready,
  output coord_t      x0,
  output coord_t      y0,
  output coord_t      x1,
  output coord_t      y1,
  output color_t      color,
  output logic        start
);

  logic     hit;
  reg_idx_e idx;

  // The engine decodes ten words, i.e. offsets 0x00..0x24 from BASE.
  always_comb begin
    logic [31:0] off;
    off = addr - BASE;
    hit = (off[31:6] == '0) && (off[1:0] == 2'b00) && (off[5:2] <= 4'd9);
    idx = reg_idx_e'(off[5:2]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x0    <= '0;
      y0    <= '0;
      x1    <= '0;
      y1    <= '0;
      color <= '0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (we && hit) begin
        unique case (idx)
          REG_X0, REG_X0_TRIG: x0    <= wdata[COORD_W-1:0];
          REG_Y0, REG_Y0_TRIG: y0    <= wdata[COORD_W-1:0];
          REG_X1, REG_X1_TRIG: x1    <= wdata[COORD_W-1:0];
          REG_Y1, REG_Y1_TRIG: y1    <= wdata[COORD_W-1:0];
          REG_COLOR:           color <= wdata[COLOR_W-1:0];
          default: ;  // control register is read only
        endcase
        start <= (idx inside {REG_X0_TRIG, REG_Y0_TRIG, REG_X1_TRIG, REG_Y1_TRIG});
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (hit && idx == REG_CTRL) rdata[0] = ready;
  end

endmodule
