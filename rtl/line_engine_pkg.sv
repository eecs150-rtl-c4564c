// Shared types and constants of the line drawing engine.
//
// Screen coordinates are 10-bit unsigned numbers and colors are 16 bits,
// as the engine's programming model defines them. The memory map places the
// engine's ten word registers at 0x8040_0040 .. 0x8040_0064: four non-trigger
// coordinate registers, four trigger coordinate registers, the color register
// and the read-only control register whose bit 0 is Ready.
package line_engine_pkg;

  localparam int unsigned COORD_W = 10;
  localparam int unsigned COLOR_W = 16;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [COLOR_W-1:0] color_t;

  // One frame buffer write: where and which color.
  typedef struct packed {
    coord_t x;
    coord_t y;
    color_t color;
  } pixel_t;

  // Word offsets from the base address 0x8040_0040 (byte offset / 4).
  typedef enum logic [3:0] {
    REG_X0      = 4'd0,  // 0x8040_0040 non-trigger x0
    REG_Y0      = 4'd1,  // 0x8040_0044 non-trigger y0
    REG_X1      = 4'd2,  // 0x8040_0048 non-trigger x1
    REG_Y1      = 4'd3,  // 0x8040_004c non-trigger y1
    REG_X0_TRIG = 4'd4,  // 0x8040_0050 trigger x0
    REG_Y0_TRIG = 4'd5,  // 0x8040_0054 trigger y0
    REG_X1_TRIG = 4'd6,  // 0x8040_0058 trigger x1
    REG_Y1_TRIG = 4'd7,  // 0x8040_005c trigger y1
    REG_COLOR   = 4'd8,  // 0x8040_0060 color
    REG_CTRL    = 4'd9   // 0x8040_0064 control (bit 0 = Ready), read only
  } reg_idx_e;

  localparam logic [31:0] LINE_ENGINE_BASE = 32'h8040_0040;

endpackage
