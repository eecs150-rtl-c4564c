// Self-checking testbench for line_engine_regs.
//
// Drives random word writes across and around the register window and keeps
// its own copy of x0, y0, x1, y1 and color from the address map (non-trigger
// registers at +0x00..+0x0c, trigger aliases at +0x10..+0x1c, color at +0x20,
// control at +0x24). After every cycle it compares the outputs with that copy,
// checks that start pulses exactly in the cycle after a trigger write, and
// that reads return Ready in bit 0 of the control register and 0 elsewhere.
module tb_line_engine_regs;
  import line_engine_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] addr, wdata;
  logic        we;
  logic [31:0] rdata;
  logic        ready;
  coord_t      x0, y0, x1, y1;
  color_t      color;
  logic        start;

  int checks = 0;
  int failures = 0;

  line_engine_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endfunction

  int m_x0, m_y0, m_x1, m_y1, m_color;
  bit m_start;
  int n_trig = 0;

  initial begin
    rst = 1'b1; we = 1'b0; addr = '0; wdata = '0; ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m_x0 = 0; m_y0 = 0; m_x1 = 0; m_y1 = 0; m_color = 0; m_start = 0;
    check(x0 == 0 && y0 == 0 && x1 == 0 && y1 == 0 && color == 0 && !start, "reset values");
    for (int i = 0; i < 5000; i++) begin
      int off;
      // mostly inside the window, sometimes just outside or misaligned
      case ($urandom_range(9))
        0:       off = $urandom_range(15) * 4 + 40;         // above the window
        1:       off = -4 * $urandom_range(1, 4);            // below the window
        2:       off = $urandom_range(9) * 4 + $urandom_range(1, 3);  // misaligned
        default: off = $urandom_range(9) * 4;
      endcase
      addr  = 32'h8040_0040 + off;
      wdata = $urandom;
      we    = $urandom_range(3) != 0;
      ready = 1'($urandom_range(1));
      #1;
      // combinational read
      check(rdata == ((off == 36) ? {31'b0, ready} : 32'b0),
            $sformatf("read at +%0d gave %h", off, rdata));
      @(posedge clk);
      m_start = 0;
      if (we) begin
        case (off)
          0, 16:  m_x0 = wdata & 32'h3ff;
          4, 20:  m_y0 = wdata & 32'h3ff;
          8, 24:  m_x1 = wdata & 32'h3ff;
          12, 28: m_y1 = wdata & 32'h3ff;
          32:     m_color = wdata & 32'hffff;
          default: ;
        endcase
        m_start = (off == 16 || off == 20 || off == 24 || off == 28);
        if (m_start) n_trig++;
      end
      #1;
      check(int'(x0) == m_x0 && int'(y0) == m_y0 && int'(x1) == m_x1 && int'(y1) == m_y1 &&
            int'(color) == m_color, $sformatf("register contents after write to +%0d", off));
      check(start == m_start, $sformatf("start after write to +%0d", off));
    end
    check(n_trig > 100, "enough trigger writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
