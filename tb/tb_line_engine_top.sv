// End-to-end testbench for line_engine_top, at its default parameters.
//
// A processor model programs the engine only through the memory map: it polls
// Ready at 0x8040_0064, writes coordinates and color to the non-trigger
// registers and starts lines with a trigger-register write. An arbiter model
// raises stall at random and commits each pixel write into a 1024 x 1024
// frame array; a reference routine draws the same lines into a second array.
//
// Phases:
//   1. Unstalled lines: checks the latency (first pixel 4 cycles after the
//      trigger write, one pixel per cycle, Ready again 4+N cycles after it).
//   2. Clearing an 800 x 600 screen with 600 horizontal lines, each started
//      by rewriting only y0 (non-trigger) and y1 (trigger), under 20% stall.
//   3. Random lines in every octant, started from each of the four trigger
//      registers, under random stall; some are left to run while the
//      processor polls Ready. Includes runs that rewrite a single
//      trigger register to draw fans of lines sharing an end point.
// The frame arrays are compared row by row at the end. Each mechanism (stall
// of a pending write, each trigger register, trigger-only repeats, steep,
// reversed and falling lines, Ready seen low while polling) is counted and
// must have happened at least once.
module tb_line_engine_top;
  import line_engine_pkg::*;

  localparam logic [31:0] A_X0 = 32'h8040_0040, A_Y0 = 32'h8040_0044,
                          A_X1 = 32'h8040_0048, A_Y1 = 32'h8040_004c,
                          T_X0 = 32'h8040_0050, T_Y0 = 32'h8040_0054,
                          T_X1 = 32'h8040_0058, T_Y1 = 32'h8040_005c,
                          A_COL = 32'h8040_0060, A_CTRL = 32'h8040_0064;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] cpu_addr, cpu_wdata;
  logic        cpu_we;
  logic [31:0] cpu_rdata;
  logic        pix_valid;
  pixel_t      pix;
  logic        stall;

  line_engine_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int stall_pct = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // Frame buffers: what the engine wrote, and what it should have written.
  logic [15:0] fb  [1024][1024];
  logic [15:0] ref_fb [1024][1024];

  // Mechanism counters.
  int n_stalled = 0, n_ready_low = 0, n_repeat = 0, n_steep = 0, n_rev = 0, n_fall = 0;
  int n_trig[4] = '{0, 0, 0, 0};
  int n_writes = 0;

  // Arbiter model: random stall, commits unstalled writes.
  always @(negedge clk) stall <= ($urandom_range(99) < stall_pct);
  always @(posedge clk) begin
    if (!rst && pix_valid) begin
      if (stall) n_stalled++;
      else begin
        fb[pix.y][pix.x] <= pix.color;
        n_writes++;
      end
    end
  end

  // Processor's view of the registers, for the reference model.
  int r_x0, r_y0, r_x1, r_y1, r_col;

  task automatic bus_write(logic [31:0] a, int d);
    cpu_addr = a; cpu_wdata = d; cpu_we = 1'b1;
    @(posedge clk); #1;
    cpu_we = 1'b0;
    case (a)
      A_X0, T_X0: r_x0 = d & 1023;
      A_Y0, T_Y0: r_y0 = d & 1023;
      A_X1, T_X1: r_x1 = d & 1023;
      A_Y1, T_Y1: r_y1 = d & 1023;
      A_COL:      r_col = d & 32'hffff;
      default: ;
    endcase
  endtask

  task automatic poll_ready();
    cpu_addr = A_CTRL; cpu_we = 1'b0;
    #1;
    while (cpu_rdata[0] !== 1'b1) begin
      n_ready_low++;
      @(posedge clk); #1;
    end
  endtask

  // Reference Bresenham, drawing into ref_fb; returns the pixel count.
  function automatic int model(int ax0, int ay0, int ax1, int ay1, int col);
    int t, dxm, dym, e, yy, ys, n;
    bit st;
    st = ((ay1 > ay0 ? ay1 - ay0 : ay0 - ay1) > (ax1 > ax0 ? ax1 - ax0 : ax0 - ax1));
    if (st) begin
      t = ax0; ax0 = ay0; ay0 = t;
      t = ax1; ax1 = ay1; ay1 = t;
      n_steep++;
    end
    if (ax0 > ax1) begin
      t = ax0; ax0 = ax1; ax1 = t;
      t = ay0; ay0 = ay1; ay1 = t;
      n_rev++;
    end
    dxm = ax1 - ax0;
    dym = (ay1 > ay0) ? ay1 - ay0 : ay0 - ay1;
    e   = dxm / 2;
    yy  = ay0;
    ys  = (ay0 < ay1) ? 1 : -1;
    if (ay0 > ay1) n_fall++;
    n   = 0;
    for (int xx = ax0; xx <= ax1; xx++) begin
      if (st) ref_fb[xx][yy] = 16'(col);
      else    ref_fb[yy][xx] = 16'(col);
      n++;
      e = e - dym;
      if (e < 0) begin
        yy = yy + ys;
        e  = e + dxm;
      end
    end
    return n;
  endfunction

  // Trigger write on register k (0..3 = x0, y0, x1, y1), then follow the line
  // to its end unless detach is set (the processor then goes on at once and
  // meets Ready low at its next poll).
  task automatic trigger(int k, int d, bit timed, bit detach = 1'b0);
    logic [31:0] a;
    int n, w0, first, ready_at;
    longint t0;
    a = (k == 0) ? T_X0 : (k == 1) ? T_Y0 : (k == 2) ? T_X1 : T_Y1;
    n_trig[k]++;
    w0 = n_writes;
    t0 = cycle;
    bus_write(a, d);
    n = model(r_x0, r_y0, r_x1, r_y1, r_col);
    // Engine must not look ready right after the trigger write.
    cpu_addr = A_CTRL; #1;
    check(cpu_rdata[0] == 1'b0, "Ready must be low after a trigger write");
    if (detach) return;
    first = -1;
    while (cpu_rdata[0] !== 1'b1) begin
      if (first < 0 && pix_valid) first = int'(cycle - t0);
      @(posedge clk); #1;
    end
    ready_at = int'(cycle - t0);
    check(n_writes - w0 == n, $sformatf("line wrote %0d pixels, want %0d", n_writes - w0, n));
    if (timed) begin
      check(first == 4, $sformatf("first pixel %0d cycles after trigger, want 4", first));
      check(ready_at == 4 + n, $sformatf("Ready back after %0d cycles, want %0d", ready_at, 4 + n));
    end
  endtask

  initial begin
    longint t_clear;
    rst = 1'b1; cpu_we = 1'b0; cpu_addr = '0; cpu_wdata = '0; stall = 1'b0;
    r_x0 = 0; r_y0 = 0; r_x1 = 0; r_y1 = 0; r_col = 0;
    foreach (fb[i, j]) begin
      fb[i][j] = 16'h0;
      ref_fb[i][j] = 16'h0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cpu_addr = A_CTRL; #1;
    check(cpu_rdata == 32'h1, "Ready set after reset");

    // Phase 1: unstalled, timed lines.
    stall_pct = 0;
    for (int i = 0; i < 40; i++) begin
      poll_ready();
      bus_write(A_X0, $urandom_range(1023));
      bus_write(A_Y0, $urandom_range(1023));
      bus_write(A_X1, $urandom_range(1023));
      bus_write(A_COL, $urandom_range(65535));
      trigger(3, $urandom_range(1023), 1'b1);
    end

    // Phase 2: clear an 800 x 600 screen, one horizontal line per row.
    stall_pct = 20;
    t_clear = cycle;
    poll_ready();
    bus_write(A_X0, 0);
    bus_write(A_X1, 799);
    bus_write(A_COL, 16'h001f);
    for (int y = 0; y < 600; y++) begin
      poll_ready();
      bus_write(A_Y0, y);
      trigger(3, y, 1'b0);
    end
    poll_ready();
    $display("screen clear took %0d cycles (%0d pixels, %0d stalled cycles so far)",
             cycle - t_clear, 800 * 600, n_stalled);
    // 480,000 pixels plus a short per-line overhead, inflated by the stall rate.
    check(cycle - t_clear < 480000 * 100 / 75, "screen clear throughput");

    // Phase 3: random lines with random trigger registers, and fans.
    stall_pct = 35;
    for (int i = 0; i < 300; i++) begin
      int k;
      poll_ready();
      if ($urandom_range(3) == 0) bus_write(A_COL, $urandom_range(65535));
      k = $urandom_range(3);
      if (k != 0) bus_write(A_X0, $urandom_range(1023));
      if (k != 1) bus_write(A_Y0, $urandom_range(1023));
      if (k != 2) bus_write(A_X1, $urandom_range(1023));
      if (k != 3) bus_write(A_Y1, $urandom_range(1023));
      trigger(k, $urandom_range(1023), 1'b0, 1'($urandom_range(1)));
      // sometimes a fan: only the trigger register changes
      if ($urandom_range(2) == 0) begin
        for (int j = 0; j < 6; j++) begin
          poll_ready();
          n_repeat++;
          trigger(k, $urandom_range(1023), 1'b0);
        end
      end
    end
    poll_ready();
    repeat (2) @(posedge clk);

    // Frame comparison, one check per row.
    for (int y = 0; y < 1024; y++) begin
      int bad;
      bad = 0;
      for (int x = 0; x < 1024; x++) if (fb[y][x] != ref_fb[y][x]) bad++;
      check(bad == 0, $sformatf("row %0d has %0d wrong pixels", y, bad));
    end

    $display("mechanisms: stalled=%0d ready_low_polls=%0d trig x0/y0/x1/y1=%0d/%0d/%0d/%0d repeats=%0d steep=%0d reversed=%0d falling=%0d writes=%0d",
             n_stalled, n_ready_low, n_trig[0], n_trig[1], n_trig[2], n_trig[3], n_repeat,
             n_steep, n_rev, n_fall, n_writes);
    check(n_stalled > 0, "stall never happened");
    check(n_ready_low > 0, "Ready never seen low while polling");
    foreach (n_trig[i]) check(n_trig[i] > 0, $sformatf("trigger register %0d never used", i));
    check(n_repeat > 0, "trigger-only repeat never happened");
    check(n_steep > 0, "no steep line");
    check(n_rev > 0, "no reversed line");
    check(n_fall > 0, "no falling line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
