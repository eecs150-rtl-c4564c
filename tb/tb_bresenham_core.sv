// Self-checking testbench for bresenham_core.
//
// Draws directed lines (every octant, points, horizontal, vertical, diagonal,
// screen-corner extremes) and random lines, each against a reference model of
// the integer Bresenham routine written with plain ints. Every pixel the core
// commits is compared, in order, with the model's list. Lines run twice: once
// with stall low, where the cycle counts are checked (first pixel 3 cycles
// after start, one pixel per cycle, ready back 3+N cycles after start), and
// once with a random stall, where the pixel list must be unchanged and held
// requests must not move. Also checks that ready drops while drawing and that
// end-point inputs may change during a line.
module tb_bresenham_core;
  import line_engine_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  logic   start;
  coord_t x0, y0, x1, y1;
  color_t color;
  logic   stall;
  logic   ready;
  logic   pix_valid;
  pixel_t pix;

  int checks = 0;
  int failures = 0;
  int stall_pct = 0;

  bresenham_core dut (.*);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference pixel list.
  int ref_x[$];
  int ref_y[$];

  function automatic void model(int ax0, int ay0, int ax1, int ay1);
    int t, dxm, dym, e, yy, ys;
    bit st;
    ref_x.delete();
    ref_y.delete();
    st = ((ay1 > ay0 ? ay1 - ay0 : ay0 - ay1) > (ax1 > ax0 ? ax1 - ax0 : ax0 - ax1));
    if (st) begin
      t = ax0; ax0 = ay0; ay0 = t;
      t = ax1; ax1 = ay1; ay1 = t;
    end
    if (ax0 > ax1) begin
      t = ax0; ax0 = ax1; ax1 = t;
      t = ay0; ay0 = ay1; ay1 = t;
    end
    dxm = ax1 - ax0;
    dym = (ay1 > ay0) ? ay1 - ay0 : ay0 - ay1;
    e   = dxm / 2;
    yy  = ay0;
    ys  = (ay0 < ay1) ? 1 : -1;
    for (int xx = ax0; xx <= ax1; xx++) begin
      if (st) begin ref_x.push_back(yy); ref_y.push_back(xx); end
      else    begin ref_x.push_back(xx); ref_y.push_back(yy); end
      e = e - dym;
      if (e < 0) begin
        yy = yy + ys;
        e  = e + dxm;
      end
    end
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endfunction

  // Random stall generator.
  always @(negedge clk) stall <= ($urandom_range(99) < stall_pct);

  // Held-request check: a stalled request must not change.
  pixel_t prev_pix;
  logic   prev_hold;
  always @(posedge clk) begin
    if (!rst && prev_hold) check(pix_valid && pix == prev_pix, "stalled request changed");
    prev_hold <= !rst && pix_valid && stall;
    prev_pix  <= pix;
  end

  task automatic draw(int ax0, int ay0, int ax1, int ay1, int col);
    int n, got, cyc, first_cyc, last_cyc;
    model(ax0, ay0, ax1, ay1);
    n = ref_x.size();
    // wait for ready
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    x0 = coord_t'(ax0); y0 = coord_t'(ay0); x1 = coord_t'(ax1); y1 = coord_t'(ay1);
    color = color_t'(col);
    start = 1'b1;
    #1;
    check(!ready, "ready must drop while start is taken");
    @(posedge clk); #1;
    start = 1'b0;
    // scramble inputs: the core must have copied them
    x0 = coord_t'($urandom); y0 = coord_t'($urandom);
    x1 = coord_t'($urandom); y1 = coord_t'($urandom);
    color = color_t'($urandom);
    cyc = 1; got = 0; first_cyc = -1; last_cyc = -1;
    while (!ready && cyc < 20000) begin
      if (pix_valid && !stall) begin
        if (got < n) begin
          check(int'(pix.x) == ref_x[got] && int'(pix.y) == ref_y[got] &&
                pix.color == color_t'(col),
                $sformatf("pixel %0d of (%0d,%0d)-(%0d,%0d): got (%0d,%0d) want (%0d,%0d)",
                          got, ax0, ay0, ax1, ay1, pix.x, pix.y, ref_x[got], ref_y[got]));
        end
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        got++;
      end
      @(posedge clk); #1;
      cyc++;
    end
    check(got == n, $sformatf("pixel count %0d want %0d", got, n));
    if (stall_pct == 0) begin
      check(first_cyc == 3, $sformatf("first pixel at cycle %0d want 3", first_cyc));
      check(last_cyc == 2 + n, $sformatf("last pixel at cycle %0d want %0d", last_cyc, 2 + n));
      check(cyc == 3 + n, $sformatf("ready back at cycle %0d want %0d", cyc, 3 + n));
    end
  endtask

  int dirs[8][4] = '{'{100, 100, 140, 110}, '{100, 100, 110, 140}, '{100, 100, 90, 140},
                     '{100, 100, 60, 110},  '{100, 100, 60, 90},   '{100, 100, 90, 60},
                     '{100, 100, 110, 60},  '{100, 100, 140, 90}};

  task automatic run_suite(int n_random);
    foreach (dirs[i]) draw(dirs[i][0], dirs[i][1], dirs[i][2], dirs[i][3], 32'h1000 + i);
    draw(5, 7, 5, 7, 16'hffff);          // single point
    draw(0, 3, 20, 3, 16'h00f0);         // horizontal
    draw(20, 3, 0, 3, 16'h00f1);
    draw(9, 0, 9, 25, 16'h0f00);         // vertical
    draw(9, 25, 9, 0, 16'h0f01);
    draw(0, 0, 30, 30, 16'h000f);        // diagonal
    draw(30, 0, 0, 30, 16'h000e);
    draw(0, 0, 1023, 1023, 16'h1234);    // extremes
    draw(1023, 0, 0, 1023, 16'h4321);
    draw(0, 1023, 1023, 1022, 16'h5555);
    draw(799, 599, 0, 0, 16'haaaa);
    for (int i = 0; i < n_random; i++) begin
      int ax0, ay0, ax1, ay1;
      ax0 = $urandom_range(1023); ay0 = $urandom_range(1023);
      if ($urandom_range(1)) begin
        ax1 = $urandom_range(1023); ay1 = $urandom_range(1023);
      end else begin
        ax1 = $urandom_range(ax0 > 20 ? ax0 - 20 : 0, ax0 < 1003 ? ax0 + 20 : 1023);
        ay1 = $urandom_range(ay0 > 20 ? ay0 - 20 : 0, ay0 < 1003 ? ay0 + 20 : 1023);
      end
      draw(ax0, ay0, ax1, ay1, $urandom_range(65535));
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; stall = 1'b0;
    x0 = '0; y0 = '0; x1 = '0; y1 = '0; color = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(ready, "ready after reset");
    stall_pct = 0;
    run_suite(60);
    stall_pct = 40;
    run_suite(60);
    stall_pct = 90;
    run_suite(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
