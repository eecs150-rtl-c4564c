// Bresenham line drawing pipeline.
//
// Given two end points (x0, y0), (x1, y1) and a color, the core emits every
// pixel of the line between them, end points included, one pixel per clock
// cycle, for lines of any slope in any direction. It computes exactly the
// pixels of the classic integer Bresenham routine: when |dy| > |dx| the line is
// "steep" and x and y swap roles; the end points are then ordered so that the
// major coordinate rises; an error term starting at dx/2 loses |dy| per step
// and, when it goes negative, the minor coordinate moves by +-1 and dx is
// added back.
//
// Structure: two setup stages and an iteration stage feeding an output
// register.
//   IDLE   when start is high, the end points are latched with x and y
//          swapped if the line is steep (stage 1).
//   SETUP  orders the latched end points along the major axis and computes
//          dx, |dy|, the initial error and the minor-axis step direction
//          (stage 2).
//   DRAW   one pixel per cycle into the output register; the iteration whose
//          major coordinate equals the end point returns to IDLE.
// With stall low, if start is high in cycle C, the first pixel is on the
// output in cycle C+3 and a line of N pixels occupies the output for N
// consecutive cycles; ready rises in cycle C+3+N.
//
// Stall: pix_valid/pix form a write request to the memory arbiter. A pixel is
// committed on a rising edge where pix_valid is high and stall is low. While
// stall is high the setup stages, the iteration and the output register all
// hold, so no pixel is lost or repeated. Only the capture of a new start in
// IDLE ignores stall, so that a start pulse is never lost.
//
// ready is high when the core is idle, no pixel is waiting in the output
// register and no start is being taken. End points and color are copied at
// start, so the inputs may change while a line is drawn.
//
// The algorithm and the one-pixel-per-cycle target follow the engine's
// specification; the pipeline split, the stall behaviour of the setup stages
// and the reset are this design's choices.
module bresenham_core
  import line_engine_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  coord_t x0,
  input  coord_t y0,
  input  coord_t x1,
  input  coord_t y1,
  input  color_t color,
  input  logic   stall,
  output logic   ready,
  output logic   pix_valid,
  output pixel_t pix
);

  // Error term: holds values in [-(2^COORD_W - 1), 2^COORD_W - 1].
  typedef logic signed [COORD_W+1:0] err_t;

  typedef enum logic [1:0] {IDLE, SETUP, DRAW} state_e;

  state_e state;

  // Setup stage 1 registers: end points in (major, minor) order.
  coord_t a0_q, b0_q, a1_q, b1_q;
  logic   steep_q;
  color_t color_q;

  // Iteration registers.
  coord_t a_q, b_q, a_end_q;   // major and minor coordinate, major end point
  coord_t dx_q, dy_q;
  err_t   err_q;
  logic   ystep_up_q;          // minor coordinate rises (1) or falls (0)

  function automatic coord_t absdiff(coord_t p, coord_t q);
    return (p > q) ? coord_t'(p - q) : coord_t'(q - p);
  endfunction

  // Setup stage 1, combinational part.
  logic steep_c;
  assign steep_c = absdiff(y1, y0) > absdiff(x1, x0);

  // Setup stage 2, combinational part.
  logic   swap_c;
  coord_t as_c, bs_c, ae_c, be_c;
  always_comb begin
    swap_c = a0_q > a1_q;
    as_c   = swap_c ? a1_q : a0_q;
    bs_c   = swap_c ? b1_q : b0_q;
    ae_c   = swap_c ? a0_q : a1_q;
    be_c   = swap_c ? b0_q : b1_q;
  end

  // Iteration, combinational part.
  err_t err_dec_c;
  logic step_minor_c;
  assign err_dec_c    = err_q - err_t'({1'b0, dy_q});
  assign step_minor_c = err_dec_c < 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      pix_valid  <= 1'b0;
      pix        <= '0;
      a0_q       <= '0;
      b0_q       <= '0;
      a1_q       <= '0;
      b1_q       <= '0;
      steep_q    <= 1'b0;
      color_q    <= '0;
      a_q        <= '0;
      b_q        <= '0;
      a_end_q    <= '0;
      dx_q       <= '0;
      dy_q       <= '0;
      err_q      <= '0;
      ystep_up_q <= 1'b0;
    end else begin
      if (state == IDLE) begin
        if (start) begin
          steep_q <= steep_c;
          a0_q    <= steep_c ? y0 : x0;
          b0_q    <= steep_c ? x0 : y0;
          a1_q    <= steep_c ? y1 : x1;
          b1_q    <= steep_c ? x1 : y1;
          color_q <= color;
          state   <= SETUP;
        end
      end else if (!stall) begin
        unique case (state)
          SETUP: begin
            a_q        <= as_c;
            b_q        <= bs_c;
            a_end_q    <= ae_c;
            dx_q       <= coord_t'(ae_c - as_c);
            dy_q       <= absdiff(be_c, bs_c);
            err_q      <= err_t'({2'b00, coord_t'(ae_c - as_c)} >> 1);
            ystep_up_q <= bs_c < be_c;
            state      <= DRAW;
          end
          DRAW: begin
            a_q   <= a_q + coord_t'(1);
            err_q <= step_minor_c ? err_dec_c + err_t'({1'b0, dx_q}) : err_dec_c;
            if (step_minor_c) b_q <= ystep_up_q ? b_q + coord_t'(1) : b_q - coord_t'(1);
            if (a_q == a_end_q) state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end

      // Output register: refilled whenever the arbiter is not stalling.
      if (!stall) begin
        pix_valid <= (state == DRAW);
        pix.x     <= steep_q ? b_q : a_q;
        pix.y     <= steep_q ? a_q : b_q;
        pix.color <= color_q;
      end
    end
  end

  assign ready = (state == IDLE) && !pix_valid && !start;

  // A stalled write request must stay on the port unchanged.
  a_stall_hold: assert property (@(posedge clk) disable iff (rst)
    (pix_valid && stall) |=> (pix_valid && $stable(pix)));

endmodule
