// rasterizer: scan conversion with a Z-buffer test.
//
// A six-state machine:
//   ERASE/NEXT  after a buffer swap, write FB_CLEAR (black, depth 255) into
//               every word of the buffer now being drawn, one word per two
//               cycles (ERASE writes, NEXT advances the address).
//   RECEIVE     ready_out is high; a projected triangle (three screen
//               vertices in 1/16 pixel, a colour and a last flag) is
//               accepted. Its bounding box, in whole pixels, is clipped to
//               the screen and the edge determinants are set up. Triangles
//               with a clipped vertex, a zero-area projection or an empty
//               box are dropped.
//   ITER        for the centre v = (x + 0.5, y + 0.5) of the current pixel
//               of the box, evaluate the convex-hull test. With
//               v1 = p1 - p0, v2 = p2 - p0 and D = det(v1 v2):
//                 a*D =  det(v v2) - det(p0 v2)
//                 b*D = -(det(v v1) - det(p0 v1))
//               and v is inside when a > 0, b > 0, a + b < 1. Comparing the
//               scaled values against 0 and D (signs flipped when D < 0)
//               gives exactly the same answer without a division. Inside
//               pixels issue a frame-buffer read and go to CHECK, others
//               advance.
//   CHECK       the stored word has arrived; if the triangle's depth is
//               below the stored depth, colour and depth are written.
//   DONE        after the last triangle of the object, obj_done pulses for
//               one cycle (the frame buffers swap) and the machine erases.
// The triangle depth is the mean of the three vertex depths. A pixel costs
// one cycle when outside the triangle and two when inside.
//
// Frame-buffer port: fb_addr/fb_we/fb_wdata, synchronous read data fb_rdata
// one cycle after fb_addr; only its depth byte is needed here. Address =
// y * WIDTH + x. The states, the convex-hull test, the bounding box and the
// colour-plus-depth Z buffer follow the design description; the integer
// form of the test, sub-pixel vertices sampled at pixel centres, the per-
// triangle depth and the treatment of clipped triangles are this design's.
module rasterizer
  import gfx_pkg::*;
#(
  parameter int WIDTH  = SCREEN,
  parameter int HEIGHT = SCREEN,
  parameter int AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_in,
  output logic          ready_out,
  input  pvert_t        p0,
  input  pvert_t        p1,
  input  pvert_t        p2,
  input  logic [7:0]    color,
  input  logic          last_in,
  output logic [AW-1:0] fb_addr,
  output logic          fb_we,
  output fbword_t       fb_wdata,
  input  fbword_t       fb_rdata,
  output logic          obj_done,
  output logic          erasing
);
  typedef enum logic [2:0] {ERASE, NEXT, RECEIVE, ITER, CHECK, DONE} state_t;
  state_t state;

  typedef logic signed [39:0] wide_t;

  logic [AW-1:0] erase_addr;
  scoord_t       v1x, v1y, v2x, v2y;
  scoord_t       xmin, xmax, ymax, cx, cy;
  wide_t         det_d, det_02, det_01;
  logic [7:0]    t_color, t_depth;
  logic          t_last;

  // Set-up values for the triangle on the input.
  scoord_t in_xmin, in_xmax, in_ymin, in_ymax;
  scoord_t in_v1x, in_v1y, in_v2x, in_v2y;
  wide_t   in_d;
  logic    in_drop;
  logic [9:0] dsum;

  function automatic scoord_t smin3(scoord_t a, scoord_t b, scoord_t c);
    scoord_t m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction
  function automatic scoord_t smax3(scoord_t a, scoord_t b, scoord_t c);
    scoord_t m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction
  function automatic wide_t det2(scoord_t ax, scoord_t ay, scoord_t bx, scoord_t by);
    return wide_t'(ax) * wide_t'(by) - wide_t'(ay) * wide_t'(bx);
  endfunction

  always_comb begin
    scoord_t lo_x, hi_x, lo_y, hi_y;
    lo_x    = smin3(p0.x, p1.x, p2.x);
    hi_x    = smax3(p0.x, p1.x, p2.x);
    lo_y    = smin3(p0.y, p1.y, p2.y);
    hi_y    = smax3(p0.y, p1.y, p2.y);
    // box in whole pixels (floor), clipped to the screen
    lo_x    = lo_x >>> SUB;
    hi_x    = hi_x >>> SUB;
    lo_y    = lo_y >>> SUB;
    hi_y    = hi_y >>> SUB;
    in_xmin = (lo_x < 0) ? scoord_t'(0) : lo_x;
    in_ymin = (lo_y < 0) ? scoord_t'(0) : lo_y;
    in_xmax = (hi_x > scoord_t'(WIDTH - 1))  ? scoord_t'(WIDTH - 1)  : hi_x;
    in_ymax = (hi_y > scoord_t'(HEIGHT - 1)) ? scoord_t'(HEIGHT - 1) : hi_y;
    in_v1x  = p1.x - p0.x;
    in_v1y  = p1.y - p0.y;
    in_v2x  = p2.x - p0.x;
    in_v2y  = p2.y - p0.y;
    in_d    = det2(in_v1x, in_v1y, in_v2x, in_v2y);
    in_drop = p0.clip || p1.clip || p2.clip || (in_d == '0) ||
              (in_xmin > in_xmax) || (in_ymin > in_ymax);
    dsum    = 10'(p0.depth) + 10'(p1.depth) + 10'(p2.depth);
  end

  // Convex-hull test for the centre of the current pixel, in 1/16 pixel.
  wide_t   a_num, b_num, ab_num;
  scoord_t sx, sy;
  logic    in_tri;
  always_comb begin
    sx     = (cx <<< SUB) + scoord_t'(2 ** (SUB - 1));
    sy     = (cy <<< SUB) + scoord_t'(2 ** (SUB - 1));
    a_num  = det2(sx, sy, v2x, v2y) - det_02;
    b_num  = det_01 - det2(sx, sy, v1x, v1y);
    ab_num = a_num + b_num;
    if (det_d > 0)
      in_tri = (a_num > 0) && (b_num > 0) && (ab_num < det_d);
    else
      in_tri = (a_num < 0) && (b_num < 0) && (ab_num > det_d);
  end

  logic last_px;
  assign last_px = (cx == xmax) && (cy == ymax);

  assign ready_out = (state == RECEIVE);

  // The frame buffer is written only while erasing or after a Z test, and
  // a Z-test write never makes a stored pixel farther away.
  a_we_state: assert property (@(posedge clk) disable iff (rst)
    fb_we |-> (state == ERASE || state == CHECK));
  a_z_nearer: assert property (@(posedge clk) disable iff (rst)
    (fb_we && state == CHECK) |-> (fb_wdata.depth < fb_rdata.depth));
  assign erasing   = (state == ERASE) || (state == NEXT);
  assign obj_done  = (state == DONE);

  always_comb begin
    fb_addr  = AW'(int'(cy) * WIDTH + int'(cx));
    fb_we    = 1'b0;
    fb_wdata = FB_CLEAR;
    unique case (state)
      ERASE: begin
        fb_addr = erase_addr;
        fb_we   = 1'b1;
      end
      NEXT: fb_addr = erase_addr;
      CHECK: begin
        fb_wdata = '{color: t_color, depth: t_depth};
        fb_we    = (t_depth < fb_rdata.depth);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ERASE;
      erase_addr <= '0;
      {v1x, v1y, v2x, v2y} <= '0;
      {xmin, xmax, ymax, cx, cy} <= '0;
      det_d      <= '0;
      det_02     <= '0;
      det_01     <= '0;
      t_color    <= '0;
      t_depth    <= '0;
      t_last     <= 1'b0;
    end else begin
      unique case (state)
        ERASE: state <= NEXT;
        NEXT: begin
          if (erase_addr == AW'(WIDTH * HEIGHT - 1)) begin
            erase_addr <= '0;
            state      <= RECEIVE;
          end else begin
            erase_addr <= erase_addr + 1'b1;
            state      <= ERASE;
          end
        end
        RECEIVE: if (valid_in) begin
          v1x     <= in_v1x;
          v1y     <= in_v1y;
          v2x     <= in_v2x;
          v2y     <= in_v2y;
          det_d   <= in_d;
          det_02  <= det2(p0.x, p0.y, in_v2x, in_v2y);
          det_01  <= det2(p0.x, p0.y, in_v1x, in_v1y);
          xmin    <= in_xmin;
          xmax    <= in_xmax;
          ymax    <= in_ymax;
          cx      <= in_xmin;
          cy      <= in_ymin;
          t_color <= color;
          t_depth <= 8'(dsum / 10'd3);
          t_last  <= last_in;
          if (in_drop) state <= last_in ? DONE : RECEIVE;
          else         state <= ITER;
        end
        ITER: begin
          if (in_tri) state <= CHECK;
          else if (last_px) state <= t_last ? DONE : RECEIVE;
          else begin
            if (cx == xmax) begin cx <= xmin; cy <= cy + 1'b1; end
            else cx <= cx + 1'b1;
          end
        end
        CHECK: begin
          if (last_px) state <= t_last ? DONE : RECEIVE;
          else begin
            state <= ITER;
            if (cx == xmax) begin cx <= xmin; cy <= cy + 1'b1; end
            else cx <= cx + 1'b1;
          end
        end
        DONE: state <= ERASE;
        default: state <= ERASE;
      endcase
    end
  end
endmodule
