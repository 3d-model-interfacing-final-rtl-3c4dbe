// gfx_top: real-time renderer for a low-polygon 3D model.
//
// Data path, one triangle at a time under valid/ready handshakes:
//   get_vertices  model ROM -> triangle (three vertices) + centre of mass
//   transformation x3, one per vertex, in lockstep: rotate by the current
//                 roll/pitch/yaw, scale, translate in front of the camera
//   projection x3 (screen position and depth of each vertex) in parallel
//                 with pixel_shader (one gray level for the triangle)
//   rasterizer    bounding-box scan, convex-hull inside test, Z test,
//                 writes colour+depth into the draw buffer of pingpong_fb
// When the last triangle of the model has been drawn the rasterizer raises
// obj_done: the two frame buffers swap, the new draw buffer is erased and
// the model is drawn again with the pose then current. The display side
// runs continuously: video_sig_gen produces 1280x720 timing, scale maps
// the raster onto the 240x240 buffer (3x3 screen pixels per buffer pixel,
// centred), and the buffer word's colour byte becomes pixel_gray.
//
// The join of parallel units: a stage accepts a triangle only when every
// unit of that stage is ready, and hands it on only when every unit has
// finished; the three per-vertex units have equal latency, so they stay
// in step. The video outputs (syncs, active_draw, pixel_gray) are aligned
// with each other, one cycle behind the raster counters because of the
// frame-buffer read. The HDMI encoder and the clock generator are outside
// this module: clk_pixel is the 74.25 MHz pixel clock. erasing (draw buffer
// being cleared) and frame_count (video frames modulo 64) are status outputs.
module gfx_top
  import gfx_pkg::*;
(
  input  logic        clk_pixel,
  input  logic        sys_rst,
  input  logic [2:0]  btn,
  input  logic [11:0] sw,
  output logic        hor_sync,
  output logic        vert_sync,
  output logic        active_draw,
  output logic [7:0]  pixel_gray,
  output logic        new_frame,
  output logic        obj_done,
  output logic        buffer_sel,
  output logic        erasing,
  output logic [5:0]  frame_count
);
  localparam int AW = $clog2(SCREEN * SCREEN);

  // ---------------- controls ----------------
  logic [3:0] roll, pitch, yaw;
  fx_t        tx, ty, scale_f, distance;
  logic       vid_new_frame;

  input_ctrl u_input (
    .clk(clk_pixel), .rst(sys_rst), .btn, .sw, .tick(vid_new_frame),
    .roll, .pitch, .yaw, .tx, .ty, .scale(scale_f), .distance);

  // ---------------- vertex fetch ----------------
  vec3_t gv_v [3];
  vec3_t com;
  logic  gv_valid, gv_last, gv_ready;

  get_vertices u_get (
    .clk_pixel, .sys_rst,
    .v1(gv_v[0]), .v2(gv_v[1]), .v3(gv_v[2]), .com,
    .valid_out(gv_valid), .obj_done(gv_last), .ready_in(gv_ready));

  // ---------------- transformation x3 ----------------
  logic [2:0] tf_ready_out, tf_valid_out, tf_last;
  vec3_t      tf_pos [3];
  logic       st2_take;

  assign gv_ready = &tf_ready_out;

  for (genvar i = 0; i < 3; i++) begin : g_tf
    transformation u_tf (
      .clk(clk_pixel), .rst(sys_rst),
      .valid_in(gv_valid && gv_ready), .ready_out(tf_ready_out[i]),
      .v_in(gv_v[i]), .obj_done_in(gv_last), .com,
      .scale(scale_f), .distance, .tx, .ty, .pitch, .roll, .yaw,
      .new_pos(tf_pos[i]), .obj_done_out(tf_last[i]),
      .valid_out(tf_valid_out[i]), .ready_in(st2_take));
  end

  // ---------------- projection x3 and pixel shader ----------------
  logic [2:0] pr_ready_out, pr_valid_out, pr_last;
  pvert_t     pv [3];
  logic       sh_ready_out, sh_valid_out;
  logic [7:0] sh_color;
  logic       st3_take, rast_ready;

  assign st2_take = (&tf_valid_out) && (&pr_ready_out) && sh_ready_out;

  // The per-vertex units run in lockstep and carry the same last flag.
  a_tf_lockstep: assert property (@(posedge clk_pixel) disable iff (sys_rst)
    (tf_valid_out == 3'b000 || tf_valid_out == 3'b111) &&
    (tf_ready_out == 3'b000 || tf_ready_out == 3'b111));
  a_pr_last: assert property (@(posedge clk_pixel) disable iff (sys_rst)
    (&pr_valid_out) |-> (pr_last == 3'b000 || pr_last == 3'b111));

  for (genvar i = 0; i < 3; i++) begin : g_proj
    projection u_proj (
      .clk(clk_pixel), .rst(sys_rst),
      .valid_in(st2_take), .ready_out(pr_ready_out[i]),
      .v_in(tf_pos[i]), .obj_done_in(tf_last[i]),
      .pv(pv[i]), .obj_done_out(pr_last[i]),
      .valid_out(pr_valid_out[i]), .ready_in(st3_take));
  end

  pixel_shader u_shader (
    .clk(clk_pixel), .rst(sys_rst),
    .valid_in(st2_take), .ready_out(sh_ready_out),
    .tri_in('{v0: tf_pos[0], v1: tf_pos[1], v2: tf_pos[2]}),
    .color(sh_color), .valid_out(sh_valid_out), .ready_in(st3_take));

  assign st3_take = (&pr_valid_out) && sh_valid_out && rast_ready;

  // ---------------- rasterizer and frame buffers ----------------
  logic [AW-1:0] fb_addr, rd_addr;
  logic          fb_we, rast_done;
  fbword_t       fb_wdata, fb_rdata, rd_data;

  rasterizer u_rast (
    .clk(clk_pixel), .rst(sys_rst),
    .valid_in(st3_take), .ready_out(rast_ready),
    .p0(pv[0]), .p1(pv[1]), .p2(pv[2]), .color(sh_color), .last_in(pr_last[0]),
    .fb_addr, .fb_we, .fb_wdata, .fb_rdata,
    .obj_done(rast_done), .erasing);

  pingpong_fb u_fb (
    .clk(clk_pixel), .rst(sys_rst), .swap(rast_done),
    .wr_addr(fb_addr), .wr_we(fb_we), .wr_wdata(fb_wdata), .wr_rdata(fb_rdata),
    .rd_addr, .rd_data, .sel(buffer_sel));

  assign obj_done = rast_done;

  // ---------------- video ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        vs, hs, ad;
  logic [7:0]  hsc, vsc;
  logic        addr_ok, addr_ok_q;

  video_sig_gen u_vsg (
    .clk_pixel, .rst(sys_rst),
    .hcount_out(hcount), .vcount_out(vcount),
    .vert_sync(vs), .hor_sync(hs), .active_draw(ad),
    .new_frame(vid_new_frame), .frame_count);

  scale u_scale (
    .hcount_in(hcount), .vcount_in(vcount),
    .hcount_scaled(hsc), .vcount_scaled(vsc), .valid_addr_scaled(addr_ok));

  assign rd_addr   = AW'(int'(vsc) * SCREEN + int'(hsc));
  assign new_frame = vid_new_frame;

  always_ff @(posedge clk_pixel) begin
    if (sys_rst) begin
      hor_sync    <= 1'b0;
      vert_sync   <= 1'b0;
      active_draw <= 1'b0;
      addr_ok_q   <= 1'b0;
    end else begin
      hor_sync    <= hs;
      vert_sync   <= vs;
      active_draw <= ad;
      addr_ok_q   <= addr_ok;
    end
  end

  // Only the colour byte of the display word is shown; its depth byte
  // matters only to the rasterizer.
  assign pixel_gray = (active_draw && addr_ok_q) ? rd_data.color : 8'd0;
endmodule
