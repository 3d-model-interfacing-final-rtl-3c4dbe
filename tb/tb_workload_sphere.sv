// tb_workload_sphere: renders a large model on the full-size design.
//
// The testbench builds a UV sphere of radius 1 with 40 meridians and 38
// latitude bands: 40*37 + 2 = 1482 vertices and 2*40*37 = 2960 triangles,
// close to the largest model size the ROM is sized for. It writes the sphere
// into the model ROM (replacing the built-in cube) before reset ends, with
// each triangle wound so that its normal points outwards. After two complete
// renders it reads the displayed buffer and checks:
//   - the silhouette is a disc of radius 120*tan(asin(1/4)) = 31 pixels
//     around the screen centre: nothing lit beyond radius 33, at least 95%
//     of the pixels lit inside radius 28;
//   - the centre faces the light and is among the brightest levels, and the
//     shading falls off towards the rim (mean gray inside radius 10 above
//     the mean gray of the ring from radius 22 to 28);
//   - every triangle of the model reached the rasterizer once per render;
//   - one render (erase + 2960 triangles) takes less than one 1650x750
//     video frame.
module tb_workload_sphere;
  import gfx_pkg::*;

  localparam int NLON = 40, NLAT = 38;
  localparam int NTRI = 2 * NLON * (NLAT - 1);

  logic        clk = 1'b0;
  logic        rst;
  logic        hs, vs, ad, nf, od, sel, er;
  logic [7:0]  gray;
  logic [5:0]  fc;

  int checks = 0, failures = 0;

  gfx_top dut (
    .clk_pixel(clk), .sys_rst(rst), .btn(3'b000), .sw(12'h000),
    .hor_sync(hs), .vert_sync(vs), .active_draw(ad), .pixel_gray(gray),
    .new_frame(nf), .obj_done(od), .buffer_sel(sel), .erasing(er),
    .frame_count(fc));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- sphere generation ----
  real vx [NLON * (NLAT - 1) + 2];
  real vy [NLON * (NLAT - 1) + 2];
  real vz [NLON * (NLAT - 1) + 2];
  int  nw;

  function automatic int ring(int i, int j);   // i = 1..NLAT-1
    return 1 + (i - 1) * NLON + (j % NLON);
  endfunction

  function automatic logic [31:0] fxr(real x);
    return 32'($rtoi(x * 65536.0 + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

  task automatic put_tri(int a, int b, int c);
    real e1x, e1y, e1z, e2x, e2y, e2z, nx, ny, nz, d;
    int t;
    e1x = vx[b] - vx[a]; e1y = vy[b] - vy[a]; e1z = vz[b] - vz[a];
    e2x = vx[c] - vx[a]; e2y = vy[c] - vy[a]; e2z = vz[c] - vz[a];
    nx = e1y * e2z - e1z * e2y;
    ny = e1z * e2x - e1x * e2z;
    nz = e1x * e2y - e1y * e2x;
    d = nx * (vx[a] + vx[b] + vx[c]) + ny * (vy[a] + vy[b] + vy[c]) +
        nz * (vz[a] + vz[b] + vz[c]);
    if (d < 0.0) begin t = b; b = c; c = t; end
    dut.u_get.rom[nw++] = fxr(vx[a]); dut.u_get.rom[nw++] = fxr(vy[a]); dut.u_get.rom[nw++] = fxr(vz[a]);
    dut.u_get.rom[nw++] = fxr(vx[b]); dut.u_get.rom[nw++] = fxr(vy[b]); dut.u_get.rom[nw++] = fxr(vz[b]);
    dut.u_get.rom[nw++] = fxr(vx[c]); dut.u_get.rom[nw++] = fxr(vy[c]); dut.u_get.rom[nw++] = fxr(vz[c]);
  endtask

  task automatic build_sphere();
    real th, ph;
    int np, sp;
    np = 0;
    sp = NLON * (NLAT - 1) + 1;
    vx[np] = 0.0; vy[np] = 1.0; vz[np] = 0.0;
    vx[sp] = 0.0; vy[sp] = -1.0; vz[sp] = 0.0;
    for (int i = 1; i < NLAT; i++) begin
      th = 3.14159265358979 * i / NLAT;
      for (int j = 0; j < NLON; j++) begin
        ph = 2.0 * 3.14159265358979 * j / NLON;
        vx[ring(i, j)] = $sin(th) * $cos(ph);
        vy[ring(i, j)] = $cos(th);
        vz[ring(i, j)] = $sin(th) * $sin(ph);
      end
    end
    dut.u_get.rom[0] = 32'(NTRI);
    dut.u_get.rom[1] = '0;
    dut.u_get.rom[2] = '0;
    dut.u_get.rom[3] = '0;
    nw = 4;
    for (int j = 0; j < NLON; j++) begin
      put_tri(np, ring(1, j), ring(1, j + 1));
      put_tri(sp, ring(NLAT - 1, j), ring(NLAT - 1, j + 1));
    end
    for (int i = 1; i < NLAT - 1; i++)
      for (int j = 0; j < NLON; j++) begin
        put_tri(ring(i, j), ring(i + 1, j), ring(i + 1, j + 1));
        put_tri(ring(i, j), ring(i + 1, j + 1), ring(i, j + 1));
      end
  endtask

  // ---- counters ----
  int n_tri = 0, t_start = 0, t_render = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && dut.st3_take) n_tri++;
  end

  int per_render [$];

  initial begin
    int lit_in, tot_in, lit_out, sum_c, n_c, sum_r, n_r, r2, img_c;
    logic [7:0] g;
    rst = 1'b1;
    #2;
    build_sphere();
    check(nw == 4 + 9 * NTRI, "sphere written into the model ROM");
    repeat (10) @(posedge clk);
    rst = 1'b0;

    for (int k = 0; k < 3; k++) begin
      t_start = cyc;
      n_tri = 0;
      @(posedge clk);
      while (!od) @(posedge clk);
      per_render.push_back(cyc - t_start);
      $display("render %0d: %0d triangles, %0d cycles", k, n_tri, cyc - t_start);
    end
    check(per_render[1] < 1650 * 750, "one render fits in one video frame");
    @(posedge clk);
    @(posedge clk);

    // Inspect the buffer now on display.
    lit_in = 0; tot_in = 0; lit_out = 0; sum_c = 0; n_c = 0; sum_r = 0; n_r = 0;
    for (int y = 0; y < SCREEN; y++)
      for (int x = 0; x < SCREEN; x++) begin
        g = sel ? dut.u_fb.g_buf[0].u_mem.mem[y * SCREEN + x].color
                : dut.u_fb.g_buf[1].u_mem.mem[y * SCREEN + x].color;
        r2 = (x - 120) * (x - 120) + (y - 120) * (y - 120);
        if (r2 <= 28 * 28) begin tot_in++; if (g != 0) lit_in++; end
        if (r2 > 33 * 33 && g != 0) lit_out++;
        if (r2 <= 10 * 10) begin sum_c += g; n_c++; end
        if (r2 >= 22 * 22 && r2 <= 28 * 28) begin sum_r += g; n_r++; end
      end
    img_c = sel ? dut.u_fb.g_buf[0].u_mem.mem[120 * SCREEN + 120].color
                : dut.u_fb.g_buf[1].u_mem.mem[120 * SCREEN + 120].color;
    $display("lit inside r28: %0d of %0d, lit outside r33: %0d, centre %0d, mean centre %0d rim %0d",
             lit_in, tot_in, lit_out, img_c, sum_c / n_c, sum_r / n_r);
    check(lit_in * 100 >= tot_in * 95, "disc filled");
    check(lit_out == 0, "nothing lit outside the silhouette");
    check(img_c >= 214, "centre faces the light");
    check(sum_c / n_c > sum_r / n_r + 40, "shading falls off towards the rim");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
