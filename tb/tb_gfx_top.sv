// tb_gfx_top: end-to-end test of the renderer at its default size.
//
// Runs gfx_top with the built-in cube model (a 2x2x2 cube, centre of mass
// at the origin of its own frame, placed 4 units in front of the camera).
// Rendered images are captured from the video outputs themselves, by
// following the raster with the testbench's own counters, and checked
// against what the geometry predicts:
//   pose 0:   only the front face (z = 3) faces the camera squarely, so
//             its projection, the square from 80 to 160 in both axes
//             (pixels 80..159), is full white (cos^2 = 1 -> gray 255) apart
//             from the 80 pixel centres exactly on its diagonal,
//             and nothing outside that square is lit;
//   yaw +45:  two faces are seen at 45 degrees (cos^2 = 1/2 -> gray 76) and
//             no pixel is white;
//   x shift:  holding the x-increase switch for four frames moves the
//             object right by 4/16 unit, so the lit area moves right.
// It also counts the mechanisms of the design: erase passes, buffer swaps,
// Z-test rejections and acceptances, back-facing (black) triangles, and
// handshake stalls at the vertex fetch; each must occur at least once.
module tb_gfx_top;
  import gfx_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [2:0]  btn;
  logic [11:0] sw;
  logic        hs, vs, ad, nf, od, sel;
  logic [7:0]  gray;

  int checks = 0, failures = 0;

  gfx_top dut (
    .clk_pixel(clk), .sys_rst(rst), .btn, .sw,
    .hor_sync(hs), .vert_sync(vs), .active_draw(ad), .pixel_gray(gray),
    .new_frame(nf), .obj_done(od), .buffer_sel(sel));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- watchdog ----
  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_erase = 0, n_swap = 0, n_zrej = 0, n_zacc = 0, n_black = 0, n_stall = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_rast.state == 3'd1 && dut.u_rast.erase_addr == '0) n_erase++;
    if (od) n_swap++;
    if (dut.u_rast.state == 3'd4) begin
      if (dut.fb_we) n_zacc++; else n_zrej++;
    end
    if (dut.u_shader.valid_out && dut.u_shader.ready_in && dut.u_shader.color == 8'd0) n_black++;
    if (dut.u_get.valid_out && !dut.u_get.ready_in) n_stall++;
  end

  // ---- frame capture from the video outputs ----
  // The outputs lag the raster counters by one cycle; this counter follows
  // the output timing: 1650 clocks per line, 750 lines, active 1280x720.
  logic [7:0] img [240][240];
  int hc, vc;

  task automatic wait_obj_done();
    @(posedge clk);
    while (!od) @(posedge clk);
  endtask

  // Capture one full frame starting at the next frame start.
  task automatic capture();
    // align: active_draw rises at the first pixel of line 0
    hc = 0; vc = 0;
    // wait for the vertical blank to end: vs high then a rising active_draw
    while (!vs) @(posedge clk);
    while (vs) @(posedge clk);
    while (!ad) @(posedge clk);
    for (int y = 0; y < 720; y++) begin
      for (int x = 0; x < 1650; x++) begin
        if (x < 1280) begin
          if (!ad) begin failures++; $display("FAIL: active_draw low at %0d,%0d", x, y); end
          if (x >= 280 && x < 1000) begin
            if (((x - 280) % 3) == 0 && (y % 3) == 0)
              img[y / 3][(x - 280) / 3] = gray;
            else if (gray != img[y / 3][(x - 280) / 3] && (x - 280) % 3 != 0) begin
              failures++;
              $display("FAIL: pixel replication at %0d,%0d", x, y);
            end
          end else if (gray != 0) begin
            failures++;
            $display("FAIL: lit pixel outside the image at %0d,%0d", x, y);
          end
        end
        @(posedge clk);
      end
    end
    checks++;
  endtask

  function automatic int count_eq(logic [7:0] g);
    int n = 0;
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 240; x++)
        if (img[y][x] == g) n++;
    return n;
  endfunction

  function automatic int lit_xmin();
    int m = 999;
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 240; x++)
        if (img[y][x] != 0 && x < m) m = x;
    return m;
  endfunction

  function automatic int lit_outside(int lo, int hi);
    int n = 0;
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 240; x++)
        if (img[y][x] != 0 && (x < lo || x > hi || y < lo || y > hi)) n++;
    return n;
  endfunction

  int n255, n76, x0, x1;

  initial begin
    rst = 1'b1; btn = '0; sw = '0;
    repeat (10) @(posedge clk);
    rst = 1'b0;

    // First complete render; the buffers swap at its end.
    wait_obj_done();
    @(posedge clk);
    check(sel == 1'b1, "buffer select toggled after the first object");
    wait_obj_done();
    capture();
    n255 = count_eq(8'd255);
    $display("pose 0: %0d white pixels, lit x from %0d", n255, lit_xmin());
    check(n255 >= 6200 && n255 <= 6400, "front face area");
    check(img[100][120] == 8'd255 && img[130][120] == 8'd255, "front face interior is white");
    check(img[10][10] == 8'd0 && img[230][200] == 8'd0, "background is black");
    check(lit_outside(80, 160) == 0, "nothing lit outside the front-face square");

    // Yaw by two steps (45 degrees).
    repeat (2) begin
      btn[2] = 1'b1; repeat (5) @(posedge clk);
      btn[2] = 1'b0; repeat (5) @(posedge clk);
    end
    check(dut.yaw == 4'd2, "two presses of button 3 step yaw by two");
    wait_obj_done();
    wait_obj_done();
    capture();
    n255 = count_eq(8'd255);
    n76  = count_eq(8'd76);
    $display("yaw 45: %0d white, %0d gray-76 pixels", n255, n76);
    check(n255 == 0, "no face squarely lit after yaw");
    check(n76 > 3000, "two faces at 45 degrees are gray 76");
    x0 = lit_xmin();

    // Shift right: hold the x-increase switch for four frames.
    sw[0] = 1'b1;
    repeat (4) begin
      @(posedge clk);
      while (!nf) @(posedge clk);
    end
    @(posedge clk);
    sw[0] = 1'b0;
    $display("tx = %h", dut.tx);
    check(dut.tx == 32'sh0000_4000, "x translation stepped four times");
    wait_obj_done();
    wait_obj_done();
    capture();
    x1 = lit_xmin();
    $display("shift: lit x from %0d to %0d", x0, x1);
    check(x1 > x0 + 5, "object moved right");

    $display("mechanisms: erase=%0d swap=%0d zrej=%0d zacc=%0d black=%0d stall=%0d",
             n_erase, n_swap, n_zrej, n_zacc, n_black, n_stall);
    check(n_erase > 0, "erase pass happened");
    check(n_swap > 0, "buffer swap happened");
    check(n_zrej > 0, "Z test rejected a hidden pixel");
    check(n_zacc > 0, "Z test accepted a pixel");
    check(n_black > 0, "a back-facing triangle was coloured black");
    check(n_stall > 0, "vertex fetch stalled on ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
