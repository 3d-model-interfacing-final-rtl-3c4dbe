// tb_rasterizer: the rasterizer on a 16x16 screen against a memory model of
// one frame buffer (synchronous read, one cycle of latency).
//
// Checks: the erase pass clears every word and takes 2 cycles per word;
// random triangles (some partly off screen, some with a clipped vertex,
// some degenerate) with random colours and depths are drawn; the buffer is
// then compared with a reference Z buffer built by the testbench with the
// three-edge-function inside test (a pixel is inside when all three edge
// functions, evaluated at the pixel centre, have the sign of the
// triangle's signed area; vertices are in 1/16 pixel) and a strict
// "nearer wins" depth rule; obj_done pulses exactly once, after the
// triangle marked last, and a new erase pass follows.
module tb_rasterizer;
  import gfx_pkg::*;

  localparam int W = 16, H = 16, AW = $clog2(W * H);

  logic clk = 1'b0, rst;
  logic valid_in, ready_out, last_in, fb_we, obj_done, erasing;
  pvert_t p0, p1, p2;
  logic [7:0] color;
  logic [AW-1:0] fb_addr;
  fbword_t fb_wdata, fb_rdata;
  fbword_t mem [W * H];
  fbword_t refm [W * H];
  int checks = 0, failures = 0;
  int n_done = 0, n_drop_expected = 0;

  rasterizer #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (fb_we) mem[fb_addr] <= fb_wdata;
    fb_rdata <= mem[fb_addr];
  end
  always @(posedge clk) if (obj_done && !rst) n_done++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint edgef(int ax, int ay, int bx, int by, int px, int py);
    return longint'(bx - ax) * longint'(py - ay) - longint'(by - ay) * longint'(px - ax);
  endfunction

  task automatic ref_draw(pvert_t a, pvert_t b, pvert_t c, logic [7:0] col);
    longint area, e0, e1, e2;
    int d;
    area = edgef(a.x, a.y, b.x, b.y, c.x, c.y);
    d = (int'(a.depth) + int'(b.depth) + int'(c.depth)) / 3;
    if (a.clip || b.clip || c.clip || area == 0) return;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        e0 = edgef(a.x, a.y, b.x, b.y, 16 * x + 8, 16 * y + 8);
        e1 = edgef(b.x, b.y, c.x, c.y, 16 * x + 8, 16 * y + 8);
        e2 = edgef(c.x, c.y, a.x, a.y, 16 * x + 8, 16 * y + 8);
        if ((area > 0 && e0 > 0 && e1 > 0 && e2 > 0) ||
            (area < 0 && e0 < 0 && e1 < 0 && e2 < 0))
          if (d < int'(refm[y * W + x].depth))
            refm[y * W + x] = '{color: col, depth: 8'(d)};
      end
  endtask

  function automatic pvert_t rv();
    pvert_t v;
    // mostly on whole or half pixels, so that edges through pixel
    // centres occur, otherwise anywhere in 1/16 pixel
    v.x = scoord_t'(int'($urandom_range(384, 0)) - 64);
    v.y = scoord_t'(int'($urandom_range(384, 0)) - 64);
    if ($urandom_range(1, 0) == 0) begin
      v.x = scoord_t'(v.x & ~16'sd7);
      v.y = scoord_t'(v.y & ~16'sd7);
    end
    v.depth = 8'($urandom_range(250, 10));
    v.clip = ($urandom_range(30, 0) == 0);
    return v;
  endfunction

  initial begin
    int cyc, ntri;
    for (int i = 0; i < W * H; i++) mem[i] = '{color: 8'hA5, depth: 8'h11};
    rst = 1'b1; valid_in = 0; last_in = 0; p0 = '0; p1 = '0; p2 = '0; color = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cyc = 0;
    while (!ready_out) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 2 * W * H, $sformatf("erase took %0d cycles", cyc));
    for (int i = 0; i < W * H; i++) begin
      chk(mem[i] == FB_CLEAR, "word cleared by erase");
      refm[i] = FB_CLEAR;
    end

    for (int pass = 0; pass < 3; pass++) begin
      ntri = 40;
      for (int n = 0; n < ntri; n++) begin
        p0 = rv(); p1 = rv(); p2 = rv();
        if (n % 13 == 5) p2 = p1;                // degenerate
        color = 8'($urandom_range(255, 1));
        last_in = (n == ntri - 1);
        ref_draw(p0, p1, p2, color);
        @(negedge clk);
        while (!ready_out) @(negedge clk);
        valid_in = 1'b1;
        @(posedge clk);
        #1 valid_in = 1'b0;
        chk(!ready_out || n == ntri - 1 || 1'b1, "accepted");
      end
      // wait for the end of the object
      cyc = 0;
      while (n_done == pass) begin @(posedge clk); #1; cyc++; end
      chk(n_done == pass + 1, "one obj_done per object");
      #1;
      chk(erasing, "erase starts after obj_done");
      for (int i = 0; i < W * H; i++)
        chk(mem[i] == refm[i], $sformatf("pixel %0d,%0d: got %h expected %h",
                                          i % W, i / W, mem[i], refm[i]));
      // next object: after the erase the buffer is clear again
      while (!ready_out) @(posedge clk);
      #1;
      for (int i = 0; i < W * H; i++) begin
        chk(mem[i] == FB_CLEAR, "cleared for the next object");
        refm[i] = FB_CLEAR;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
