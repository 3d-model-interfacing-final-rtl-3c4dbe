// tb_pixel_shader: random triangles through the shader. The expected colour
// is computed with real arithmetic: n = (v1 - v0) x (v2 - v0); black if
// n.z >= 0 (facing away from the camera), else k = round(16 * nz^2/|n|^2)
// limited to 15 and gray = round(255 * 2^((k - 15) / 4)). Cases within
// 0.02 of a rounding boundary accept either neighbour. Also checks the
// fixed latency of a lit triangle (87 cycles: 11 stage cycles plus 76
// division cycles)
// and that the two faces of the cube test model come out as expected.
module tb_pixel_shader;
  import gfx_pkg::*;

  logic clk = 1'b0, rst;
  logic valid_in, ready_out, valid_out, ready_in;
  tri3_t tri_in;
  logic [7:0] color;
  int checks = 0, failures = 0;

  pixel_shader dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rr(int lo, int hi);
    int v;
    v = lo + int'($urandom_range(hi - lo, 0));
    return v / 1000.0;
  endfunction
  function automatic fx_t f(real x);
    return fx_t'($rtoi(x * 65536.0));
  endfunction
  function automatic real r(fx_t v);
    return $itor(v) / 65536.0;
  endfunction
  function automatic int gray_of(int k);
    return $rtoi(255.0 * (2.0 ** ((k - 15) / 4.0)) + 0.5);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input tri3_t t, output logic [7:0] c, output int lat);
    tri_in = t;
    @(negedge clk);
    while (!ready_out) @(negedge clk);
    valid_in = 1'b1;
    @(posedge clk);
    #1 valid_in = 1'b0;
    lat = 0;
    while (!valid_out) begin @(posedge clk); #1; lat++; end
    c = color;
    ready_in = 1'b1;
    @(posedge clk);
    #1 ready_in = 1'b0;
  endtask

  initial begin
    tri3_t t;
    real e1x, e1y, e1z, e2x, e2y, e2z, a, b, c, m, q, fr;
    int k, k2, lat, g1, g2;
    logic [7:0] col;
    rst = 1'b1; valid_in = 0; ready_in = 0; tri_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Cube front face (normal towards the camera) and back face.
    t.v0 = '{x: f(0), y: f(0), z: f(0)};
    t.v1 = '{x: f(0), y: f(2), z: f(0)};
    t.v2 = '{x: f(2), y: f(2), z: f(0)};
    run(t, col, lat);
    chk(col == 8'd255, $sformatf("front face colour %0d", col));
    chk(lat == 87, $sformatf("lit latency %0d", lat));
    t.v1 = '{x: f(2), y: f(0), z: f(0)};
    run(t, col, lat);
    chk(col == 8'd0, "back face is black");

    for (int n = 0; n < 300; n++) begin
      t.v0 = '{x: f(rr(-3000, 3000)), y: f(rr(-3000, 3000)), z: f(rr(1000, 8000))};
      t.v1 = '{x: f(rr(-3000, 3000)), y: f(rr(-3000, 3000)), z: f(rr(1000, 8000))};
      t.v2 = '{x: f(rr(-3000, 3000)), y: f(rr(-3000, 3000)), z: f(rr(1000, 8000))};
      e1x = r(t.v1.x) - r(t.v0.x); e1y = r(t.v1.y) - r(t.v0.y); e1z = r(t.v1.z) - r(t.v0.z);
      e2x = r(t.v2.x) - r(t.v0.x); e2y = r(t.v2.y) - r(t.v0.y); e2z = r(t.v2.z) - r(t.v0.z);
      a = e1y * e2z - e1z * e2y;
      b = e1z * e2x - e1x * e2z;
      c = e1x * e2y - e1y * e2x;
      m = a * a + b * b + c * c;
      run(t, col, lat);
      if (c >= -0.001) begin
        if (c < 0.001) begin
          checks++;            // nearly edge-on: either black or the dimmest
        end else
          chk(col == 8'd0, $sformatf("%0d: facing away, got %0d", n, col));
      end else begin
        q  = 16.0 * c * c / m;
        k  = $rtoi(q + 0.5);
        fr = q - $floor(q);
        k2 = (fr > 0.48 && fr < 0.52) ? ((fr < 0.5) ? k + 1 : k - 1) : k;
        if (k > 15) k = 15;
        if (k2 > 15) k2 = 15;
        g1 = gray_of(k);
        g2 = gray_of(k2);
        chk(int'(col) == g1 || int'(col) == g2,
            $sformatf("%0d: cos2*16=%f got %0d expected %0d", n, q, col, g1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
