// tb_get_vertices: fetches the built-in cube model (12 triangles of a 2x2x2
// cube spanning 0..2 on each axis, centre of mass (1,1,1)). Checks the
// centre of mass, that every triangle has three corners of that cube with
// integer coordinates in {0, 2}, that the three corners span one face
// (share one coordinate), that each face appears exactly twice, obj_done on
// the 12th triangle only, wrap-around to the first triangle, outputs held
// while ready_in is low, and the 18-cycle fetch time per triangle.
module tb_get_vertices;
  import gfx_pkg::*;

  logic clk = 1'b0, rst, valid_out, obj_done, ready_in;
  vec3_t v1, v2, v3, com;
  int checks = 0, failures = 0;

  get_vertices dut (.clk_pixel(clk), .sys_rst(rst), .*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit corner(vec3_t v);
    return (v.x == 0 || v.x == 32'sh2_0000) && (v.y == 0 || v.y == 32'sh2_0000) &&
           (v.z == 0 || v.z == 32'sh2_0000);
  endfunction

  initial begin
    int faces [6];
    int lat, face;
    vec3_t first [3];
    vec3_t h1;
    rst = 1'b1; ready_in = 0;
    foreach (faces[i]) faces[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 13; n++) begin
      lat = 0;
      while (!valid_out) begin @(posedge clk); #1; lat++; end
      if (n > 0) chk(lat == 18, $sformatf("fetch time %0d", lat));
      chk(com.x == FX_ONE && com.y == FX_ONE && com.z == FX_ONE, "centre of mass");
      if (n == 0) begin first[0] = v1; first[1] = v2; first[2] = v3; end
      if (n == 12) begin
        chk(v1 == first[0] && v2 == first[1] && v3 == first[2], "wraps to the first triangle");
        chk(!obj_done, "no obj_done on the first triangle");
      end else begin
        chk(corner(v1) && corner(v2) && corner(v3), $sformatf("triangle %0d corners", n));
        face = -1;
        if (v1.x == v2.x && v2.x == v3.x) face = (v1.x == 0) ? 0 : 1;
        else if (v1.y == v2.y && v2.y == v3.y) face = (v1.y == 0) ? 2 : 3;
        else if (v1.z == v2.z && v2.z == v3.z) face = (v1.z == 0) ? 4 : 5;
        chk(face >= 0, "triangle lies in a face");
        if (face >= 0) faces[face]++;
        chk(obj_done == (n == 11), $sformatf("obj_done on triangle %0d", n));
      end
      // hold while not ready
      h1 = v1;
      repeat (3) @(posedge clk);
      #1;
      chk(valid_out && v1 == h1, "held while not ready");
      @(negedge clk); ready_in = 1'b1;
      @(posedge clk); #1 ready_in = 1'b0;
    end
    foreach (faces[i]) chk(faces[i] == 2, $sformatf("face %0d has two triangles", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
