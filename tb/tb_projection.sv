// tb_projection: random camera-space vertices through one projection unit.
// Expected screen positions are computed independently with real
// arithmetic, in 1/16 pixel: px = 1920 +/- floor(1920*|x|/z),
// py = 1920 -/+ floor(1920*|y|/z) (screen y down),
// depth = min(255, floor(16*z)); a vertex with z <= 1/16 is expected to be
// flagged clip. The latency (3 + 48 division cycles) and the
// hold of the output under back-pressure are checked as well.
module tb_projection;
  import gfx_pkg::*;

  logic clk = 1'b0, rst;
  logic valid_in, ready_out, obj_done_in, obj_done_out, valid_out, ready_in;
  vec3_t v_in;
  pvert_t pv;
  int checks = 0, failures = 0;

  projection dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rr(int lo, int hi);
    int v;
    v = lo + int'($urandom_range(hi - lo, 0));
    return v / 1000.0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real x, y, z;
    int ex, ey, ed, lat, ox, oy;
    bit eclip;
    rst = 1'b1; valid_in = 0; ready_in = 0; obj_done_in = 0; v_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      x = rr(-3000, 3000);
      y = rr(-3000, 3000);
      z = (n % 10 == 0) ? rr(-2000, 60) : rr(500, 12000);
      v_in.x = fx_t'($rtoi(x * 65536.0));
      v_in.y = fx_t'($rtoi(y * 65536.0));
      v_in.z = fx_t'($rtoi(z * 65536.0));
      obj_done_in = 1'($urandom);
      // reference from the fixed-point inputs as given to the unit
      x = $itor(v_in.x) / 65536.0;
      y = $itor(v_in.y) / 65536.0;
      z = $itor(v_in.z) / 65536.0;
      eclip = (v_in.z <= 32'sh1000);
      if (!eclip) begin
        ox = $rtoi(1920.0 * (x < 0 ? -x : x) / z);
        oy = $rtoi(1920.0 * (y < 0 ? -y : y) / z);
        if (ox > 30000) ox = 30000;
        if (oy > 30000) oy = 30000;
        ex = (x < 0) ? 1920 - ox : 1920 + ox;
        ey = (y < 0) ? 1920 + oy : 1920 - oy;
      end
      ed = (z < 0) ? 0 : $rtoi(z * 16.0);
      if (ed > 255) ed = 255;

      @(negedge clk);
      while (!ready_out) @(negedge clk);
      valid_in = 1'b1;
      @(posedge clk);
      #1 valid_in = 1'b0;
      lat = 0;
      while (!valid_out) begin @(posedge clk); #1; lat++; end
      if (!eclip) chk(lat == 3 + 48 + 1, $sformatf("latency %0d", lat));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      chk(valid_out, "valid held");
      chk(pv.clip == eclip, $sformatf("clip flag, z=%f", z));
      if (!eclip) begin
        // allow 1/16 pixel for the Q16.16 truncation of x, y, z
        chk(int'(pv.x) - ex <= 1 && ex - int'(pv.x) <= 1 &&
            int'(pv.y) - ey <= 1 && ey - int'(pv.y) <= 1,
            $sformatf("%0d: (%f,%f,%f) -> (%0d,%0d) expected (%0d,%0d)",
                      n, x, y, z, pv.x, pv.y, ex, ey));
      end
      chk(pv.depth == 8'(ed), $sformatf("depth %0d expected %0d", pv.depth, ed));
      chk(obj_done_out == obj_done_in, "obj_done travels with the vertex");
      ready_in = 1'b1;
      @(posedge clk);
      #1 ready_in = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
