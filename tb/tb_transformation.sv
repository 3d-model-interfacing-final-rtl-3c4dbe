// tb_transformation: random vertices, poses, scales and offsets are sent
// through one transformation unit and compared with a floating-point
// model: p = Ry(yaw) * Rx(pitch) * Rz(roll) * (v - com) * scale + (tx, ty,
// distance), angles in 22.5 degree steps. Tolerance is 2^-8 units. It also
// checks the latency (valid_out 5 cycles after the accepting edge), that
// ready_out is low while busy, and that outputs hold under back-pressure.
module tb_transformation;
  import gfx_pkg::*;

  logic clk = 1'b0, rst;
  logic valid_in, ready_out, obj_done_in, obj_done_out, valid_out, ready_in;
  vec3_t v_in, com, new_pos;
  fx_t scale, distance, tx, ty;
  logic [3:0] pitch, roll, yaw;
  int checks = 0, failures = 0;

  transformation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fx_t v);
    return $itor(v) / 65536.0;
  endfunction
  function automatic fx_t f(real x);
    return fx_t'($rtoi(x * 65536.0));
  endfunction

  // uniform random value in [lo, hi] thousandths
  function automatic real rr(int lo, int hi);
    int v;
    v = lo + int'($urandom_range(hi - lo, 0));
    return v / 1000.0;
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real px, py, pz, t1, t2, th, ex, ey, ez;
    int lat;
    rst = 1'b1; valid_in = 0; ready_in = 0; obj_done_in = 0;
    v_in = '0; com = '0; scale = FX_ONE; distance = '0; tx = '0; ty = '0;
    pitch = 0; roll = 0; yaw = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      v_in.x = f(rr(-4000, 4000));
      v_in.y = f(rr(-4000, 4000));
      v_in.z = f(rr(-4000, 4000));
      com.x = f(rr(-1000, 1000));
      com.y = f(rr(-1000, 1000));
      com.z = f(rr(-1000, 1000));
      scale = f(rr(250, 3000));
      distance = f(rr(1000, 8000));
      tx = f(rr(-1000, 1000));
      ty = f(rr(-1000, 1000));
      pitch = 4'($urandom); roll = 4'($urandom); yaw = 4'($urandom);
      obj_done_in = 1'($urandom);
      // reference
      px = r(v_in.x) - r(com.x); py = r(v_in.y) - r(com.y); pz = r(v_in.z) - r(com.z);
      th = 2.0 * 3.14159265358979 * roll / 16.0;       // about z
      t1 = $cos(th) * px - $sin(th) * py; t2 = $sin(th) * px + $cos(th) * py; px = t1; py = t2;
      th = 2.0 * 3.14159265358979 * pitch / 16.0;      // about x
      t1 = $cos(th) * py - $sin(th) * pz; t2 = $sin(th) * py + $cos(th) * pz; py = t1; pz = t2;
      th = 2.0 * 3.14159265358979 * yaw / 16.0;        // about y
      t1 = $cos(th) * px + $sin(th) * pz; t2 = -$sin(th) * px + $cos(th) * pz; px = t1; pz = t2;
      ex = px * r(scale) + r(tx); ey = py * r(scale) + r(ty); ez = pz * r(scale) + r(distance);

      @(negedge clk);
      while (!ready_out) @(negedge clk);
      valid_in = 1'b1;
      @(posedge clk);
      #1 valid_in = 1'b0;
      lat = 0;
      #1;
      chk(!ready_out, "busy after accept");
      while (!valid_out) begin @(posedge clk); #1; lat++; end
      chk(lat == 5, $sformatf("latency %0d", lat));
      // hold under back-pressure
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      chk(valid_out, "valid held");
      chk(fabs(r(new_pos.x) - ex) < 0.004 && fabs(r(new_pos.y) - ey) < 0.004 &&
          fabs(r(new_pos.z) - ez) < 0.004,
          $sformatf("vertex %0d: got %f %f %f expected %f %f %f", n,
                    r(new_pos.x), r(new_pos.y), r(new_pos.z), ex, ey, ez));
      chk(obj_done_out == obj_done_in, "obj_done travels with the vertex");
      ready_in = 1'b1;
      @(posedge clk);
      #1 ready_in = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
