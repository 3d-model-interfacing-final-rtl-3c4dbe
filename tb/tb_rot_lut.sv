// tb_rot_lut: checks every matrix of the rotation LUT (3 axes x 16 angles)
// against rotation matrices built from $cos/$sin of angle*22.5 degrees, to
// within 1 LSB of Q16.16, including the homogeneous row and column.
module tb_rot_lut;
  import gfx_pkg::*;

  axis_t      axis;
  logic [3:0] angle;
  fx_t        m [4][4];
  int checks = 0, failures = 0;

  rot_lut dut (.axis, .angle, .m);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int to_fx(real r);
    return $rtoi(r * 65536.0 + (r >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin
    real th, c, s;
    real e [4][4];
    for (int ax = 0; ax < 3; ax++) begin
      for (int k = 0; k < 16; k++) begin
        axis  = axis_t'(ax);
        angle = 4'(k);
        #1;
        th = 2.0 * 3.14159265358979 * k / 16.0;
        c = $cos(th);
        s = $sin(th);
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            e[i][j] = (i == j) ? 1.0 : 0.0;
        case (ax)
          0: begin e[1][1] = c; e[1][2] = -s; e[2][1] = s; e[2][2] = c; end
          1: begin e[0][0] = c; e[0][2] = s; e[2][0] = -s; e[2][2] = c; end
          default: begin e[0][0] = c; e[0][1] = -s; e[1][0] = s; e[1][1] = c; end
        endcase
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            int d;
            d = int'(m[i][j]) - to_fx(e[i][j]);
            checks++;
            if (d > 1 || d < -1) begin
              failures++;
              $display("FAIL axis %0d angle %0d m[%0d][%0d]=%0d expected %0d",
                       ax, k, i, j, m[i][j], to_fx(e[i][j]));
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
