// rot_lut: rotation-matrix look-up table.
//
// Returns the 4x4 homogeneous matrix that rotates a column vector
// [x y z 1]^T by angle * 22.5 degrees about the chosen axis. The angle is the
// 4-bit index that the user controls step (16 positions per turn). The sine
// and cosine entries come from a one-quadrant table of Q16.16 constants,
// round(sin(2*pi*k/16) * 65536), mirrored for the other quadrants.
//
// Purely combinational. Storing rotations as matrix LUTs, and the 4x4
// homogeneous form with w = 1, follow the design description; the 4-bit
// angle resolution is read from the 4-bit pitch/roll/yaw buses of the block
// diagram, and the right-handed sign convention is this design's own choice.
module rot_lut
  import gfx_pkg::*;
(
  input  axis_t      axis,
  input  logic [3:0] angle,
  output fx_t        m [4][4]
);
  fx_t c, s;

  always_comb begin
    c = cos16(angle);
    s = sin16(angle);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        m[i][j] = (i == j) ? FX_ONE : '0;
    unique case (axis)
      AXIS_X: begin
        m[1][1] = c;  m[1][2] = -s;
        m[2][1] = s;  m[2][2] = c;
      end
      AXIS_Y: begin
        m[0][0] = c;  m[0][2] = s;
        m[2][0] = -s; m[2][2] = c;
      end
      default: begin
        m[0][0] = c;  m[0][1] = -s;
        m[1][0] = s;  m[1][1] = c;
      end
    endcase
  end
endmodule
