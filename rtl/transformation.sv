// transformation: vertex shader for one vertex.
//
// Takes a model-space vertex, appends w = 1 and multiplies it by three 4x4
// homogeneous rotation matrices from rot_lut (roll about z, the viewing
// axis, then pitch about x, then yaw about y), so the model turns about its
// own centre of mass. It then applies the scale factor and translates the
// result into camera space: centre of mass placed at (tx, ty, distance).
//
// Handshake: a vertex is accepted when valid_in && ready_out; new_pos,
// obj_done_out and valid_out are held until ready_in. obj_done_in marks the
// last triangle of the object and travels with the vertex. Latency from
// accept to valid_out is 6 cycles (ROLL, PITCH, YAW, SCALE, TRANSLATE, then
// the output register). Rotation before translation, matrix LUTs and
// homogeneous coordinates follow the design description; subtracting the
// centre of mass before rotating, the axis order and the fixed-point
// arithmetic are this design's choices.
module transformation
  import gfx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  output logic       ready_out,
  input  vec3_t      v_in,
  input  logic       obj_done_in,
  input  vec3_t      com,
  input  fx_t        scale,
  input  fx_t        distance,
  input  fx_t        tx,
  input  fx_t        ty,
  input  logic [3:0] pitch,
  input  logic [3:0] roll,
  input  logic [3:0] yaw,
  output vec3_t      new_pos,
  output logic       obj_done_out,
  output logic       valid_out,
  input  logic       ready_in
);
  typedef enum logic [2:0] {
    S_IDLE, S_ROLL, S_PITCH, S_YAW, S_SCALE, S_TRANS, S_OUT
  } state_t;

  state_t     state;
  vec3_t      p;
  logic [3:0] ang_r, ang_p, ang_y;
  fx_t        scale_r, dist_r, tx_r, ty_r;
  logic       last_r;

  axis_t      axis;
  logic [3:0] angle;
  fx_t        m [4][4];
  vec3_t      rotated;

  rot_lut u_lut (.axis(axis), .angle(angle), .m(m));

  always_comb begin
    unique case (state)
      S_PITCH: begin axis = AXIS_X; angle = ang_p; end
      S_YAW:   begin axis = AXIS_Y; angle = ang_y; end
      default: begin axis = AXIS_Z; angle = ang_r; end
    endcase
  end

  // [x y z 1] times the selected matrix; only the first three rows matter.
  always_comb begin
    logic signed [63:0] acc [3];
    fx_t h [4];
    h[0] = p.x; h[1] = p.y; h[2] = p.z; h[3] = FX_ONE;
    for (int i = 0; i < 3; i++) begin
      acc[i] = '0;
      for (int j = 0; j < 4; j++)
        acc[i] += 64'(m[i][j]) * 64'(h[j]);
    end
    rotated.x = fx_t'(acc[0] >>> FRAC);
    rotated.y = fx_t'(acc[1] >>> FRAC);
    rotated.z = fx_t'(acc[2] >>> FRAC);
  end

  assign ready_out = (state == S_IDLE);

  // Result held while the downstream stage is not ready.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    (valid_out && !ready_in) |=> (valid_out && $stable(new_pos) && $stable(obj_done_out)));
  assign valid_out = (state == S_OUT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      p            <= '0;
      new_pos      <= '0;
      obj_done_out <= 1'b0;
      last_r       <= 1'b0;
      {ang_r, ang_p, ang_y} <= '0;
      {scale_r, dist_r, tx_r, ty_r} <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (valid_in) begin
          p.x     <= v_in.x - com.x;
          p.y     <= v_in.y - com.y;
          p.z     <= v_in.z - com.z;
          ang_r   <= roll;
          ang_p   <= pitch;
          ang_y   <= yaw;
          scale_r <= scale;
          dist_r  <= distance;
          tx_r    <= tx;
          ty_r    <= ty;
          last_r  <= obj_done_in;
          state   <= S_ROLL;
        end
        S_ROLL:  begin p <= rotated; state <= S_PITCH; end
        S_PITCH: begin p <= rotated; state <= S_YAW;   end
        S_YAW:   begin p <= rotated; state <= S_SCALE; end
        S_SCALE: begin
          p.x   <= fx_mul(p.x, scale_r);
          p.y   <= fx_mul(p.y, scale_r);
          p.z   <= fx_mul(p.z, scale_r);
          state <= S_TRANS;
        end
        S_TRANS: begin
          new_pos.x    <= p.x + tx_r;
          new_pos.y    <= p.y + ty_r;
          new_pos.z    <= p.z + dist_r;
          obj_done_out <= last_r;
          state        <= S_OUT;
        end
        S_OUT: if (ready_in) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
