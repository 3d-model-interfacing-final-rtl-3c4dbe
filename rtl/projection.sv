// projection: perspective projection of one camera-space vertex.
//
// The camera is fixed at the origin looking along +z. The vertex [x y z 1]
// is multiplied by the perspective matrix
//     [F 0 0 0; 0 F 0 0; 0 0 1 0; 0 0 1 0]
// (F = FOCAL, 1.0 by default: a 90 degree field of view), so w = z. x and y
// are then divided by w, and the normalised range (-1, 1) is mapped onto the
// SCREEN-pixel viewing plane: px = HALF + HALF*x/w, py = HALF - HALF*y/w
// (screen y grows downwards), in 1/16 pixel (SUB = 4 fraction bits,
// truncated towards the screen centre, saturated at +/-PMAX from it). Two
// sequential dividers run in parallel, one for x and one for y. The vertex
// depth is z quantised to 8 bits (one step is 2^(DEPTH_SHIFT-16) units, 1/16
// by default) and saturated at 255. A vertex with w <= NEAR is flagged clip
// and its screen position is not computed.
//
// Handshake as in transformation: accept on valid_in && ready_out, result
// held with valid_out until ready_in. valid_out rises DIV_W + 4 = 52 clock
// edges after the accepting edge (3 for a clipped vertex). The projection
// matrix, the divide by w and the (-1,1) -> (0,240) mapping follow the
// design description; the field of view, near plane, depth encoding,
// sub-pixel output and y direction are this design's choices.
module projection
  import gfx_pkg::*;
#(
  parameter fx_t FOCAL       = 32'sh0001_0000,  // 1.0
  parameter fx_t NEAR        = 32'sh0000_1000,  // 1/16
  parameter int  HALF        = SCREEN / 2,
  parameter int  DEPTH_SHIFT = 12               // depth LSB = 1/16 unit
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_in,
  output logic   ready_out,
  input  vec3_t  v_in,
  input  logic   obj_done_in,
  output pvert_t pv,
  output logic   obj_done_out,
  output logic   valid_out,
  input  logic   ready_in
);
  localparam int DIV_W = 48;
  localparam int PMAX  = 30000;           // 1/16 pixel units

  typedef enum logic [2:0] {S_IDLE, S_MATRIX, S_DIV, S_WAIT, S_MAP, S_OUT} state_t;
  state_t state;

  vec3_t v_r;
  fx_t   xc, yc, w;
  logic  last_r;

  logic              div_start;
  logic [DIV_W-1:0]  nx, ny, dw, qx, qy;
  logic              bx, by, dx, dy;

  always_comb begin
    nx = DIV_W'(xc[31] ? -64'(xc) : 64'(xc)) * DIV_W'(HALF << SUB);
    ny = DIV_W'(yc[31] ? -64'(yc) : 64'(yc)) * DIV_W'(HALF << SUB);
    dw = DIV_W'(w);
  end

  udiv_seq #(.WIDTH(DIV_W)) u_divx (
    .clk, .rst, .start(div_start), .num(nx), .den(dw),
    .busy(bx), .done(dx), .quot(qx));
  udiv_seq #(.WIDTH(DIV_W)) u_divy (
    .clk, .rst, .start(div_start), .num(ny), .den(dw),
    .busy(by), .done(dy), .quot(qy));

  assign div_start = (state == S_DIV);
  assign ready_out = (state == S_IDLE);
  assign valid_out = (state == S_OUT);

  // Both dividers are started together and must finish together.
  a_div_idle: assert property (@(posedge clk) disable iff (rst)
    (state == S_DIV) |-> (!bx && !by));
  a_div_lockstep: assert property (@(posedge clk) disable iff (rst) (dx == dy));
  // Result held while the downstream stage is not ready.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    (valid_out && !ready_in) |=> (valid_out && $stable(pv)));

  function automatic scoord_t place(logic neg, logic [DIV_W-1:0] q, logic flip);
    int off;
    off = (q > DIV_W'(PMAX)) ? PMAX : int'(q);
    if (neg ^ flip) return scoord_t'((HALF << SUB) - off);
    else            return scoord_t'((HALF << SUB) + off);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      v_r          <= '0;
      xc           <= '0;
      yc           <= '0;
      w            <= FX_ONE;
      last_r       <= 1'b0;
      pv           <= '0;
      obj_done_out <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (valid_in) begin
          v_r    <= v_in;
          last_r <= obj_done_in;
          state  <= S_MATRIX;
        end
        S_MATRIX: begin
          xc    <= fx_mul(FOCAL, v_r.x);
          yc    <= fx_mul(FOCAL, v_r.y);
          w     <= v_r.z;
          state <= (v_r.z <= NEAR) ? S_MAP : S_DIV;
        end
        S_DIV:  state <= S_WAIT;
        S_WAIT: if (dx && dy) state <= S_MAP;
        S_MAP: begin
          if (w <= NEAR) begin
            pv.x    <= '0;
            pv.y    <= '0;
            pv.clip <= 1'b1;
          end else begin
            pv.x    <= place(xc[31], qx, 1'b0);
            pv.y    <= place(yc[31], qy, 1'b1);
            pv.clip <= 1'b0;
          end
          if (w[31])
            pv.depth <= 8'd0;
          else if ((w >>> DEPTH_SHIFT) > 255)
            pv.depth <= 8'hFF;
          else
            pv.depth <= 8'(w >>> DEPTH_SHIFT);
          obj_done_out <= last_r;
          state        <= S_OUT;
        end
        S_OUT: if (ready_in) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
