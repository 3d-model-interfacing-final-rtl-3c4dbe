// pixel_shader: flat grayscale shading of one triangle.
//
// The light is a fixed direction pointing out of the camera, (0, 0, -1).
// The shader forms the two side vectors e1 = v1 - v0 and e2 = v2 - v0,
// their cross product n = <a, b, c>, and cos^2 of the angle between n and
// the light, c^2 / (a^2 + b^2 + c^2), which avoids any square root. cos^2
// is scaled by 16 and rounded to an index 0..15 (16 is folded onto 15) that
// selects one of 16 gray levels. A triangle whose normal points away from
// the camera (c >= 0), or that is degenerate, is coloured black.
//
// The state machine walks the stages of the original design one per cycle:
// RECEIVE, VECTOR_CALC (6 subtractions), NORMAL_CALC_MULT (6 products),
// NORMAL_CALC_ADD (3 subtractions), SQUARE_NORMAL (3 squares), MAGNITUDE
// (one adder used twice, so two cycles), RECIP (here a sequential divide of
// 16*c^2 by |n|^2, with 8 extra fraction bits), COS_SQUARED (latch the
// quotient), ROUND and COLOR. For a lit triangle valid_out rises 87 clock
// edges after the accepting edge (11 stage cycles plus DIV_W = 76 division
// cycles); a black one skips the division. The stage list, the cos^2 formula and the 16-entry
// gray table follow the design description; fixed-point arithmetic, the
// combined divide and the gray values are this design's own choices.
//
// Gray table: gray[k] = round(255 * 2^((k - 15) / 4)), an exponential fall
// of brightness as the angle to the light grows.
module pixel_shader
  import gfx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  output logic       ready_out,
  input  tri3_t      tri_in,
  output logic [7:0] color,
  output logic       valid_out,
  input  logic       ready_in
);
  localparam int DIV_W = 76;

  typedef enum logic [3:0] {
    RECEIVE, VECTOR_CALC, NORMAL_CALC_MULT, NORMAL_CALC_ADD, SQUARE_NORMAL,
    MAGNITUDE, RECIP, COS_SQUARED, ROUND, COLOR, OUTPUT
  } state_t;
  state_t state;

  tri3_t              t;
  vec3_t              e1, e2;
  logic signed [63:0] pr [6];
  fx_t                na, nb, nc;
  logic [63:0]        sa, sb, sc;
  logic [65:0]        mag;
  logic               mag_step;
  logic [DIV_W-1:0]   q;
  logic [4:0]         idx;

  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] div_num, div_den, div_q;

  assign div_num = DIV_W'(sc) << 12;        // 16 * c^2 * 2^8
  assign div_den = DIV_W'(mag);

  udiv_seq #(.WIDTH(DIV_W)) u_div (
    .clk, .rst, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q));

  function automatic logic [7:0] gray(logic [3:0] k);
    logic [7:0] lut [16] = '{8'd19, 8'd23, 8'd27, 8'd32, 8'd38, 8'd45, 8'd54, 8'd64,
                             8'd76, 8'd90, 8'd107, 8'd128, 8'd152, 8'd180, 8'd214, 8'd255};
    return lut[k];
  endfunction

  function automatic logic [63:0] sq(fx_t v);
    logic signed [63:0] s;
    s = 64'(v) * 64'(v);
    return 64'(s);
  endfunction

  assign ready_out = (state == RECEIVE);

  a_hold: assert property (@(posedge clk) disable iff (rst)
    (valid_out && !ready_in) |=> (valid_out && $stable(color)));
  assign valid_out = (state == OUTPUT);
  assign div_start = (state == RECIP) && !div_busy && !div_done && (mag != '0) && nc[31];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RECEIVE;
      t        <= '0;
      e1       <= '0;
      e2       <= '0;
      for (int i = 0; i < 6; i++) pr[i] <= '0;
      na       <= '0;
      nb       <= '0;
      nc       <= '0;
      sa       <= '0;
      sb       <= '0;
      sc       <= '0;
      mag      <= '0;
      mag_step <= 1'b0;
      q        <= '0;
      idx      <= '0;
      color    <= '0;
    end else begin
      unique case (state)
        RECEIVE: if (valid_in) begin
          t     <= tri_in;
          state <= VECTOR_CALC;
        end
        VECTOR_CALC: begin
          e1.x  <= t.v1.x - t.v0.x;
          e1.y  <= t.v1.y - t.v0.y;
          e1.z  <= t.v1.z - t.v0.z;
          e2.x  <= t.v2.x - t.v0.x;
          e2.y  <= t.v2.y - t.v0.y;
          e2.z  <= t.v2.z - t.v0.z;
          state <= NORMAL_CALC_MULT;
        end
        NORMAL_CALC_MULT: begin
          pr[0] <= 64'(e1.y) * 64'(e2.z);
          pr[1] <= 64'(e1.z) * 64'(e2.y);
          pr[2] <= 64'(e1.z) * 64'(e2.x);
          pr[3] <= 64'(e1.x) * 64'(e2.z);
          pr[4] <= 64'(e1.x) * 64'(e2.y);
          pr[5] <= 64'(e1.y) * 64'(e2.x);
          state <= NORMAL_CALC_ADD;
        end
        NORMAL_CALC_ADD: begin
          na    <= fx_t'((pr[0] - pr[1]) >>> FRAC);
          nb    <= fx_t'((pr[2] - pr[3]) >>> FRAC);
          nc    <= fx_t'((pr[4] - pr[5]) >>> FRAC);
          state <= SQUARE_NORMAL;
        end
        SQUARE_NORMAL: begin
          sa       <= sq(na);
          sb       <= sq(nb);
          sc       <= sq(nc);
          mag_step <= 1'b0;
          state    <= MAGNITUDE;
        end
        MAGNITUDE: begin
          // One adder, used twice: first a^2 + b^2, then + c^2.
          if (!mag_step) begin
            mag      <= 66'(sa) + 66'(sb);
            mag_step <= 1'b1;
          end else begin
            mag      <= mag + 66'(sc);
            mag_step <= 1'b0;
            state    <= RECIP;
          end
        end
        RECIP: begin
          if (mag == '0 || !nc[31]) begin
            q     <= '0;
            state <= COS_SQUARED;
          end else if (div_done) begin
            q     <= div_q;
            state <= COS_SQUARED;
          end
        end
        COS_SQUARED: begin
          // q = 16 * cos^2 with 8 fraction bits; round to nearest.
          idx   <= 5'((q + DIV_W'(128)) >> 8);
          state <= ROUND;
        end
        ROUND: begin
          if (idx > 5'd15) idx <= 5'd15;
          state <= COLOR;
        end
        COLOR: begin
          color <= (mag == '0 || !nc[31]) ? 8'd0 : gray(idx[3:0]);
          state <= OUTPUT;
        end
        OUTPUT: if (ready_in) state <= RECEIVE;
        default: state <= RECEIVE;
      endcase
    end
  end
endmodule
