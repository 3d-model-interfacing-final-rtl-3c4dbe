// gfx_pkg: types, constants and small arithmetic helpers shared by the
// render pipeline.
//
// All world-space arithmetic is signed fixed point Q16.16 held in 32 bits
// (fx_t). The pipeline this follows used 32-bit floating-point cores; the
// fixed-point format here is this design's own choice and keeps every unit
// plain synthesizable logic. Screen coordinates are signed fixed point
// with SUB = 4 fraction bits (scoord_t, 1/16 pixel): the range lets vertices
// that project off screen still be clipped by the rasterizer's bounding box,
// and the fraction keeps edges that meet on a pixel centre from leaving gaps
// or double covering between neighbouring triangles.
//
// The frame-buffer word is 16 bits: colour in bits [15:8], depth in [7:0].
package gfx_pkg;

  localparam int FRAC = 16;                       // fractional bits of fx_t
  typedef logic signed [31:0] fx_t;
  localparam fx_t FX_ONE = 32'sh0001_0000;

  // Screen: 240 x 240 pixels, coordinates 0..239. Projected vertex
  // positions carry SUB fraction bits (1/16 pixel) so that triangle edges
  // fall between pixel centres; pixel (x, y) is sampled at its centre,
  // (x + 0.5, y + 0.5).
  localparam int SCREEN = 240;
  localparam int SUB    = 4;
  typedef logic signed [15:0] scoord_t;

  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } vec3_t;

  typedef struct packed {
    vec3_t v0;
    vec3_t v1;
    vec3_t v2;
  } tri3_t;

  // One projected vertex: position in 1/16 pixel and 8-bit depth.
  typedef struct packed {
    scoord_t    x;
    scoord_t    y;
    logic [7:0] depth;
    logic       clip;     // vertex at or behind the near plane
  } pvert_t;

  // Homogeneous 4x4 matrix, row major: m[row][col].
  typedef fx_t mat4_t [4][4];

  // Rotation axes for the matrix LUT.
  typedef enum logic [1:0] {AXIS_X = 2'd0, AXIS_Y = 2'd1, AXIS_Z = 2'd2} axis_t;

  // Frame-buffer word.
  typedef struct packed {
    logic [7:0] color;
    logic [7:0] depth;
  } fbword_t;

  localparam fbword_t FB_CLEAR = '{color: 8'h00, depth: 8'hFF};

  // Q16.16 multiply with truncation toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FRAC);
  endfunction

  // sin(k * 22.5 deg) in Q16.16 for a 4-bit angle index k:
  // round(sin(2*pi*k/16) * 65536). Built from one quadrant by symmetry.
  function automatic fx_t sin16(logic [3:0] k);
    fx_t base [5];
    logic [1:0] q;
    logic [2:0] r;
    base[0] = 32'sd0;
    base[1] = 32'sd25080;
    base[2] = 32'sd46341;
    base[3] = 32'sd60547;
    base[4] = 32'sd65536;
    q = k[3:2];
    r = {1'b0, k[1:0]};
    case (q)
      2'd0: return  base[r];
      2'd1: return  base[3'd4 - r];
      2'd2: return -base[r];
      default: return -base[3'd4 - r];
    endcase
  endfunction

  function automatic fx_t cos16(logic [3:0] k);
    return sin16(k + 4'd4);
  endfunction

endpackage
