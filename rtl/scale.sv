// scale: maps the 1280x720 raster onto the 240x240 frame buffer.
//
// Each frame-buffer pixel covers FACTOR x FACTOR screen pixels (3 x 3 by
// default, so the 240x240 image fills a 720x720 square). The square is
// centred horizontally: screen columns H_OFFSET .. H_OFFSET+719 are shown,
// everything else is outside. valid_addr_scaled is high when the screen
// pixel falls inside the square, and then hcount_scaled/vcount_scaled give
// the frame-buffer column and row. Combinational. The port names follow the
// block diagram; the factor and the centring are this design's choices.
module scale #(
  parameter int FACTOR   = 3,
  parameter int OUT      = 240,
  parameter int H_OFFSET = 280
) (
  input  logic [10:0] hcount_in,
  input  logic [9:0]  vcount_in,
  output logic [7:0]  hcount_scaled,
  output logic [7:0]  vcount_scaled,
  output logic        valid_addr_scaled
);
  logic [10:0] hrel;
  always_comb begin
    hrel              = hcount_in - 11'(H_OFFSET);
    valid_addr_scaled = (hcount_in >= 11'(H_OFFSET)) &&
                        (hrel < 11'(OUT * FACTOR)) &&
                        (vcount_in < 10'(OUT * FACTOR));
    hcount_scaled     = valid_addr_scaled ? 8'(hrel / 11'(FACTOR)) : 8'd0;
    vcount_scaled     = valid_addr_scaled ? 8'(vcount_in / 10'(FACTOR)) : 8'd0;
  end
endmodule
