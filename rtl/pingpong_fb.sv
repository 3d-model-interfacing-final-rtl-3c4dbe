// pingpong_fb: ping-pong frame buffer with the Z buffer folded in.
//
// Two fb_bram memories of WIDTH*HEIGHT words, each word {colour[15:8],
// depth[7:0]}. At any time one memory is the draw buffer, reached through
// the rasterizer port (wr_*: read and write, used for the Z test), and the
// other is the display buffer, read by the video port (rd_*). A one-cycle
// pulse on swap exchanges the two roles; sel tells which memory is being
// drawn (0 or 1). Both reads have one cycle of latency; the read-data
// multiplexers use the role selection of the previous cycle so that data
// stays matched to the address that produced it.
//
// Two memories swapped on the object-done signal, both readable and
// writable, follow the design description; the 16-bit word is taken from its
// "8 bits colour, 8 bits depth" layout.
module pingpong_fb
  import gfx_pkg::*;
#(
  parameter int WIDTH  = SCREEN,
  parameter int HEIGHT = SCREEN,
  parameter int AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          swap,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_we,
  input  fbword_t       wr_wdata,
  output fbword_t       wr_rdata,
  input  logic [AW-1:0] rd_addr,
  output fbword_t       rd_data,
  output logic          sel
);
  logic    sel_q;
  fbword_t a_rd [2];
  fbword_t b_rd [2];

  for (genvar k = 0; k < 2; k++) begin : g_buf
    fb_bram #(.DEPTH(WIDTH * HEIGHT), .AW(AW)) u_mem (
      .clk,
      .a_addr (wr_addr),
      .a_we   (wr_we && (sel == 1'(k))),
      .a_wdata(wr_wdata),
      .a_rdata(a_rd[k]),
      .b_addr (rd_addr),
      .b_rdata(b_rd[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel   <= 1'b0;
      sel_q <= 1'b0;
    end else begin
      if (swap) sel <= ~sel;
      sel_q <= sel;
    end
  end

  assign wr_rdata = a_rd[sel_q];
  assign rd_data  = b_rd[~sel_q];
endmodule
