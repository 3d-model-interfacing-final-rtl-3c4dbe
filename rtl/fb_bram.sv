// fb_bram: one frame-buffer memory of DEPTH 16-bit words.
//
// Port A reads and writes (read-first: a read in the same cycle as a write
// returns the old word), port B only reads. Both reads are synchronous with
// one cycle of latency, the usual block-RAM behaviour. Used twice by
// pingpong_fb. The contents start cleared to FB_CLEAR.
module fb_bram
  import gfx_pkg::*;
#(
  parameter int DEPTH = SCREEN * SCREEN,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  fbword_t       a_wdata,
  output fbword_t       a_rdata,
  input  logic [AW-1:0] b_addr,
  output fbword_t       b_rdata
);
  fbword_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = FB_CLEAR;
  end

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) b_rdata <= mem[b_addr];
endmodule
