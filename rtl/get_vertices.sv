// get_vertices: model ROM and triangle fetch.
//
// The model is stored in a ROM of 32-bit words, prepared offline from an
// .obj file: word 0 holds the triangle count N, words 1..3 the model's
// centre of mass (x, y, z in Q16.16), and then 9 words per triangle
// (v1.x v1.y v1.z v2.x ... v3.z). After reset the header is read once; the
// triangles are then issued in order, one per handshake, and the list
// repeats forever so that every frame re-renders the model with the current
// rotation. obj_done is high together with the last triangle of the list.
//
// Each ROM word takes two cycles (address, then capture; the ROM reads
// synchronously like a block RAM), so a triangle is ready 18 cycles after
// the previous one was taken. valid_out stays high, with v1..v3 stable,
// until ready_in. The ROM size, MAX_TRIS, covers a model of about 1500
// vertices (a closed mesh has about twice as many triangles as vertices).
// The ROM-from-.obj scheme, the centre of mass and the v1/v2/v3, valid_out
// and obj_done outputs follow the design description; the word layout is
// this design's own.
module get_vertices
  import gfx_pkg::*;
#(
  parameter string MODEL_FILE = "rtl/cube_model.mem",
  parameter int    MAX_TRIS   = 3000
) (
  input  logic  clk_pixel,
  input  logic  sys_rst,
  output vec3_t v1,
  output vec3_t v2,
  output vec3_t v3,
  output vec3_t com,
  output logic  valid_out,
  output logic  obj_done,
  input  logic  ready_in
);
  localparam int WORDS = 4 + 9 * MAX_TRIS;
  localparam int AW    = $clog2(WORDS);
  localparam int TW    = $clog2(MAX_TRIS + 1);

  logic [31:0] rom [WORDS];
  initial $readmemh(MODEL_FILE, rom);

  typedef enum logic [2:0] {S_HADDR, S_HCAP, S_TADDR, S_TCAP, S_OUT} state_t;
  state_t state;

  logic [AW-1:0] addr, base;
  logic [31:0]   rdata;
  logic [3:0]    word;
  logic [TW-1:0] ntris, tri_idx;
  fx_t           tw [9];

  always_ff @(posedge clk_pixel) rdata <= rom[addr];

  assign valid_out = (state == S_OUT);

  a_hold: assert property (@(posedge clk_pixel) disable iff (sys_rst)
    (valid_out && !ready_in) |=> (valid_out && $stable(v1) && $stable(v2) && $stable(v3)));
  assign obj_done  = (state == S_OUT) && (tri_idx == ntris - 1'b1);
  assign v1 = '{x: tw[0], y: tw[1], z: tw[2]};
  assign v2 = '{x: tw[3], y: tw[4], z: tw[5]};
  assign v3 = '{x: tw[6], y: tw[7], z: tw[8]};

  always_ff @(posedge clk_pixel) begin
    if (sys_rst) begin
      state   <= S_HADDR;
      addr    <= '0;
      base    <= AW'(4);
      word    <= '0;
      ntris   <= '0;
      tri_idx <= '0;
      com     <= '0;
      for (int i = 0; i < 9; i++) tw[i] <= '0;
    end else begin
      unique case (state)
        S_HADDR: state <= S_HCAP;
        S_HCAP: begin
          unique case (word)
            4'd0:    ntris <= (rdata > 32'(MAX_TRIS)) ? TW'(MAX_TRIS) : TW'(rdata);
            4'd1:    com.x <= rdata;
            4'd2:    com.y <= rdata;
            default: com.z <= rdata;
          endcase
          if (word == 4'd3) begin
            word  <= '0;
            addr  <= AW'(4);
            base  <= AW'(4);
            state <= S_TADDR;
          end else begin
            word  <= word + 1'b1;
            addr  <= addr + 1'b1;
            state <= S_HADDR;
          end
        end
        S_TADDR: state <= (ntris == '0) ? S_TADDR : S_TCAP;
        S_TCAP: begin
          tw[word] <= rdata;
          if (word == 4'd8) begin
            word  <= '0;
            state <= S_OUT;
          end else begin
            word  <= word + 1'b1;
            addr  <= addr + 1'b1;
            state <= S_TADDR;
          end
        end
        S_OUT: if (ready_in) begin
          if (tri_idx == ntris - 1'b1) begin
            tri_idx <= '0;
            base    <= AW'(4);
            addr    <= AW'(4);
          end else begin
            tri_idx <= tri_idx + 1'b1;
            base    <= base + AW'(9);
            addr    <= base + AW'(9);
          end
          state <= S_TADDR;
        end
        default: state <= S_HADDR;
      endcase
    end
  end
endmodule
