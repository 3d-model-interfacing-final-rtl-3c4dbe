// video_sig_gen: raster timing for the video output.
//
// Free-running horizontal and vertical counters with sync and blanking
// decode. Defaults are the 1280x720 at 60 Hz timing (74.25 MHz pixel clock,
// 13.468 ns period): 1650 clocks per line, 750 lines per frame, syncs active
// high. active_draw is high inside the visible area, new_frame pulses for
// one cycle at the first pixel after the last visible line, and frame_count
// counts frames modulo 64. Outputs are registered with the counters, so
// they describe the pixel named by hcount_out/vcount_out. The port names
// follow the block diagram; the timing numbers are the standard 720p ones
// matching the pixel-clock period quoted for the design.
module video_sig_gen #(
  parameter int ACTIVE_H = 1280,
  parameter int FP_H     = 110,
  parameter int SYNC_H   = 40,
  parameter int BP_H     = 220,
  parameter int ACTIVE_V = 720,
  parameter int FP_V     = 5,
  parameter int SYNC_V   = 5,
  parameter int BP_V     = 20
) (
  input  logic        clk_pixel,
  input  logic        rst,
  output logic [10:0] hcount_out,
  output logic [9:0]  vcount_out,
  output logic        vert_sync,
  output logic        hor_sync,
  output logic        active_draw,
  output logic        new_frame,
  output logic [5:0]  frame_count
);
  localparam int TOTAL_H = ACTIVE_H + FP_H + SYNC_H + BP_H;
  localparam int TOTAL_V = ACTIVE_V + FP_V + SYNC_V + BP_V;

  always_comb begin
    hor_sync    = (hcount_out >= 11'(ACTIVE_H + FP_H)) &&
                  (hcount_out <  11'(ACTIVE_H + FP_H + SYNC_H));
    vert_sync   = (vcount_out >= 10'(ACTIVE_V + FP_V)) &&
                  (vcount_out <  10'(ACTIVE_V + FP_V + SYNC_V));
    active_draw = (hcount_out < 11'(ACTIVE_H)) && (vcount_out < 10'(ACTIVE_V));
    new_frame   = (hcount_out == 11'(ACTIVE_H)) && (vcount_out == 10'(ACTIVE_V));
  end

  always_ff @(posedge clk_pixel) begin
    if (rst) begin
      hcount_out  <= '0;
      vcount_out  <= '0;
      frame_count <= '0;
    end else begin
      if (hcount_out == 11'(TOTAL_H - 1)) begin
        hcount_out <= '0;
        vcount_out <= (vcount_out == 10'(TOTAL_V - 1)) ? '0 : vcount_out + 1'b1;
      end else begin
        hcount_out <= hcount_out + 1'b1;
      end
      if (new_frame) frame_count <= frame_count + 1'b1;
    end
  end
endmodule
