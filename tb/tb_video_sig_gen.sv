// tb_video_sig_gen: runs the 1280x720 timing generator for two frames and
// checks the line length (1650), frame length (750 lines), sync widths and
// positions (40 clocks after 1280+110, 5 lines after 720+5), the visible
// area (1280x720 per frame), one new_frame per frame at pixel (1280, 720)
// and the frame counter.
module tb_video_sig_gen;
  logic clk = 1'b0, rst;
  logic [10:0] hcount_out;
  logic [9:0]  vcount_out;
  logic vert_sync, hor_sync, active_draw, new_frame;
  logic [5:0] frame_count;
  int checks = 0, failures = 0;

  video_sig_gen dut (.clk_pixel(clk), .*);

  always #1 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int h, v, act, hs_n, vs_n, nf, hs_bad, vs_bad;
    logic [5:0] fc0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #0.5 rst = 1'b0;
    h = 0; v = 0; act = 0; hs_n = 0; vs_n = 0; nf = 0; hs_bad = 0; vs_bad = 0;
    fc0 = frame_count;
    for (int c = 0; c < 2 * 1650 * 750; c++) begin
      if (hcount_out != 11'(h) || vcount_out != 10'(v)) begin
        failures++; $display("FAIL: counter at %0d,%0d", h, v); break;
      end
      if (active_draw) act++;
      if (active_draw != (h < 1280 && v < 720)) hs_bad++;
      if (hor_sync != (h >= 1390 && h < 1430)) hs_bad++;
      if (vert_sync != (v >= 725 && v < 730)) vs_bad++;
      if (new_frame) begin
        nf++;
        chk(h == 1280 && v == 720, "new_frame position");
      end
      @(posedge clk); #0.5;
      h++;
      if (h == 1650) begin h = 0; v++; if (v == 750) v = 0; end
    end
    chk(act == 2 * 1280 * 720, $sformatf("visible pixels %0d", act));
    chk(hs_bad == 0, "horizontal sync and active area");
    chk(vs_bad == 0, "vertical sync");
    chk(nf == 2, "one new_frame per frame");
    chk(frame_count == fc0 + 6'd2, "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
