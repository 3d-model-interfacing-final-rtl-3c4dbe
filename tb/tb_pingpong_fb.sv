// tb_pingpong_fb: a small (16x16) ping-pong buffer. Writes distinct
// patterns into the draw buffer, checks the draw-side read-back (one cycle
// latency, Z-test port), checks that the display side does not see the
// words being drawn until a swap, and that after a swap the roles are
// exchanged: the display shows the finished picture and writes go to the
// other memory.
module tb_pingpong_fb;
  import gfx_pkg::*;

  localparam int W = 16, H = 16, AW = $clog2(W * H);

  logic clk = 1'b0, rst, swap, wr_we, sel;
  logic [AW-1:0] wr_addr, rd_addr;
  fbword_t wr_wdata, wr_rdata, rd_data;
  int checks = 0, failures = 0;

  pingpong_fb #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fbword_t pat(int frame, int i);
    return fbword_t'(16'((frame * 7919 + i * 31) ^ 16'h5A3C));
  endfunction

  task automatic draw(int frame);
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      wr_addr = AW'(i); wr_we = 1'b1; wr_wdata = pat(frame, i);
    end
    @(negedge clk);
    wr_we = 1'b0;
  endtask

  task automatic read_draw(int i, output fbword_t d);
    @(negedge clk);
    wr_addr = AW'(i);
    @(negedge clk);
    d = wr_rdata;
  endtask

  task automatic read_disp(int i, output fbword_t d);
    @(negedge clk);
    rd_addr = AW'(i);
    @(negedge clk);
    d = rd_data;
  endtask

  initial begin
    fbword_t d;
    rst = 1'b1; swap = 0; wr_we = 0; wr_addr = '0; rd_addr = '0; wr_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    chk(sel == 1'b0, "memory 0 is drawn first");
    for (int f = 0; f < 4; f++) begin
      draw(f);
      for (int i = 0; i < W * H; i += 7) begin
        read_draw(i, d);
        chk(d == pat(f, i), $sformatf("frame %0d draw-side read %0d", f, i));
        read_disp(i, d);
        chk(d != pat(f, i), $sformatf("frame %0d not visible before swap", f));
      end
      @(negedge clk); swap = 1'b1;
      @(negedge clk); swap = 1'b0;
      chk(sel == 1'(f + 1), "roles exchanged");
      for (int i = 0; i < W * H; i += 5) begin
        read_disp(i, d);
        chk(d == pat(f, i), $sformatf("frame %0d displayed after swap, word %0d", f, i));
      end
      if (f > 0)
        for (int i = 0; i < W * H; i += 11) begin
          read_draw(i, d);
          chk(d == pat(f - 1, i), "old frame now in the draw buffer");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
