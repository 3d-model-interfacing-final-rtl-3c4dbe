// tb_scale: every raster position of a 1650x750 frame is mapped and checked
// against the expected 3x3 replication of a 240x240 image centred in the
// 1280-pixel line (columns 280..999, lines 0..719).
module tb_scale;
  logic [10:0] hcount_in;
  logic [9:0]  vcount_in;
  logic [7:0]  hcount_scaled, vcount_scaled;
  logic        valid_addr_scaled;
  int checks = 0, failures = 0;

  scale dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ev;
    for (int v = 0; v < 750; v++)
      for (int h = 0; h < 1650; h++) begin
        hcount_in = 11'(h);
        vcount_in = 10'(v);
        #1;
        ev = (h >= 280 && h < 1000 && v < 720);
        checks++;
        if (valid_addr_scaled != ev ||
            (ev && (int'(hcount_scaled) != (h - 280) / 3 || int'(vcount_scaled) != v / 3))) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %0d,%0d -> %0d %0d %0d", h, v, hcount_scaled, vcount_scaled,
                     valid_addr_scaled);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
