// tb_input_ctrl: presses each button and checks one angle step per press
// (with wrap-around after 16 presses), holds switch pairs across ticks and
// checks translation and scale steps, the scale limits, that both switches
// of a pair on means no change, and that nothing moves without a tick.
module tb_input_ctrl;
  import gfx_pkg::*;

  logic clk = 1'b0, rst, tick;
  logic [2:0] btn;
  logic [11:0] sw;
  logic [3:0] roll, pitch, yaw;
  fx_t tx, ty, scale, distance;
  int checks = 0, failures = 0;

  input_ctrl dut (.*);

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

  task automatic press(int b);
    @(negedge clk); btn[b] = 1'b1;
    repeat (6) @(negedge clk);
    btn[b] = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  task automatic ticks(int n);
    repeat (n) begin
      @(negedge clk); tick = 1'b1;
      @(negedge clk); tick = 1'b0;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1; btn = '0; sw = '0; tick = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    chk(roll == 0 && pitch == 0 && yaw == 0 && tx == 0 && ty == 0 && scale == FX_ONE,
        "reset values");
    chk(distance == 32'sh4_0000, "distance");
    press(0);
    chk(roll == 1 && pitch == 0 && yaw == 0, "button 1 steps roll");
    press(1); press(1);
    chk(pitch == 2 && roll == 1 && yaw == 0, "button 2 steps pitch");
    repeat (17) press(2);
    chk(yaw == 1, "button 3 steps yaw and wraps");
    // switches without tick: no change
    sw = 12'b0101_0101_0101;
    repeat (20) @(negedge clk);
    chk(tx == 0 && roll == 1 && scale == FX_ONE, "no change without tick");
    ticks(3);
    chk(tx == 32'sh3000 && ty == 32'sh3000, "translation up three steps");
    chk(pitch == 5 && roll == 4 && yaw == 4, "switches step angles");
    chk(scale == FX_ONE + 3 * 32'sh400, "scale up three steps");
    sw = 12'b1010_1010_1010;
    ticks(4);
    chk(tx == -32'sh1000 && ty == -32'sh1000, "translation down");
    chk(pitch == 1 && roll == 0 && yaw == 0, "angles down");
    sw = 12'b1111_1111_1111;
    ticks(2);
    chk(tx == -32'sh1000 && pitch == 1, "both switches of a pair: hold");
    sw = 12'b1000_0000_0000;
    ticks(80);
    chk(scale == 32'sh1000, "scale held at its minimum");
    sw = 12'b0100_0000_0000;
    ticks(300);
    chk(scale == 32'sh4_0000, "scale held at its maximum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
