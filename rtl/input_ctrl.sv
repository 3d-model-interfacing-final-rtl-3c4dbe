// input_ctrl: user controls for the model's pose.
//
// Buttons 1..3 (btn[0..2]) step roll, pitch and yaw by one 22.5 degree
// position per press: each button is synchronised with two flip-flops and
// its rising edge counted, the 4-bit angles wrapping around. The 12
// switches form six increase/decrease pairs, {dec, inc} per variable:
//   sw[1:0] x translation, sw[3:2] y translation, sw[5:4] pitch,
//   sw[7:6] roll, sw[9:8] yaw, sw[11:10] scale.
// While exactly one switch of a pair is on, its variable moves by one step
// on every tick (the video new_frame pulse, so 60 steps per second):
// translation by TSTEP, scale by SSTEP (held between SMIN and SMAX), angles
// by one position. distance, the object's depth in front of the camera, is
// the constant DISTANCE.
//
// Buttons for rotation and the twelve-switch pairing follow the design
// description; step sizes, limits, the tick rate and the lack of a debounce
// filter beyond the synchroniser are this design's choices.
module input_ctrl
  import gfx_pkg::*;
#(
  parameter fx_t TSTEP    = 32'sh0000_1000,   // 1/16
  parameter fx_t SSTEP    = 32'sh0000_0400,   // 1/64
  parameter fx_t SMIN     = 32'sh0000_1000,   // 1/16
  parameter fx_t SMAX     = 32'sh0004_0000,   // 4.0
  parameter fx_t DISTANCE = 32'sh0004_0000    // 4.0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] btn,
  input  logic [11:0] sw,
  input  logic       tick,
  output logic [3:0] roll,
  output logic [3:0] pitch,
  output logic [3:0] yaw,
  output fx_t        tx,
  output fx_t        ty,
  output fx_t        scale,
  output fx_t        distance
);
  logic [2:0] b_s1, b_s2, b_s3;
  logic [2:0] rise;

  assign rise     = b_s2 & ~b_s3;
  assign distance = DISTANCE;

  // p is a {dec, inc} switch pair: 2'b01 increases, 2'b10 decreases.
  function automatic logic [3:0] step_ang(logic [3:0] a, logic up, logic [1:0] p, logic t);
    logic [3:0] r;
    r = a + (up ? 4'd1 : 4'd0);
    if (t && p == 2'b01) r = r + 4'd1;
    if (t && p == 2'b10) r = r - 4'd1;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      {b_s1, b_s2, b_s3} <= '0;
      roll  <= '0;
      pitch <= '0;
      yaw   <= '0;
      tx    <= '0;
      ty    <= '0;
      scale <= FX_ONE;
    end else begin
      b_s1 <= btn;
      b_s2 <= b_s1;
      b_s3 <= b_s2;
      roll  <= step_ang(roll,  rise[0], sw[7:6], tick);
      pitch <= step_ang(pitch, rise[1], sw[5:4], tick);
      yaw   <= step_ang(yaw,   rise[2], sw[9:8], tick);
      if (tick) begin
        if (sw[1:0] == 2'b01) tx <= tx + TSTEP;
        if (sw[1:0] == 2'b10) tx <= tx - TSTEP;
        if (sw[3:2] == 2'b01) ty <= ty + TSTEP;
        if (sw[3:2] == 2'b10) ty <= ty - TSTEP;
        if (sw[11:10] == 2'b01) scale <= (scale + SSTEP > SMAX) ? SMAX : scale + SSTEP;
        if (sw[11:10] == 2'b10) scale <= (scale - SSTEP < SMIN) ? SMIN : scale - SSTEP;
      end
    end
  end
endmodule
