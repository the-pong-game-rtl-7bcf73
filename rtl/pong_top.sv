// pong_top: two-player Pong on a small FPGA board with a PS/2 keyboard and a
// VGA monitor.
//
// Blocks and data flow:
//   read_ps2   keyboard frames -> paddle directions (W/S left, arrows right)
//              and serve (space); the last scan code is shown on the LEDs
//   cntrl      VGA timing, game state and painting -> 2-bit colour + syncs
//   vga_int    colour code -> one bit each of R, G, B; syncs registered
//   game_title title on the four-digit seven-segment display
// The board's VGA connector takes three red, three green and two blue bits
// through a resistor DAC; the game uses one bit per colour, so each colour bit
// drives all pins of its colour (full intensity).
//
// Clocking: one clock, clk_ic4, used as the 25 MHz pixel clock. btn3 is the
// active-high, synchronous reset of the keyboard decoder and the game. The
// display reaches the pins two clk cycles after the timing core decides it
// (one register in cntrl, one in vga_int); syncs and colour stay aligned.
//
// Wiring, port names and the fan-out of each colour bit follow the original
// board design.
module pong_top
  import pong_pkg::*;
#(
  parameter int unsigned BALL_DELAY = 4,
  parameter int unsigned SCAN_BITS  = 17
) (
  input  logic       clk_ic4,
  input  logic       btn3,
  input  logic       ps2c,
  input  logic       ps2d,
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic [7:0] seg,
  output logic [3:0] an,
  output logic [7:0] ld
);

  dir_e   lf_dir, rt_dir;
  logic   serve, hsync, vsync;
  color_e color;
  logic   red0, green0, blue0;

  read_ps2 u1 (
    .clk      (clk_ic4),
    .reset    (btn3),
    .ps2_clk  (ps2c),
    .ps2_data (ps2d),
    .ps2_code (ld),
    .left_dir (lf_dir),
    .right_dir(rt_dir),
    .serve    (serve)
  );

  cntrl #(.BALL_DELAY(BALL_DELAY)) cntrl_inst (
    .clk      (clk_ic4),
    .reset    (btn3),
    .left_dir (lf_dir),
    .right_dir(rt_dir),
    .serve    (serve),
    .hsynch   (hsync),
    .vsynch   (vsync),
    .color    (color)
  );

  vga_int vga_inst (
    .clk       (clk_ic4),
    .color     (color),
    .vsynch_in (vsync),
    .hsynch_in (hsync),
    .red       (red0),
    .green     (green0),
    .blue      (blue0),
    .vsynch_out(vga_vs),
    .hsynch_out(vga_hs)
  );

  game_title #(.SCAN_BITS(SCAN_BITS)) title_inst (
    .clk      (clk_ic4),
    .seven_seg(seg),
    .an       (an)
  );

  assign vga_red   = {3{red0}};
  assign vga_green = {3{green0}};
  assign vga_blue  = {2{blue0}};

endmodule
