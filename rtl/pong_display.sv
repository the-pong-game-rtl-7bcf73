// pong_display: paints the playing field, one game cell at a time.
//
// Purely combinational. For the cell (pixel, line) of the 80 x 60 grid that
// the beam is in, it returns the colour code of the object there. Objects are
// tested in this order, a later one covering an earlier one:
//   background               black
//   top wall (line 9), bottom wall (line 58), full width      cyan
//   left paddle  column 7,  lines left_y  .. left_y+8          cyan
//   right paddle column 73, lines right_y .. right_y+8         cyan
//   ball at (ball_x, ball_y)                                   red
//   left score  columns 8-11,  lines 0-15, digit lscore        magenta
//   right score columns 64-67, lines 0-15, digit rscore        magenta
// Score digits come from the digit ROM: this block drives its address
// {digit, line[2:0]} and picks bit 3 - pixel[1:0] of the returned row, so a
// 4 x 8-cell glyph appears twice, on lines 0-7 and 8-15.
//
// Positions, colours and draw order follow the original design. The original
// registers the ROM's digit select, delaying it by one clk; here it is
// combinational, so the first pixel of a score cell is not taken from the
// previous cell.
module pong_display
  import pong_pkg::*;
(
  input  logic [6:0] pixel,
  input  logic [5:0] line,
  input  logic [5:0] left_y,
  input  logic [5:0] right_y,
  input  logic [6:0] ball_x,
  input  logic [5:0] ball_y,
  input  logic [3:0] lscore,
  input  logic [3:0] rscore,
  output logic [6:0] rom_address,
  input  logic [3:0] rom_data,
  output color_e     color
);

  logic in_score_rows, in_lscore, in_rscore;

  assign in_score_rows = (32'(line) < SCORE_ROWS);
  assign in_lscore = in_score_rows && (32'(pixel) >= LSCORE_X0) && (32'(pixel) < LSCORE_X0 + SCORE_W);
  assign in_rscore = in_score_rows && (32'(pixel) >= RSCORE_X0) && (32'(pixel) < RSCORE_X0 + SCORE_W);

  always_comb begin
    rom_address[2:0] = line[2:0];
    if (in_lscore)      rom_address[6:3] = lscore;
    else if (in_rscore) rom_address[6:3] = rscore;
    else                rom_address[6:3] = 4'd1;
  end

  always_comb begin
    color = COL_BLACK;
    if (32'(line) == WALL_TOP || 32'(line) == WALL_BOTTOM) color = COL_CYAN;
    if (32'(pixel) == LEFT_X - 1 && line >= left_y &&
        {1'b0, line} <= {1'b0, left_y} + 7'(PADDLE_HEIGHT))  color = COL_CYAN;
    if (32'(pixel) == RIGHT_X + 1 && line >= right_y &&
        {1'b0, line} <= {1'b0, right_y} + 7'(PADDLE_HEIGHT)) color = COL_CYAN;
    if (pixel == ball_x && line == ball_y)                   color = COL_RED;
    if ((in_lscore || in_rscore) && rom_data[3 - pixel[1:0]]) color = COL_MAGENTA;
  end

endmodule
