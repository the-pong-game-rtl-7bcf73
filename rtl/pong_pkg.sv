// pong_pkg: types and constants shared by the Pong design.
//
// The game draws on an 80 x 60 grid of "cells", each cell being 8 x 8 pixels
// of a 640 x 480 VGA picture. Colours travel between the game controller and
// the VGA output stage as a 2-bit code; paddle movement requests travel from
// the keyboard decoder to the controller as a 2-bit direction code.
// Codes, key scan codes and playfield coordinates follow the original design;
// the enum and struct wrappers are this implementation's own.
package pong_pkg;

  // 2-bit colour code and its RGB meaning (see vga_int).
  typedef enum logic [1:0] {
    COL_BLACK   = 2'b00,
    COL_RED     = 2'b01,   // ball
    COL_MAGENTA = 2'b10,   // score digits
    COL_CYAN    = 2'b11    // walls and paddles
  } color_e;

  // Paddle direction request. "Up" is towards line 0 of the screen.
  typedef enum logic [1:0] {
    DIR_STOP = 2'b00,
    DIR_UP   = 2'b01,
    DIR_DOWN = 2'b10
  } dir_e;

  // One-bit RGB triple as driven towards the resistor DAC.
  typedef struct packed {
    logic red;
    logic green;
    logic blue;
  } rgb_t;

  // PS/2 set-2 scan codes used by the game.
  localparam logic [7:0] SC_UP      = 8'h75;  // arrow up (sent after E0)
  localparam logic [7:0] SC_DOWN    = 8'h72;  // arrow down (sent after E0)
  localparam logic [7:0] SC_W       = 8'h1D;
  localparam logic [7:0] SC_S       = 8'h1B;
  localparam logic [7:0] SC_SPACE   = 8'h29;
  localparam logic [7:0] SC_BREAK   = 8'hF0;  // key-release prefix
  localparam logic [7:0] SC_EXTEND  = 8'hE0;  // extended-key prefix

  // Playfield geometry, in cells.
  localparam int unsigned WALL_TOP      = 9;
  localparam int unsigned WALL_BOTTOM   = 58;
  localparam int unsigned LEFT_WALL     = 2;
  localparam int unsigned RIGHT_WALL    = 77;
  localparam int unsigned LEFT_X        = 8;   // ball column that meets the left paddle
  localparam int unsigned RIGHT_X       = 72;  // ball column that meets the right paddle
  localparam int unsigned PADDLE_HEIGHT = 8;   // paddle spans y .. y+PADDLE_HEIGHT
  localparam int unsigned PADDLE_ZONE_A = 4;   // top part of the paddle:    offset <  4
  localparam int unsigned PADDLE_ZONE_B = 6;   // middle part of the paddle: offset <  6
  localparam int unsigned PADDLE_ZONE_C = 8;   // bottom part of the paddle: offset <= 8
  localparam int unsigned PADDLE_Y_MIN  = 9;   // paddle top may not rise above the top wall
  localparam int unsigned PADDLE_Y_MAX  = 50;  // 50 + 8 = bottom wall
  localparam int unsigned PADDLE_Y_RST  = 9;
  localparam int unsigned BALL_Y_RST    = 32;
  // Score digits: columns and rows of the 4-cell-wide glyph windows.
  localparam int unsigned LSCORE_X0     = 8;
  localparam int unsigned RSCORE_X0     = 64;
  localparam int unsigned SCORE_W       = 4;
  localparam int unsigned SCORE_ROWS    = 16;  // lines 0..15

endpackage
