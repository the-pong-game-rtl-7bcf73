// tb_pong_display: self-checking test of the playing-field painter.
//
// For random game states, every cell of the 80 x 60 grid is painted and
// compared with a model of the picture kept here. The model works from object
// rectangles and priorities (scores over ball over paddles over walls over
// background) and from its own copy of the digit glyphs; the painter reads
// the real digit ROM. Counts of cells of each kind make sure that walls,
// paddles, ball and both score digits were all drawn.
`timescale 1ns/1ps
module tb_pong_display;
  import pong_pkg::*;
  logic [6:0] pixel;
  logic [5:0] line;
  logic [5:0] left_y, right_y;
  logic [6:0] ball_x;
  logic [5:0] ball_y;
  logic [3:0] lscore, rscore;
  logic [6:0] rom_address;
  logic [3:0] rom_data;
  color_e     color;
  int checks = 0, failures = 0;

  pong_display dut (.*);
  digit_rom rom (.address(rom_address), .data(rom_data));

  // Glyph rows 0..7, leftmost pixel in the most significant bit.
  logic [3:0] glyph [10][8] = '{
    '{4'h0, 4'hF, 4'h9, 4'h9, 4'h9, 4'h9, 4'h9, 4'hF},
    '{4'h0, 4'h1, 4'h1, 4'h1, 4'h1, 4'h1, 4'h1, 4'h1},
    '{4'h0, 4'hF, 4'h1, 4'h1, 4'hF, 4'h8, 4'h8, 4'hF},
    '{4'h0, 4'hF, 4'h1, 4'h1, 4'hF, 4'h1, 4'h1, 4'hF},
    '{4'h0, 4'h9, 4'h9, 4'h9, 4'hF, 4'h1, 4'h1, 4'h1},
    '{4'h0, 4'hF, 4'h8, 4'h8, 4'hF, 4'h1, 4'h1, 4'hF},
    '{4'h0, 4'hF, 4'h8, 4'h8, 4'hF, 4'h9, 4'h9, 4'hF},
    '{4'h0, 4'hF, 4'h1, 4'h1, 4'h1, 4'h1, 4'h1, 4'h1},
    '{4'h0, 4'hF, 4'h9, 4'h9, 4'hF, 4'h9, 4'h9, 4'hF},
    '{4'h0, 4'hF, 4'h9, 4'h9, 4'hF, 4'h1, 4'h1, 4'h1}
  };

  function automatic logic [1:0] expect_color(int x, int y);
    logic [1:0] c = 2'b00;
    if (y == 9 || y == 58) c = 2'b11;
    if (x == 7  && y >= left_y  && y <= left_y + 8)  c = 2'b11;
    if (x == 73 && y >= right_y && y <= right_y + 8) c = 2'b11;
    if (x == ball_x && y == ball_y) c = 2'b01;
    if (y < 16 && x >= 8 && x <= 11 && glyph[lscore][y % 8][11 - x]) c = 2'b10;
    if (y < 16 && x >= 64 && x <= 67 && glyph[rscore][y % 8][67 - x]) c = 2'b10;
    return c;
  endfunction

  initial begin
    int n[4] = '{0, 0, 0, 0};
    for (int s = 0; s < 40; s++) begin
      left_y  = 6'($urandom_range(50, 9));
      right_y = 6'($urandom_range(50, 9));
      ball_x  = 7'($urandom_range(77, 2));
      ball_y  = 6'($urandom_range(58, 9));
      lscore  = 4'(s % 10);
      rscore  = 4'((s * 7) % 10);
      if (s == 0) begin ball_x = 7'd8; ball_y = 6'd9; end   // ball on the wall, under a score column
      for (int y = 0; y < 60; y++)
        for (int x = 0; x < 80; x++) begin
          pixel = 7'(x); line = 6'(y);
          #1;
          checks++;
          n[color]++;
          if (color != color_e'(expect_color(x, y))) begin
            failures++;
            if (failures < 10) $display("FAIL: state %0d cell (%0d,%0d) colour %b, expected %b", s, x, y, color, expect_color(x, y));
          end
        end
    end
    foreach (n[k]) begin
      checks++;
      if (n[k] == 0) begin failures++; $display("FAIL: colour %0d never drawn", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
