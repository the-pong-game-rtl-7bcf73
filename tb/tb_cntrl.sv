// tb_cntrl: self-checking test of the game controller at full VGA timing.
//
// The test watches only the controller's outputs. From hsynch and vsynch it
// locates each active pixel (149 clocks after hsync falls: 96 sync, 48 back
// porch, 5 border; active lines begin 29 lines after vsync rises) and samples
// the colour in the middle of every 8 x 8 cell. Each captured frame is
// compared with a picture model drawn from the game state of that frame
// (walls, paddles, ball, score glyphs), and colour must be black outside the
// active area. Over 13 frames with the left paddle held "down" and the right
// paddle "up", it checks that the left paddle moves one cell per frame, the
// right paddle stays clamped at the top, and the ball moves on every fifth
// frame only.
`timescale 1ns/1ps
module tb_cntrl;
  import pong_pkg::*;
  logic   clk = 1'b0;
  logic   reset;
  dir_e   left_dir, right_dir;
  logic   serve;
  logic   hsynch, vsynch;
  color_e color;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  cntrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

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

  // Captured frame
  logic [1:0] pic [60][80];
  int   hs_clk = -1000000, line_idx = -1000;
  int   frames = 0;
  logic hs_q = 1, vs_q = 1;
  bit   blank_bad = 0;

  always @(posedge clk) if (!reset) begin
    int px;
    hs_clk <= hs_clk + 1;
    if (hs_q && !hsynch) begin
      hs_clk   <= 1;
      line_idx <= line_idx + 1;
    end
    if (!vs_q && vsynch) begin
      line_idx <= -29;
      frames   <= frames + 1;
    end
    px = hs_clk - 149;
    if (line_idx >= 0 && line_idx < 480 && px >= 0 && px < 640) begin
      if (px % 8 == 4 && line_idx % 8 == 4) pic[line_idx / 8][px / 8] = color;
    end else if (frames >= 1 && color != COL_BLACK) begin
      if (!blank_bad) $display("INFO colour %0d at line %0d pixel %0d", color, line_idx, px);
      blank_bad = 1;
    end
    hs_q <= hsynch; vs_q <= vsynch;
  end

  function automatic int picture_errors(int ly, int ry, int bx, int by, int ls, int rs);
    int e = 0;
    for (int y = 0; y < 60; y++)
      for (int x = 0; x < 80; x++) begin
        logic [1:0] c = 2'b00;
        if (y == 9 || y == 58) c = 2'b11;
        if (x == 7  && y >= ly && y <= ly + 8) c = 2'b11;
        if (x == 73 && y >= ry && y <= ry + 8) c = 2'b11;
        if (x == bx && y == by) c = 2'b01;
        if (y < 16 && x >= 8 && x <= 11 && glyph[ls][y % 8][11 - x]) c = 2'b10;
        if (y < 16 && x >= 64 && x <= 67 && glyph[rs][y % 8][67 - x]) c = 2'b10;
        if (pic[y][x] != c) e++;
      end
    return e;
  endfunction

  // Paddle top from the picture; rows 9 and 58 are walls, so a paddle touching
  // a wall shows only 8 of its 9 cells between them.
  function automatic int find_top(int col);
    int first = -1, last = -1;
    for (int y = 10; y < 58; y++) if (pic[y][col] == 2'b11) begin
      if (first < 0) first = y;
      last = y;
    end
    if (first < 0) return -1;
    if (last - first == 8) return first;
    return (first == 10) ? 9 : first;
  endfunction

  initial begin
    int ly, ry, bx, by, ls, rs, prev_ly, prev_bx, prev_by, moves, still;
    reset = 1; left_dir = DIR_DOWN; right_dir = DIR_UP; serve = 1;
    repeat (5) @(posedge clk);
    reset = 0;
    prev_ly = -1; prev_bx = -1; prev_by = -1; moves = 0; still = 0;
    // skip the first, partial frame
    wait (frames == 1);
    for (int f = 0; f < 13; f++) begin
      // game state is stable during the active part of a frame
      wait (line_idx == 10);
      ly = dut.left_y; ry = dut.right_y; bx = dut.ball_x; by = dut.ball_y;
      ls = dut.lscore; rs = dut.rscore;
      wait (frames == f + 2);
      check(picture_errors(ly, ry, bx, by, ls, rs) == 0,
            $sformatf("frame %0d: %0d cells differ from the model", f, picture_errors(ly, ry, bx, by, ls, rs)));
      if (prev_ly >= 0) begin
        check(find_top(7) == prev_ly + 1, $sformatf("left paddle top %0d after %0d", find_top(7), prev_ly));
        check(find_top(73) == 9, "right paddle clamped at the top wall");
        if (bx != prev_bx || by != prev_by) moves++; else still++;
      end
      prev_ly = find_top(7); prev_bx = bx; prev_by = by;
    end
    // 12 frame steps at one move in five frames: 2 or 3 moves
    check(moves >= 2 && moves <= 3 && moves + still == 12, $sformatf("ball moved on %0d of 12 frames", moves));
    check(!blank_bad, "colour black outside the active area");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * 805 * 519) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
