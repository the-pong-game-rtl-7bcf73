// tb_pong_top_full: the whole design at its default parameters, through one
// complete round of play input and display.
//
// After reset the player presses S (left paddle down) on a PS/2 keyboard
// model, holds it for several frames and releases it. The test reads every
// frame back from the VGA pins and checks: the picture equals a model drawn
// from the game state; the left paddle moves one cell per frame while S is
// held and stops after the release; the ball moves on exactly one frame in
// five (the default speed divider); lines are 805 clocks with a 96-clock
// hsync and frames 519 lines; the LEDs show the last scan code (1B); the
// seven-segment display shows "PonG", each digit lit for 32768 clocks.
`timescale 1ns/1ps
module tb_pong_top_full;
  import pong_pkg::*;
  logic       clk = 1'b0;
  logic       btn3;
  logic       ps2c, ps2d;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic       vga_hs, vga_vs;
  logic [7:0] seg, ld;
  logic [3:0] an;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;   // 25 MHz

  ps2_keyboard_model #(.HALF_PERIOD(20000)) kbd (.ps2_clk(ps2c), .ps2_data(ps2d));

  pong_top dut (
    .clk_ic4(clk), .btn3(btn3), .ps2c(ps2c), .ps2d(ps2d),
    .vga_red(vga_red), .vga_green(vga_green), .vga_blue(vga_blue),
    .vga_hs(vga_hs), .vga_vs(vga_vs), .seg(seg), .an(an), .ld(ld)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // picture capture from the pins (see tb_pong_top)
  logic [1:0] pic [60][80];
  int   hs_clk = -1000000, line_idx = -1000, frames = 0, lines_in_frame = 0;
  logic hs_q = 1, vs_q = 1;
  bit   sync_bad = 0;

  always @(posedge clk) if (!btn3) begin
    int px;
    hs_clk <= hs_clk + 1;
    if (hs_q && !vga_hs) begin
      if (frames >= 1 && hs_clk != 805) sync_bad = 1;
      hs_clk <= 1;
      line_idx <= line_idx + 1;
      lines_in_frame <= lines_in_frame + 1;
    end
    if (!hs_q && vga_hs && frames >= 1 && hs_clk != 96) sync_bad = 1;
    if (!vs_q && vga_vs) begin
      if (frames >= 1 && lines_in_frame != 519) sync_bad = 1;
      lines_in_frame <= (hs_q && !vga_hs) ? 1 : 0;
      line_idx <= -29;
      frames <= frames + 1;
    end
    px = hs_clk - 149;
    if (line_idx >= 0 && line_idx < 480 && px >= 0 && px < 640 && px % 8 == 4 && line_idx % 8 == 4)
      case ({vga_red[0], vga_green[0], vga_blue[0]})
        3'b000:  pic[line_idx / 8][px / 8] = 2'b00;
        3'b100:  pic[line_idx / 8][px / 8] = 2'b01;
        3'b101:  pic[line_idx / 8][px / 8] = 2'b10;
        3'b011:  pic[line_idx / 8][px / 8] = 2'b11;
        default: pic[line_idx / 8][px / 8] = 2'bxx;
      endcase
    hs_q <= vga_hs; vs_q <= vga_vs;
  end

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
        if (pic[y][x] !== c) e++;
      end
    return e;
  endfunction

  function automatic int paddle_top(int col);
    int first = -1, last = -1;
    for (int y = 10; y < 58; y++) if (pic[y][col] == 2'b11) begin
      if (first < 0) first = y;
      last = y;
    end
    if (first < 0) return -1;
    if (last - first == 8) return first;
    return (first == 10) ? 9 : first;
  endfunction

  task automatic find_ball(output int bx, output int by);
    bx = -1; by = -1;
    for (int y = 0; y < 60; y++) for (int x = 0; x < 80; x++)
      if (pic[y][x] == 2'b01) begin bx = x; by = y; end
  endtask

  int s_ly, s_ry, s_bx, s_by, s_ls, s_rs;
  always @(posedge clk) if (line_idx == 240 && hs_clk == 1) begin
    s_ly = int'(dut.cntrl_inst.left_y);  s_ry = int'(dut.cntrl_inst.right_y);
    s_bx = int'(dut.cntrl_inst.ball_x);  s_by = int'(dut.cntrl_inst.ball_y);
    s_ls = int'(dut.cntrl_inst.lscore);  s_rs = int'(dut.cntrl_inst.rscore);
  end

  // title display: record the segments shown on each digit and its lit time
  logic [7:0] shown [4];
  int         run = 0, bad_run = 0, runs = 0;
  logic [3:0] an_q = 4'hF;
  always @(posedge clk) if (!btn3) begin
    for (int d = 0; d < 4; d++) if (an == ~(4'b1 << d)) shown[d] = seg;
    if (an != an_q) begin
      if (runs > 1 && run != 32768) bad_run++;   // the first run began before the monitor
      runs++;
      run = 1;
    end else run++;
    an_q <= an;
  end

  initial begin
    int bx, by, lt, prev_lt, prev_bx, prev_by, moves, moving_frames, still_frames;
    btn3 = 1;
    repeat (10) @(posedge clk);
    btn3 = 0;
    wait (frames == 1);
    fork
      kbd.send_byte(8'h1B);       // S pressed
    join_none
    prev_lt = -1; prev_bx = -1; prev_by = -1; moves = 0; moving_frames = 0; still_frames = 0;
    for (int f = 2; f < 17; f++) begin
      wait (frames == f);
      if (f == 9) fork
        begin kbd.send_byte(8'hF0); kbd.gap(2); kbd.send_byte(8'h1B); end   // S released
      join_none
      find_ball(bx, by);
      lt = paddle_top(7);
      check(picture_errors(s_ly, s_ry, s_bx, s_by, s_ls, s_rs) == 0, $sformatf("frame %0d picture differs", f));
      check(lt == s_ly && bx == s_bx && by == s_by, $sformatf("frame %0d objects", f));
      if (prev_lt >= 0) begin
        if (f >= 4 && f <= 9) begin
          check(lt == prev_lt + 1, $sformatf("frame %0d paddle %0d after %0d while S held", f, lt, prev_lt));
          moving_frames++;
        end
        if (f >= 12) begin
          check(lt == prev_lt, $sformatf("frame %0d paddle %0d after %0d after release", f, lt, prev_lt));
          still_frames++;
        end
        if (bx != prev_bx || by != prev_by) moves++;
      end
      prev_lt = lt; prev_bx = bx; prev_by = by;
    end
    // 14 frame steps, one move in five: 2 or 3 moves
    check(moves >= 2 && moves <= 3, $sformatf("ball moved on %0d of 14 frames", moves));
    check(moving_frames == 6 && still_frames == 5, "paddle frames counted");
    check(!sync_bad, "sync timing at the pins");
    check(ld == 8'h1B, $sformatf("LEDs show %02h", ld));
    check(bad_run == 0 && runs > 8, $sformatf("digit lit times: %0d wrong of %0d", bad_run, runs));
    check(shown[3] == ~8'b1100_1110 && shown[2] == ~8'b0011_1010 &&
          shown[1] == ~8'b0010_1010 && shown[0] == ~8'b1011_1100, "title reads PonG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 805 * 519) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
