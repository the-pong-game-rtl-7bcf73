// tb_pong_top: end-to-end game test of the whole design.
//
// Two scripted players use a PS/2 keyboard model (real 25 kHz PS/2 timing,
// 25 MHz system clock). Each frame the test reads the picture back from the
// VGA pins, sampling the middle of every 8 x 8 cell, finds the ball (red) and
// the paddles (cyan in columns 7 and 73) and decides each player's key
// presses from that: a player that "plays" keeps the ball in front of the
// paddle with W/S or the arrow keys, a player that "misses" holds the paddle
// away. The script is:
//   1. left player presses W at the top wall (paddle clamp)
//   2. right plays, left misses            -> right scores
//   3. space serves the ball again
//   4. left plays, right misses            -> left scores, left paddle hits
// Checked from the pins: every line 805 clocks with a 96-clock hsync, every
// frame 519 lines, all pins of one colour equal, the picture equal to a model
// drawn from the game state on sampled frames, LEDs showing the last scan
// code, the title display scanning its four digits. Counted from the game
// state, each must happen at least once: key press, key release, extended
// key, paddle moving up and down, paddle clamp, paddle hit left and right,
// score left and right, serve, ball bouncing off a wall while out of play,
// ball bouncing off the top and bottom walls.
// The ball runs at one cell per frame (BALL_DELAY 0) and the title display
// scans faster (SCAN_BITS 10) to keep the run short; everything else is at
// its default size.
`timescale 1ns/1ps
module tb_pong_top;
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

  pong_top #(.BALL_DELAY(0), .SCAN_BITS(10)) dut (
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

  // ---------------------------------------------------------------- keyboard
  logic [7:0] keyq[$];
  logic [7:0] last_sent = 8'h00;
  int         bytes_sent = 0;
  initial forever begin
    wait (keyq.size() > 0);
    last_sent = keyq[0];
    kbd.send_byte(keyq.pop_front());
    bytes_sent++;
    kbd.gap(3);
  end

  task automatic press(input logic [7:0] code, input bit ext);
    if (ext) keyq.push_back(8'hE0);
    keyq.push_back(code);
  endtask
  task automatic release_key(input logic [7:0] code, input bit ext);
    if (ext) keyq.push_back(8'hE0);
    keyq.push_back(8'hF0);
    keyq.push_back(code);
  endtask

  // ------------------------------------------------------- picture capture
  logic [1:0] pic [60][80];
  int   hs_clk = -1000000, line_idx = -1000, frames = 0;
  int   last_hs = -1;
  logic hs_q = 1, vs_q = 1;
  int   lines_in_frame = 0;
  bit   pins_bad = 0, sync_bad = 0;

  function automatic logic [1:0] code_of(logic r, logic g, logic b);
    case ({r, g, b})
      3'b000:  return 2'b00;
      3'b100:  return 2'b01;
      3'b101:  return 2'b10;
      3'b011:  return 2'b11;
      default: return 2'bxx;
    endcase
  endfunction

  always @(posedge clk) if (!btn3) begin
    int px;
    hs_clk <= hs_clk + 1;
    if (hs_q && !vga_hs) begin
      if (frames >= 1 && hs_clk != 805) begin
        if (!sync_bad) $display("INFO line period %0d in frame %0d", hs_clk, frames);
        sync_bad = 1;
      end
      hs_clk <= 1;
      line_idx <= line_idx + 1;
      lines_in_frame <= lines_in_frame + 1;
    end
    if (!hs_q && vga_hs && frames >= 1 && hs_clk != 96) begin
      if (!sync_bad) $display("INFO hsync width %0d in frame %0d", hs_clk, frames);
      sync_bad = 1;
    end
    if (!vs_q && vga_vs) begin
      if (frames >= 1 && lines_in_frame != 519) begin
        if (!sync_bad) $display("INFO %0d lines in frame %0d", lines_in_frame, frames);
        sync_bad = 1;
      end
      lines_in_frame <= (hs_q && !vga_hs) ? 1 : 0;   // vsync rises as a line starts
      line_idx <= -29;
      frames <= frames + 1;
    end
    if (vga_red[0] != vga_red[1] || vga_red[0] != vga_red[2] || vga_green[0] != vga_green[1] ||
        vga_green[0] != vga_green[2] || vga_blue[0] != vga_blue[1]) pins_bad = 1;
    px = hs_clk - 149;
    if (line_idx >= 0 && line_idx < 480 && px >= 0 && px < 640 && px % 8 == 4 && line_idx % 8 == 4)
      pic[line_idx / 8][px / 8] = code_of(vga_red[0], vga_green[0], vga_blue[0]);
    hs_q <= vga_hs; vs_q <= vga_vs;
  end

  // ------------------------------------------------------------ picture model
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

  // Objects seen in the captured picture.
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

  // ------------------------------------------------------ mechanism counters
  int n_press, n_release, n_ext, n_up, n_down, n_clamp, n_hit_l, n_hit_r,
      n_score_l, n_score_r, n_serve, n_dead, n_top, n_bot;
  logic [7:0] ld_q = 8'h00;

  // game state as seen by the design
  `define BALL dut.cntrl_inst.u_ball
  `define PADS dut.cntrl_inst.u_paddles

  always @(posedge clk) if (!btn3 && dut.cntrl_inst.frame_tick) begin
    if (`PADS.left_dir == DIR_UP && `PADS.left_y == 9) n_clamp++;
    if (`PADS.left_dir == DIR_UP || `PADS.right_dir == DIR_UP) n_up++;
    if (`PADS.left_dir == DIR_DOWN || `PADS.right_dir == DIR_DOWN) n_down++;
  end
  logic xdir_q = 1, ydir_q = 0, play_q = 0;
  logic [3:0] ls_q = 0, rs_q = 0;
  logic [6:0] bx_q = 2;
  always @(posedge clk) if (!btn3) begin
    if (`BALL.ball_xdir != xdir_q) begin
      if (bx_q == 7'd8)  n_hit_l++;
      if (bx_q == 7'd72) n_hit_r++;
      if ((bx_q == 7'd2 || bx_q == 7'd77) && `BALL.lscore == ls_q && `BALL.rscore == rs_q) n_dead++;
    end
    if (`BALL.ball_ydir != ydir_q) begin
      if (ydir_q) n_top++; else n_bot++;
    end
    if (`BALL.lscore != ls_q) n_score_l++;
    if (`BALL.rscore != rs_q) n_score_r++;
    if (`BALL.in_play && !play_q) n_serve++;
    xdir_q <= `BALL.ball_xdir; ydir_q <= `BALL.ball_ydir; play_q <= `BALL.in_play;
    ls_q <= `BALL.lscore; rs_q <= `BALL.rscore; bx_q <= `BALL.ball_x;
  end
  always @(posedge dut.u1.data_ready) begin
    if (ld == 8'hF0) n_release++;
    else if (ld == 8'hE0) n_ext++;
    else if (ld_q != 8'hF0 && ld_q != 8'hE0) n_press++;
    else if (ld_q == 8'hE0) n_press++;
    ld_q = ld;
  end

  // Game state during the visible part of the frame being captured (the game
  // steps at the end of vertical sync, before the next frame is drawn).
  int s_ly, s_ry, s_bx, s_by, s_ls, s_rs;
  always @(posedge clk) if (line_idx == 240 && hs_clk == 1) begin
    s_ly = `PADS.left_y;  s_ry = `PADS.right_y;
    s_bx = `BALL.ball_x;  s_by = `BALL.ball_y;
    s_ls = `BALL.lscore;  s_rs = `BALL.rscore;
  end

  // ------------------------------------------------------------ the players
  // key currently held by each player: 0 none, 1 up, 2 down
  int held_l = 0, held_r = 0;
  task automatic steer(input bit right, input int want);
    int held = right ? held_r : held_l;
    logic [7:0] up_code   = right ? 8'h75 : 8'h1D;
    logic [7:0] down_code = right ? 8'h72 : 8'h1B;
    if (want == held) return;
    if (keyq.size() > 6) return;        // keyboard busy: decide again next frame
    if (held == 1) release_key(up_code, right);
    if (held == 2) release_key(down_code, right);
    if (want == 1) press(up_code, right);
    if (want == 2) press(down_code, right);
    if (right) held_r = want; else held_l = want;
  endtask

  function automatic int track(int top, int by);
    if (by < 0 || top < 0) return 0;
    if (by < top + 3) return 1;
    if (by > top + 5) return 2;
    return 0;
  endfunction

  function automatic int avoid(int top, int by);
    if (by < 0 || top < 0) return 0;
    return (by >= 30) ? 1 : 2;
  endfunction

  initial begin
    int phase, bx, by, lt, rt, f0, seen_pictures, samples;
    n_press = 0; n_release = 0; n_ext = 0; n_up = 0; n_down = 0; n_clamp = 0; n_hit_l = 0; n_hit_r = 0;
    n_score_l = 0; n_score_r = 0; n_serve = 0; n_dead = 0; n_top = 0; n_bot = 0;
    btn3 = 1;
    repeat (10) @(posedge clk);
    btn3 = 0;
    wait (frames == 1);
    phase = 1; samples = 0;
    press(8'h1D, 0); held_l = 1;       // W at the top wall: clamp
    for (int f = 2; f < 600; f++) begin
      wait (frames == f);
      find_ball(bx, by);
      lt = paddle_top(7);
      rt = paddle_top(73);
      if (f % 25 == 0) begin
        samples++;
        check(picture_errors(s_ly, s_ry, s_bx, s_by, s_ls, s_rs) == 0, $sformatf("frame %0d picture differs", f));
        check(lt == s_ly && rt == s_ry && (bx < 0 || (bx == s_bx && by == s_by)),   // a score digit may hide the ball
              $sformatf("frame %0d objects seen at L%0d R%0d ball (%0d,%0d)", f, lt, rt, bx, by));
      end
      case (phase)
        1: if (f > 5) phase = 2;
        2: begin                          // right plays, left misses
             steer(0, avoid(lt, by));
             steer(1, track(rt, by));
             if (n_score_r > 0) begin phase = 3; f0 = f; end
           end
        3: begin                          // serve with the space bar
             steer(0, 0); steer(1, 0);
             if (f == f0 + 1) press(8'h29, 0);
             if (f == f0 + 4) release_key(8'h29, 0);
             if (f > f0 + 4 && n_serve >= 2) phase = 4;
           end
        4: begin                          // left plays, right misses
             steer(0, track(lt, by));
             steer(1, avoid(rt, by));
             if (n_score_l > 0 && n_hit_l > 0) phase = 5;
           end
        default: ;
      endcase
      if (phase == 5 && n_top > 0 && n_bot > 0 && n_dead > 0) break;
    end
    repeat (200) @(posedge clk);
    check(ld == last_sent, $sformatf("LEDs show %02h, last code sent %02h", ld, last_sent));
    check(!sync_bad, "sync timing at the pins");
    check(!pins_bad, "all pins of a colour equal");
    check(samples > 0, "pictures sampled");
    // title display: each anode low in turn
    begin
      int seen_an[4] = '{0, 0, 0, 0};
      repeat (5000) begin
        @(posedge clk);
        for (int d = 0; d < 4; d++) if (an == ~(4'b1 << d)) seen_an[d]++;
      end
      foreach (seen_an[d]) check(seen_an[d] > 0, $sformatf("digit %0d of the title never lit", d));
    end
    $display("INFO frames %0d keys: press %0d release %0d ext %0d  paddles: up %0d down %0d clamp %0d",
             frames, n_press, n_release, n_ext, n_up, n_down, n_clamp);
    $display("INFO ball: hits L %0d R %0d scores L %0d R %0d serves %0d dead-wall %0d top %0d bottom %0d",
             n_hit_l, n_hit_r, n_score_l, n_score_r, n_serve, n_dead, n_top, n_bot);
    check(n_press > 0,   "key press");
    check(n_release > 0, "key release");
    check(n_ext > 0,     "extended key");
    check(n_up > 0,      "paddle up");
    check(n_down > 0,    "paddle down");
    check(n_clamp > 0,   "paddle clamp");
    check(n_hit_l > 0,   "left paddle hit");
    check(n_hit_r > 0,   "right paddle hit");
    check(n_score_l > 0, "left score");
    check(n_score_r > 0, "right score");
    check(n_serve >= 2,  "serve");
    check(n_dead > 0,    "bounce off a wall out of play");
    check(n_top > 0,     "top wall bounce");
    check(n_bot > 0,     "bottom wall bounce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (620 * 805 * 519) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
