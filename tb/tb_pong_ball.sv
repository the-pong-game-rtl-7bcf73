// tb_pong_ball: self-checking test of ball movement, bounces and scoring.
//
// Frame ticks arrive every other clock. The paddles follow the ball most of
// the time (at a random offset, so every part of a paddle gets hit) and
// sometimes stand aside so the ball reaches a wall; serve is asserted at
// random. A reference model in this file computes the ball after every tick
// and all outputs are compared. BALL_DELAY is 2, so the ball must move on
// every third tick. The test counts paddle hits on each paddle and each zone,
// scores on each side including the 9 -> 0 wrap, bounces off the walls with
// the ball out of play, top and bottom wall bounces and serves, and fails if
// any of them never happened.
`timescale 1ns/1ps
module tb_pong_ball;
  logic       clk = 1'b0;
  logic       reset, frame_tick, serve;
  logic [5:0] left_y, right_y;
  logic [6:0] ball_x;
  logic [5:0] ball_y;
  logic [3:0] lscore, rscore;
  logic       in_play, ball_xdir, ball_ydir;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pong_ball #(.BALL_DELAY(2)) dut (.*);

  // reference state
  int m_x, m_y, m_rate, m_dl, m_ls, m_rs, m_moves;
  bit m_right, m_up, m_play;
  // event counters
  int n_hit_l, n_hit_r, n_zone[3], n_score_l, n_score_r, n_wrap, n_dead_wall, n_top, n_bot, n_serve;

  task automatic model_tick();
    bit hit; int off; int nx, ny, nrate; bit nright, nup, nplay;
    if (m_dl < 2) begin m_dl++; return; end
    m_dl = 0; m_moves++;
    nx = m_x; ny = m_y; nrate = m_rate; nright = m_right; nup = m_up; nplay = m_play;
    hit = 0; off = 0;
    if (serve && !m_play) begin nplay = 1; n_serve++; end
    if (m_right) begin
      if (m_x == 72 && m_y >= right_y && m_y <= right_y + 8) begin hit = 1; off = m_y - right_y; nright = 0; n_hit_r++; end
      else if (m_x >= 77) begin
        nright = 0;
        if (m_play) begin m_ls = (m_ls + 1) % 10; n_score_l++; if (m_ls == 0) n_wrap++; end
        else n_dead_wall++;
        nplay = 0;
      end else nx = m_x + 1;
    end else begin
      if (m_x == 8 && m_y >= left_y && m_y <= left_y + 8) begin hit = 1; off = m_y - left_y; nright = 1; n_hit_l++; end
      else if (m_x <= 2) begin
        nright = 1;
        if (m_play) begin m_rs = (m_rs + 1) % 10; n_score_r++; if (m_rs == 0) n_wrap++; end
        else n_dead_wall++;
        nplay = 0;
      end else nx = m_x - 1;
    end
    if (hit) begin
      if (off < 4)      begin nup = 1; nrate = 1; n_zone[0]++; end
      else if (off < 6) begin nrate = 0; n_zone[1]++; end
      else              begin nup = 0; nrate = 1; n_zone[2]++; end
    end
    if (m_up) begin
      if (m_y <= 9) begin nup = 0; n_top++; end else ny = m_y - m_rate;
    end else begin
      if (m_y >= 58) begin nup = 1; n_bot++; end else ny = m_y + m_rate;
    end
    m_x = nx; m_y = ny; m_rate = nrate; m_right = nright; m_up = nup; m_play = nplay;
  endtask

  initial begin
    int mode, offs;
    reset = 1; frame_tick = 0; serve = 0; left_y = 9; right_y = 9;
    m_x = 2; m_y = 32; m_rate = 1; m_right = 1; m_up = 0; m_play = 0; m_dl = 0; m_ls = 0; m_rs = 0; m_moves = 0;
    repeat (3) @(posedge clk); #1;
    reset = 0;
    mode = 0; offs = 0;
    for (int i = 0; i < 60000; i++) begin
      // every ~100 ticks choose how the paddles behave for a while
      if (i % 97 == 0) begin
        mode = $urandom_range(9);
        offs = $urandom_range(8);
        serve = ($urandom_range(3) == 0);
      end
      if (mode < 7) begin
        int t = m_y - offs;
        t = t < 9 ? 9 : t > 50 ? 50 : t;
        left_y = 6'(t); right_y = 6'(t);
      end else begin
        left_y  = (m_y > 30) ? 6'd9 : 6'd50;
        right_y = (m_y > 30) ? 6'd9 : 6'd50;
      end
      frame_tick = 1;
      @(posedge clk); #1;
      frame_tick = 0;
      model_tick();
      checks++;
      if (32'(ball_x) != m_x || 32'(ball_y) != m_y || 32'(lscore) != m_ls || 32'(rscore) != m_rs ||
          in_play != m_play || ball_xdir != m_right || ball_ydir != m_up) begin
        failures++;
        if (failures < 10)
          $display("FAIL: tick %0d ball (%0d,%0d) dir %b%b play %b score %0d:%0d, expected (%0d,%0d) %b%b %b %0d:%0d",
                   i, ball_x, ball_y, ball_xdir, ball_ydir, in_play, lscore, rscore,
                   m_x, m_y, m_right, m_up, m_play, m_ls, m_rs);
      end
      @(posedge clk); #1;   // no tick: nothing may change
      checks++;
      if (32'(ball_x) != m_x || 32'(ball_y) != m_y) begin failures++; $display("FAIL: moved without a tick"); end
    end
    checks++;
    if (m_moves != 20000) begin failures++; $display("FAIL: %0d moves for 60000 ticks", m_moves); end
    $display("INFO hits L %0d R %0d zones %0d/%0d/%0d scores L %0d R %0d wraps %0d dead %0d top %0d bottom %0d serves %0d",
             n_hit_l, n_hit_r, n_zone[0], n_zone[1], n_zone[2], n_score_l, n_score_r, n_wrap, n_dead_wall, n_top, n_bot, n_serve);
    foreach (n_zone[k]) begin checks++; if (n_zone[k] == 0) failures++; end
    checks++; if (n_hit_l == 0 || n_hit_r == 0) failures++;
    checks++; if (n_score_l == 0 || n_score_r == 0 || n_wrap == 0) begin failures++; $display("FAIL: scoring not exercised"); end
    checks++; if (n_dead_wall == 0 || n_serve == 0) begin failures++; $display("FAIL: serve/out-of-play not exercised"); end
    checks++; if (n_top == 0 || n_bot == 0) begin failures++; $display("FAIL: wall bounces not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
