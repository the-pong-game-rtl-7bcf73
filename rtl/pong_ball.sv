// pong_ball: ball movement, bounces and scoring.
//
// The ball is one cell of the 80 x 60 grid at (ball_x, ball_y). A frame
// counter slows it down: the ball moves on one frame out of BALL_DELAY+1
// (every fifth frame by default, about 12 cells per second at 60 Hz).
// On such a frame:
//   horizontal  It moves one column in its x direction, unless
//               - it is at column LEFT_X (8) moving left, or RIGHT_X (72) moving
//                 right, and the paddle in front of it covers its line: it
//                 bounces. Where it hits the paddle sets its vertical motion:
//                 top part (offset 0-3 below the paddle top) sends it upwards
//                 one line per move, the middle part (4-5) flat, the bottom
//                 part (6-8) downwards one line per move;
//               - it has reached the left wall (column 2) or the right wall
//                 (column 77): it bounces and, if the ball is in play
//                 (`enable`), the player on the other side scores. A score
//                 counts 0-9 and wraps to 0. Scoring takes the ball out of
//                 play; `serve` puts it back in play on a later move.
//   vertical    It moves ball_yrate lines up or down; at or beyond the top
//               wall (line 9) or the bottom wall (line 58) it reverses instead.
// Reset: ball at the left wall on line 32 heading right and down, one line per
// move, not in play, scores 0. Outputs change one clk cycle after `frame_tick`.
//
// From the original design: the frame-count speed divider (delay >= 4), the
// reset values, the wall and paddle columns, the score-and-bounce at the walls
// gated by `enable`, the 0-9 wrap of the scores, the paddle zone bounds 4/6/8
// and the vertical wall bounce. This design's own rules: the bounce test at
// the paddle columns, what each zone does to the vertical motion, serving as
// "serve high puts the ball in play", and the reset directions.
module pong_ball
  import pong_pkg::*;
#(
  parameter int unsigned BALL_DELAY = 4   // moves on one frame in BALL_DELAY+1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       frame_tick,
  input  logic       serve,
  input  logic [5:0] left_y,
  input  logic [5:0] right_y,
  output logic [6:0] ball_x,
  output logic [5:0] ball_y,
  output logic [3:0] lscore,
  output logic [3:0] rscore,
  output logic       in_play,
  output logic       ball_xdir,   // 1: moving right
  output logic       ball_ydir    // 1: moving up
);

  logic [1:0] ball_yrate;
  logic [7:0] delay;
  logic       move;

  // Paddle covers the ball's line: paddle spans y .. y + PADDLE_HEIGHT.
  function automatic logic covers(logic [5:0] paddle_y, logic [5:0] by);
    return (by >= paddle_y) && ({1'b0, by} <= {1'b0, paddle_y} + 7'(PADDLE_HEIGHT));
  endfunction

  assign move = frame_tick && (32'(delay) >= BALL_DELAY);

  always_ff @(posedge clk) begin
    if (reset) begin
      ball_x     <= 7'(LEFT_WALL);
      ball_y     <= 6'(BALL_Y_RST);
      ball_yrate <= 2'd1;
      ball_xdir  <= 1'b1;
      ball_ydir  <= 1'b0;
      lscore     <= '0;
      rscore     <= '0;
      in_play    <= 1'b0;
      delay      <= '0;
    end else if (move) begin
      logic       hit;
      logic [5:0] offset;
      delay <= '0;
      hit    = 1'b0;
      offset = '0;
      if (serve && !in_play) in_play <= 1'b1;

      // Horizontal movement, paddle bounce and scoring.
      if (ball_xdir) begin
        if (ball_x == 7'(RIGHT_X) && covers(right_y, ball_y)) begin
          hit       = 1'b1;
          offset    = ball_y - right_y;
          ball_xdir <= 1'b0;
        end else if (ball_x >= 7'(RIGHT_WALL)) begin
          ball_xdir <= 1'b0;
          if (in_play) lscore <= (lscore == 4'd9) ? 4'd0 : lscore + 4'd1;
          in_play <= 1'b0;
        end else begin
          ball_x <= ball_x + 7'd1;
        end
      end else begin
        if (ball_x == 7'(LEFT_X) && covers(left_y, ball_y)) begin
          hit       = 1'b1;
          offset    = ball_y - left_y;
          ball_xdir <= 1'b1;
        end else if (ball_x <= 7'(LEFT_WALL)) begin
          ball_xdir <= 1'b1;
          if (in_play) rscore <= (rscore == 4'd9) ? 4'd0 : rscore + 4'd1;
          in_play <= 1'b0;
        end else begin
          ball_x <= ball_x - 7'd1;
        end
      end

      // Where the ball meets the paddle sets its vertical motion for later moves.
      if (hit) begin
        if (32'(offset) < PADDLE_ZONE_A) begin
          ball_ydir  <= 1'b1;
          ball_yrate <= 2'd1;
        end else if (32'(offset) < PADDLE_ZONE_B) begin
          ball_yrate <= 2'd0;
        end else if (32'(offset) <= PADDLE_ZONE_C) begin
          ball_ydir  <= 1'b0;
          ball_yrate <= 2'd1;
        end
      end

      // Vertical movement (1 = up) with wall bounce.
      if (ball_ydir) begin
        if (ball_y <= 6'(WALL_TOP)) ball_ydir <= 1'b0;
        else                        ball_y    <= ball_y - 6'(ball_yrate);
      end else begin
        if (ball_y >= 6'(WALL_BOTTOM)) ball_ydir <= 1'b1;
        else                           ball_y    <= ball_y + 6'(ball_yrate);
      end
    end else if (frame_tick) begin
      delay <= delay + 8'd1;
    end
  end

endmodule
