// pong_paddles: paddle position logic.
//
// Each paddle is a vertical bar whose top sits on line `*_y` of the 80 x 60
// cell grid and which spans PADDLE_HEIGHT+1 cells downwards. Once per frame
// (`frame_tick`) each paddle moves one cell in the direction its player
// requests: DIR_DOWN adds 1 to y, DIR_UP subtracts 1, DIR_STOP holds. The
// result is clamped to PADDLE_Y_MIN..PADDLE_Y_MAX (9..50) so the paddle stays
// between the top wall (line 9) and the bottom wall (line 58 = 50 + 8).
// Reset puts both paddles at the top, y = 9. Positions change one clk cycle
// after `frame_tick`.
//
// Movement per frame, the clamp limits and the reset position follow the
// original design. The original keeps a "next" and a "current" register per
// paddle, so a move shows one frame late; here one register per paddle
// applies the move and the clamp in the same frame.
module pong_paddles
  import pong_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       frame_tick,
  input  dir_e       left_dir,
  input  dir_e       right_dir,
  output logic [5:0] left_y,
  output logic [5:0] right_y
);

  function automatic logic [5:0] step(logic [5:0] y, dir_e dir);
    logic [6:0] n;
    unique case (dir)
      DIR_DOWN: n = {1'b0, y} + 7'd1;
      DIR_UP:   n = {1'b0, y} - 7'd1;
      default:  n = {1'b0, y};
    endcase
    if (n < 7'(PADDLE_Y_MIN))      return 6'(PADDLE_Y_MIN);
    else if (n > 7'(PADDLE_Y_MAX)) return 6'(PADDLE_Y_MAX);
    else                           return n[5:0];
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      left_y  <= 6'(PADDLE_Y_RST);
      right_y <= 6'(PADDLE_Y_RST);
    end else if (frame_tick) begin
      left_y  <= step(left_y, left_dir);
      right_y <= step(right_y, right_dir);
    end
  end

endmodule
