// cntrl: the Pong game controller.
//
// Ties the game together: a vga_core produces the beam position as a cell of
// an 80 x 60 grid, pong_display paints that cell from the game state with the
// help of the digit ROM, and the game state (paddles in pong_paddles, ball and
// scores in pong_ball) advances once per frame. The frame step happens at the
// end of each vertical sync pulse, detected as the rising edge of vsynch.
//
// Output pipeline: hsynch, vsynch and color are registered once, so they stay
// aligned; color is forced to black (00) whenever the beam is outside the
// active 640 x 480 area. Latency from vga_core to the outputs is one clk.
//
// Interface: left_dir/right_dir request paddle movement (00 stop, 01 up,
// 10 down), serve puts the ball in play. color goes to vga_int.
//
// The structure (timing core, character ROM, display painter, per-frame game
// logic) and the one-stage output pipeline follow the original design. Running
// the game logic on the pixel clock with a frame-rate enable, rather than
// clocking it from the registered vertical sync, and blanking colour during
// vertical retrace are this design's choices.
module cntrl
  import pong_pkg::*;
#(
  parameter int unsigned BALL_DELAY = 4,
  parameter int unsigned H_LEFT   = 5,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_RIGHT  = 7,
  parameter int unsigned H_FRONT  = 9,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_TOP    = 5,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_BOTTOM = 6,
  parameter int unsigned V_FRONT  = 2,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 24
) (
  input  logic   clk,
  input  logic   reset,
  input  dir_e   left_dir,
  input  dir_e   right_dir,
  input  logic   serve,
  output logic   hsynch,
  output logic   vsynch,
  output color_e color
);

  logic       next_hsynch, next_vsynch, hblank, vblank;
  logic [5:0] line;
  logic [6:0] pixel;
  logic [6:0] number_address;
  logic [3:0] number_data;
  color_e     next_color;
  logic       vsynch_d, frame_tick;

  logic [5:0] left_y, right_y;
  logic [6:0] ball_x;
  logic [5:0] ball_y;
  logic [3:0] lscore, rscore;

  vga_core #(
    .H_LEFT(H_LEFT), .H_ACTIVE(H_ACTIVE), .H_RIGHT(H_RIGHT),
    .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .V_TOP(V_TOP), .V_ACTIVE(V_ACTIVE), .V_BOTTOM(V_BOTTOM),
    .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK)
  ) vga1 (
    .clk      (clk),
    .reset    (reset),
    .hsynch   (next_hsynch),
    .vsynch   (next_vsynch),
    .hblank   (hblank),
    .vblank   (vblank),
    .line     (line),
    .pixel    (pixel),
    .line_tick()
  );

  digit_rom cgen1 (
    .address(number_address),
    .data   (number_data)
  );

  pong_display u_display (
    .pixel      (pixel),
    .line       (line),
    .left_y     (left_y),
    .right_y    (right_y),
    .ball_x     (ball_x),
    .ball_y     (ball_y),
    .lscore     (lscore),
    .rscore     (rscore),
    .rom_address(number_address),
    .rom_data   (number_data),
    .color      (next_color)
  );

  // Frame step at the end of the vertical sync pulse.
  always_ff @(posedge clk) begin
    if (reset) vsynch_d <= 1'b1;
    else       vsynch_d <= next_vsynch;
  end
  assign frame_tick = next_vsynch && !vsynch_d;

  pong_paddles u_paddles (
    .clk       (clk),
    .reset     (reset),
    .frame_tick(frame_tick),
    .left_dir  (left_dir),
    .right_dir (right_dir),
    .left_y    (left_y),
    .right_y   (right_y)
  );

  pong_ball #(.BALL_DELAY(BALL_DELAY)) u_ball (
    .clk       (clk),
    .reset     (reset),
    .frame_tick(frame_tick),
    .serve     (serve),
    .left_y    (left_y),
    .right_y   (right_y),
    .ball_x    (ball_x),
    .ball_y    (ball_y),
    .lscore    (lscore),
    .rscore    (rscore),
    .in_play   (),
    .ball_xdir (),
    .ball_ydir ()
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      hsynch <= 1'b1;
      vsynch <= 1'b1;
      color  <= COL_BLACK;
    end else begin
      hsynch <= next_hsynch;
      vsynch <= next_vsynch;
      color  <= (hblank || vblank) ? COL_BLACK : next_color;
    end
  end

endmodule
