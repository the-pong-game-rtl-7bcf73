// read_ps2: keyboard decoder for the two Pong players.
//
// Wraps the PS/2 receiver (ps2_ctrl) and turns the keyboard's make and break
// codes into paddle direction requests and a serve request:
//   W / S                -> left_dir  = up / down
//   arrow up / arrow down -> right_dir = up / down
//   space                -> serve
// A key press sets its direction; a key release (F0 prefix, then the key's
// code) clears the direction only if it is still the one that key set, so
// pressing the other key of the pair takes over without being cancelled by the
// first key's release. Any F0 also clears `serve`, and the release of the space
// bar clears it as well. The E0 prefix of the arrow keys is ignored on a press;
// inside a release sequence it keeps the decoder waiting for the key code.
//
// Handshake with ps2_ctrl: the decoder holds `do_read` high while idle. When
// `scan_ready` arrives it decodes `scan_code`, drops `do_read` and waits
// (state PRESSED) until the receiver's `trigger` falls, i.e. until the next
// frame has started, then raises `do_read` again. Each frame is decoded once.
// The decoded outputs change one clk cycle after `scan_ready` rises.
//
// Reset: no paddle moves and `serve` is high, so the ball is in play at once.
// The key map, the stop-key (F0) handling, the reset values and the handshake
// follow the original design; the enum encodings and the synchronous reset are
// this design's choices.
module read_ps2
  import pong_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] ps2_code,
  output dir_e       left_dir,
  output dir_e       right_dir,
  output logic       serve
);

  typedef enum logic {NOT_PRESSED, PRESSED} key_state_e;

  logic       do_read;
  logic       data_ready;
  logic       trigger;
  logic       stopkey;     // an F0 (release) prefix has been seen
  key_state_e key_state;

  ps2_ctrl u_ps2_ctrl (
    .clk       (clk),
    .reset     (reset),
    .ps2_clk   (ps2_clk),
    .ps2_data  (ps2_data),
    .do_read   (do_read),
    .scan_code (ps2_code),
    .scan_ready(data_ready),
    .trigger   (trigger)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      right_dir <= DIR_STOP;
      left_dir  <= DIR_STOP;
      serve     <= 1'b1;
      do_read   <= 1'b1;
      stopkey   <= 1'b0;
      key_state <= NOT_PRESSED;
    end else if (data_ready || !do_read) begin
      unique case (key_state)
        NOT_PRESSED: begin
          if (!stopkey) begin
            // a make code, or a prefix
            unique case (ps2_code)
              SC_UP:    right_dir <= DIR_UP;
              SC_DOWN:  right_dir <= DIR_DOWN;
              SC_W:     left_dir  <= DIR_UP;
              SC_S:     left_dir  <= DIR_DOWN;
              SC_SPACE: serve     <= 1'b1;
              SC_BREAK: begin
                stopkey <= 1'b1;
                serve   <= 1'b0;
              end
              default: ;
            endcase
          end else begin
            // the code after F0 names the key that was released
            stopkey <= 1'b0;
            unique case (ps2_code)
              SC_UP:     if (right_dir == DIR_UP)   right_dir <= DIR_STOP;
              SC_DOWN:   if (right_dir == DIR_DOWN) right_dir <= DIR_STOP;
              SC_W:      if (left_dir  == DIR_UP)   left_dir  <= DIR_STOP;
              SC_S:      if (left_dir  == DIR_DOWN) left_dir  <= DIR_STOP;
              SC_EXTEND: stopkey <= 1'b1;
              SC_SPACE:  serve   <= 1'b0;
              default: ;
            endcase
          end
          do_read   <= 1'b0;
          key_state <= PRESSED;
        end
        PRESSED: begin
          if (!trigger) begin
            do_read   <= 1'b1;
            key_state <= NOT_PRESSED;
          end
        end
      endcase
    end
  end

endmodule
