// tb_pong_paddles: self-checking test of the paddle position logic.
//
// Pulses frame_tick with random direction requests for both paddles and checks
// each position against a clamped counter kept here: +1 for down, -1 for up,
// limits 9 and 50, reset at 9. Also checked: nothing moves without a
// frame_tick, and both limits are reached.
`timescale 1ns/1ps
module tb_pong_paddles;
  import pong_pkg::*;
  logic       clk = 1'b0;
  logic       reset, frame_tick;
  dir_e       left_dir, right_dir;
  logic [5:0] left_y, right_y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pong_paddles dut (.*);

  function automatic int move(int y, dir_e d);
    int n = y + (d == DIR_DOWN ? 1 : d == DIR_UP ? -1 : 0);
    return n < 9 ? 9 : n > 50 ? 50 : n;
  endfunction

  initial begin
    int ml, mr, hit_top, hit_bottom;
    hit_top = 0; hit_bottom = 0;
    reset = 1; frame_tick = 0; left_dir = DIR_STOP; right_dir = DIR_STOP;
    repeat (3) @(posedge clk); #1;
    reset = 0;
    ml = 9; mr = 9;
    checks++;
    if (left_y != 9 || right_y != 9) begin failures++; $display("FAIL: reset position"); end
    for (int i = 0; i < 600; i++) begin
      // long runs in one direction so both clamps are exercised
      if (i % 60 == 0) left_dir  = dir_e'($urandom_range(2));
      if (i % 45 == 0) right_dir = dir_e'($urandom_range(2));
      if (i < 60) left_dir = DIR_UP;
      if (i >= 60 && i < 120) left_dir = DIR_DOWN;
      frame_tick = (i % 3 != 2);
      @(posedge clk); #1;
      if (frame_tick) begin
        ml = move(ml, left_dir);
        mr = move(mr, right_dir);
      end
      if (ml == 9 && left_dir == DIR_UP) hit_top++;
      if (ml == 50 && left_dir == DIR_DOWN) hit_bottom++;
      checks++;
      if (32'(left_y) != ml || 32'(right_y) != mr) begin
        failures++;
        $display("FAIL: step %0d left %0d right %0d, expected %0d %0d", i, left_y, right_y, ml, mr);
      end
    end
    checks++;
    if (hit_top == 0 || hit_bottom == 0) begin failures++; $display("FAIL: clamps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
