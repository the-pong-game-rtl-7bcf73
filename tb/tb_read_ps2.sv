// tb_read_ps2: self-checking test of the keyboard decoder.
//
// A keyboard model types press and release sequences of W, S, the arrow keys
// (with their E0 prefix) and the space bar, plus an unrelated key. After each
// byte the decoder's outputs are compared with a reference model of the key
// map kept in this file: a press sets a direction, a release clears it only if
// that key had set it, any F0 clears serve, space sets serve. Also checked:
// reset values, ps2_code showing the last byte, and that the outputs update
// exactly one clock after the receiver's scan_ready.
`timescale 1ns/1ps
module tb_read_ps2;
  import pong_pkg::*;
  logic       clk = 1'b0;
  logic       reset;
  logic       ps2_clk, ps2_data;
  logic [7:0] ps2_code;
  dir_e       left_dir, right_dir;
  logic       serve;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ps2_keyboard_model #(.HALF_PERIOD(150)) kbd (.ps2_clk(ps2_clk), .ps2_data(ps2_data));
  read_ps2 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference model of the decoder.
  logic [1:0] m_left, m_right;
  logic       m_serve, m_stop;
  task automatic model(input logic [7:0] c);
    if (!m_stop) begin
      if (c == 8'h75) m_right = 2'b01;
      if (c == 8'h72) m_right = 2'b10;
      if (c == 8'h1D) m_left  = 2'b01;
      if (c == 8'h1B) m_left  = 2'b10;
      if (c == 8'h29) m_serve = 1'b1;
      if (c == 8'hF0) begin m_stop = 1'b1; m_serve = 1'b0; end
    end else begin
      m_stop = 1'b0;
      if (c == 8'h75 && m_right == 2'b01) m_right = 2'b00;
      if (c == 8'h72 && m_right == 2'b10) m_right = 2'b00;
      if (c == 8'h1D && m_left  == 2'b01) m_left  = 2'b00;
      if (c == 8'h1B && m_left  == 2'b10) m_left  = 2'b00;
      if (c == 8'hE0) m_stop = 1'b1;
      if (c == 8'h29) m_serve = 1'b0;
    end
  endtask

  // Count deliveries from the receiver.
  int   ready_edges = 0;
  logic ready_q = 1'b0;
  always @(posedge clk) begin
    ready_q <= dut.data_ready;
    if (dut.data_ready && !ready_q) ready_edges <= ready_edges + 1;
  end

  int n_bytes = 0;
  task automatic type_byte(input logic [7:0] c);
    logic [4:0] prev_out;
    prev_out = {left_dir, right_dir, serve};
    fork
      kbd.send_byte(c);
      begin
        // outputs change only at the clock right after scan_ready rises
        @(posedge dut.data_ready);
        check({left_dir, right_dir, serve} == prev_out, "outputs unchanged when scan_ready rises");
        @(posedge clk); #1;
        model(c);
        check(left_dir == dir_e'(m_left) && right_dir == dir_e'(m_right) && serve == m_serve,
              "outputs updated one clock after scan_ready");
      end
    join
    n_bytes++;
    repeat (10) @(posedge clk);
    check(ps2_code == c, $sformatf("ps2_code %02h, expected %02h", ps2_code, c));
    check(left_dir == dir_e'(m_left) && right_dir == dir_e'(m_right) && serve == m_serve,
          $sformatf("after %02h: left %b right %b serve %b, expected %b %b %b",
                    c, left_dir, right_dir, serve, m_left, m_right, m_serve));
    kbd.gap(2);
  endtask

  initial begin
    reset = 1'b1;
    m_left = 2'b00; m_right = 2'b00; m_serve = 1'b1; m_stop = 1'b0;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    repeat (3) @(posedge clk);
    check(left_dir == DIR_STOP && right_dir == DIR_STOP && serve == 1'b1, "reset values");

    // W press / release
    type_byte(8'h1D);  check(left_dir == DIR_UP, "W moves the left paddle up");
    type_byte(8'hF0); type_byte(8'h1D);
    check(left_dir == DIR_STOP && serve == 1'b0, "W released");
    // S press, W press, S release keeps W, W release stops
    type_byte(8'h1B);  check(left_dir == DIR_DOWN, "S moves the left paddle down");
    type_byte(8'h1D);
    type_byte(8'hF0); type_byte(8'h1B);
    check(left_dir == DIR_UP, "releasing S keeps W's direction");
    type_byte(8'hF0); type_byte(8'h1D);
    // arrow up / down with the E0 prefix
    type_byte(8'hE0); type_byte(8'h75);  check(right_dir == DIR_UP, "arrow up");
    type_byte(8'hE0); type_byte(8'hF0); type_byte(8'h75);  check(right_dir == DIR_STOP, "arrow up released");
    type_byte(8'hE0); type_byte(8'h72);  check(right_dir == DIR_DOWN, "arrow down");
    type_byte(8'hE0); type_byte(8'hF0); type_byte(8'h72);
    // space
    type_byte(8'h29);  check(serve == 1'b1, "space serves");
    type_byte(8'hF0); type_byte(8'h29);  check(serve == 1'b0, "space released");
    // unrelated key changes nothing
    type_byte(8'h1C); type_byte(8'hF0); type_byte(8'h1C);
    // random mix of relevant codes
    for (int i = 0; i < 40; i++) begin
      logic [7:0] pick[8] = '{8'h1D, 8'h1B, 8'h75, 8'h72, 8'h29, 8'hF0, 8'hE0, 8'h5A};
      type_byte(pick[$urandom_range(7)]);
    end
    check(ready_edges == n_bytes, $sformatf("%0d codes delivered for %0d bytes", ready_edges, n_bytes));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
