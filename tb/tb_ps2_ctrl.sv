// tb_ps2_ctrl: self-checking test of the PS/2 receiver.
//
// A keyboard model sends frames; the test plays the consumer's side of the
// handshake. Checked: every byte arrives unchanged exactly once; scan_ready
// stays high for two clocks after do_read drops (three in all with this
// registered consumer); trigger rises three clocks
// after the falling PS/2 clock edge of the stop bit; a frame that completes
// while do_read is low is held and delivered when do_read rises; trigger
// falls at the next frame's start bit.
`timescale 1ns/1ps
module tb_ps2_ctrl;
  logic       clk = 1'b0;
  logic       reset;
  logic       ps2_clk, ps2_data;
  logic       do_read;
  logic [7:0] scan_code;
  logic       scan_ready, trigger;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ps2_keyboard_model #(.HALF_PERIOD(200)) kbd (.ps2_clk(ps2_clk), .ps2_data(ps2_data));

  ps2_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Stop-bit falling edge -> trigger rise latency, in clk cycles.
  int  fall_count = 0;
  int  cycles_since_fall = 0;
  int  trig_latency = -1;
  logic ps2_clk_q = 1'b1, trigger_q = 1'b0;
  always @(posedge clk) begin
    cycles_since_fall <= cycles_since_fall + 1;
    if (ps2_clk_q && !ps2_clk) cycles_since_fall <= 1;
    if (trigger && !trigger_q) trig_latency <= cycles_since_fall;
    ps2_clk_q <= ps2_clk;
    trigger_q <= trigger;
  end

  // Count scan_ready pulses and their length.
  int ready_pulses = 0, ready_len = 0, last_len = 0;
  logic ready_q = 1'b0;
  always @(posedge clk) if (!reset) begin
    ready_q <= scan_ready;
    if (scan_ready) ready_len <= ready_len + 1;
    if (scan_ready && !ready_q) ready_pulses <= ready_pulses + 1;
    if (!scan_ready && ready_q) begin
      last_len  <= ready_len;
      ready_len <= 0;
    end
  end

  // Consumer: take the code on scan_ready, drop do_read, re-arm after trigger falls.
  logic [7:0] got[$];
  bit consumer_on = 1'b1;
  bit manual_read = 1'b0;     // do_read level while the test drives it by hand
  always @(posedge clk) begin
    if (reset) do_read <= 1'b1;
    else if (!consumer_on) do_read <= manual_read;
    else begin
      if (scan_ready && do_read) begin
        got.push_back(scan_code);
        do_read <= 1'b0;
      end else if (!do_read && !trigger && !scan_ready) do_read <= 1'b1;
    end
  end

  initial begin
    logic [7:0] sent[$];
    logic [7:0] b;
    reset = 1'b1;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(posedge clk);

    for (int n = 0; n < 20; n++) begin
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(b);
      kbd.send_byte(b);
      repeat (20) @(posedge clk);
      check(trig_latency == 3, $sformatf("trigger latency %0d, expected 3", trig_latency));
      check(trigger == 1'b1, "trigger high after the stop bit");
      check(got.size() == sent.size(), $sformatf("received %0d codes, sent %0d", got.size(), sent.size()));
      if (got.size() == sent.size())
        check(got[$] == b, $sformatf("code %02h, expected %02h", got[$], b));
      check(last_len == 3, $sformatf("scan_ready lasted %0d cycles, expected 3", last_len));
      kbd.gap(2);
    end
    check(ready_pulses == 20, $sformatf("%0d scan_ready pulses for 20 frames", ready_pulses));

    // A frame that completes while do_read is low is held until do_read rises.
    @(posedge clk);
    consumer_on = 1'b0;
    manual_read = 1'b0;
    kbd.send_byte(8'hA5);
    repeat (50) @(posedge clk);
    check(scan_ready == 1'b0 && got.size() == 20, "no delivery while do_read is low");
    check(trigger == 1'b1, "trigger holds the completed frame");
    manual_read = 1'b1;
    @(posedge clk);
    @(posedge clk);
    @(posedge clk);
    #1;
    check(scan_ready && scan_code == 8'hA5, "held frame delivered when do_read rises");
    manual_read = 1'b0;
    // trigger falls on the next frame's start bit
    fork
      kbd.send_byte(8'h3C);
      begin
        wait (ps2_clk == 1'b0);
        repeat (5) @(posedge clk);
        check(trigger == 1'b0, "trigger falls at the next start bit");
      end
    join
    repeat (10) @(posedge clk);
    check(trigger == 1'b1, "trigger high after the second frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
