// tb_vga_core: self-checking test of the VGA timing generator at its default
// 640 x 480 timing.
//
// Runs three frames and measures, independently of the design's counters:
// line period 805 clocks, horizontal sync pulse 96 clocks, 640 active pixels
// per line, 48 clocks from the end of sync to the left border and 5 more to the
// first active pixel; frame period 519 lines, vertical sync 2 lines, 480
// active lines; the vertical sync edges fall on the start of a horizontal
// sync pulse; 8 lines (bottom border and front porch) lie between the last
// active line and vsync and 29 lines (back porch and top border) between vsync
// and the first active line. Inside the active area pixel and line must equal the pixel and
// line number divided by 8; pixel reads 0 outside the active part of a line
// and line reads 0 outside the active lines of a frame.
`timescale 1ns/1ps
module tb_vga_core;
  logic       clk = 1'b0;
  logic       reset;
  logic       hsynch, vsynch, hblank, vblank, line_tick;
  logic [5:0] line;
  logic [6:0] pixel;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  vga_core dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Running measurements.
  longint cyc = 0;
  longint vb_rise = -1;
  longint hs_fall = -1, hs_rise = -1, vs_fall = -1, vs_rise = -1, act_start = -1;
  int     active_len = 0, act_lines = 0, line_no = -1;
  int     hs_falls = 0, vs_falls = 0;
  logic   hs_q = 1, vs_q = 1, hb_q = 1, vb_q = 1;
  bit     coord_bad = 0;

  always @(posedge clk) if (!reset) begin
    cyc <= cyc + 1;
    // horizontal
    if (hs_q && !hsynch) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 805, $sformatf("line period %0d", cyc - hs_fall));
      hs_fall <= cyc;
      hs_falls <= hs_falls + 1;
      check(line_tick == 0, "line_tick before sync");
    end
    if (!hs_q && hsynch) begin
      check(cyc - hs_fall == 96, $sformatf("hsync width %0d", cyc - hs_fall));
      hs_rise <= cyc;
    end
    if (hb_q && !hblank) begin
      if (hs_rise >= 0) check(cyc - hs_rise == 48 + 5, $sformatf("sync end to active %0d", cyc - hs_rise));
      act_start <= cyc;
      if (!vblank) begin
        act_lines <= act_lines + 1;
        line_no   <= line_no + 1;
      end
    end
    if (!hb_q && hblank) check(cyc - act_start == 640, $sformatf("active pixels %0d", cyc - act_start));
    // vertical
    if (vs_q && !vsynch) begin
      check(hs_q && !hsynch, "vsync falls with the start of hsync");
      if (vs_fall >= 0) check(cyc - vs_fall == 805 * 519, $sformatf("frame period %0d", cyc - vs_fall));
      vs_fall <= cyc;
      vs_falls <= vs_falls + 1;
    end
    if (!vs_q && vsynch) begin
      check(cyc - vs_fall == 2 * 805, $sformatf("vsync width %0d", cyc - vs_fall));
      vs_rise <= cyc;
    end
    if (vs_q && !vsynch && vb_rise >= 0)
      check(cyc - vb_rise == (6 + 2) * 805, $sformatf("end of active to vsync %0d", cyc - vb_rise));
    if (!vblank && vb_q && vs_rise >= 0)
      check(cyc - vs_rise == (24 + 5) * 805, $sformatf("vsync end to active %0d", cyc - vs_rise));
    if (vblank && !vb_q) vb_rise <= cyc;
    if (!vb_q && vblank) begin
      check(act_lines == 480, $sformatf("active lines %0d", act_lines));
      act_lines <= 0;
      line_no   <= -1;
    end
    // coordinates
    if (!hblank && !vblank) begin
      int px, ln;
      px = hb_q ? 0 : int'(cyc - act_start);     // first active clock: counters not yet updated
      ln = hb_q ? line_no + 1 : line_no;
      if (32'(pixel) != px / 8 || 32'(line) != ln / 8) begin
        if (!coord_bad) $display("INFO first coordinate mismatch: pixel %0d line %0d expected %0d %0d", pixel, line, px / 8, ln / 8);
        coord_bad = 1;
      end
    end else if ((hblank && pixel != 0) || (vblank && line != 0)) coord_bad = 1;
    hs_q <= hsynch; vs_q <= vsynch; hb_q <= hblank; vb_q <= vblank;
  end

  // line_tick coincides with the last clock before hsync falls
  always @(posedge clk) if (!reset && line_tick) begin
    #0.5;
    check(hsynch == 1'b0, "line_tick is followed by hsync low");
  end

  initial begin
    reset = 1'b1;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    wait (vs_falls == 4);
    check(!coord_bad, "pixel/line coordinates");
    check(hs_falls > 3 * 519, $sformatf("%0d lines seen", hs_falls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * 805 * 519) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
