// tb_vga_int: self-checking test of the VGA output stage.
//
// Drives random colour codes and sync levels every clock and checks, one
// clock later, the RGB bits (00 black, 01 red, 10 magenta, 11 cyan) and the
// registered syncs.
`timescale 1ns/1ps
module tb_vga_int;
  import pong_pkg::*;
  logic   clk = 1'b0;
  color_e color;
  logic   vsynch_in, hsynch_in;
  logic   red, green, blue, vsynch_out, hsynch_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_int dut (.*);

  function automatic logic [2:0] rgb_of(logic [1:0] c);
    case (c)
      2'b01:   return 3'b100;   // red
      2'b10:   return 3'b101;   // magenta
      2'b11:   return 3'b011;   // cyan
      default: return 3'b000;
    endcase
  endfunction

  initial begin
    logic [1:0] c_prev;
    logic       v_prev, h_prev;
    int seen [4] = '{0, 0, 0, 0};
    color = COL_BLACK; vsynch_in = 1; hsynch_in = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 400; i++) begin
      c_prev = 2'($urandom); v_prev = 1'($urandom); h_prev = 1'($urandom);
      color = color_e'(c_prev); vsynch_in = v_prev; hsynch_in = h_prev;
      seen[c_prev]++;
      @(posedge clk); #1;
      color = color_e'(2'($urandom));     // next input must not leak through
      checks++;
      if ({red, green, blue} != rgb_of(c_prev) || vsynch_out != v_prev || hsynch_out != h_prev) begin
        failures++;
        $display("FAIL: colour %b -> rgb %b%b%b syncs %b%b", c_prev, red, green, blue, vsynch_out, hsynch_out);
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) failures++;
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
