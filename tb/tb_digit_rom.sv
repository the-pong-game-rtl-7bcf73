// tb_digit_rom: self-checking test of the score-digit ROM.
//
// Reads all 128 addresses and compares them with glyphs drawn here as text,
// one string of four characters per row ('#' lit, '.' dark). Addresses past
// the ten digits must read 0.
`timescale 1ns/1ps
module tb_digit_rom;
  logic [6:0] address;
  logic [3:0] data;
  int checks = 0, failures = 0;

  digit_rom dut (.*);

  // Glyph rows 1..7 of each digit; row 0 is blank for every digit.
  string art [10][7] = '{
    '{"####", "#..#", "#..#", "#..#", "#..#", "#..#", "####"},   // 0
    '{"...#", "...#", "...#", "...#", "...#", "...#", "...#"},   // 1
    '{"####", "...#", "...#", "####", "#...", "#...", "####"},   // 2
    '{"####", "...#", "...#", "####", "...#", "...#", "####"},   // 3
    '{"#..#", "#..#", "#..#", "####", "...#", "...#", "...#"},   // 4
    '{"####", "#...", "#...", "####", "...#", "...#", "####"},   // 5
    '{"####", "#...", "#...", "####", "#..#", "#..#", "####"},   // 6
    '{"####", "...#", "...#", "...#", "...#", "...#", "...#"},   // 7
    '{"####", "#..#", "#..#", "####", "#..#", "#..#", "####"},   // 8
    '{"####", "#..#", "#..#", "####", "...#", "...#", "...#"}    // 9
  };

  function automatic logic [3:0] expected(int a);
    logic [3:0] v;
    int d = a / 8, r = a % 8;
    if (d > 9 || r == 0) return 4'h0;
    for (int c = 0; c < 4; c++) v[3 - c] = (art[d][r - 1][c] == "#");
    return v;
  endfunction

  initial begin
    for (int a = 0; a < 128; a++) begin
      address = 7'(a);
      #1;
      checks++;
      if (data !== expected(a)) begin
        failures++;
        $display("FAIL: address %0d read %b, expected %b", a, data, expected(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
