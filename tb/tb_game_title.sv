// tb_game_title: self-checking test of the seven-segment title display.
//
// With a 4-bit scan counter each digit is lit for 4 clocks. Checked every
// clock: exactly one anode is low, the digits go an[0], an[1], an[2], an[3]
// in turn, each for 4 clocks, and the segment lines (active low,
// {a,b,c,d,e,f,g,dp}) carry "P", "o", "n", "G" on an[3] .. an[0].
`timescale 1ns/1ps
module tb_game_title;
  logic       clk = 1'b0;
  logic [7:0] seven_seg;
  logic [3:0] an;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  game_title #(.SCAN_BITS(4)) dut (.*);

  // segments a..g lit for each letter, leftmost digit first
  //                         abcdefg
  localparam logic [6:0] P = 7'b1100111;
  localparam logic [6:0] O = 7'b0011101;
  localparam logic [6:0] N = 7'b0010101;
  localparam logic [6:0] G = 7'b1011110;

  initial begin
    logic [6:0] want [4];
    int run, prev_digit, digit;
    want[3] = P; want[2] = O; want[1] = N; want[0] = G;
    run = 0; prev_digit = -1;
    // align to a digit change
    @(negedge clk);
    while (an == 4'b1110) @(negedge clk);
    while (an != 4'b1110) @(negedge clk);
    prev_digit = 0;
    for (int i = 0; i < 96; i++) begin
      checks++;
      digit = -1;
      for (int d = 0; d < 4; d++) if (an == ~(4'b1 << d)) digit = d;
      if (digit < 0) begin
        failures++;
        $display("FAIL: anodes %b not one-hot low", an);
      end else begin
        if (seven_seg != ~{want[digit], 1'b0}) begin
          failures++;
          $display("FAIL: digit %0d segments %b", digit, seven_seg);
        end
        if (digit != prev_digit) begin
          checks++;
          if (run != 4 || digit != (prev_digit + 1) % 4) begin
            failures++;
            $display("FAIL: digit %0d after %0d clocks on digit %0d", digit, run, prev_digit);
          end
          run = 0;
        end
        prev_digit = digit;
        run++;
      end
      @(negedge clk);
    end
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
