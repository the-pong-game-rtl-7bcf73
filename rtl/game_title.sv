// game_title: shows the game's title on the board's four-digit display.
//
// The board has a common-anode four-digit seven-segment display whose digits
// share the segment lines, so the digits are lit one after the other, fast
// enough for the eye to see all four. A free-running counter's top two bits
// pick the digit: an[3] is the leftmost, an[0] the rightmost, both anodes and
// segments are active low. seven_seg = {a, b, c, d, e, f, g, dp}.
// With SCAN_BITS = 17 and a 25 MHz clock each digit is lit for 1.3 ms and the
// whole display is refreshed at 191 Hz. The counter has no reset: its
// declaration gives it a power-up value of zero, which an FPGA loads at
// configuration, and from any other start it scans just the same.
//
// The module's name, its clock input and its two outputs (seven_seg[7:0],
// an[3:0]) are those of the original board design; what it shows (the word
// "PonG", given by TITLE, one active-high {a..g, dp} byte per digit, leftmost
// first), the segment order on the bus and the scan rate are this design's
// choices.
module game_title #(
  parameter int unsigned SCAN_BITS = 17,
  parameter logic [31:0] TITLE     = {8'b1100_1110,    // P
                                      8'b0011_1010,    // o
                                      8'b0010_1010,    // n
                                      8'b1011_1100}    // G
) (
  input  logic       clk,
  output logic [7:0] seven_seg,
  output logic [3:0] an
);

  logic [SCAN_BITS-1:0] scan = '0;   // power-up value; the counter has no reset
  logic [1:0]           digit;

  always_ff @(posedge clk) scan <= scan + 1'b1;

  assign digit = scan[SCAN_BITS-1 -: 2];

  always_comb begin
    an            = 4'b1111;
    an[digit]     = 1'b0;
    seven_seg     = ~TITLE[8 * digit +: 8];
  end

endmodule
