// digit_rom: character generator for the score digits 0-9.
//
// An 80-word x 4-bit read-only memory, read combinationally. Each digit owns
// eight consecutive words, one per glyph row: address = {digit[3:0], row[2:0]}.
// A glyph is four pixels wide; bit 3 of a word is its leftmost pixel. Row 0 of
// every glyph is blank and rows 1-7 draw the digit in a seven-segment style
// (a 4 x 7 box, top/middle/bottom bars and the sides). Addresses 80-127 read 0.
//
// Each digit's glyph is stored as one 32-bit constant, row 0 in the top
// nibble. The glyph shapes and the 80 x 4 organisation are the original
// design's; packing them per digit is this design's choice.
module digit_rom (
  input  logic [6:0] address,
  output logic [3:0] data
);

  localparam logic [31:0] GLYPH [10] = '{
    32'h0F99_999F,   // 0
    32'h0111_1111,   // 1
    32'h0F11_F88F,   // 2
    32'h0F11_F11F,   // 3
    32'h0999_F111,   // 4
    32'h0F88_F11F,   // 5
    32'h0F88_F99F,   // 6
    32'h0F11_1111,   // 7
    32'h0F99_F99F,   // 8
    32'h0F99_F111    // 9
  };

  logic [3:0] digit;
  logic [2:0] row;

  assign digit = address[6:3];
  assign row   = address[2:0];

  always_comb begin
    if (digit <= 4'd9) data = GLYPH[digit][(7 - row) * 4 +: 4];
    else               data = 4'h0;
  end

endmodule
