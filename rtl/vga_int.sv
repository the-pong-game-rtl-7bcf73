// vga_int: VGA output stage.
//
// Registers the horizontal and vertical sync signals and translates the game
// controller's 2-bit colour code into one bit each of red, green and blue:
//   00 black, 01 red, 10 magenta (red + blue), 11 cyan (green + blue).
// Both paths have one register, so sync and colour leave the FPGA aligned
// with each other, one clk cycle after they enter. The board's resistor DAC
// turns the three bits into analog levels.
//
// The colour table and the single register stage follow the original design.
module vga_int
  import pong_pkg::*;
(
  input  logic   clk,
  input  color_e color,
  input  logic   vsynch_in,
  input  logic   hsynch_in,
  output logic   red,
  output logic   green,
  output logic   blue,
  output logic   vsynch_out,
  output logic   hsynch_out
);

  rgb_t rgb;

  always_ff @(posedge clk) begin
    vsynch_out <= vsynch_in;
    hsynch_out <= hsynch_in;
    unique case (color)
      COL_RED:     rgb <= '{red: 1'b1, green: 1'b0, blue: 1'b0};
      COL_MAGENTA: rgb <= '{red: 1'b1, green: 1'b0, blue: 1'b1};
      COL_CYAN:    rgb <= '{red: 1'b0, green: 1'b1, blue: 1'b1};
      default:     rgb <= '{red: 1'b0, green: 1'b0, blue: 1'b0};
    endcase
  end

  assign red   = rgb.red;
  assign green = rgb.green;
  assign blue  = rgb.blue;

endmodule
