// ps2_keyboard_model: behavioural PS/2 keyboard for simulation.
//
// Drives the PS/2 clock and data lines as a keyboard does: idle high, and for
// each byte an 11-bit frame (0 start bit, 8 data bits LSB first, odd parity,
// 1 stop bit), data changed while the clock is high and the clock then pulsed
// low, so the receiver samples on the falling edge. HALF_PERIOD sets half a PS/2
// clock period in simulation time units (a real keyboard runs at 10-30 kHz;
// tests use a faster clock to save time, still much slower than the system
// clock). `send_byte` sends one frame; `gap` keeps the lines idle between
// frames.
module ps2_keyboard_model #(
  parameter int HALF_PERIOD = 200
) (
  output logic ps2_clk,
  output logic ps2_data
);

  initial begin
    ps2_clk  = 1'b1;
    ps2_data = 1'b1;
  end

  task automatic send_byte(input logic [7:0] b);
    logic [10:0] frame;
    frame = {1'b1, ~^b, b, 1'b0};   // stop, odd parity, data, start (LSB first)
    for (int i = 0; i < 11; i++) begin
      ps2_data = frame[i];
      #(HALF_PERIOD);
      ps2_clk = 1'b0;
      #(HALF_PERIOD);
      ps2_clk = 1'b1;
    end
    #(HALF_PERIOD);
  endtask

  task automatic gap(input int periods);
    repeat (periods) #(2 * HALF_PERIOD);
  endtask

endmodule
