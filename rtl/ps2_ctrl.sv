// ps2_ctrl: PS/2 keyboard receiver.
//
// A PS/2 keyboard sends 11-bit frames: a 0 start bit, eight data bits LSB
// first, an odd parity bit and a 1 stop bit, each valid on the falling edge of
// the keyboard-driven PS/2 clock (roughly 10-30 kHz). This block samples both
// PS/2 lines with a two-flop synchroniser, detects falling edges of the PS/2
// clock and steps a four-state receiver (start, data, parity, stop) on each of
// them. The data bits are shifted into an 8-bit register preloaded with
// 1000_0000: the marker 1 walks down as bits arrive and reaching bit 0 tells the
// receiver that the eighth bit is next, so no separate bit counter is needed.
// Parity and stop bits are received but not checked, as in the original design.
//
// Handshake: after the stop bit `trigger` goes high and stays high until the
// next falling PS/2 clock edge (the start bit of the next frame). While
// `trigger` and `do_read` are both high the shift register is copied to
// `scan_code` and `scan_ready` is set; once that stops, `scan_ready` drops two
// clock cycles later. A consumer raises `do_read`, waits for `scan_ready`,
// drops `do_read` and raises it again only after `trigger` has fallen, so each
// frame is delivered exactly once.
//
// Timing: `trigger` rises 3 clk cycles after the falling PS/2 clock edge of the
// stop bit (two synchroniser flops, one edge-detect/state register);
// `scan_code`/`scan_ready` follow one cycle after `trigger && do_read`.
//
// The state machine, the marker-bit shift register, the trigger/do_read
// handshake and the two-cycle scan_ready hold follow the original design. The
// original clocks the receiver directly on the PS/2 clock; here everything runs
// on the system clock with a synchronous reset, which is this design's choice.
module ps2_ctrl (
  input  logic       clk,
  input  logic       reset,       // synchronous, active high
  input  logic       ps2_clk,
  input  logic       ps2_data,
  input  logic       do_read,
  output logic [7:0] scan_code,
  output logic       scan_ready,
  output logic       trigger
);

  typedef enum logic [1:0] {START_BIT, DATA_BITS, PARITY_BIT, STOP_BIT} rx_state_e;

  logic [2:0] clk_sync;           // [0] first flop, [2] previous synchronised value
  logic [1:0] data_sync;
  logic       ps2_fall;
  rx_state_e  rx_state;
  logic [7:0] s_reg;
  logic [1:0] clear_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      clk_sync  <= '1;
      data_sync <= '1;
    end else begin
      clk_sync  <= {clk_sync[1:0], ps2_clk};
      data_sync <= {data_sync[0], ps2_data};
    end
  end

  assign ps2_fall = clk_sync[2] & ~clk_sync[1];

  // Frame receiver, stepped on falling PS/2 clock edges.
  always_ff @(posedge clk) begin
    if (reset) begin
      rx_state <= START_BIT;
      s_reg    <= 8'b1000_0000;
      trigger  <= 1'b0;
    end else if (ps2_fall) begin
      trigger <= 1'b0;
      unique case (rx_state)
        START_BIT: begin
          if (!data_sync[1]) begin
            s_reg    <= 8'b1000_0000;
            rx_state <= DATA_BITS;
          end
        end
        DATA_BITS: begin
          if (s_reg[0]) rx_state <= PARITY_BIT;   // marker reached bit 0: this is data bit 7
          s_reg <= {data_sync[1], s_reg[7:1]};
        end
        PARITY_BIT: rx_state <= STOP_BIT;
        STOP_BIT: begin
          trigger  <= 1'b1;
          rx_state <= START_BIT;
        end
      endcase
    end
  end

  // Hand-over to the system side.
  always_ff @(posedge clk) begin
    if (reset) begin
      scan_code  <= '0;
      scan_ready <= 1'b0;
      clear_cnt  <= '0;
    end else if (trigger && do_read) begin
      scan_code  <= s_reg;
      scan_ready <= 1'b1;
      clear_cnt  <= '0;
    end else if (clear_cnt + 2'd1 >= 2'd2) begin
      clear_cnt  <= '0;
      scan_ready <= 1'b0;
    end else begin
      clear_cnt  <= clear_cnt + 2'd1;
    end
  end

endmodule
