// vga_core: VGA timing generator for a 640 x 480 picture.
//
// Two state machines, each with a segment counter, walk through the parts of
// a scan line and of a frame:
//   horizontal (one step per clk = one pixel):
//     LEFT_BORDER 5, ACTIVE_VIDEO 640, RIGHT_BORDER 7, FRONT_PORCH 9,
//     SYNCH 96, BACK_PORCH 48                       -> 805 clocks per line
//   vertical (one step per line):
//     TOP_BORDER 5, ACTIVE_VIDEO 480, BOTTOM_BORDER 6, FRONT_PORCH 2,
//     SYNCH 2, BACK_PORCH 24                        -> 519 lines per frame
// The vertical machine advances on the last clock of the horizontal front
// porch, so a new line begins as the horizontal sync pulse starts. Both sync
// outputs are active low. At a 25 MHz pixel clock a line lasts 32.2 us and a
// frame 16.7 ms (59.9 Hz), within what VGA monitors lock to.
//
// Outputs, all decoded from the state registers and valid in the same cycle:
//   hsynch, vsynch  sync pulses (low during SYNCH)
//   hblank          high outside the 640 active pixels of a line
//   vblank          high outside the 480 active lines of a frame
//   pixel           active pixel number / 8 (0..79), 0 outside active video
//   line            active line number  / 8 (0..59), 0 outside active video
// so the game sees an 80 x 60 grid of 8 x 8-pixel cells.
//
// The segment lengths are the original design's: its counters compare with
// 4, 639, 6, 8, 95, 47 (horizontal) and 4, 479, 5, 1, 1, 23 (vertical) and its
// comments count each segment as that number plus one. They differ from the
// 800 x 521 timing of the standard table (16/96/48 pixels, 10/2/29 lines); the
// original's borders-plus-porches are kept here, and every length is a
// parameter. The original clocks its vertical counter on a derived line
// clock; here it is a line-rate enable on the single clock, and `vblank` is
// this design's addition so the colour can be blanked during vertical retrace.
module vga_core #(
  parameter int unsigned H_LEFT   = 5,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_RIGHT  = 7,
  parameter int unsigned H_FRONT  = 9,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_TOP    = 5,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_BOTTOM = 6,
  parameter int unsigned V_FRONT  = 2,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 24
) (
  input  logic       clk,
  input  logic       reset,      // synchronous, active high
  output logic       hsynch,
  output logic       vsynch,
  output logic       hblank,
  output logic       vblank,
  output logic [5:0] line,
  output logic [6:0] pixel,
  output logic       line_tick   // one clk pulse as the vertical machine advances
);

  typedef enum logic [2:0] {
    SEG_TOP_LEFT, SEG_ACTIVE, SEG_BOTTOM_RIGHT, SEG_FRONT, SEG_SYNCH, SEG_BACK
  } seg_e;

  seg_e       hstate, vstate;
  logic [9:0] hcount, vcount;
  logic       h_last, v_last;

  function automatic seg_e next_seg(seg_e s);
    unique case (s)
      SEG_TOP_LEFT:     return SEG_ACTIVE;
      SEG_ACTIVE:       return SEG_BOTTOM_RIGHT;
      SEG_BOTTOM_RIGHT: return SEG_FRONT;
      SEG_FRONT:        return SEG_SYNCH;
      SEG_SYNCH:        return SEG_BACK;
      default:          return SEG_TOP_LEFT;
    endcase
  endfunction

  function automatic int unsigned h_len(seg_e s);
    unique case (s)
      SEG_TOP_LEFT:     return H_LEFT;
      SEG_ACTIVE:       return H_ACTIVE;
      SEG_BOTTOM_RIGHT: return H_RIGHT;
      SEG_FRONT:        return H_FRONT;
      SEG_SYNCH:        return H_SYNC;
      default:          return H_BACK;
    endcase
  endfunction

  function automatic int unsigned v_len(seg_e s);
    unique case (s)
      SEG_TOP_LEFT:     return V_TOP;
      SEG_ACTIVE:       return V_ACTIVE;
      SEG_BOTTOM_RIGHT: return V_BOTTOM;
      SEG_FRONT:        return V_FRONT;
      SEG_SYNCH:        return V_SYNC;
      default:          return V_BACK;
    endcase
  endfunction

  assign h_last    = (32'(hcount) == h_len(hstate) - 1);
  assign v_last    = (32'(vcount) == v_len(vstate) - 1);
  assign line_tick = h_last && (hstate == SEG_FRONT);

  always_ff @(posedge clk) begin
    if (reset) begin
      hstate <= SEG_TOP_LEFT;
      hcount <= '0;
    end else if (h_last) begin
      hstate <= next_seg(hstate);
      hcount <= '0;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      vstate <= SEG_TOP_LEFT;
      vcount <= '0;
    end else if (line_tick) begin
      if (v_last) begin
        vstate <= next_seg(vstate);
        vcount <= '0;
      end else begin
        vcount <= vcount + 10'd1;
      end
    end
  end

  always_comb begin
    hsynch = (hstate != SEG_SYNCH);
    vsynch = (vstate != SEG_SYNCH);
    hblank = (hstate != SEG_ACTIVE);
    vblank = (vstate != SEG_ACTIVE);
    pixel  = hblank ? 7'd0 : hcount[9:3];
    line   = vblank ? 6'd0 : vcount[8:3];
  end

endmodule
