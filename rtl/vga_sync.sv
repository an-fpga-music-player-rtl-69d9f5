// vga_sync -- horizontal and vertical scan counters for the 640 x 480 display.
//
// A horizontal counter runs 0..H_TOTAL-1 (800 pixels) and wraps at the end
// of each line; the vertical counter advances once per line and wraps after
// V_TOTAL-1 (525 lines). Both advance only when the pixel clock enable `ce`
// is high, so with ce toggling every other 50 MHz cycle they run at the
// 25 MHz pixel rate. Counter value 0 is the start of the sync pulse; each
// line then holds back porch, left border, active pixels, right border and
// front porch (96/40/8/640/8/8), each field sync, back porch, top border,
// active lines, bottom border and front porch (2/25/8/480/8/2).
//
// Outputs are decoded combinationally from the counters (zero latency):
// negative-going sync pulses (the usual 640 x 480 polarity, a choice of this
// design), `active` inside the 640 x 480 picture, and x/y, the pixel
// position inside the picture. end_of_line / end_of_field mark the last
// count of a line / field.
module vga_sync
  import music_player_pkg::*;
#(
  parameter int HSYNC  = H_SYNC,
  parameter int HBACK  = H_BACK,
  parameter int HLEFT  = H_LEFT,
  parameter int HACT   = H_ACTIVE,
  parameter int HRIGHT = H_RIGHT,
  parameter int HFRONT = H_FRONT,
  parameter int VSYNC  = V_SYNC,
  parameter int VBACK  = V_BACK,
  parameter int VTOP   = V_TOP,
  parameter int VACT   = V_ACTIVE,
  parameter int VBOT   = V_BOTTOM,
  parameter int VFRONT = V_FRONT
) (
  input  logic       clk,
  input  logic       rst,          // synchronous, active high
  input  logic       ce,           // pixel clock enable
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       active,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       end_of_line,
  output logic       end_of_field
);
  localparam int HTOTAL = HSYNC + HBACK + HLEFT + HACT + HRIGHT + HFRONT;
  localparam int VTOTAL = VSYNC + VBACK + VTOP + VACT + VBOT + VFRONT;
  localparam int HSTART = HSYNC + HBACK + HLEFT;   // first active pixel
  localparam int VSTART = VSYNC + VBACK + VTOP;    // first active line

  assign end_of_line  = (hcount == 10'(HTOTAL - 1));
  assign end_of_field = (vcount == 10'(VTOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (ce) begin
      if (end_of_line) begin
        hcount <= '0;
        vcount <= end_of_field ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 10'd1;
      end
    end
  end

  logic h_act, v_act;
  assign h_act   = (hcount >= 10'(HSTART)) && (hcount < 10'(HSTART + HACT));
  assign v_act   = (vcount >= 10'(VSTART)) && (vcount < 10'(VSTART + VACT));
  assign active  = h_act && v_act;
  assign hsync_n = !(hcount < 10'(HSYNC));
  assign vsync_n = !(vcount < 10'(VSYNC));
  assign x       = h_act ? hcount - 10'(HSTART) : '0;
  assign y       = v_act ? vcount - 10'(VSTART) : '0;

endmodule
