// vga_text_render -- tile-mapped text overlay for the player's status screen.
//
// The 640 x 480 picture is divided into 80 x 60 character cells of 8 x 8
// pixels. Four text lines are shown, each a fixed label followed by a field
// taken from the character registers:
//
//   cell row 5   "TITLE:"  + 12 title characters   (registers 16..27)
//   cell row 9   "TIME:"   + 6 digits              (registers 0..5)
//   cell row 13  "SRATE:"  + 6 digits              (registers 7..12)
//   cell row 17  "VOLUME:" + 3 digits              (registers 13..15)
//
// Labels start in cell column 2 and fields in cell column 10. For every
// pixel the cell's character code is looked up, font_rom returns the glyph
// row, and the pixel bit selects white (all colour bits high) or black.
//
// Timing: one pixel of latency. The colour, the syncs and blank_n are all
// registered on the same pixel clock enable, so they stay aligned.
// The lines shown, the 8 x 8 tiles and the white-on-black colours follow the
// reference display; the exact cell positions are this design's choice.
module vga_text_render
  import music_player_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [31:0][9:0] chars,
  input  logic [9:0]       x,
  input  logic [9:0]       y,
  input  logic             active,
  input  logic             hsync_n_in,
  input  logic             vsync_n_in,
  output logic [9:0]       vga_r,
  output logic [9:0]       vga_g,
  output logic [9:0]       vga_b,
  output logic             vga_hs,
  output logic             vga_vs,
  output logic             vga_blank_n
);
  localparam int LABEL_COL = 2;
  localparam int FIELD_COL = 10;

  localparam logic [8*6-1:0] LBL_TITLE  = "TITLE:";
  localparam logic [8*5-1:0] LBL_TIME   = "TIME:";
  localparam logic [8*6-1:0] LBL_SRATE  = "SRATE:";
  localparam logic [8*7-1:0] LBL_VOLUME = "VOLUME:";

  // character code of one cell of the status screen
  function automatic logic [7:0] cell_code(input int row, input int col,
                                           input logic [31:0][9:0] regs);
    int lc, fc;
    logic [7:0] code;
    lc   = col - LABEL_COL;
    fc   = col - FIELD_COL;
    code = CH_SPACE;
    case (row)
      5: begin
        if (lc >= 0 && lc < 6)  code = LBL_TITLE[8*(5-lc) +: 8];
        if (fc >= 0 && fc < 12) code = regs[REG_TITLE0 + fc][7:0];
      end
      9: begin
        if (lc >= 0 && lc < 5)  code = LBL_TIME[8*(4-lc) +: 8];
        if (fc >= 0 && fc < 6)  code = regs[REG_TIME0 + fc][7:0];
      end
      13: begin
        if (lc >= 0 && lc < 6)  code = LBL_SRATE[8*(5-lc) +: 8];
        if (fc >= 0 && fc < 6)  code = regs[REG_SRATE0 + fc][7:0];
      end
      17: begin
        if (lc >= 0 && lc < 7)  code = LBL_VOLUME[8*(6-lc) +: 8];
        if (fc >= 0 && fc < 3)  code = regs[REG_VOLUME0 + fc][7:0];
      end
      default: code = CH_SPACE;
    endcase
    return code;
  endfunction

  logic [7:0] code;
  logic [7:0] glyph_row;
  logic       pixel_on;

  always_comb code = cell_code(int'(y[9:3]), int'(x[9:3]), chars);

  font_rom u_font (.code(code), .row(y[2:0]), .bits(glyph_row));

  assign pixel_on = active && glyph_row[3'd7 - x[2:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
      vga_hs <= 1'b1; vga_vs <= 1'b1; vga_blank_n <= 1'b0;
    end else if (ce) begin
      vga_r       <= {10{pixel_on}};
      vga_g       <= {10{pixel_on}};
      vga_b       <= {10{pixel_on}};
      vga_hs      <= hsync_n_in;
      vga_vs      <= vsync_n_in;
      vga_blank_n <= active;
    end
  end

endmodule
