// vga_controller -- 640 x 480 text display for the music player.
//
// The processor writes character codes into vga_char_regs over the Avalon
// bus (clk_sys domain). The display side runs from the board's 50 MHz clock:
// a toggle flip-flop makes the 25 MHz pixel clock. Inside, it is used as a
// clock enable, so all display logic stays on the single 50 MHz clock; the
// video DAC gets it inverted as vga_clk, whose rising edge then falls in
// the middle of each pixel, when the DAC inputs are stable. vga_sync scans
// 800 x 525 counts per frame and vga_text_render turns each position into
// a white or black pixel (one pixel of latency, syncs delayed to match).
//
// Character registers cross from clk_sys to clk_50 through two flip-flop
// stages per bit. The bits of a register may land one pixel clock apart
// when it is rewritten, so for at most one frame a single cell can show a
// mixed code; for a status display this is harmless and avoids a handshake.
//
// Output signals are those of the ADV7123 video DAC: 10-bit R, G, B,
// active-low blank and composite sync (held inactive, low, since the
// separate HSYNC/VSYNC lines are used), horizontal and vertical syncs.
module vga_controller
  import music_player_pkg::*;
(
  input  logic        clk_sys,
  input  logic        rst_sys,
  input  avm_req_t    avs_req,
  output avm_rsp_t    avs_rsp,
  input  logic        clk_50,
  input  logic        rst_50,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  output logic        vga_clk,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic        vga_hs,
  output logic        vga_vs
);
  logic [31:0][9:0] chars_sys, chars_m, chars_pix;

  vga_char_regs u_regs (
    .clk(clk_sys), .rst(rst_sys), .avs_req(avs_req), .avs_rsp(avs_rsp),
    .chars(chars_sys)
  );

  always_ff @(posedge clk_50) begin
    chars_m   <= chars_sys;
    chars_pix <= chars_m;
  end

  // 25 MHz pixel clock from 50 MHz
  logic clk25;
  always_ff @(posedge clk_50) begin
    if (rst_50) clk25 <= 1'b0;
    else        clk25 <= ~clk25;
  end
  logic ce;
  assign ce      = ~clk25;      // the 50 MHz cycle in which clk25 rises
  assign vga_clk = ~clk25;     // rises mid-pixel, when the outputs are stable

  logic [9:0] hcount, vcount, x, y;
  logic       hs_n, vs_n, active, eol, eof;

  vga_sync u_sync (
    .clk(clk_50), .rst(rst_50), .ce(ce),
    .hcount(hcount), .vcount(vcount), .hsync_n(hs_n), .vsync_n(vs_n),
    .active(active), .x(x), .y(y), .end_of_line(eol), .end_of_field(eof)
  );

  vga_text_render u_render (
    .clk(clk_50), .rst(rst_50), .ce(ce), .chars(chars_pix),
    .x(x), .y(y), .active(active), .hsync_n_in(hs_n), .vsync_n_in(vs_n),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b),
    .vga_hs(vga_hs), .vga_vs(vga_vs), .vga_blank_n(vga_blank_n)
  );

  assign vga_sync_n = 1'b0;

endmodule
