// tb_vga_text_render -- pixel-level check of the status screen layout.
//
// Sweeps the whole 640 x 480 picture by driving x/y directly (pixel enable
// every clock) and compares each output pixel, one clock later, with a
// reference built here: labels "TITLE:", "TIME:", "SRATE:", "VOLUME:" in
// cell column 2 of cell rows 5, 9, 13, 17, fields from column 10, glyphs
// taken from a small reference table for the characters used. Also checks
// that syncs and blank are delayed by the same single clock and that
// nothing is drawn outside the active area.
`timescale 1ns/1ps
module tb_vga_text_render;
  import music_player_pkg::*;
  logic clk = 0, rst = 1, ce = 1;
  logic [31:0][9:0] chars;
  logic [9:0] x, y, r, g, b;
  logic active, hs_in, vs_in, hs, vs, blank_n;
  int checks = 0, failures = 0;

  vga_text_render dut (.clk, .rst, .ce, .chars, .x, .y, .active,
    .hsync_n_in(hs_in), .vsync_n_in(vs_in), .vga_r(r), .vga_g(g), .vga_b(b),
    .vga_hs(hs), .vga_vs(vs), .vga_blank_n(blank_n));
  always #5 clk = ~clk;

  // reference glyphs, C64 style, for the characters on screen in this test
  function automatic logic [63:0] ref_glyph(input byte c);
    case (c)
      "T": return 64'h7E18181818181800;  "I": return 64'h3C18181818183C00;
      "L": return 64'h6060606060607E00;  "E": return 64'h7E60607860607E00;
      ":": return 64'h0000180000180000;  "M": return 64'h63777F6B63636300;
      "S": return 64'h3C66603C06663C00;  "R": return 64'h7C66667C786C6600;
      "A": return 64'h183C667E66666600;  "V": return 64'h66666666663C1800;
      "O": return 64'h3C66666666663C00;  "U": return 64'h6666666666663C00;
      "W": return 64'h6363636B7F776300;  ".": return 64'h0000000000181800;
      "C": return 64'h3C66606060663C00;
      "0": return 64'h3C666E7666663C00;  "1": return 64'h1818381818187E00;
      "2": return 64'h3C66060C30607E00;  "3": return 64'h3C66061C06663C00;
      "4": return 64'h060E1E667F060600;  "6": return 64'h3C66607C66663C00;
      default: return 64'h0;
    endcase
  endfunction

  string lines [4] = '{"  TITLE:  MUSIC.WAV", "  TIME:   000136",
                      "  SRATE:  044100",     "  VOLUME: 120"};
  int    line_row [4] = '{5, 9, 13, 17};

  function automatic bit ref_pixel(input int px, input int py);
    int cr, cc;
    byte ch;
    cr = py / 8; cc = px / 8; ch = " ";
    for (int l = 0; l < 4; l++)
      if (cr == line_row[l] && cc < lines[l].len()) ch = lines[l][cc];
    return ref_glyph(ch)[63 - 8*(py % 8) - (px % 8)];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s x=%0d y=%0d r=%h exp=%b", what, x, y, r, exp_on); end
  endtask

  bit exp_on, exp_act, exp_hs, exp_vs;
  int lit;
  initial begin
    string title, t, s, v;
    title = "MUSIC.WAV"; t = "000136"; s = "044100"; v = "120";
    for (int i = 0; i < 32; i++) chars[i] = 10'h20;
    for (int i = 0; i < title.len(); i++) chars[REG_TITLE0 + i] = 10'(title[i]);
    for (int i = 0; i < 6; i++) chars[REG_TIME0 + i]  = 10'(t[i] - "0");   // digit values
    for (int i = 0; i < 6; i++) chars[REG_SRATE0 + i] = 10'(s[i]);         // ASCII digits
    for (int i = 0; i < 3; i++) chars[REG_VOLUME0 + i] = 10'(v[i] - "0");
    x = 0; y = 0; active = 0; hs_in = 1; vs_in = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    lit = 0;
    for (int py = 0; py < 480; py++)
      for (int px = 0; px < 648; px++) begin
        @(negedge clk);
        x = 10'(px < 640 ? px : 0); y = 10'(py);
        active = (px < 640);
        hs_in = (px != 645); vs_in = (py != 3);
        exp_on = (px < 640) && ref_pixel(px, py);
        exp_act = active; exp_hs = hs_in; exp_vs = vs_in;
        @(posedge clk); #1;
        check(r == {10{exp_on}} && g == r && b == r, "pixel");
        check(blank_n == exp_act && hs == exp_hs && vs == exp_vs, "sync/blank alignment");
        if (exp_on) lit++;
      end
    check(lit > 1000, "text visible");
    $display("lit pixels %0d", lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
