// tb_vga_controller -- one full frame of the text display, end to end.
//
// The character registers are written over the Avalon bus the way the
// player software does it (sample-rate digits at addresses 7..12, time at
// 0..5, volume at 13..15, title at 16..). Then the VGA outputs are sampled
// on each rising edge of vga_clk for a complete frame. Starting from a
// falling VSYNC the testbench tracks the scan position itself and checks
// every pixel against a reference rendering of the expected text, blank_n
// against the 640 x 480 active area, the HSYNC width (96 pixels), the line
// length (800 pixels), the VSYNC width (2 lines), the frame length
// (525 lines) and the 25 MHz pixel rate (vga_clk period two 50 MHz clocks).
`timescale 1ns/1ps
module tb_vga_controller;
  import music_player_pkg::*;
  logic clk_sys = 0, clk_50 = 0, rst_sys = 1, rst_50 = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic [9:0] r, g, b;
  logic vclk, blank_n, sync_n, hs, vs;
  int checks = 0, failures = 0;

  vga_controller dut (.clk_sys, .rst_sys, .avs_req(req), .avs_rsp(rsp), .clk_50, .rst_50,
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_clk(vclk), .vga_blank_n(blank_n),
    .vga_sync_n(sync_n), .vga_hs(hs), .vga_vs(vs));

  always #5  clk_sys = ~clk_sys;
  always #10 clk_50  = ~clk_50;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk_sys);
    req = AVM_REQ_IDLE; req.address = 32'(a); req.write = 1; req.writedata = d;
    @(posedge clk_sys); #1 req = AVM_REQ_IDLE;
  endtask

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
                      "  SRATE:  044100",    "  VOLUME: 120"};
  int    line_row [4] = '{5, 9, 13, 17};

  function automatic bit ref_pixel(input int px, input int py);
    int cr, cc;
    byte ch;
    cr = py / 8; cc = px / 8; ch = " ";
    for (int l = 0; l < 4; l++)
      if (cr == line_row[l] && cc < lines[l].len()) ch = lines[l][cc];
    return ref_glyph(ch)[63 - 8*(py % 8) - (px % 8)];
  endfunction

  int h, v, hs_w, vs_w, lines_seen, lit, line_len;
  bit in_act, exp_on, prev_hs, prev_vs;
  realtime t_prev;
  initial begin
    string title;
    int srate, digits[6];
    req = AVM_REQ_IDLE;
    repeat (4) @(posedge clk_50);
    rst_sys = 0; rst_50 = 0;
    // sample rate 44100 -> six digits at addresses 12 (units) down to 7
    srate = 44100;
    for (int i = 0; i < 6; i++) begin digits[5-i] = srate % 10; srate /= 10; end
    for (int i = 0; i < 6; i++) wr(7 + i, digits[i]);
    wr(0, 0); wr(1, 0); wr(2, 0); wr(3, 1); wr(4, 3); wr(5, 6);
    wr(13, 1); wr(14, 2); wr(15, 0);
    title = "MUSIC.WAV";
    for (int i = 0; i < title.len(); i++) wr(16 + i, 32'(title[i]));
    // pixel clock rate
    @(posedge vclk); t_prev = $realtime; @(posedge vclk);
    check($realtime - t_prev == 40.0, "vga_clk period 40 ns");
    // align to the start of a frame
    @(negedge vs);
    @(posedge vclk);
    h = 0; v = 0; hs_w = 0; vs_w = 0; lines_seen = 0; lit = 0; line_len = 0;
    prev_hs = hs; prev_vs = vs;
    for (int n = 0; n < 800 * 525; n++) begin
      in_act = (h >= 144 && h < 784 && v >= 35 && v < 515);
      exp_on = in_act && ref_pixel(h - 144, v - 35);
      check(r == {10{exp_on}} && g == r && b == r, "pixel");
      check(blank_n == in_act, "blank_n");
      check(hs == (h >= 96), "hsync position");
      check(vs == (v >= 2), "vsync position");
      check(sync_n == 1'b0, "composite sync unused");
      if (exp_on) lit++;
      if (!hs) hs_w++;
      if (!vs && h == 0) vs_w++;
      h++;
      if (h == 800) begin h = 0; v++; end
      @(posedge vclk);
      if (prev_hs && !hs) begin lines_seen++; line_len = n + 1; end
      prev_hs = hs;
    end
    check(hs_w == 525 * 96, "hsync width 96 pixels");
    check(vs_w == 2, "vsync width 2 lines");
    check(lines_seen == 525, "525 lines per frame");
    check(!vs, "next frame starts after 525 lines");
    check(lit > 1000, "text drawn");
    $display("lit pixels %0d", lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
