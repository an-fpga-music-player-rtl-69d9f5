// font_rom -- 8 x 8 character glyph ROM for the text display.
//
// Each glyph is eight rows of eight pixels; bit 7 of a row is the leftmost
// pixel. A glyph is addressed by an 8-bit character code and a 3-bit row
// number and the row comes out combinationally (the ROM maps to LUTs).
//
// Codes: 0..9 select the digit glyphs directly, so a processor can write a
// decimal digit value without converting it; ASCII '0'..'9', 'A'..'Z'
// (lower case folded to upper case), ':', '.', '-' and '_' select their
// glyphs; every other code, space included, is blank. The glyph shapes are
// the classic 8 x 8 home-computer set, whose V, T, I, M, E, ':' and digit
// patterns are the ones the display was designed with.
module font_rom (
  input  logic [7:0] code,
  input  logic [2:0] row,
  output logic [7:0] bits
);
  logic [7:0]  c;
  logic [63:0] g;

  always_comb begin
    c = code;
    if (code < 8'd10)                       c = code + 8'h30;   // digit value
    else if (code >= 8'h61 && code <= 8'h7A) c = code - 8'h20;  // fold case
    case (c)
      8'h30: g = 64'h3C666E7666663C00;   // '0'
      8'h31: g = 64'h1818381818187E00;   // '1'
      8'h32: g = 64'h3C66060C30607E00;   // '2'
      8'h33: g = 64'h3C66061C06663C00;   // '3'
      8'h34: g = 64'h060E1E667F060600;   // '4'
      8'h35: g = 64'h7E607C0606663C00;   // '5'
      8'h36: g = 64'h3C66607C66663C00;   // '6'
      8'h37: g = 64'h7E660C1818181800;   // '7'
      8'h38: g = 64'h3C66663C66663C00;   // '8'
      8'h39: g = 64'h3C66663E06663C00;   // '9'
      8'h41: g = 64'h183C667E66666600;   // 'A'
      8'h42: g = 64'h7C66667C66667C00;   // 'B'
      8'h43: g = 64'h3C66606060663C00;   // 'C'
      8'h44: g = 64'h786C6666666C7800;   // 'D'
      8'h45: g = 64'h7E60607860607E00;   // 'E'
      8'h46: g = 64'h7E60607860606000;   // 'F'
      8'h47: g = 64'h3C66606E66663C00;   // 'G'
      8'h48: g = 64'h6666667E66666600;   // 'H'
      8'h49: g = 64'h3C18181818183C00;   // 'I'
      8'h4A: g = 64'h1E0C0C0C0C6C3800;   // 'J'
      8'h4B: g = 64'h666C7870786C6600;   // 'K'
      8'h4C: g = 64'h6060606060607E00;   // 'L'
      8'h4D: g = 64'h63777F6B63636300;   // 'M'
      8'h4E: g = 64'h66767E7E6E666600;   // 'N'
      8'h4F: g = 64'h3C66666666663C00;   // 'O'
      8'h50: g = 64'h7C66667C60606000;   // 'P'
      8'h51: g = 64'h3C666666663C0E00;   // 'Q'
      8'h52: g = 64'h7C66667C786C6600;   // 'R'
      8'h53: g = 64'h3C66603C06663C00;   // 'S'
      8'h54: g = 64'h7E18181818181800;   // 'T'
      8'h55: g = 64'h6666666666663C00;   // 'U'
      8'h56: g = 64'h66666666663C1800;   // 'V'
      8'h57: g = 64'h6363636B7F776300;   // 'W'
      8'h58: g = 64'h66663C183C666600;   // 'X'
      8'h59: g = 64'h6666663C18181800;   // 'Y'
      8'h5A: g = 64'h7E060C1830607E00;   // 'Z'
      8'h3A: g = 64'h0000180000180000;   // ':'
      8'h2E: g = 64'h0000000000181800;   // '.'
      8'h2D: g = 64'h0000007E00000000;   // '-'
      8'h5F: g = 64'h00000000000000FF;   // '_'
      default: g = 64'h0;
    endcase
    bits = g[63 - 8*int'(row) -: 8];
  end

endmodule
