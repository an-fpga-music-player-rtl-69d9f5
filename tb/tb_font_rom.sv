// tb_font_rom -- checks glyph rows against independently written patterns.
//
// Reference rows: the letter V, the five glyphs of "TIME:" and the first two
// rows of the ten digits, written out here as bit strings; plus the rules
// that digit values 0..9 equal ASCII '0'..'9', lower case equals upper
// case, and space and unknown codes are blank.
`timescale 1ns/1ps
module tb_font_rom;
  logic [7:0] code, bits;
  logic [2:0] row;
  int checks = 0, failures = 0;

  font_rom dut (.code, .row, .bits);

  task automatic expect_row(input logic [7:0] c, input int r, input logic [7:0] exp);
    code = c; row = 3'(r); #1;
    checks++;
    if (bits !== exp) begin
      failures++;
      $display("FAIL code %h row %0d got %b exp %b", c, r, bits, exp);
    end
  endtask

  logic [7:0] v_rows [8] = '{8'b01100110, 8'b01100110, 8'b01100110, 8'b01100110,
                             8'b01100110, 8'b00111100, 8'b00011000, 8'b00000000};
  // "TIME:" as five 8-pixel glyphs per row
  logic [39:0] time_rows [8] = '{
    40'b0111111000111100011000110111111000000000,
    40'b0001100000011000011101110110000000000000,
    40'b0001100000011000011111110110000000011000,
    40'b0001100000011000011010110111100000000000,
    40'b0001100000011000011000110110000000000000,
    40'b0001100000011000011000110110000000011000,
    40'b0001100000111100011000110111111000000000,
    40'b0000000000000000000000000000000000000000};
  logic [79:0] digit_rows [2] = '{
    80'b00111100000110000011110000111100000001100111111000111100011111100011110000111100,
    80'b01100110000110000110011001100110000011100110000001100110011001100110011001100110};
  string tm = "TIME:";
  logic [7:0] a, b;

  initial begin
    for (int r = 0; r < 8; r++) expect_row("V", r, v_rows[r]);
    for (int i = 0; i < 5; i++)
      for (int r = 0; r < 8; r++) expect_row(tm[i], r, time_rows[r][39 - 8*i -: 8]);
    for (int d = 0; d < 10; d++)
      for (int r = 0; r < 2; r++) begin
        expect_row(8'(d), r, digit_rows[r][79 - 8*d -: 8]);
        expect_row(8'h30 + 8'(d), r, digit_rows[r][79 - 8*d -: 8]);
      end
    for (int c = 8'h61; c <= 8'h7A; c++)
      for (int r = 0; r < 8; r++) begin
        code = 8'(c - 8'h20); row = 3'(r); #1; a = bits;
        code = 8'(c);         #1; b = bits;
        checks++;
        if (a !== b || (r == 0 && a == 0 && c != 8'h71)) begin
          failures++; $display("FAIL case fold %h", c);
        end
      end
    for (int r = 0; r < 8; r++) begin
      expect_row(8'h20, r, 8'h00);
      expect_row(8'hFF, r, 8'h00);
      expect_row(8'h7F, r, 8'h00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
