// vga_char_regs -- processor-writable character registers of the text display.
//
// An Avalon-MM slave with a 5-bit word address and 32 registers of 10 bits.
// A write stores writedata[9:0] in the addressed register; a read returns it
// zero-extended in the same cycle (waitrequest is always low). Each register
// holds the character code shown in one character cell of the display (see
// font_rom for the codes and music_player_pkg for which register feeds which
// cell: time digits at 0..5, sample-rate digits at 7..12, volume digits at
// 13..15, title characters at 16..27).
//
// The 5-bit address, the 10-bit register width and the sample-rate digit
// addresses 7..12 follow the reference design. Read-back and the reset value
// (every register blank, code 0x20) are choices of this design.
module vga_char_regs
  import music_player_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  avm_req_t             avs_req,    // address = word offset
  output avm_rsp_t             avs_rsp,
  output logic [31:0][9:0]     chars
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) chars[i] <= 10'(CH_SPACE);
    end else if (avs_req.write) begin
      chars[avs_req.address[4:0]] <= avs_req.writedata[9:0];
    end
  end

  assign avs_rsp.waitrequest = 1'b0;
  assign avs_rsp.readdata    = {22'd0, chars[avs_req.address[4:0]]};

endmodule
