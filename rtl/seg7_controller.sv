// seg7_controller -- eight-digit hexadecimal display on the 7-segment LEDs.
//
// An Avalon register of 32 bits is written by the processor; each of its
// eight nibbles is shown as a hexadecimal digit on one display, nibble 0 on
// digit 0. Segments are active low (a segment lights when its bit is 0) in
// the order {g, f, e, d, c, b, a}. Decoding is combinational from the
// register. A read returns the register. The controller's place in the
// system is the reference design's; its register and hex decoding are this
// design's choices.
module seg7_controller
  import music_player_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  avm_req_t       avs_req,
  output avm_rsp_t       avs_rsp,
  output logic [7:0][6:0] hex_n
);
  logic [31:0] value;

  always_ff @(posedge clk) begin
    if (rst)                value <= '0;
    else if (avs_req.write) value <= avs_req.writedata;
  end

  function automatic logic [6:0] seg(input logic [3:0] d);
    case (d)
      4'h0: seg = 7'b1000000; 4'h1: seg = 7'b1111001;
      4'h2: seg = 7'b0100100; 4'h3: seg = 7'b0110000;
      4'h4: seg = 7'b0011001; 4'h5: seg = 7'b0010010;
      4'h6: seg = 7'b0000010; 4'h7: seg = 7'b1111000;
      4'h8: seg = 7'b0000000; 4'h9: seg = 7'b0010000;
      4'hA: seg = 7'b0001000; 4'hB: seg = 7'b0000011;
      4'hC: seg = 7'b1000110; 4'hD: seg = 7'b0100001;
      4'hE: seg = 7'b0000110; default: seg = 7'b0001110;
    endcase
  endfunction

  always_comb
    for (int i = 0; i < 8; i++) hex_n[i] = seg(value[4*i +: 4]);

  assign avs_rsp.waitrequest = 1'b0;
  assign avs_rsp.readdata    = value;

endmodule
