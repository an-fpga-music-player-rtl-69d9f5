// onchip_ram -- on-chip RAM on the Avalon bus (8 KB at the default size).
//
// A single-port synchronous RAM of 2**AW 32-bit words with byte enables.
// Writes complete in the cycle they are presented. A read holds waitrequest
// high for one cycle while the RAM is read and returns the word in the
// second cycle with waitrequest low. The RAM contents are not initialised.
// The 8 KB size is the window the reference system gives its on-chip
// memory; the one-wait-state read is this design's choice.
module onchip_ram
  import music_player_pkg::*;
#(
  parameter int AW = 11            // 2048 words = 8 KB
) (
  input  logic     clk,
  input  logic     rst,
  input  avm_req_t avs_req,        // address = word offset
  output avm_rsp_t avs_rsp
);
  logic [31:0] mem [1 << AW];
  logic [31:0] q;
  logic        rd_pending;
  logic [AW-1:0] a;

  assign a = avs_req.address[AW-1:0];

  always_ff @(posedge clk) begin
    if (avs_req.write) begin
      for (int b = 0; b < 4; b++)
        if (avs_req.byteenable[b]) mem[a][8*b +: 8] <= avs_req.writedata[8*b +: 8];
    end
    q <= mem[a];
  end

  always_ff @(posedge clk) begin
    if (rst) rd_pending <= 1'b0;
    else     rd_pending <= avs_req.read && !rd_pending;
  end

  assign avs_rsp.waitrequest = avs_req.read && !rd_pending;
  assign avs_rsp.readdata    = q;

endmodule
