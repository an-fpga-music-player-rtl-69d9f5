// audio_controller -- Avalon-MM audio DAC controller for the WM8731 codec.
//
// The processor copies PCM samples read from the SD card into a DAC FIFO
// and checks before each write that the FIFO is not full. The codec is
// configured as master: it generates BCLK and DACLRC itself from the
// 18.43 MHz master clock that this block forwards on aud_xck, and
// i2s_dac_tx shifts the samples out on DACDAT in I2S format, 16 bits per
// channel. The FIFO is dual-clock (async_fifo) between the system clock and
// the codec's bit clock.
//
// Register map (32-bit words, no wait states):
//   0  write   push one stereo frame: writedata[31:16] left, [15:0] right
//   1  read    status: bit 0 FIFO full, bit 1 FIFO empty, bit 2 overflow
//              (a frame was written while full and dropped), bits 23:16
//              FIFO level seen from the write side
//   1  write   writedata[2] = 1 clears the overflow flag
//
// The FIFO, the full check, master-mode clocking and the 16-bit I2S format
// follow the reference system; the register map, the FIFO depth (128
// frames, one 512-byte SD block of 16-bit stereo) and silence on underrun
// are choices of this design.
module audio_controller
  import music_player_pkg::*;
#(
  parameter int FIFO_AW = 7
) (
  input  logic     clk_sys,
  input  logic     rst_sys,
  input  avm_req_t avs_req,
  output avm_rsp_t avs_rsp,
  input  logic     clk_audio,     // 18.432 MHz from the PLL
  output logic     aud_xck,       // codec master clock
  input  logic     aud_bclk,      // from the codec (master mode)
  input  logic     aud_daclrck,   // from the codec (master mode)
  output logic     aud_dacdat,
  output logic     underrun       // pulse, BCLK domain
);
  logic          full, empty_r, rd, empty_w, overflow, frame_start;
  logic [FIFO_AW:0] wlevel;
  logic [31:0]   rdata;
  logic          bclk_n, rst_b;
  logic          push;

  assign aud_xck = clk_audio;
  assign bclk_n  = ~aud_bclk;
  assign push    = avs_req.write && (avs_req.address[1:0] == 2'd0);
  assign empty_w = (wlevel == '0);

  async_fifo #(.DW(32), .AW(FIFO_AW)) u_fifo (
    .wclk(clk_sys), .wrst(rst_sys), .wr_en(push), .wdata(avs_req.writedata),
    .full(full), .wlevel(wlevel),
    .rclk(bclk_n), .rrst(rst_b), .rd_en(rd), .rdata(rdata), .empty(empty_r)
  );

  reset_sync u_rst_b (.clk(bclk_n), .rst_in(rst_sys), .rst_out(rst_b));

  i2s_dac_tx #(.SW(16)) u_tx (
    .clk_n(bclk_n), .rst(rst_b), .daclrc(aud_daclrck),
    .fifo_rdata(rdata), .fifo_empty(empty_r), .fifo_rd(rd),
    .dacdat(aud_dacdat), .underrun(underrun), .frame_start(frame_start)
  );

  always_ff @(posedge clk_sys) begin
    if (rst_sys) overflow <= 1'b0;
    else if (push && full) overflow <= 1'b1;
    else if (avs_req.write && avs_req.address[1:0] == 2'd1 && avs_req.writedata[2])
      overflow <= 1'b0;
  end

  always_comb begin
    avs_rsp.waitrequest = 1'b0;
    avs_rsp.readdata    = '0;
    if (avs_req.address[1:0] == 2'd1) begin
      avs_rsp.readdata[0]     = full;
      avs_rsp.readdata[1]     = empty_w;
      avs_rsp.readdata[2]     = overflow;
      avs_rsp.readdata[23:16] = 8'(wlevel);
    end
  end

endmodule
