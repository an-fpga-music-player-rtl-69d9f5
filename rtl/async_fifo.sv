// async_fifo -- dual-clock FIFO (DAC sample FIFO of the audio controller).
//
// Words are written in the wclk domain and read in the rclk domain. Read and
// write pointers are one bit wider than the address and are passed to the
// other domain in Gray code through two flip-flops, so each side sees a
// pointer that is late but never wrong: `full` may stay high and `empty` may
// stay high a few cycles longer than necessary, never the reverse.
//
// Read side is first-word-fall-through: rdata shows the oldest word whenever
// empty is low, and rd_en pops it at the next rclk edge. A write while full
// and a read while empty are ignored. wlevel is the fill level seen from the
// write side (it can overstate the level by the words read in the last
// two or three rclk cycles).
module async_fifo #(
  parameter int DW = 32,
  parameter int AW = 7             // 2**AW words
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic [AW:0]   wlevel,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty
);
  localparam int DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------ write side
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wlevel = wbin - gray2bin(rgray_w2);

  // ------------------------------------------------------------- read side
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

endmodule
