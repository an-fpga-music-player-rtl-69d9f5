// tb_i2s_dac_tx -- I2S serialiser against a model of the codec in master mode.
//
// The codec model makes BCLK (period 40 ns) and changes DACLRC on a BCLK
// falling edge every 48 BCLKs (left low, right high). It reads DACDAT on
// rising edges: the first rising edge after a DACLRC change is the one-BCLK
// delay, the next 16 carry the sample MSB first, the rest of the slot must
// be zero. A FIFO model holds 20 random stereo frames; every one must arrive
// in order on the right channels, the FIFO must be popped once per frame,
// and after it runs dry the output must be silence with `underrun` pulsing
// once per frame.
`timescale 1ns/1ps
module tb_i2s_dac_tx;
  localparam int NF = 20, SLOT = 48;
  logic bclk = 0, lrc = 1, rst = 1;
  logic [31:0] fmem [64];
  int unsigned rptr = 0, wptr = 0;
  logic fifo_rd, dacdat, underrun, frame_start;
  int checks = 0, failures = 0;

  i2s_dac_tx #(.SW(16)) dut (.clk_n(~bclk), .rst, .daclrc(lrc),
    .fifo_rdata(fmem[rptr[5:0]]), .fifo_empty(rptr == wptr), .fifo_rd,
    .dacdat, .underrun, .frame_start);

  always #20 bclk = ~bclk;
  always @(negedge bclk) if (fifo_rd) rptr <= rptr + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // codec model: frame clock
  int bcnt = 0;
  always @(negedge bclk) begin
    bcnt <= (bcnt == SLOT - 1) ? 0 : bcnt + 1;
    if (bcnt == SLOT - 1) lrc <= ~lrc;
  end

  // codec model: receiver
  int k = 0, nleft = 0, nright = 0, nunder = 0, npad_bad = 0;
  logic last_lrc = 1, cur_lrc = 1;
  logic [15:0] sh;
  bit armed = 0;
  logic [15:0] got_l [$];
  logic [15:0] got_r [$];
  always @(posedge bclk) begin
    if (lrc != last_lrc) begin k = 1; cur_lrc = lrc; end else k++;
    last_lrc = lrc;
    if (k >= 2 && k <= 17) sh = {sh[14:0], dacdat};
    if (k > 17 && dacdat) npad_bad++;
    if (k == 17) begin
      if (!cur_lrc && armed) got_l.push_back(sh);
      else if (cur_lrc && got_l.size() > got_r.size()) got_r.push_back(sh);
    end
  end
  always @(posedge bclk) if (underrun) nunder++;

  initial begin
    for (int i = 0; i < NF; i++) fmem[i] = $urandom;
    repeat (6) @(posedge bclk);
    @(negedge bclk) rst = 0;
    @(posedge lrc);              // start in a right slot so the next left is aligned
    wptr = NF; armed = 1;
    repeat (2 * (NF + 4)) @(lrc);
    // frames received: first left after wptr set is frame 0
    check(rptr == NF, "one pop per frame");
    for (int i = 0; i < NF; i++) begin
      check(got_l.size() > i && got_l[i] == fmem[i][31:16], "left sample");
      check(got_r.size() > i && got_r[i] == fmem[i][15:0], "right sample");
    end
    for (int i = NF; i < got_r.size(); i++) check(got_l[i] == 0 && got_r[i] == 0, "silence on underrun");
    check(nunder >= 3, "underrun pulses");
    check(npad_bad == 0, "zero padding after LSB");
    $display("frames %0d underruns %0d", got_l.size(), nunder);
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
