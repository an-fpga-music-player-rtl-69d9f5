// tb_audio_controller -- software-style playback through the audio controller.
//
// A codec model in master mode drives BCLK (217 ns, 18.432 MHz / 4) and
// DACLRC (48 BCLKs per channel, 48 kHz frames) and decodes I2S from DACDAT.
// The bus side does what the player software does: poll the status
// register, and write a stereo frame whenever the FIFO is not full, for
// 200 frames. Checks: FIFO full is seen (the bus is far faster than the
// codec), a write while full sets the overflow flag and is dropped, the
// flag clears, status level/empty bits, all 200 frames arrive in order
// on the right channels, and after the last one the output is silence with
// underrun pulses. aud_xck must follow the 18.432 MHz clock.
`timescale 1ns/1ps
module tb_audio_controller;
  import music_player_pkg::*;
  localparam int NF = 200, SLOT = 48;
  logic clk_sys = 0, rst_sys = 1, clk_audio = 0, bclk = 0, lrc = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic xck, dacdat, underrun;
  int checks = 0, failures = 0;

  audio_controller dut (.clk_sys, .rst_sys, .avs_req(req), .avs_rsp(rsp),
    .clk_audio, .aud_xck(xck), .aud_bclk(bclk), .aud_daclrck(lrc),
    .aud_dacdat(dacdat), .underrun);

  always #5     clk_sys = ~clk_sys;
  always #27.127 clk_audio = ~clk_audio;
  always #108.5 bclk = ~bclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus(input bit w, input int a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk_sys);
    req = AVM_REQ_IDLE; req.address = 32'(a); req.write = w; req.read = !w;
    req.writedata = d; req.byteenable = '1;
    #1;
    while (rsp.waitrequest) begin @(negedge clk_sys); #1; end
    q = rsp.readdata;
    @(posedge clk_sys); #1 req = AVM_REQ_IDLE;
  endtask

  // codec model
  int bcnt = 0, k = 0, nunder = 0;
  logic last_lrc = 1, cur_lrc = 1;
  logic [15:0] sh;
  logic [15:0] got_l [$];
  logic [15:0] got_r [$];
  bit armed = 0;
  always @(negedge bclk) begin
    bcnt <= (bcnt == SLOT - 1) ? 0 : bcnt + 1;
    if (bcnt == SLOT - 1) lrc <= ~lrc;
  end
  always @(posedge bclk) begin
    if (lrc != last_lrc) begin k = 1; cur_lrc = lrc; end else k++;
    last_lrc = lrc;
    if (k >= 2 && k <= 17) sh = {sh[14:0], dacdat};
    if (k == 17) begin
      if (!cur_lrc && (armed || sh != 0)) begin armed = 1; got_l.push_back(sh); end
      else if (cur_lrc && got_l.size() > got_r.size()) got_r.push_back(sh);
    end
    if (underrun && got_l.size() >= NF) nunder++;
  end

  logic [31:0] frames [NF];
  logic [31:0] st;
  int sent, full_seen, xck_edges;
  initial begin
    req = AVM_REQ_IDLE;
    for (int i = 0; i < NF; i++) frames[i] = {16'($urandom_range(1, 65535)), 16'($urandom)};
    repeat (30) @(posedge clk_sys);
    rst_sys = 0;
    repeat (30) @(posedge bclk);
    bus(0, 1, 0, st);
    check(st[0] == 0 && st[1] == 1 && st[23:16] == 0, "status after reset: empty");
    sent = 0; full_seen = 0;
    while (sent < NF) begin
      bus(0, 1, 0, st);
      if (st[0]) begin
        full_seen++;
        if (full_seen == 1) begin
          check(st[23:16] == 8'd128, "level 128 when full");
          bus(1, 0, 32'hDEAD_BEEF, st);        // dropped
          bus(0, 1, 0, st);
          check(st[2] == 1, "overflow flag set");
          bus(1, 1, 32'h4, st);
          bus(0, 1, 0, st);
          check(st[2] == 0, "overflow flag cleared");
        end
      end else begin
        bus(1, 0, frames[sent], st);
        sent++;
      end
    end
    check(full_seen > 0, "FIFO became full");
    wait (got_r.size() >= NF);
    repeat (4 * 2 * SLOT) @(posedge bclk);
    for (int i = 0; i < NF; i++) begin
      check(got_l[i] == frames[i][31:16], "left sample");
      check(got_r[i] == frames[i][15:0], "right sample");
    end
    for (int i = NF; i < got_r.size(); i++) check(got_l[i] == 0 && got_r[i] == 0, "silence after the end");
    check(nunder >= 2, "underrun after the last frame");
    bus(0, 1, 0, st);
    check(st[1] == 1, "empty at the end");
    xck_edges = 0;
    fork
      repeat (100) @(posedge xck) xck_edges++;
      repeat (100) @(posedge clk_audio);
    join
    check(xck_edges == 100, "aud_xck follows clk_audio");
    $display("frames %0d full polls %0d underruns %0d", got_l.size(), full_seen, nunder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
