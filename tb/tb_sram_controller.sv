// tb_sram_controller -- 32-bit accesses to a model of the 256K x 16 SRAM.
//
// The SRAM model is asynchronous: while CE and OE are low and nobody
// drives the bus it returns the addressed half-word; on the rising edge of
// WE (with CE low) it stores the bus, per byte lane under UB/LB. Random
// reads and writes with random byte enables over the whole range are
// compared with a word model. Checks also that each access takes six
// clocks (five wait states), that the controller never drives the bus
// during a read, and that WE is never low while OE is low.
`timescale 1ns/1ps
module tb_sram_controller;
  import music_player_pkg::*;
  logic clk = 0, rst = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic [17:0] sa;
  logic [15:0] dq_out, dq_in;
  logic dq_oe, ce_n, oe_n, we_n, ub_n, lb_n;
  int checks = 0, failures = 0;
  logic [15:0] sram [1 << 18];
  logic [31:0] model [int];

  sram_controller dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp), .sram_addr(sa),
    .sram_dq_out(dq_out), .sram_dq_oe(dq_oe), .sram_dq_in(dq_in), .sram_ce_n(ce_n),
    .sram_oe_n(oe_n), .sram_we_n(we_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n));
  always #5 clk = ~clk;

  assign dq_in = (!ce_n && !oe_n && !dq_oe) ? sram[sa] : 16'h0;
  always @(posedge we_n) if (!ce_n) begin
    if (!lb_n) sram[sa][7:0]  <= dq_out[7:0];
    if (!ub_n) sram[sa][15:8] <= dq_out[15:8];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int bad_drive = 0;
  always @(posedge clk) if ((!we_n && !oe_n) || (dq_oe && !oe_n)) bad_drive++;

  task automatic bus(input bit w, input int a, input logic [31:0] d, input logic [3:0] be,
                     output logic [31:0] q, output int waits);
    @(negedge clk);
    req = AVM_REQ_IDLE; req.address = 32'(a); req.write = w; req.read = !w;
    req.writedata = d; req.byteenable = be;
    waits = 0;
    #1;
    while (rsp.waitrequest) begin waits++; @(negedge clk); #1; end
    q = rsp.readdata;
    @(posedge clk); #1 req = AVM_REQ_IDLE;
  endtask

  logic [31:0] q;
  int w, addrs [64];
  initial begin
    req = AVM_REQ_IDLE;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i < 2) ? i * 131071 : $urandom_range(0, 131071);
      model[addrs[i]] = $urandom;
      sram[{addrs[i][16:0], 1'b0}] = model[addrs[i]][15:0];
      sram[{addrs[i][16:0], 1'b1}] = model[addrs[i]][31:16];
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 1000; n++) begin
      int a; a = addrs[$urandom_range(0, 63)];
      if ($urandom_range(0, 1)) begin
        logic [31:0] d; logic [3:0] be;
        d = $urandom; be = 4'($urandom);
        bus(1, a, d, be, q, w);
        for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = d[8*b +: 8];
      end else begin
        bus(0, a, 0, 4'hF, q, w);
        check(q == model[a], "read data");
      end
      check(w == 5, "five wait states per access");
    end
    check(bad_drive == 0, "no bus fight, no write during output enable");
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
