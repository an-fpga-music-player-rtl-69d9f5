// tb_onchip_ram -- 8 KB on-chip RAM with byte enables, against a model.
//
// Random writes with random byte enables and random reads over the whole
// 2048-word range; every read must match the model and take exactly one
// wait state (two clocks), every write none.
`timescale 1ns/1ps
module tb_onchip_ram;
  import music_player_pkg::*;
  logic clk = 0, rst = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] model [2048];
  bit          valid [2048];

  onchip_ram dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

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
  int w;
  initial begin
    req = AVM_REQ_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 2048; a++) begin
      bus(1, a, 32'(a) * 32'h9E37_79B9, 4'hF, q, w);
      model[a] = 32'(a) * 32'h9E37_79B9; valid[a] = 1;
      check(w == 0, "write without wait state");
    end
    for (int n = 0; n < 4000; n++) begin
      int a; a = $urandom_range(0, 2047);
      if ($urandom_range(0, 1)) begin
        logic [31:0] d; logic [3:0] be;
        d = $urandom; be = 4'($urandom);
        bus(1, a, d, be, q, w);
        for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = d[8*b +: 8];
      end else begin
        bus(0, a, 0, 4'hF, q, w);
        check(q == model[a], "read data");
        check(w == 1, "one wait state on read");
      end
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
