// tb_vga_char_regs -- write/read-back of the 32 character registers.
//
// Checks the reset value (blank, 0x20) of every register, that a write
// changes only the addressed register, that only writedata[9:0] is kept,
// and that reads return the stored value with no wait state.
`timescale 1ns/1ps
module tb_vga_char_regs;
  import music_player_pkg::*;
  logic clk = 0, rst = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic [31:0][9:0] chars;
  logic [9:0] model [32];
  int checks = 0, failures = 0;

  vga_char_regs dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp), .chars);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    req = AVM_REQ_IDLE; req.address = 32'(a); req.write = 1; req.writedata = d;
    @(posedge clk); #1 req = AVM_REQ_IDLE;
  endtask

  initial begin
    req = AVM_REQ_IDLE;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = 10'h20;
      check(chars[i] == 10'h20, "reset value");
    end
    for (int n = 0; n < 300; n++) begin
      int a; logic [31:0] d;
      a = $urandom_range(0, 31); d = $urandom;
      wr(a, d);
      model[a] = d[9:0];
      for (int i = 0; i < 32; i++) check(chars[i] == model[i], "register array");
      // read back a random register
      a = $urandom_range(0, 31);
      @(negedge clk); req.address = 32'(a); req.read = 1; #1;
      check(rsp.waitrequest == 0 && rsp.readdata == {22'd0, model[a]}, "read back");
      @(posedge clk); #1 req = AVM_REQ_IDLE;
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
