// tb_seg7_controller -- hexadecimal digits on the eight 7-segment displays.
//
// The reference lists, for each hex digit, which of the segments a..g are
// lit (written as letters); the testbench turns that into active-low
// {g..a} patterns and compares all eight displays for random register
// values and for each digit in each position. Read-back is checked too.
`timescale 1ns/1ps
module tb_seg7_controller;
  import music_player_pkg::*;
  logic clk = 0, rst = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic [7:0][6:0] hex_n;
  int checks = 0, failures = 0;

  seg7_controller dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp), .hex_n);
  always #5 clk = ~clk;

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] pattern(input int d);
    logic [6:0] p = 7'h7F;
    for (int i = 0; i < lit[d].len(); i++) p[lit[d][i] - "a"] = 1'b0;
    return p;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [31:0] d);
    @(negedge clk); req = AVM_REQ_IDLE; req.write = 1; req.writedata = d;
    @(posedge clk); #1 req = AVM_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] v;
    req = AVM_REQ_IDLE;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 8; i++) check(hex_n[i] == pattern(0), "reset shows zeros");
    for (int n = 0; n < 200; n++) begin
      v = (n < 128) ? (32'(n % 16) << (4 * (n / 16))) : $urandom;
      wr(v);
      for (int i = 0; i < 8; i++) check(hex_n[i] == pattern(int'(v[4*i +: 4])), "digit pattern");
      #1 check(rsp.readdata == v, "read back");
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
