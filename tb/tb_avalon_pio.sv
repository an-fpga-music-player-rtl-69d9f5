// tb_avalon_pio -- output, input and bidirectional PIO ports.
//
// Output port (18 bits, reset value 0x15): reset value, writes reach the
// pins, read returns the output register, direction register ignored.
// Input port (4 bits): pins are read after the two-flop synchroniser
// (visible on the third clock, not before), writes have no effect.
// Bidirectional port (1 bit, like SD_CMD): starts as input, becomes a driver
// when the direction bit is written, and reads the pin in both cases.
`timescale 1ns/1ps
module tb_avalon_pio;
  import music_player_pkg::*;
  logic clk = 0, rst = 1;
  avm_req_t rq_o, rq_i, rq_b;
  avm_rsp_t rs_o, rs_i, rs_b;
  logic [17:0] o_out, o_oe;
  logic [3:0]  i_in, i_out, i_oe;
  logic        b_in, b_out, b_oe;
  int checks = 0, failures = 0;

  avalon_pio #(.WIDTH(18), .DIR(PIO_OUTPUT), .RESET_VALUE(32'h15)) u_o (
    .clk, .rst, .avs_req(rq_o), .avs_rsp(rs_o), .pio_in('0), .pio_out(o_out), .pio_oe(o_oe));
  avalon_pio #(.WIDTH(4), .DIR(PIO_INPUT)) u_i (
    .clk, .rst, .avs_req(rq_i), .avs_rsp(rs_i), .pio_in(i_in), .pio_out(i_out), .pio_oe(i_oe));
  avalon_pio #(.WIDTH(1), .DIR(PIO_BIDIR)) u_b (
    .clk, .rst, .avs_req(rq_b), .avs_rsp(rs_b), .pio_in(b_in), .pio_out(b_out), .pio_oe(b_oe));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(ref avm_req_t rq, input int a, input logic [31:0] d);
    @(negedge clk);
    rq = AVM_REQ_IDLE; rq.address = 32'(a); rq.write = 1; rq.writedata = d;
    @(posedge clk); #1 rq = AVM_REQ_IDLE;
  endtask

  task automatic rd_o(input int a, output logic [31:0] q);
    @(negedge clk); rq_o = AVM_REQ_IDLE; rq_o.address = 32'(a); rq_o.read = 1; #1;
    q = rs_o.readdata; @(posedge clk); #1 rq_o = AVM_REQ_IDLE;
  endtask
  task automatic rd_i(input int a, output logic [31:0] q);
    @(negedge clk); rq_i = AVM_REQ_IDLE; rq_i.address = 32'(a); rq_i.read = 1; #1;
    q = rs_i.readdata; @(posedge clk); #1 rq_i = AVM_REQ_IDLE;
  endtask
  task automatic rd_b(input int a, output logic [31:0] q);
    @(negedge clk); rq_b = AVM_REQ_IDLE; rq_b.address = 32'(a); rq_b.read = 1; #1;
    q = rs_b.readdata; @(posedge clk); #1 rq_b = AVM_REQ_IDLE;
  endtask

  logic [31:0] q;
  initial begin
    rq_o = AVM_REQ_IDLE; rq_i = AVM_REQ_IDLE; rq_b = AVM_REQ_IDLE;
    i_in = 4'hA; b_in = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // output port
    check(o_out == 18'h15 && o_oe == '1, "output reset value, always driven");
    for (int n = 0; n < 20; n++) begin
      logic [17:0] d; d = 18'($urandom);
      wr(rq_o, 0, {14'h3FFF, d});
      check(o_out == d, "output pins");
      rd_o(0, q); check(q == {14'd0, d}, "output read back");
    end
    wr(rq_o, 1, 32'hFFFF_FFFF);
    check(o_oe == '1, "direction ignored on output port");
    // input port
    check(i_oe == '0, "input port never drives");
    rd_i(0, q); check(q == 32'hA, "input read");
    @(negedge clk) i_in = 4'h5;
    rd_i(0, q); check(q == 32'hA, "synchroniser delay: old value after one clock");
    rd_i(0, q); check(q == 32'h5, "new value after synchroniser");
    wr(rq_i, 0, 32'hF); rd_i(0, q); check(q == 32'h5, "writes ignored on input port");
    // bidirectional port
    check(b_oe == 0, "bidir starts as input");
    rd_b(1, q); check(q == 0, "direction reset 0");
    wr(rq_b, 0, 1);
    check(b_out == 1 && b_oe == 0, "output register written, not driven");
    wr(rq_b, 1, 1);
    check(b_oe == 1, "driving after direction write");
    rd_b(1, q); check(q == 1, "direction read back");
    @(negedge clk) b_in = 0;
    repeat (3) @(posedge clk);
    rd_b(0, q); check(q == 0, "bidir reads pin");
    wr(rq_b, 1, 0);
    check(b_oe == 0, "released");
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
