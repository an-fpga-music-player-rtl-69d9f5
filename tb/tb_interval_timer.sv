// tb_interval_timer -- 1 ms timer at 100 MHz, default parameters.
//
// Checks: stopped after reset with period 99999; in continuous mode with
// the interrupt enabled, timeouts come every 100,000 clocks (1 ms) and irq
// rises with each; writing status clears TO and irq; a snapshot taken a
// known number of clocks after a timeout holds the expected count; STOP
// freezes the counter; a new period (999) written through periodl/periodh
// stops the timer and, once restarted, gives 1,000-clock intervals; one-shot
// mode stops after the first timeout.
`timescale 1ns/1ps
module tb_interval_timer;
  import music_player_pkg::*;
  logic clk = 0, rst = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic irq, to_pulse;
  int checks = 0, failures = 0;
  longint cyc = 0;

  interval_timer dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp), .irq, .timeout_pulse(to_pulse));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus(input bit w, input int a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    req = AVM_REQ_IDLE; req.address = 32'(a); req.write = w; req.read = !w; req.writedata = d;
    #1 q = rsp.readdata;
    @(posedge clk); #1 req = AVM_REQ_IDLE;
  endtask

  logic [31:0] q, lo, hi;
  longint t1, t2, t3;
  initial begin
    req = AVM_REQ_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    bus(0, 0, 0, q); check(q[1:0] == 2'b00, "stopped, no timeout after reset");
    bus(0, 2, 0, lo); bus(0, 3, 0, hi);
    check({hi[15:0], lo[15:0]} == 32'd99_999, "default period 1 ms");
    bus(1, 1, 32'b0111, q);                      // ITO | CONT | START
    bus(0, 0, 0, q); check(q[1] == 1, "running");
    @(posedge to_pulse); t1 = cyc;
    @(posedge to_pulse); t2 = cyc;
    @(posedge to_pulse); t3 = cyc;
    check(t2 - t1 == 100_000 && t3 - t2 == 100_000, "1 ms interval = 100000 clocks");
    #1 check(irq == 1, "irq on timeout");
    bus(1, 0, 0, q);
    #1 check(irq == 0, "irq cleared by status write");
    // snapshot 50 clocks after a timeout
    @(posedge to_pulse);
    repeat (49) @(posedge clk);
    @(negedge clk);
    req = AVM_REQ_IDLE; req.address = 4; req.write = 1;
    @(posedge clk); #1 req = AVM_REQ_IDLE;
    bus(0, 4, 0, lo); bus(0, 5, 0, hi);
    check({hi[15:0], lo[15:0]} == 32'd99_999 - 32'd49, "snapshot value (50th edge after timeout)");
    // stop
    bus(1, 1, 32'b1000, q);
    bus(1, 4, 0, q); bus(0, 4, 0, lo);
    repeat (100) @(posedge clk);
    bus(1, 4, 0, q); bus(0, 4, 0, hi);
    check(lo == hi, "stopped counter does not move");
    bus(0, 0, 0, q); check(q[1] == 0, "RUN low after STOP");
    // new period 999
    bus(1, 1, 32'b0110, q);                      // CONT | START
    bus(1, 2, 999, q); bus(1, 3, 0, q);
    bus(0, 0, 0, q); check(q[1] == 0, "period write stops the timer");
    bus(1, 1, 32'b0110, q);
    @(posedge to_pulse); t1 = cyc;
    @(posedge to_pulse); t2 = cyc;
    check(t2 - t1 == 1000, "period 999 gives 1000 clocks");
    check(irq == 0, "irq masked when ITO = 0");
    // one-shot
    bus(1, 1, 32'b1000, q);
    bus(1, 1, 32'b0100, q);                      // START, CONT = 0
    @(posedge to_pulse);
    repeat (3) @(posedge clk);
    bus(0, 0, 0, q); check(q[1:0] == 2'b01, "one-shot: stopped with TO set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
