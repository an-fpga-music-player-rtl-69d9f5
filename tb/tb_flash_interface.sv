// tb_flash_interface -- checks the flash interface against a model of a
// 16-bit NOR flash with AMD-style program commands.
//
// The model holds 4M half-words. Most of them follow a fixed formula,
// addr * 0x9E37 + 0x55 (low 16 bits); programmed words are kept in a
// table. Read data appears 90 ns after the last change of address, CE# or
// OE#, and reads 0xBAD0 before that. Writes are taken on the rising edge of
// WE#. The model checks:
//   * CE# low and OE# high during a write;
//   * WE# low for at least 35 ns, and data stable 30 ns before it rises;
//   * the address stable while WE# is low;
//   * the interface never drives the data bus while the chip does.
// The model decodes the program sequence (555:AA, 2AA:55, 555:A0, then
// address:data) and the reset command (F0). Programming can only clear
// bits.
//
// The testbench reads 200 random words and compares them with the
// formula. It programs 40 half-words with the command sequence through
// 16-bit stores, reads them back, and gives a 32-bit write of two reset
// commands. It checks the bus time of every access: 24 clocks for a read,
// 18 for a 32-bit write, 10 for a 16-bit write.
`timescale 1ns/1ps
module tb_flash_interface;
  import music_player_pkg::*;

  logic clk = 0, rst = 1;
  avm_req_t req = AVM_REQ_IDLE;
  avm_rsp_t rsp;
  logic [21:0] fl_addr;
  logic [15:0] fl_dq_out, fl_dq_in = 16'hBAD0;
  logic fl_dq_oe, fl_ce_n, fl_oe_n, fl_we_n, fl_rst_n;
  int checks = 0, failures = 0;

  flash_interface dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp), .fl_addr, .fl_dq_out, .fl_dq_oe,
                       .fl_dq_in, .fl_ce_n, .fl_oe_n, .fl_we_n, .fl_rst_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ flash model
  logic [15:0] prog [int];
  realtime t_chg = 0, t_data = 0, t_wefall = 0;
  int cmd_step = 0, n_prog = 0, n_reset_cmd = 0;
  logic [21:0] we_addr;

  function automatic logic [15:0] fword(input logic [21:0] a);
    return prog.exists(int'(a)) ? prog[int'(a)] : 16'(int'(a) * 32'h9E37 + 32'h55);
  endfunction

  always @(fl_addr or fl_ce_n or fl_oe_n) begin
    fl_dq_in = 16'hBAD0;
    t_chg = $realtime;
  end
  always #1 if (!fl_ce_n && !fl_oe_n && $realtime - t_chg >= 90) fl_dq_in = fword(fl_addr);
  always @(fl_dq_out) t_data = $realtime;
  always @(posedge clk) if (!rst) check(!(fl_dq_oe && !fl_ce_n && !fl_oe_n), "no bus conflict");

  always @(negedge fl_we_n) if (!rst) begin
    check(!fl_ce_n && fl_oe_n, "CE# low, OE# high on write");
    t_wefall = $realtime;
    we_addr = fl_addr;
  end

  always @(posedge fl_we_n) if (!rst) begin
    check($realtime - t_wefall >= 35, "WE# pulse width");
    check($realtime - t_data >= 30 && fl_dq_oe, "data setup before WE# rises");
    check(fl_addr == we_addr, "address stable while WE# low");
    if (fl_dq_out[7:0] == 8'hF0 && cmd_step != 3) begin cmd_step = 0; n_reset_cmd++; end
    else case (cmd_step)
      0: cmd_step = (fl_addr[10:0] == 11'h555 && fl_dq_out[7:0] == 8'hAA) ? 1 : 0;
      1: cmd_step = (fl_addr[10:0] == 11'h2AA && fl_dq_out[7:0] == 8'h55) ? 2 : 0;
      2: cmd_step = (fl_addr[10:0] == 11'h555 && fl_dq_out[7:0] == 8'hA0) ? 3 : 0;
      default: begin
        prog[int'(fl_addr)] = fword(fl_addr) & fl_dq_out;
        n_prog++;
        cmd_step = 0;
      end
    endcase
  end

  // ----------------------------------------------------------------- master
  task automatic access(input bit w, input logic [20:0] wa, input logic [31:0] d,
                        input logic [3:0] be, input int exp_clocks, output logic [31:0] q);
    int clocks = 1;
    @(negedge clk);
    req = '{address: 32'(wa), read: !w, write: w, writedata: d, byteenable: be};
    @(posedge clk); #1;
    while (rsp.waitrequest) begin clocks++; @(posedge clk); #1; end
    q = rsp.readdata;
    @(posedge clk); #1;
    req = AVM_REQ_IDLE;
    check(clocks + 1 == exp_clocks, "access clocks");
  endtask

  task automatic write16(input logic [21:0] a, input logic [15:0] d);
    logic [31:0] q;
    access(1, a[21:1], {d, d}, a[0] ? 4'b1100 : 4'b0011, 10, q);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [20:0] wa;
    logic [21:0] pa [40];
    logic [15:0] pd [40];
    repeat (4) @(posedge clk);
    rst = 0;
    @(posedge clk); #1;
    check(fl_rst_n && fl_ce_n && fl_we_n && fl_oe_n && !fl_dq_oe, "idle after reset");

    for (int n = 0; n < 200; n++) begin
      wa = 21'($urandom);
      access(0, wa, 0, 4'hF, 24, q);
      check(q == {fword({wa, 1'b1}), fword({wa, 1'b0})}, "read word");
    end

    for (int n = 0; n < 40; n++) begin
      pa[n] = 22'(n + 1) << 14 | 22'($urandom_range(0, 16383));   // distinct, away from the commands
      pd[n] = 16'($urandom);
      write16(22'h555, 16'hAA); write16(22'h2AA, 16'h55); write16(22'h555, 16'hA0);
      write16(pa[n], pd[n]);
    end
    check(n_prog == 40, "program sequences accepted");
    for (int n = 0; n < 40; n++) begin
      access(0, pa[n][21:1], 0, 4'hF, 24, q);
      check((pa[n][0] ? q[31:16] : q[15:0]) == (16'(int'(pa[n]) * 32'h9E37 + 32'h55) & pd[n]),
            "programmed word");
    end

    access(1, 21'h40, 32'h00F0_00F0, 4'hF, 18, q);   // two reset commands
    check(n_reset_cmd == 2, "32-bit write gives two write cycles");

    $display("reads 240  programmed %0d  reset commands %0d", n_prog, n_reset_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
