// tb_lcd_controller -- checks the character-LCD slave against a model of an
// HD44780-type 16 x 2 module.
//
// The module model holds the display RAM and address counter, executes
// instructions (clear, set address, and any other instruction, which it
// only records) and character writes on the falling edge of E, answers
// reads while E is high (busy flag and address counter, or the character
// at the address counter, which then advances) and stays busy for 3 us
// after each instruction or write. It checks the bus timing of every cycle:
// RS/RW set up 40 ns before E rises, E high at least 230 ns, write data
// stable 80 ns before E falls, RS/RW/data held 10 ns after E falls, at
// least 500 ns from one E rise to the next, nothing changing while E is
// high, and no access while busy.
//
// The testbench acts as the player software: it polls the busy flag before
// each access, initialises the module, writes the song title on line 1 and
// the volume on line 2, reads line 1 back through data reads and reads the
// address counter. Every bus access must hold waitrequest for exactly
// 1 + T_AS + T_PW + T_H = 56 clocks at 100 MHz.
`timescale 1ns/1ps
module tb_lcd_controller;
  import music_player_pkg::*;
  localparam int WAIT_CLKS = 56;
  localparam realtime BUSY_NS = 3000;

  logic clk = 0, rst = 1;
  avm_req_t req = AVM_REQ_IDLE;
  avm_rsp_t rsp;
  logic lcd_rs, lcd_rw, lcd_en, lcd_data_oe;
  logic [7:0] lcd_data_out, lcd_data_in;
  int checks = 0, failures = 0;

  lcd_controller dut (.clk, .rst, .avs_req(req), .avs_rsp(rsp), .lcd_rs, .lcd_rw, .lcd_en,
                      .lcd_data_out, .lcd_data_oe, .lcd_data_in);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ module model
  logic [7:0] ddram [128];
  logic [6:0] ac = 0;
  realtime busy_until = 0, t_ctrl = 0, t_data = 0, t_rise = -1000, t_fall = -1000;
  int n_instr = 0, n_busy_seen = 0;

  function automatic bit busy();
    return $realtime < busy_until;
  endfunction

  always_comb begin
    if (lcd_en && lcd_rw) lcd_data_in = lcd_rs ? ddram[ac] : {busy(), ac};
    else                  lcd_data_in = 8'h5A;     // not driven by the module
  end

  always @(lcd_rs or lcd_rw) if (!rst) begin
    check(!lcd_en, "RS/RW stable while E high");
    check($realtime - t_fall >= 10, "RS/RW hold after E falls");
    t_ctrl = $realtime;
  end

  always @(lcd_data_out or lcd_data_oe) if (!rst) begin
    check(!(lcd_en && !lcd_rw), "write data stable while E high");
    check($realtime - t_fall >= 10, "write data hold after E falls");
    t_data = $realtime;
  end

  always @(posedge lcd_en) if (!rst) begin
    check($realtime - t_ctrl >= 40, "RS/RW setup before E");
    check($realtime - t_rise >= 500, "E cycle time");
    check(!(lcd_rw && lcd_data_oe), "data bus not driven on a read");
    if (!(lcd_rw && !lcd_rs)) check(!busy(), "no access while busy");
    t_rise = $realtime;
  end

  always @(negedge lcd_en) if (!rst) begin
    check($realtime - t_rise >= 230, "E pulse width");
    t_fall = $realtime;
    if (!lcd_rw) begin
      check(lcd_data_oe && $realtime - t_data >= 80, "write data setup before E falls");
      busy_until = $realtime + BUSY_NS;
      if (lcd_rs) begin
        ddram[ac] = lcd_data_out;
        ac++;
      end else begin
        n_instr++;
        if (lcd_data_out == 8'h01) begin
          foreach (ddram[i]) ddram[i] = 8'h20;
          ac = 0;
        end else if (lcd_data_out[7]) ac = lcd_data_out[6:0];
      end
    end else if (lcd_rs) ac++;
  end

  // ----------------------------------------------------------- software side
  task automatic bus(input bit w, input int a, input logic [31:0] d, output logic [31:0] q);
    int waits = 0;
    @(negedge clk);
    req = '{address: 32'(a), read: !w, write: w, writedata: d, byteenable: 4'hF};
    #1;
    while (rsp.waitrequest) begin waits++; @(negedge clk); #1; end
    q = rsp.readdata;
    @(posedge clk); #1;
    req = AVM_REQ_IDLE;
    check(waits == WAIT_CLKS, "waitrequest clocks per access");
  endtask

  task automatic wait_ready();
    logic [31:0] s;
    do begin
      bus(0, 1, 0, s);
      if (s[7]) n_busy_seen++;
    end while (s[7]);
  endtask

  task automatic instr(input logic [7:0] c);
    logic [31:0] q;
    wait_ready(); bus(1, 0, c, q);
  endtask

  task automatic put(input string str);
    logic [31:0] q;
    for (int i = 0; i < str.len(); i++) begin wait_ready(); bus(1, 2, 32'(str[i]), q); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string line1 = "MUSIC.WAV", line2 = "VOLUME 120";
    logic [31:0] q;
    foreach (ddram[i]) ddram[i] = 8'h00;
    repeat (5) @(posedge clk);
    rst = 0;
    check(!lcd_en && !lcd_data_oe, "idle after reset");

    instr(8'h38);                 // 8-bit bus, 2 lines
    instr(8'h0C);                 // display on
    instr(8'h06);                 // entry mode: increment
    instr(8'h01);                 // clear
    instr(8'h80); put(line1);     // line 1
    instr(8'hC0); put(line2);     // line 2 (address 0x40)

    wait_ready();
    bus(0, 1, 0, q);
    check(q[6:0] == 7'(8'h40 + line2.len()), "address counter read");

    for (int i = 0; i < 16; i++)
      check(ddram[i] == (i < line1.len() ? line1[i] : 8'h20), "line 1 contents");
    for (int i = 0; i < 16; i++)
      check(ddram[8'h40 + i] == (i < line2.len() ? line2[i] : 8'h20), "line 2 contents");

    instr(8'h80);
    for (int i = 0; i < line1.len(); i++) begin
      wait_ready();
      bus(0, 3, 0, q);
      check(q[7:0] == line1[i], "character read back");
    end
    bus(0, 0, 0, q);              // a read of word 0 also returns the status
    check(q[6:0] == 7'(line1.len()), "status through word 0");

    check(n_instr == 7, "instructions executed");
    check(n_busy_seen > 0, "busy flag seen");
    repeat (100) @(posedge clk);
    $display("instructions %0d  busy polls %0d", n_instr, n_busy_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
