// tb_avalon_fabric -- address decoding and response routing.
//
// Every slave is modelled as returning {its index, the word offset it
// received} and a waitrequest pattern of its own. For the first, a random
// and the last word of each window the testbench checks that exactly that
// slave sees the read or write, with the word offset counted from the
// window base, that all others see neither, and that the master gets that
// slave's readdata and waitrequest. Addresses in the gaps between windows
// must select nobody and raise decode_error; the printed base addresses of
// the on-chip memory, timers and LED/switch PIOs are checked literally.
`timescale 1ns/1ps
module tb_avalon_fabric;
  import music_player_pkg::*;
  avm_req_t m_req;
  avm_rsp_t m_rsp;
  avm_req_t [NUM_SLAVES-1:0] s_req;
  avm_rsp_t [NUM_SLAVES-1:0] s_rsp;
  logic derr;
  int checks = 0, failures = 0;

  avalon_fabric dut (.m_req, .m_rsp, .s_req, .s_rsp, .decode_error(derr));

  always_comb
    for (int i = 0; i < NUM_SLAVES; i++) begin
      s_rsp[i].readdata    = {8'(i), s_req[i].address[23:0]};
      s_rsp[i].waitrequest = (i % 3 == 1);
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr %h", what, m_req.address); end
  endtask

  task automatic probe(input logic [31:0] a, input int exp_slave, input bit w);
    int hits;
    m_req = AVM_REQ_IDLE; m_req.address = a; m_req.read = !w; m_req.write = w;
    m_req.writedata = $urandom; m_req.byteenable = 4'hF;
    #1;
    hits = 0;
    for (int i = 0; i < NUM_SLAVES; i++) if (s_req[i].read || s_req[i].write) hits++;
    if (exp_slave < 0) begin
      check(hits == 0 && derr && !m_rsp.waitrequest && m_rsp.readdata == 0, "unmapped address");
    end else begin
      check(hits == 1 && (w ? s_req[exp_slave].write : s_req[exp_slave].read), "one slave selected");
      check(s_req[exp_slave].address == (a - ADDR_MAP[exp_slave].base) >> 2, "word offset");
      check(s_req[exp_slave].writedata == m_req.writedata, "write data forwarded");
      check(m_rsp.readdata == {8'(exp_slave), 24'((a - ADDR_MAP[exp_slave].base) >> 2)}, "readdata routed");
      check(m_rsp.waitrequest == (exp_slave % 3 == 1), "waitrequest routed");
      check(!derr, "no decode error");
    end
  endtask

  initial begin
    check(ADDR_MAP[SL_ONCHIP_MEM].base == 32'h0220_2000 && ADDR_MAP[SL_ONCHIP_MEM].last == 32'h0220_3FFF, "onchip_mem window");
    check(ADDR_MAP[SL_TIMER].base == 32'h0220_50C0 && ADDR_MAP[SL_TIMER_STAMP].base == 32'h0220_50E0, "timer windows");
    check(ADDR_MAP[SL_PIO_GREEN_LED].base == 32'h0220_5120 && ADDR_MAP[SL_PIO_RED_LED].base == 32'h0220_5130
          && ADDR_MAP[SL_PIO_SWITCH].base == 32'h0220_5150, "PIO windows");
    for (int i = 0; i < NUM_SLAVES; i++) begin
      logic [31:0] span;
      span = ADDR_MAP[i].last - ADDR_MAP[i].base + 1;
      probe(ADDR_MAP[i].base, i, 0);
      probe(ADDR_MAP[i].base, i, 1);
      probe(ADDR_MAP[i].last - 3, i, 0);
      probe(ADDR_MAP[i].last, i, 1);
      probe(ADDR_MAP[i].base + (($urandom % span) & ~32'h3), i, $urandom_range(0, 1));
      // just above the window: either another window or nothing
      begin
        int other;
        other = -1;
        for (int j = 0; j < NUM_SLAVES; j++)
          if (ADDR_MAP[i].last + 1 >= ADDR_MAP[j].base && ADDR_MAP[i].last + 1 <= ADDR_MAP[j].last) other = j;
        probe(ADDR_MAP[i].last + 1, other, 0);
      end
    end
    probe(32'h0, -1, 0);
    probe(32'h0220_4000, -1, 1);
    m_req = AVM_REQ_IDLE; #1;
    check(!derr, "idle bus: no decode error");
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
