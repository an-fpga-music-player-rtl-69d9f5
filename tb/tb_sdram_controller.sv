// tb_sdram_controller -- checks the SDRAM controller against a model of a
// 4-bank, 16-bit SDRAM with 12-bit rows and 8-bit columns.
//
// The model decodes the command pins on every rising clock edge and checks
// the protocol: start-up order (no command before the power-up wait, a
// PRECHARGE ALL, two AUTO REFRESH, then LOAD MODE REGISTER with burst
// length 2, sequential, CAS latency 3) and afterwards ACTIVE only to an idle
// bank after precharge and refresh times (tRP, tRFC, tRC), READ/WRITE only
// to the open row after tRCD and always with auto-precharge, REFRESH only
// with every bank idle, and at least one REFRESH every REFRESH_CYCLES plus
// the longest access. It stores written half-words under their DQM masks
// and returns read data CAS latency clocks after the READ, checking that
// the controller does not drive the data bus then.
//
// The testbench issues 600 random reads and writes (random byte enables,
// random gaps, some to the same row) and compares every read with a
// reference memory. Accesses that see no refresh must take exactly 10
// (read) and 8 (write) clocks. The power-up wait and the refresh interval
// are shortened (200 and 100 clocks) so that refreshes collide with bus
// accesses often; the command timing is at its defaults.
`timescale 1ns/1ps
module tb_sdram_controller;
  import music_player_pkg::*;
  localparam int INIT = 200, REFI = 100, CL = 3;
  localparam int T_RCD = 2, T_RP = 2, T_RFC = 7, T_WR = 2, T_RC = 7;

  logic clk = 0, rst = 1;
  avm_req_t req = AVM_REQ_IDLE;
  avm_rsp_t rsp;
  logic [11:0] a;
  logic [1:0] ba, dqm;
  logic cs_n, ras_n, cas_n, we_n, cke, dq_oe;
  logic [15:0] dq_out, dq_in = 0;
  int checks = 0, failures = 0;

  sdram_controller #(.REFRESH_CYCLES(REFI), .INIT_CYCLES(INIT)) dut (
    .clk, .rst, .avs_req(req), .avs_rsp(rsp), .sdram_addr(a), .sdram_ba(ba),
    .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_cke(cke), .sdram_dqm(dqm), .sdram_dq_out(dq_out), .sdram_dq_oe(dq_oe),
    .sdram_dq_in(dq_in));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ SDRAM model
  logic [15:0] mem [int];
  bit          open_b [4];
  int          row_b [4], act_at [4], idle_at [4], last_act [4];
  int          cyc = 0, rst_cyc = 0, last_ref = -1000, n_ref = 0, n_init_ref = 0;
  bit          mode_set = 0, pre_all = 0;
  int          wr_beat_at = -1, wr_key = 0;
  logic [15:0] rd_q [int];                    // cycle -> data to present
  int          n_rd_cmd = 0, n_wr_cmd = 0;

  function automatic int key(input int b, input int r, input int c);
    return (b << 20) | (r << 8) | c;
  endfunction

  task automatic store(input int k, input logic [15:0] d, input logic [1:0] m);
    logic [15:0] old = mem.exists(k) ? mem[k] : 16'h0;
    if (!m[0]) old[7:0]  = d[7:0];
    if (!m[1]) old[15:8] = d[15:8];
    mem[k] = old;
  endtask

  initial foreach (idle_at[i]) begin idle_at[i] = 0; last_act[i] = -1000; open_b[i] = 0; end

  always @(posedge clk) begin
    logic [3:0] c;
    cyc++;
    if (rst) rst_cyc = cyc;
    c = {cs_n, ras_n, cas_n, we_n};
    if (!rst) begin
      // second beat of a write burst
      if (cyc == wr_beat_at) begin
        check(dq_oe, "write data driven, beat 2");
        store(wr_key + 1, dq_out, dqm);
      end
      if (rd_q.exists(cyc)) check(!dq_oe, "bus free while the SDRAM drives it");
      if (c != 4'b0111 && c[3] == 1'b0) begin
        check(cke, "CKE high");
        check(cyc - rst_cyc > INIT, "power-up wait");
        if (!mode_set) begin
          check(c inside {4'b0010, 4'b0001, 4'b0000}, "only init commands before the mode register");
          if (c == 4'b0010) begin check(a[10], "precharge all"); pre_all = 1; end
          if (c == 4'b0001) begin check(pre_all && cyc - last_ref >= T_RFC, "init refresh"); last_ref = cyc; n_init_ref++; end
          if (c == 4'b0000) begin
            check(n_init_ref >= 2 && cyc - last_ref >= T_RFC, "two refreshes before mode register");
            check(ba == 0 && a[2:0] == 3'b001 && a[3] == 0 && a[6:4] == CL && a[9] == 0, "mode register value");
            mode_set = 1;
          end
        end else begin
          case (c)
            4'b0011: begin                      // ACTIVE
              check(!open_b[ba] && cyc >= idle_at[ba], "ACTIVE to an idle bank after tRP");
              check(cyc - last_ref >= T_RFC, "ACTIVE after tRFC");
              check(cyc - last_act[ba] >= T_RC, "ACTIVE to ACTIVE tRC");
              open_b[ba] = 1; row_b[ba] = a; act_at[ba] = cyc; last_act[ba] = cyc;
            end
            4'b0101, 4'b0100: begin             // READ / WRITE
              int k;
              k = key(ba, row_b[ba], a[7:0]);
              check(open_b[ba] && cyc - act_at[ba] >= T_RCD, "READ/WRITE to an open row after tRCD");
              check(a[10], "auto-precharge");
              check(a[0] == 0, "burst starts on an even column");
              open_b[ba] = 0;
              if (!we_n) begin
                n_wr_cmd++;
                check(dq_oe, "write data driven, beat 1");
                store(k, dq_out, dqm);
                wr_beat_at = cyc + 1; wr_key = k;
                idle_at[ba] = cyc + 1 + T_WR + T_RP;
              end else begin
                n_rd_cmd++;
                rd_q[cyc + CL]     = mem.exists(k) ? mem[k] : 16'h0;
                rd_q[cyc + CL + 1] = mem.exists(k + 1) ? mem[k + 1] : 16'h0;
                idle_at[ba] = cyc + 2 + T_RP;
              end
            end
            4'b0001: begin                      // AUTO REFRESH
              for (int i = 0; i < 4; i++) check(!open_b[i] && cyc >= idle_at[i], "REFRESH with all banks idle");
              check(cyc - last_ref <= REFI + 15, "refresh interval");
              last_ref = cyc; n_ref++;
            end
            default: check(0, "unexpected command");
          endcase
        end
      end
      if (mode_set) check(cyc - last_ref <= REFI + 15, "refresh not overdue");
    end
    // present read data for the next edge
    dq_in <= rd_q.exists(cyc + 1) ? rd_q[cyc + 1] : 16'hDEAD;
  end

  // ----------------------------------------------------------------- master
  logic [31:0] ref_mem [int];
  logic [20:0] written [$];
  int n_plain_rd = 0, n_plain_wr = 0, n_collide = 0;

  task automatic access(input bit w, input logic [20:0] wa, input logic [31:0] d,
                        input logic [3:0] be, output logic [31:0] q);
    int clocks = 1, ref0, start;
    @(negedge clk);
    ref0 = n_ref; start = cyc;
    req = '{address: 32'(wa), read: !w, write: w, writedata: d, byteenable: be};
    @(posedge clk); #1;
    while (rsp.waitrequest) begin clocks++; @(posedge clk); #1; end
    q = rsp.readdata;
    @(posedge clk); #1;                       // the transfer ends at this edge
    req = AVM_REQ_IDLE;
    if (n_ref == ref0 && start - last_ref > T_RFC + 1) begin
      // clocks counts from the request to the clock it completes in
      check(clocks + 1 == (w ? 8 : 10), "access clocks");
      if (w) n_plain_wr++; else n_plain_rd++;
    end else n_collide++;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, d, e;
    logic [20:0] wa;
    logic [3:0] be;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      if ($urandom_range(0, 3) == 0 && written.size() > 0)
        wa = written[$urandom_range(0, written.size() - 1)];
      else if ($urandom_range(0, 2) == 0) wa = {2'd1, 12'd77, 7'($urandom)};   // same row
      else wa = 21'($urandom);
      if ($urandom_range(0, 1)) begin
        d = $urandom; be = 4'($urandom_range(1, 15));
        e = ref_mem.exists(wa) ? ref_mem[wa] : 32'h0;
        for (int b = 0; b < 4; b++) if (be[b]) e[8*b +: 8] = d[8*b +: 8];
        ref_mem[wa] = e;
        written.push_back(wa);
        access(1, wa, d, be, q);
      end else begin
        access(0, wa, 0, 4'hF, q);
        check(q == (ref_mem.exists(wa) ? ref_mem[wa] : 32'h0), "read data");
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("reads %0d  writes %0d  refreshes %0d  plain reads %0d  plain writes %0d  refresh collisions %0d",
             n_rd_cmd, n_wr_cmd, n_ref, n_plain_rd, n_plain_wr, n_collide);
    check(n_ref > 10 && n_collide > 0, "refreshes interleaved with accesses");
    check(n_plain_rd > 0 && n_plain_wr > 0, "plain accesses timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
