// tb_async_fifo -- dual-clock FIFO against a queue model.
//
// Write clock 10 ns, read clock 37 ns (unrelated). Phase 1 fills the FIFO
// with the reader stopped and checks that full rises after exactly 2**AW
// words and that further writes are dropped. Phase 2 drains it and checks
// order and that empty rises. Phase 3 runs random writes and reads at both
// ends for thousands of words and checks every word read against the model.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int DW = 16, AW = 4;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, wr_en = 0, rd_en = 0;
  logic [DW-1:0] wdata, rdata;
  logic full, empty;
  logic [AW:0] wlevel;
  int checks = 0, failures = 0;
  logic [DW-1:0] q [$];

  async_fifo #(.DW(DW), .AW(AW)) dut (.wclk, .wrst, .wr_en, .wdata, .full, .wlevel,
                                      .rclk, .rrst, .rd_en, .rdata, .empty);
  always #5    wclk = ~wclk;
  always #18.5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int nwritten, nread;
  bit stop_w;
  initial begin
    repeat (4) @(posedge rclk);
    wrst = 0; rrst = 0;
    // phase 1: fill
    for (int i = 0; i < (1 << AW) + 3; i++) begin
      @(negedge wclk);
      check(full == (i >= (1 << AW)), "full flag while filling");
      check(wlevel == (AW+1)'(i < (1 << AW) ? i : (1 << AW)), "write-side level");
      wdata = DW'(i * 7 + 1); wr_en = 1;
      if (!full) q.push_back(wdata);
      @(posedge wclk); #1 wr_en = 0;
    end
    // phase 2: drain
    repeat (4) @(posedge rclk);
    while (q.size() > 0) begin
      @(negedge rclk);
      check(!empty, "not empty while data left");
      check(rdata == q[0], "fill/drain order");
      void'(q.pop_front());
      rd_en = 1; @(posedge rclk); #1 rd_en = 0;
    end
    @(negedge rclk);
    check(empty, "empty after drain");
    // phase 3: random traffic
    nwritten = 0; nread = 0; stop_w = 0;
    fork
      begin
        while (nwritten < 3000) begin
          @(negedge wclk);
          wr_en = ($urandom_range(0, 3) != 0); wdata = DW'($urandom);
          if (wr_en && !full) begin q.push_back(wdata); nwritten++; end
          @(posedge wclk); #1 wr_en = 0;
        end
      end
      begin
        while (nread < 3000) begin
          @(negedge rclk);
          rd_en = ($urandom_range(0, 4) != 0);
          if (rd_en && !empty) begin
            check(q.size() > 0 && rdata == q[0], "random traffic data");
            void'(q.pop_front()); nread++;
          end
          @(posedge rclk); #1 rd_en = 0;
        end
      end
    join
    check(nread == 3000, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
