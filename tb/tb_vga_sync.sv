// tb_vga_sync -- checks the 640 x 480 scan counters over two full fields.
//
// With the pixel enable high every clock, the testbench keeps its own
// horizontal and vertical position and checks against it: line length 800,
// field length 525 lines, sync pulse widths (96 pixels, 2 lines), active
// area 640 x 480 starting after sync + back porch + border (144, 35), and
// the x/y coordinates. With the enable high every other clock the line must
// take 1600 clocks.
`timescale 1ns/1ps
module tb_vga_sync;
  logic clk = 0, rst = 1, ce = 1;
  logic [9:0] hcount, vcount, x, y;
  logic hs_n, vs_n, active, eol, eof;
  int checks = 0, failures = 0;

  vga_sync dut (.clk, .rst, .ce, .hcount, .vcount, .hsync_n(hs_n), .vsync_n(vs_n),
                .active, .x, .y, .end_of_line(eol), .end_of_field(eof));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  initial begin
    #20_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h, v, act_pix, hs_cnt, vs_lines, line_clocks, t0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    h = 0; v = 0; act_pix = 0; hs_cnt = 0; vs_lines = 0;
    for (int n = 0; n < 2 * 800 * 525; n++) begin
      check(hcount == 10'(h) && vcount == 10'(v), "counter");
      check(hs_n == !(h < 96), "hsync");
      check(vs_n == !(v < 2), "vsync");
      check(active == (h >= 144 && h < 784 && v >= 35 && v < 515), "active");
      if (active) begin
        check(x == 10'(h - 144) && y == 10'(v - 35), "xy");
        act_pix++;
      end
      check(eol == (h == 799), "eol");
      check(eof == (v == 524), "eof");
      if (!hs_n) hs_cnt++;
      if (h == 0 && !vs_n) vs_lines++;
      h++;
      if (h == 800) begin h = 0; v = (v == 524) ? 0 : v + 1; end
      @(negedge clk);
    end
    check(act_pix == 2 * 640 * 480, "active pixel count");
    check(hs_cnt == 2 * 525 * 96, "hsync clocks");
    check(vs_lines == 2 * 2, "vsync lines");
    // half-rate enable: one line takes 1600 clocks
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    fork
      forever begin @(posedge clk); ce <= ~ce; end
    join_none
    @(posedge eol);
    t0 = $time;
    @(posedge clk);
    @(posedge eol);
    line_clocks = ($time - t0) / 10;
    check(line_clocks == 1600, "line at half rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
