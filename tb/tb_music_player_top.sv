// tb_music_player_top -- end-to-end run of the player hardware, default
// parameters (1 ms timer, 128-frame DAC FIFO, 8 KB RAM, full 640 x 480
// frame).
//
// The testbench plays the role of the processor software through the
// Avalon data master, and models the codec (master-mode BCLK/DACLRC, I2S
// receiver), the SRAM, SDRAM and flash chips, the LCD module and the
// buttons and switches. It:
//   * puts TITLE, TIME, SRATE (44100, digits at addresses 7..12) and VOLUME
//     on the VGA registers,
//   * checks RAM (on-chip, SRAM and SDRAM, with their wait states; the first
//     SDRAM access waits out the 200 us start-up), a flash write and read
//     (two 16-bit write cycles, 23 wait states per read), the 7-segment
//     display, LEDs, keys, switches, the SD and I2C bit-banged lines, the
//     title on the character LCD, and an access to an unmapped address,
//   * starts the 1 ms timer and plays 300 stereo frames while SW[1] says
//     play: polls the FIFO status, writes a frame when it is not full,
//     advances the play time on each timer interrupt and raises the volume
//     when KEY[3] is pressed,
//   * pauses (SW[1] = 0): the FIFO drains and the codec gets silence,
//   * captures one complete VGA frame and checks every pixel against a
//     reference rendering of the final screen.
// Every mechanism is counted (FIFO full, DAC underrun, timer interrupt,
// wait states, decode error, key press, pause, VGA frame, LCD bus cycle,
// SDRAM refresh, flash write cycle) and one that never happened is a failure.
`timescale 1ns/1ps
module tb_music_player_top;
  import music_player_pkg::*;
  localparam int NF = 300, SLOT = 48;

  logic clk_sys = 0, clk_50 = 0, clk_audio = 0, bclk = 0, lrc = 1, rst = 1;
  avm_req_t cpu_req;
  avm_rsp_t cpu_rsp;
  logic timer_irq, stamp_irq, derr;
  logic [3:0] key;
  logic [1:0] sw;
  logic [8:0] ledg;
  logic [17:0] ledr;
  logic [7:0][6:0] hex_n;
  logic sd_clk, sd_cmd_out, sd_cmd_oe, sd_cmd_in, sd_dat_out, sd_dat_oe, sd_dat_in;
  logic sd_dat3_out, sd_dat3_oe, sd_dat3_in;
  logic i2c_sclk, i2c_sdat_out, i2c_sdat_oe, i2c_sdat_in;
  logic aud_xck, aud_dacdat, aud_underrun;
  logic [9:0] vga_r, vga_g, vga_b;
  logic vga_clk, vga_blank_n, vga_sync_n, vga_hs, vga_vs;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_out, sram_dq_in;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic lcd_rs, lcd_rw, lcd_en, lcd_data_oe;
  logic [7:0] lcd_data_out, lcd_data_in;
  logic [11:0] sdram_addr;
  logic [1:0] sdram_ba, sdram_dqm;
  logic sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n, sdram_cke, sdram_dq_oe;
  logic [15:0] sdram_dq_out, sdram_dq_in = 0;
  logic [21:0] fl_addr;
  logic [15:0] fl_dq_out, fl_dq_in = 16'hBAD0;
  logic fl_dq_oe, fl_ce_n, fl_oe_n, fl_we_n, fl_rst_n;
  int checks = 0, failures = 0;

  music_player_top dut (.*, .timer_stamp_irq(stamp_irq), .bus_decode_error(derr),
                        .aud_bclk(bclk), .aud_daclrck(lrc));

  always #5      clk_sys   = ~clk_sys;
  always #10     clk_50    = ~clk_50;
  always #27.127 clk_audio = ~clk_audio;
  always #108.5  bclk      = ~bclk;

  // Character LCD module: status reads return "not busy, address 0";
  // instructions are counted and characters appended to line 1.
  string lcd_line = "";
  int n_lcd_instr = 0;
  assign lcd_data_in = 8'h00;
  always @(negedge lcd_en) if (!rst && !lcd_rw) begin
    if (lcd_rs) lcd_line = {lcd_line, string'(lcd_data_out)};
    else n_lcd_instr++;
  end

  // SDRAM chip, CAS latency 3, bursts of two: ACTIVE opens a row, READ and
  // WRITE (with auto-precharge) move two half-words.
  logic [15:0] sdram [int];
  int sd_row [4], sd_cyc = 0, sd_wr_next = -1, sd_wr_key = 0, n_sdram_ref = 0;
  logic [15:0] sd_rd [int];
  always @(posedge clk_sys) begin
    int k;
    sd_cyc++;
    if (sd_cyc == sd_wr_next) sdram[sd_wr_key] = sdram_dq_out;       // second beat
    k = (int'(sdram_ba) << 20) | (sd_row[sdram_ba] << 8) | int'(sdram_addr[7:0]);
    case ({sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n})
      4'b0011: sd_row[sdram_ba] = int'(sdram_addr);
      4'b0100: begin sdram[k] = sdram_dq_out; sd_wr_key = k + 1; sd_wr_next = sd_cyc + 1; end
      4'b0101: begin
        sd_rd[sd_cyc + 3] = sdram.exists(k) ? sdram[k] : 16'h0;
        sd_rd[sd_cyc + 4] = sdram.exists(k + 1) ? sdram[k + 1] : 16'h0;
      end
      4'b0001: n_sdram_ref++;
      default: ;
    endcase
    sdram_dq_in <= sd_rd.exists(sd_cyc + 1) ? sd_rd[sd_cyc + 1] : 16'h0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------- bus master model
  int n_wait = 0, n_derr = 0;
  task automatic bus(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk_sys);
    cpu_req = AVM_REQ_IDLE; cpu_req.address = a; cpu_req.write = w; cpu_req.read = !w;
    cpu_req.writedata = d; cpu_req.byteenable = 4'hF;
    #1;
    while (cpu_rsp.waitrequest) begin n_wait++; @(negedge clk_sys); #1; end
    if (derr) n_derr++;
    q = cpu_rsp.readdata;
    @(posedge clk_sys); #1 cpu_req = AVM_REQ_IDLE;
  endtask
  function automatic logic [31:0] base(input slave_e s);
    return ADDR_MAP[s].base;
  endfunction
  logic [31:0] q;
  task automatic wr(input slave_e s, input int reg_no, input logic [31:0] d);
    bus(1, base(s) + 32'(reg_no) * 4, d, q);
  endtask
  task automatic rd(input slave_e s, input int reg_no, output logic [31:0] d);
    bus(0, base(s) + 32'(reg_no) * 4, 0, d);
  endtask

  // ----------------------------------------------------------- flash model
  // Read data after the access time; write cycles stored as plain words
  // (command decoding is checked in the flash interface's own testbench).
  logic [15:0] flash [int];
  int n_fl_we = 0;
  always @(fl_addr or fl_ce_n or fl_oe_n) begin
    fl_dq_in = 16'hBAD0;
    if (!fl_ce_n && !fl_oe_n)
      fl_dq_in <= #90 flash.exists(int'(fl_addr)) ? flash[int'(fl_addr)] : 16'hFFFF;
  end
  always @(posedge fl_we_n) if (!rst && !fl_ce_n) begin
    flash[int'(fl_addr)] = fl_dq_out;
    n_fl_we++;
  end

  // ------------------------------------------------------------ SRAM model
  logic [15:0] sram [1 << 18];
  assign sram_dq_in = (!sram_ce_n && !sram_oe_n && !sram_dq_oe) ? sram[sram_addr] : 16'h0;
  always @(posedge sram_we_n) if (!sram_ce_n) begin
    if (!sram_lb_n) sram[sram_addr][7:0]  <= sram_dq_out[7:0];
    if (!sram_ub_n) sram[sram_addr][15:8] <= sram_dq_out[15:8];
  end

  // ----------------------------------------------------------- codec model
  int bcnt = 0, k = 0, n_under = 0;
  logic last_lrc = 1, cur_lrc = 1;
  logic [15:0] sh;
  logic [15:0] got_l [$];
  logic [15:0] got_r [$];
  bit armed = 0;
  always @(negedge bclk) begin
    bcnt <= (bcnt == SLOT - 1) ? 0 : bcnt + 1;
    if (bcnt == SLOT - 1) lrc <= ~lrc;
  end
  always @(posedge bclk) begin
    if (lrc != last_lrc) begin k = 1; cur_lrc = lrc; end else k++;
    last_lrc = lrc;
    if (k >= 2 && k <= 17) sh = {sh[14:0], aud_dacdat};
    if (k == 17) begin
      if (!cur_lrc && (armed || sh != 0)) begin armed = 1; got_l.push_back(sh); end
      else if (cur_lrc && got_l.size() > got_r.size()) got_r.push_back(sh);
    end
    if (aud_underrun && !sw[1]) n_under++;   // counted while paused
  end

  // ------------------------------------------------------- screen reference
  function automatic logic [63:0] ref_glyph(input byte c);
    case (c)
      "T": return 64'h7E18181818181800;  "I": return 64'h3C18181818183C00;
      "L": return 64'h6060606060607E00;  "E": return 64'h7E60607860607E00;
      ":": return 64'h0000180000180000;  "M": return 64'h63777F6B63636300;
      "S": return 64'h3C66603C06663C00;  "R": return 64'h7C66667C786C6600;
      "A": return 64'h183C667E66666600;  "V": return 64'h66666666663C1800;
      "O": return 64'h3C66666666663C00;  "U": return 64'h6666666666663C00;
      "W": return 64'h6363636B7F776300;  ".": return 64'h0000000000181800;
      "C": return 64'h3C66606060663C00;
      "0": return 64'h3C666E7666663C00;  "1": return 64'h1818381818187E00;
      "2": return 64'h3C66060C30607E00;  "3": return 64'h3C66061C06663C00;
      "4": return 64'h060E1E667F060600;  "5": return 64'h7E607C0606663C00;
      "6": return 64'h3C66607C66663C00;  "7": return 64'h7E660C1818181800;
      "8": return 64'h3C66663C66663C00;  "9": return 64'h3C66663E06663C00;
      default: return 64'h0;
    endcase
  endfunction
  string lines [4];
  int    line_row [4] = '{5, 9, 13, 17};
  function automatic bit ref_pixel(input int px, input int py);
    int cr, cc;
    byte ch;
    cr = py / 8; cc = px / 8; ch = " ";
    for (int l = 0; l < 4; l++)
      if (cr == line_row[l] && cc < lines[l].len()) ch = lines[l][cc];
    return ref_glyph(ch)[63 - 8*(py % 8) - (px % 8)];
  endfunction

  // ------------------------------------------------------------- the run
  logic [31:0] frames [NF];
  int sent, n_full, n_irq, n_keys, n_pause, n_frames_vga, play_ms, volume;
  int h, v, lit, w0;
  bit in_act, exp_on;
  string title;

  task automatic show_time(input int t);
    for (int i = 5; i >= 0; i--) begin wr(SL_VGA, REG_TIME0 + i, t % 10); t /= 10; end
  endtask
  task automatic show_volume(input int vol);
    for (int i = 2; i >= 0; i--) begin wr(SL_VGA, REG_VOLUME0 + i, vol % 10); vol /= 10; end
  endtask

  initial begin
    int srate;
    cpu_req = AVM_REQ_IDLE;
    key = 4'hF; sw = 2'b10;                      // keys released (active low), SW1 = play
    sd_cmd_in = 1; sd_dat_in = 1; sd_dat3_in = 1; i2c_sdat_in = 1;
    for (int i = 0; i < NF; i++) frames[i] = {16'($urandom_range(1, 65535)), 16'($urandom)};
    repeat (10) @(posedge clk_50);
    rst = 0;
    repeat (40) @(posedge bclk);

    // --- screen contents, as the player software writes them
    title = "MUSIC.WAV";
    for (int i = 0; i < title.len(); i++) wr(SL_VGA, REG_TITLE0 + i, 32'(title[i]));
    srate = 44100;
    for (int i = 12; i >= 7; i--) begin wr(SL_VGA, i, srate % 10); srate /= 10; end
    volume = 120; show_volume(volume);
    play_ms = 0; show_time(play_ms);
    rd(SL_VGA, 9, q); check(q == 4, "VGA register read back");

    // --- memories
    w0 = n_wait;
    wr(SL_ONCHIP_MEM, 5, 32'h1234_5678); rd(SL_ONCHIP_MEM, 5, q);
    check(q == 32'h1234_5678 && n_wait == w0 + 1, "on-chip RAM, one wait state");
    w0 = n_wait;
    wr(SL_SRAM, 1000, 32'hCAFE_F00D); rd(SL_SRAM, 1000, q);
    check(q == 32'hCAFE_F00D && n_wait == w0 + 10, "SRAM, five wait states per access");
    check(sram[2000] == 16'hF00D && sram[2001] == 16'hCAFE, "SRAM half-word order");
    wr(SL_SDRAM, 21'h12345, 32'h0BAD_BEEF); wr(SL_SDRAM, 21'h12346, 32'h1357_9BDF);
    rd(SL_SDRAM, 21'h12345, q); check(q == 32'h0BAD_BEEF, "SDRAM word");
    rd(SL_SDRAM, 21'h12346, q); check(q == 32'h1357_9BDF, "SDRAM next word");
    wr(SL_FLASH, 21'h00400, 32'hA5A5_1234);
    check(n_fl_we == 2 && flash[22'h800] == 16'h1234 && flash[22'h801] == 16'hA5A5, "flash write cycles");
    w0 = n_wait;
    rd(SL_FLASH, 21'h00400, q);
    check(q == 32'hA5A5_1234 && n_wait == w0 + 23, "flash read, 23 wait states");
    rd(SL_FLASH, 21'h00401, q); check(q == 32'hFFFF_FFFF, "erased flash reads all ones");

    // --- 7-segment, LEDs, keys, switches
    wr(SL_SEG7, 0, 32'h0004_4100);
    check(hex_n[0] == 7'b1000000 && hex_n[2] == 7'b1111001 && hex_n[3] == 7'b0011001, "7-segment digits");
    wr(SL_PIO_GREEN_LED, 0, 9'h1AA); wr(SL_PIO_RED_LED, 0, 18'h2_5A5A);
    check(ledg == 9'h1AA && ledr == 18'h2_5A5A, "LED PIOs");
    rd(SL_PIO_SWITCH, 0, q); check(q == 32'b10, "switches read");
    rd(SL_PIO_KEY, 0, q); check(q == 32'hF, "keys read");

    // --- SD card and I2C lines (software bit-banging)
    wr(SL_PIO_SD_CLK, 0, 1); check(sd_clk == 1, "SD_CLK high");
    wr(SL_PIO_SD_CLK, 0, 0); check(sd_clk == 0, "SD_CLK low");
    check(!sd_cmd_oe && !sd_dat_oe && !sd_dat3_oe && !i2c_sdat_oe, "bidirectional lines start as inputs");
    wr(SL_PIO_SD_CMD, 0, 0); wr(SL_PIO_SD_CMD, 1, 1);
    check(sd_cmd_oe && !sd_cmd_out, "SD_CMD driven low");
    wr(SL_PIO_SD_DAT3, 0, 1); wr(SL_PIO_SD_DAT3, 1, 1);
    check(sd_dat3_oe && sd_dat3_out, "SD_DAT3 driven high");
    @(negedge clk_sys) sd_dat_in = 0; repeat (3) @(posedge clk_sys);
    rd(SL_PIO_SD_DAT, 0, q); check(q == 0, "SD_DAT start bit read");
    wr(SL_PIO_I2C_SCLK, 0, 1); wr(SL_PIO_I2C_SDAT, 0, 1); wr(SL_PIO_I2C_SDAT, 1, 1);
    wr(SL_PIO_I2C_SDAT, 0, 0);                     // START: SDAT falls while SCLK high
    check(i2c_sclk && i2c_sdat_oe && !i2c_sdat_out, "I2C start condition");
    wr(SL_PIO_I2C_SDAT, 1, 0);
    @(negedge clk_sys) i2c_sdat_in = 0; repeat (3) @(posedge clk_sys);
    rd(SL_PIO_I2C_SDAT, 0, q); check(q == 0, "I2C ACK read");

    // --- character LCD: clear, then the title on line 1
    w0 = n_wait;
    rd(SL_LCD, 1, q); check(q[7] == 0, "LCD not busy");
    wr(SL_LCD, 0, 8'h01); wr(SL_LCD, 0, 8'h80);
    for (int i = 0; i < title.len(); i++) wr(SL_LCD, 2, 32'(title[i]));
    check(n_wait == w0 + 56 * (3 + title.len()), "LCD, 56 wait states per access");
    check(lcd_line == title && n_lcd_instr == 2, "LCD line 1 shows the title");

    // --- unmapped address
    bus(0, 32'h0300_0000, 0, q);
    check(n_derr == 1 && q == 0, "decode error on unmapped address");

    // --- play: 1 ms timer, feed the DAC FIFO
    wr(SL_TIMER, 1, 32'b0111);                    // ITO | CONT | START
    sent = 0; n_full = 0; n_irq = 0; n_keys = 0; n_pause = 0;
    fork
      begin                                       // user presses KEY[3] once
        repeat (150_000) @(posedge clk_sys);
        key[3] = 0; repeat (2000) @(posedge clk_sys); key[3] = 1;
      end
    join_none
    while (sent < NF) begin
      if (timer_irq) begin
        wr(SL_TIMER, 0, 0); n_irq++;
        play_ms++; show_time(play_ms);
      end
      rd(SL_PIO_KEY, 0, q);
      if (!q[3] && n_keys == 0) begin n_keys++; volume++; show_volume(volume); end
      rd(SL_PIO_SWITCH, 0, q);
      if (q[1]) begin
        rd(SL_AUDIO, 1, q);
        if (q[0]) n_full++;
        else begin wr(SL_AUDIO, 0, frames[sent]); sent++; end
      end
    end
    // --- pause
    sw[1] = 0;
    repeat (5) @(posedge clk_sys);
    rd(SL_PIO_SWITCH, 0, q);
    if (!q[1]) n_pause++;
    wait (got_r.size() >= NF);
    repeat (6 * 2 * SLOT) @(posedge bclk);
    rd(SL_AUDIO, 1, q); check(q[1], "FIFO empty while paused");
    for (int i = 0; i < NF; i++) begin
      check(got_l[i] == frames[i][31:16] && got_r[i] == frames[i][15:0], "audio frame");
    end
    for (int i = NF; i < got_r.size(); i++) check(got_l[i] == 0 && got_r[i] == 0, "silence while paused");

    // --- one complete VGA frame against the reference screen
    lines[0] = {"  TITLE:  ", title};
    lines[1] = $sformatf("  TIME:   %06d", play_ms);
    lines[2] = "  SRATE:  044100";
    lines[3] = $sformatf("  VOLUME: %03d", volume);
    repeat (10) @(posedge clk_50);
    @(negedge vga_vs);
    @(posedge vga_clk);
    h = 0; v = 0; lit = 0; n_frames_vga = 0;
    for (int n = 0; n < 800 * 525; n++) begin
      in_act = (h >= 144 && h < 784 && v >= 35 && v < 515);
      exp_on = in_act && ref_pixel(h - 144, v - 35);
      check(vga_r == {10{exp_on}} && vga_g == vga_r && vga_b == vga_r, "VGA pixel");
      check(vga_blank_n == in_act && vga_hs == (h >= 96) && vga_vs == (v >= 2), "VGA timing");
      if (exp_on) lit++;
      h++;
      if (h == 800) begin h = 0; v++; end
      @(posedge vga_clk);
    end
    check(!vga_vs, "next frame after 525 lines");
    n_frames_vga++;

    $display("frames sent %0d  FIFO-full polls %0d  underruns %0d  timer irqs %0d  key presses %0d",
             sent, n_full, n_under, n_irq, n_keys);
    $display("pauses %0d  wait states %0d  decode errors %0d  VGA frames %0d  lit pixels %0d",
             n_pause, n_wait, n_derr, n_frames_vga, lit);
    $display("LCD instructions %0d  LCD characters %0d  SDRAM refreshes %0d", n_lcd_instr, lcd_line.len(), n_sdram_ref);
    check(n_full > 0, "mechanism: DAC FIFO full");
    check(n_under > 0, "mechanism: DAC underrun (silence)");
    check(n_irq > 0, "mechanism: 1 ms timer interrupt");
    check(n_keys > 0, "mechanism: volume key");
    check(n_pause > 0, "mechanism: pause switch");
    check(n_wait > 0, "mechanism: bus wait states");
    check(n_derr > 0, "mechanism: decode error");
    check(n_frames_vga > 0 && lit > 1000, "mechanism: VGA frame with text");
    check(n_lcd_instr > 0 && lcd_line.len() > 0, "mechanism: LCD bus cycles");
    check(n_sdram_ref > 100, "mechanism: SDRAM refresh");
    check(n_fl_we > 0, "mechanism: flash write cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
