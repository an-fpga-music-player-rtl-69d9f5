// music_player_top -- hardware of the FPGA music player, around the CPU.
//
// The player is a soft-processor system: software on a 32-bit processor
// reads WAV files from an SD card (FAT16, 1-bit SD mode, all bit-banged
// through PIO pins), configures the WM8731 codec over a bit-banged I2C bus,
// streams the PCM samples into the audio controller's DAC FIFO, shows title,
// play time, sample rate and volume on a VGA monitor and reacts to the
// buttons and switches. This module holds every peripheral of that system
// and the Avalon interconnect; the processor itself is outside, and its
// Avalon data master enters on cpu_req / cpu_rsp.
//
// Peripherals (base addresses in music_player_pkg::ADDR_MAP):
//   onchip_ram 8 KB, vga_controller (32 character registers), audio
//   controller, two interval timers (timer, timer_stamp: 1 ms, 32 bit),
//   PIOs: 4 keys (in), 9 green LEDs, 18 red LEDs (out), 2 switches (in),
//   SD_CLK (out), SD_CMD, SD_DAT, SD_DAT3 (bidirectional), I2C_SCLK (out),
//   I2C_SDAT (bidirectional), an 8-digit 7-segment controller, the
//   SRAM controller (256K x 16), the 16 x 2 character LCD controller,
//   the SDRAM controller (8 MB main memory, 16-bit data) and the flash
//   interface (4M x 16 NOR flash).
//
// Clocks: clk_sys (100 MHz, processor and bus), clk_50 (board clock, VGA),
// clk_audio (18.432 MHz codec master clock) and the codec's own BCLK.
// rst is active high and is synchronised into clk_sys and clk_50.
// Bidirectional pins come out as _out/_oe/_in triples.
module music_player_top
  import music_player_pkg::*;
(
  input  logic            clk_sys,
  input  logic            clk_50,
  input  logic            clk_audio,
  input  logic            rst,
  // processor data master
  input  avm_req_t        cpu_req,
  output avm_rsp_t        cpu_rsp,
  output logic            timer_irq,
  output logic            timer_stamp_irq,
  output logic            bus_decode_error,
  // user controls
  input  logic [3:0]      key,
  input  logic [1:0]      sw,
  output logic [8:0]      ledg,
  output logic [17:0]     ledr,
  output logic [7:0][6:0] hex_n,
  // SD card, 1-bit mode
  output logic            sd_clk,
  output logic            sd_cmd_out, sd_cmd_oe,
  input  logic            sd_cmd_in,
  output logic            sd_dat_out, sd_dat_oe,
  input  logic            sd_dat_in,
  output logic            sd_dat3_out, sd_dat3_oe,
  input  logic            sd_dat3_in,
  // codec control (I2C) and audio
  output logic            i2c_sclk,
  output logic            i2c_sdat_out, i2c_sdat_oe,
  input  logic            i2c_sdat_in,
  output logic            aud_xck,
  input  logic            aud_bclk,
  input  logic            aud_daclrck,
  output logic            aud_dacdat,
  output logic            aud_underrun,
  // VGA (ADV7123)
  output logic [9:0]      vga_r, vga_g, vga_b,
  output logic            vga_clk, vga_blank_n, vga_sync_n, vga_hs, vga_vs,
  // SRAM
  output logic [17:0]     sram_addr,
  output logic [15:0]     sram_dq_out,
  output logic            sram_dq_oe,
  input  logic [15:0]     sram_dq_in,
  output logic            sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n,
  // character LCD
  output logic            lcd_rs, lcd_rw, lcd_en,
  output logic [7:0]      lcd_data_out,
  output logic            lcd_data_oe,
  input  logic [7:0]      lcd_data_in,
  // SDRAM (its clock comes from the PLL, phase-shifted)
  output logic [11:0]     sdram_addr,
  output logic [1:0]      sdram_ba,
  output logic            sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n, sdram_cke,
  output logic [1:0]      sdram_dqm,
  output logic [15:0]     sdram_dq_out,
  output logic            sdram_dq_oe,
  input  logic [15:0]     sdram_dq_in,
  // NOR flash
  output logic [21:0]     fl_addr,
  output logic [15:0]     fl_dq_out,
  output logic            fl_dq_oe,
  input  logic [15:0]     fl_dq_in,
  output logic            fl_ce_n, fl_oe_n, fl_we_n, fl_rst_n
);
  logic rst_sys, rst_50;
  reset_sync u_rs_sys (.clk(clk_sys), .rst_in(rst), .rst_out(rst_sys));
  reset_sync u_rs_50  (.clk(clk_50),  .rst_in(rst), .rst_out(rst_50));

  avm_req_t [NUM_SLAVES-1:0] s_req;
  avm_rsp_t [NUM_SLAVES-1:0] s_rsp;

  avalon_fabric u_fabric (
    .m_req(cpu_req), .m_rsp(cpu_rsp), .s_req(s_req), .s_rsp(s_rsp),
    .decode_error(bus_decode_error)
  );

  onchip_ram u_onchip_mem (
    .clk(clk_sys), .rst(rst_sys),
    .avs_req(s_req[SL_ONCHIP_MEM]), .avs_rsp(s_rsp[SL_ONCHIP_MEM])
  );

  vga_controller u_vga (
    .clk_sys(clk_sys), .rst_sys(rst_sys),
    .avs_req(s_req[SL_VGA]), .avs_rsp(s_rsp[SL_VGA]),
    .clk_50(clk_50), .rst_50(rst_50),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .vga_clk(vga_clk),
    .vga_blank_n(vga_blank_n), .vga_sync_n(vga_sync_n),
    .vga_hs(vga_hs), .vga_vs(vga_vs)
  );

  audio_controller u_audio (
    .clk_sys(clk_sys), .rst_sys(rst_sys),
    .avs_req(s_req[SL_AUDIO]), .avs_rsp(s_rsp[SL_AUDIO]),
    .clk_audio(clk_audio), .aud_xck(aud_xck), .aud_bclk(aud_bclk),
    .aud_daclrck(aud_daclrck), .aud_dacdat(aud_dacdat), .underrun(aud_underrun)
  );

  logic timer_to, stamp_to;
  interval_timer u_timer (
    .clk(clk_sys), .rst(rst_sys),
    .avs_req(s_req[SL_TIMER]), .avs_rsp(s_rsp[SL_TIMER]),
    .irq(timer_irq), .timeout_pulse(timer_to)
  );
  interval_timer u_timer_stamp (
    .clk(clk_sys), .rst(rst_sys),
    .avs_req(s_req[SL_TIMER_STAMP]), .avs_rsp(s_rsp[SL_TIMER_STAMP]),
    .irq(timer_stamp_irq), .timeout_pulse(stamp_to)
  );

  // ------------------------------------------------------------------ PIOs
  logic [3:0]  key_oe_unused;
  logic [3:0]  key_out_unused;
  logic [1:0]  sw_oe_unused, sw_out_unused;
  logic [8:0]  ledg_oe;
  logic [17:0] ledr_oe;
  logic        sd_clk_oe, i2c_sclk_oe;

  avalon_pio #(.WIDTH(4), .DIR(PIO_INPUT)) u_pio_key (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_KEY]), .avs_rsp(s_rsp[SL_PIO_KEY]),
    .pio_in(key), .pio_out(key_out_unused), .pio_oe(key_oe_unused));
  avalon_pio #(.WIDTH(9), .DIR(PIO_OUTPUT)) u_pio_green_led (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_GREEN_LED]), .avs_rsp(s_rsp[SL_PIO_GREEN_LED]),
    .pio_in('0), .pio_out(ledg), .pio_oe(ledg_oe));
  avalon_pio #(.WIDTH(18), .DIR(PIO_OUTPUT)) u_pio_red_led (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_RED_LED]), .avs_rsp(s_rsp[SL_PIO_RED_LED]),
    .pio_in('0), .pio_out(ledr), .pio_oe(ledr_oe));
  avalon_pio #(.WIDTH(2), .DIR(PIO_INPUT)) u_pio_switch (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_SWITCH]), .avs_rsp(s_rsp[SL_PIO_SWITCH]),
    .pio_in(sw), .pio_out(sw_out_unused), .pio_oe(sw_oe_unused));
  avalon_pio #(.WIDTH(1), .DIR(PIO_OUTPUT)) u_pio_sd_clk (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_SD_CLK]), .avs_rsp(s_rsp[SL_PIO_SD_CLK]),
    .pio_in(1'b0), .pio_out(sd_clk), .pio_oe(sd_clk_oe));
  avalon_pio #(.WIDTH(1), .DIR(PIO_BIDIR)) u_pio_sd_cmd (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_SD_CMD]), .avs_rsp(s_rsp[SL_PIO_SD_CMD]),
    .pio_in(sd_cmd_in), .pio_out(sd_cmd_out), .pio_oe(sd_cmd_oe));
  avalon_pio #(.WIDTH(1), .DIR(PIO_BIDIR)) u_pio_sd_dat (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_SD_DAT]), .avs_rsp(s_rsp[SL_PIO_SD_DAT]),
    .pio_in(sd_dat_in), .pio_out(sd_dat_out), .pio_oe(sd_dat_oe));
  avalon_pio #(.WIDTH(1), .DIR(PIO_BIDIR)) u_pio_sd_dat3 (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_SD_DAT3]), .avs_rsp(s_rsp[SL_PIO_SD_DAT3]),
    .pio_in(sd_dat3_in), .pio_out(sd_dat3_out), .pio_oe(sd_dat3_oe));
  avalon_pio #(.WIDTH(1), .DIR(PIO_OUTPUT)) u_pio_i2c_sclk (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_I2C_SCLK]), .avs_rsp(s_rsp[SL_PIO_I2C_SCLK]),
    .pio_in(1'b0), .pio_out(i2c_sclk), .pio_oe(i2c_sclk_oe));
  avalon_pio #(.WIDTH(1), .DIR(PIO_BIDIR)) u_pio_i2c_sdat (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_PIO_I2C_SDAT]), .avs_rsp(s_rsp[SL_PIO_I2C_SDAT]),
    .pio_in(i2c_sdat_in), .pio_out(i2c_sdat_out), .pio_oe(i2c_sdat_oe));

  seg7_controller u_seg7 (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_SEG7]), .avs_rsp(s_rsp[SL_SEG7]),
    .hex_n(hex_n));

  sram_controller #(.ADDR_W(18)) u_sram (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_SRAM]), .avs_rsp(s_rsp[SL_SRAM]),
    .sram_addr(sram_addr), .sram_dq_out(sram_dq_out), .sram_dq_oe(sram_dq_oe),
    .sram_dq_in(sram_dq_in), .sram_ce_n(sram_ce_n), .sram_oe_n(sram_oe_n),
    .sram_we_n(sram_we_n), .sram_ub_n(sram_ub_n), .sram_lb_n(sram_lb_n));

  lcd_controller u_lcd (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_LCD]), .avs_rsp(s_rsp[SL_LCD]),
    .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_en(lcd_en), .lcd_data_out(lcd_data_out),
    .lcd_data_oe(lcd_data_oe), .lcd_data_in(lcd_data_in));

  sdram_controller u_sdram (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_SDRAM]), .avs_rsp(s_rsp[SL_SDRAM]),
    .sdram_addr(sdram_addr), .sdram_ba(sdram_ba), .sdram_cs_n(sdram_cs_n),
    .sdram_ras_n(sdram_ras_n), .sdram_cas_n(sdram_cas_n), .sdram_we_n(sdram_we_n),
    .sdram_cke(sdram_cke), .sdram_dqm(sdram_dqm), .sdram_dq_out(sdram_dq_out),
    .sdram_dq_oe(sdram_dq_oe), .sdram_dq_in(sdram_dq_in));

  flash_interface u_flash (
    .clk(clk_sys), .rst(rst_sys), .avs_req(s_req[SL_FLASH]), .avs_rsp(s_rsp[SL_FLASH]),
    .fl_addr(fl_addr), .fl_dq_out(fl_dq_out), .fl_dq_oe(fl_dq_oe), .fl_dq_in(fl_dq_in),
    .fl_ce_n(fl_ce_n), .fl_oe_n(fl_oe_n), .fl_we_n(fl_we_n), .fl_rst_n(fl_rst_n));

endmodule
