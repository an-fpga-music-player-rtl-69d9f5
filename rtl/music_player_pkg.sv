// music_player_pkg -- types and constants shared by the music player SoC.
//
// The SoC connects its peripherals to the processor's data master over an
// Avalon memory-mapped bus. A request travels as one packed struct and the
// answer as another. Slaves see a word offset inside their own window,
// already qualified by their chip select, and answer in the same cycle
// unless they hold waitrequest high; readdata is taken in the cycle where
// waitrequest is low.
//
// The address map copies the base addresses printed for the on-chip memory,
// the two interval timers and the LED and switch PIOs of the reference
// system; the remaining windows (VGA, audio, SD card and I2C PIOs, keys,
// 7-segment, SRAM, LCD, SDRAM, flash) are placed by this design in free space
// of the same region.
//
// The VGA constants are the horizontal and vertical line budgets of the
// 640 x 480 display (800 pixels per line, 525 lines per field, with
// 8-pixel/8-line borders around the active area).
package music_player_pkg;

  // ---------------------------------------------------------------- Avalon
  typedef struct packed {
    logic [31:0] address;     // byte address (master) or word offset (slave)
    logic        read;
    logic        write;
    logic [31:0] writedata;
    logic [3:0]  byteenable;
  } avm_req_t;

  typedef struct packed {
    logic [31:0] readdata;
    logic        waitrequest;
  } avm_rsp_t;

  localparam avm_req_t AVM_REQ_IDLE = '{address: '0, read: 1'b0, write: 1'b0,
                                        writedata: '0, byteenable: '0};

  // ------------------------------------------------------------ address map
  typedef enum logic [4:0] {
    SL_ONCHIP_MEM, SL_VGA, SL_AUDIO, SL_TIMER, SL_TIMER_STAMP, SL_PIO_KEY,
    SL_PIO_GREEN_LED, SL_PIO_RED_LED, SL_PIO_SD_CLK, SL_PIO_SWITCH,
    SL_PIO_SD_CMD, SL_PIO_SD_DAT, SL_PIO_SD_DAT3, SL_PIO_I2C_SCLK,
    SL_PIO_I2C_SDAT, SL_SEG7, SL_SRAM, SL_LCD, SL_SDRAM, SL_FLASH, SL_NONE
  } slave_e;

  localparam int NUM_SLAVES = 20;

  typedef struct packed {
    logic [31:0] base;
    logic [31:0] last;     // inclusive end address
  } window_t;

  localparam window_t ADDR_MAP [NUM_SLAVES] = '{
    '{32'h0220_2000, 32'h0220_3FFF},   // onchip_mem      (printed)
    '{32'h0220_5000, 32'h0220_507F},   // vga_0           32 registers
    '{32'h0220_5080, 32'h0220_508F},   // audio_0
    '{32'h0220_50C0, 32'h0220_50DF},   // timer           (printed)
    '{32'h0220_50E0, 32'h0220_50FF},   // timer_stamp     (printed)
    '{32'h0220_5100, 32'h0220_510F},   // pio_key
    '{32'h0220_5120, 32'h0220_512F},   // pio_green_led   (printed)
    '{32'h0220_5130, 32'h0220_513F},   // pio_red_led     (printed)
    '{32'h0220_5140, 32'h0220_514F},   // pio_sd_clk
    '{32'h0220_5150, 32'h0220_515F},   // pio_switch      (printed)
    '{32'h0220_5160, 32'h0220_516F},   // pio_sd_cmd
    '{32'h0220_5170, 32'h0220_517F},   // pio_sd_dat
    '{32'h0220_5180, 32'h0220_518F},   // pio_sd_dat3
    '{32'h0220_5190, 32'h0220_519F},   // pio_i2c_sclk
    '{32'h0220_51A0, 32'h0220_51AF},   // pio_i2c_sdat
    '{32'h0220_51B0, 32'h0220_51BF},   // seg7
    '{32'h0210_0000, 32'h0217_FFFF},   // sram            512 KB
    '{32'h0220_51C0, 32'h0220_51CF},   // lcd             16 x 2 character LCD
    '{32'h0180_0000, 32'h01FF_FFFF},   // sdram           8 MB
    '{32'h0100_0000, 32'h017F_FFFF}    // flash           4M x 16
  };

  // PIO flavours (the reference system's PIO component options)
  typedef enum logic [1:0] {PIO_OUTPUT, PIO_INPUT, PIO_BIDIR} pio_dir_e;

  // -------------------------------------------------------------- VGA 640x480
  localparam int H_SYNC   = 96;
  localparam int H_BACK   = 40;
  localparam int H_LEFT   = 8;
  localparam int H_ACTIVE = 640;
  localparam int H_RIGHT  = 8;
  localparam int H_FRONT  = 8;
  localparam int H_TOTAL  = H_SYNC + H_BACK + H_LEFT + H_ACTIVE + H_RIGHT + H_FRONT; // 800

  localparam int V_SYNC   = 2;
  localparam int V_BACK   = 25;
  localparam int V_TOP    = 8;
  localparam int V_ACTIVE = 480;
  localparam int V_BOTTOM = 8;
  localparam int V_FRONT  = 2;
  localparam int V_TOTAL  = V_SYNC + V_BACK + V_TOP + V_ACTIVE + V_BOTTOM + V_FRONT; // 525

  // -------------------------------------------------------- text display map
  // Character register addresses written by the processor (5-bit address).
  localparam int REG_TIME0   = 0;    // 6 digits, most significant first: 0..5
  localparam int REG_SRATE0  = 7;    // 6 digits, most significant first: 7..12
  localparam int REG_VOLUME0 = 13;   // 3 digits: 13..15
  localparam int REG_TITLE0  = 16;   // 12 characters of the 8.3 file name: 16..27
  localparam int NUM_CHAR_REGS = 32;

  // Character codes: 0..9 are the digit values themselves, everything else
  // is ASCII (upper and lower case letters share glyphs).
  localparam logic [7:0] CH_SPACE = 8'h20;
  localparam logic [7:0] CH_COLON = 8'h3A;
  localparam logic [7:0] CH_DOT   = 8'h2E;

endpackage
