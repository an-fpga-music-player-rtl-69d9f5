# Music player SoC for the DE2 board

This is the hardware half of a WAV music player built on an Altera DE2
board (Cyclone II). A soft processor reads WAV files from an SD card, finds
them through the FAT16 file system, and pushes the samples into an audio
codec. The player shows the title, the elapsed time, the sample rate and the
volume as text on a 640 x 480 VGA monitor. Four keys and two switches
control it, and the LEDs and 7-segment displays give extra feedback.

Almost all of the intelligence is software. The SD-card protocol, FAT16,
WAV header parsing and the codec's I2C set-up all run on the processor, and
reach their pins through one-bit parallel I/O ports. The hardware in this
repository is everything around the processor:

* an Avalon memory-mapped interconnect with one master, the processor's
  data port, and 20 slave windows;
* a VGA text display controller (the largest custom part);
* an audio DAC controller with a dual-clock FIFO and an I2S serialiser that
  follows the codec's clocks;
* two 32-bit interval timers, each with a 1 ms default period;
* PIO ports for keys, switches, LEDs, the SD card lines (1-bit mode) and the
  codec's I2C lines;
* 8 KB of on-chip RAM, a controller for the 8 MB SDRAM that serves as
  main memory, a controller for the 256K x 16 asynchronous SRAM,
  a bus bridge to the 8 MB NOR flash, a 7-segment display controller, and
  a bus bridge to the 16 x 2 character LCD, which shows the title and
  volume.

The processor itself is not included. Neither are the vendor blocks that
would sit beside it: the JTAG UART, the system ID and the PLL. The processor's data
master is a port of `music_player_top` (`cpu_req` and `cpu_rsp`), so any
Avalon master can drive the SoC: a CPU core, a bus functional model, or the
end-to-end testbench.

## Clocks and reset

| Clock       | Frequency  | Used by |
|-------------|------------|---------|
| `clk_sys`   | 100 MHz    | interconnect and every bus slave |
| `clk_50`    | 50 MHz     | VGA scan and pixel logic (25 MHz clock enable) |
| `clk_audio` | 18.432 MHz | forwarded to the codec as its master clock (`aud_xck`) |
| `aud_bclk`  | set by the codec | I2S serialiser; the codec is the clock master |

`rst` is active high. `reset_sync` synchronises it into each domain with
two flip-flops, so it both rises and falls two clock edges late. Every
flip-flop that has a reset uses it synchronously. Only two
things cross between domains:

* The 32 character registers go from `clk_sys` to `clk_50` through a
  two-flip-flop copy. A character can be torn for one pixel clock while it
  changes. That is harmless for a display.
* Audio frames go from `clk_sys` to `aud_bclk` through `async_fifo`, which
  uses Gray-coded pointers.

## Bus and address map

The `music_player_pkg` package defines the bus:

* `avm_req_t`: byte address, read, write, writedata, byteenable.
* `avm_rsp_t`: readdata and waitrequest.

`avalon_fabric` decodes the address without registers. It hands each slave
a word offset inside that slave's window, with read and write already
gated by the chip select. It returns the selected slave's readdata and
waitrequest. A master holds its request until waitrequest is low, and
takes readdata in that cycle. An address outside every window completes at
once, reads back 0, and pulses `bus_decode_error`.

| Window                    | Slave | Origin |
|---------------------------|-------|--------|
| 0x0220_2000 – 0x0220_3FFF | on-chip RAM, 8 KB | reference system |
| 0x0220_5000 – 0x0220_507F | VGA character registers (32 words) | chosen |
| 0x0220_5080 – 0x0220_508F | audio controller | chosen |
| 0x0220_50C0 – 0x0220_50DF | interval timer `timer` | reference system |
| 0x0220_50E0 – 0x0220_50FF | interval timer `timer_stamp` | reference system |
| 0x0220_5100               | keys (4, input) | chosen |
| 0x0220_5120               | green LEDs (9, output) | reference system |
| 0x0220_5130               | red LEDs (18, output) | reference system |
| 0x0220_5140               | SD_CLK (output) | chosen |
| 0x0220_5150               | switches (2, input) | reference system |
| 0x0220_5160 / 5170 / 5180 | SD_CMD, SD_DAT, SD_DAT3 (bidirectional) | chosen |
| 0x0220_5190 / 51A0        | I2C_SCLK (output), I2C_SDAT (bidirectional) | chosen |
| 0x0220_51B0               | 7-segment, 8 hex digits | chosen |
| 0x0220_51C0               | character LCD (4 words) | chosen |
| 0x0210_0000 – 0x0217_FFFF | SRAM, 512 KB | chosen |
| 0x0180_0000 – 0x01FF_FFFF | SDRAM, 8 MB | chosen |
| 0x0100_0000 – 0x017F_FFFF | flash, 4M x 16 | chosen |

Each PIO window is 16 bytes wide. "Chosen" means the reference system uses
the peripheral but its address is not known, so this design placed it in
free space nearby.

## VGA text display

`vga_controller` joins three parts:

* `vga_char_regs`: the bus side;
* `vga_sync`: the scan counters;
* `vga_text_render`, with `font_rom`: the pixel pipeline.

### Scan timing

A flip-flop toggles on `clk_50` and gives a 25 MHz pixel enable. Both the
counters and the renderer advance only on that enable. `vga_clk`, sent to
the ADV7123 video DAC, is the inverse of the toggle. Its rising edge
therefore falls in the middle of each pixel, where the DAC's inputs are
stable.

A line is 800 pixel clocks and a field is 525 lines. Count 0 is the start
of the sync pulse:

| Horizontal (pixels) | sync 96 | back porch 40 | border 8 | **active 640** | border 8 | front porch 8 |
|---|---|---|---|---|---|---|
| counts | 0–95 | 96–135 | 136–143 | **144–783** | 784–791 | 792–799 |

| Vertical (lines) | sync 2 | back porch 25 | border 8 | **active 480** | border 8 | front porch 2 |
|---|---|---|---|---|---|---|
| counts | 0–1 | 2–26 | 27–34 | **35–514** | 515–522 | 523–524 |

Both sync pulses are active low. The borders are blanked. At 25 MHz this
gives a 59.5 Hz field, close to the 59.94 Hz of the 25.175 MHz standard.
Monitors accept it. Other budgets come from the `vga_sync` parameters, for
example the common 16/48-pixel porches with 10/33 lines, provided the
totals keep the same meaning.

### Screen layout and character codes

The picture is 80 x 60 cells of 8 x 8 pixels. Four lines of white text on
black are drawn. Each line is a fixed label starting at cell column 2,
followed by a field starting at cell column 10:

| Cell row | Label     | Field | Registers |
|----------|-----------|-------|-----------|
| 5        | `TITLE:`  | 12 characters (an 8.3 file name) | 16–27 |
| 9        | `TIME:`   | 6 digits | 0–5 |
| 13       | `SRATE:`  | 6 digits, e.g. `044100` | 7–12 |
| 17       | `VOLUME:` | 3 digits | 13–15 |

Registers 6 and 28–31 exist but are not shown. Every register is 10 bits
wide, but only the low 8 bits choose a glyph. A register holds a code, not
a bitmap:

* codes 0–9 show the digits 0–9, so software can write `value % 10`
  directly;
* other codes are ASCII, and lower case is shown as upper case;
* `:` `.` `-` `_` and the space also have glyphs;
* every other code is blank.

Registers reset to a space and can be read back.

`font_rom` is a combinational 8 x 8 font. Bit 7 of a row is the leftmost
pixel. Its glyphs are the well-known 8-bit home-computer character set.

### Pipeline

Within one pixel clock, the renderer:

1. turns the scan position into a cell and a glyph row;
2. chooses the label character or the register for that cell;
3. reads the font row;
4. takes the bit for the pixel's column.

The colour, the two syncs and `vga_blank_n` are all registered on the same
enable. The picture therefore leaves one pixel clock after the counters,
and stays aligned with its syncs. `vga_sync_n`, the DAC's sync-on-green
input, is held low.

## Audio path

```
clk_sys domain          |            aud_bclk domain (codec is master)
bus write -> async_fifo (128 x 32 frames) -> i2s_dac_tx -> aud_dacdat
                                               ^  aud_bclk, aud_daclrck from codec
clk_audio ----------------------------------------------> aud_xck (codec MCLK)
```

The WM8731 codec runs in master mode. It divides the 18.432 MHz master
clock into BCLK and the frame clock DACLRC. Software sets its format over
the I2C PIOs: I2S, 16 bits per channel, master.

* **Serialiser.** `i2s_dac_tx` runs on the inverted BCLK, so its outputs
  change on BCLK falling edges. It watches DACLRC. DACLRC low is the left
  channel, DACLRC high the right.
* **Bit timing.** After each DACLRC change, the first falling edge puts
  the MSB on `aud_dacdat`. The codec samples it on the second rising edge
  of BCLK after the change, which is I2S timing. The other 15 bits follow
  MSB first. The line then stays 0 for the rest of the slot, so any slot
  length the codec chooses works.
* **Frames.** One stereo frame is popped at the start of each left slot.
* **Underrun.** If the FIFO is empty at that point, the frame is sent as
  silence and `aud_underrun` pulses.

The FIFO holds 128 frames, which is one 512-byte SD-card block of 16-bit
stereo, or 2.9 ms at 44.1 kHz. Software polls the status word and writes
a frame whenever the FIFO is not full.

## Register maps

All registers are 32-bit words. Only the memories and the LCD add wait
states.

**Audio controller**

| Word | Access | Meaning |
|------|--------|---------|
| 0 | write | push one frame: [31:16] left sample, [15:0] right sample |
| 1 | read  | bit 0 full; bit 1 empty; bit 2 overflow (a frame was written while full and dropped); [23:16] fill level |
| 1 | write | bit 2 = 1 clears overflow |

**Interval timer** (`timer` and `timer_stamp`, 16 bits per word)

| Word | Meaning |
|------|---------|
| 0 status | bit 0 TO: timeout seen; any write clears it. bit 1 RUN |
| 1 control | bit 0 ITO: interrupt enable. bit 1 CONT. bit 2 START. bit 3 STOP |
| 2, 3 | period low and high halves; a write stops the timer and reloads it |
| 4, 5 | snapshot: a write to 4 captures the counter; 4 and 5 read it back |

A period register value of P gives a timeout every P+1 clocks. The
`PERIOD_CYCLES` parameter (default 100,000) sets the reset value, so the
timer gives 1 ms at 100 MHz. `irq` is TO AND ITO.

**PIO**

* Word 0 is the data register. It reads the pin, through a two-flop
  synchroniser, on input and bidirectional ports.
* Word 1 is the direction register, on bidirectional ports only. A 1 bit
  drives that pin. The register resets to all inputs.
* Bidirectional pins come out of the top as separate `_out`, `_oe` and
  `_in` signals. The board's pad is then `assign pad = oe ? out : 'z`.

**7-segment.** There is one read/write word. Each of its eight nibbles is
shown as a hex digit on `hex_n[i]`, as active-low segments {g,f,e,d,c,b,a}.

**On-chip RAM.** 2K x 32 bits, with byte enables. Reads take one wait
state; writes take none.

**SRAM controller.** It gives a 32-bit view of the 256K x 16 chip. An
access makes two 16-bit chip cycles: the low half at the even chip address,
then the high half. Each half takes two clocks. With the 100 MHz clock,
that leaves a 20 ns window for 10 ns parts. waitrequest is high for five
clocks, and the access completes in the sixth. On writes, byte enables map onto
UB# and LB#. A half whose enables are both zero is still cycled, with both
strobes high so nothing is written. Reads always enable both bytes.

**SDRAM controller.** It gives a 32-bit view of the 16-bit SDRAM (4 banks,
4096 rows, 256 columns). The policy is closed-page. Each access is one
ACTIVE followed by a two-word READ or WRITE burst with auto-precharge, so
no row stays open between accesses.

* **Address.** Word offset w selects bank w[20:19], row w[18:7] and the
  even column {w[6:0], 0}.
* **Start-up.** After reset the controller waits 200 us (`INIT_CYCLES`),
  then issues PRECHARGE ALL and two AUTO REFRESH. It then loads the mode
  register: burst length 2, sequential, CAS latency 3.
* **Refresh.** An AUTO REFRESH is issued every 7.8 us (`REFRESH_CYCLES` =
  780). A due refresh goes ahead of a waiting access.
* **Timing.** With the controller idle, a read takes 10 clocks and a write
  8, counting the clock in which each completes. The command timing
  parameters (`T_RCD`, `T_RP`, `T_RFC`, `T_WR`, `T_MRD`) are in clocks.
  The defaults suit a -7 grade part at 100 MHz.
* **Clock.** The chip's clock must come from the PLL, shifted so that
  read data arrives in time. The reference board uses -65 degrees.

An open-page controller would be faster for sequential code fetches, but
it is not needed at this player's data rates.

**Character LCD.** The module is an HD44780-type controller. Each bus
access becomes one complete module bus cycle, and waitrequest holds the
processor until it is over.

| Word | Access | Module cycle |
|------|--------|--------------|
| 0 | write | instruction (RS = 0) |
| 1 | read  | busy flag in bit 7, address counter in bits 6:0 |
| 2 | write | character (RS = 1) |
| 3 | read  | character at the address counter |

Address bit 1 drives RS and the bus direction drives RW. A cycle is:

* RS and RW set up for 50 ns (`T_AS` = 5 clocks);
* E high for 250 ns (`T_PW` = 25); read data is taken as E falls;
* E low for 250 ns (`T_H` = 25) while data and strobes are held.

waitrequest is high for 56 clocks, and the access completes in the 57th.
Software must poll the busy flag before each instruction or character.
The module needs tens of microseconds for each one. The board's LCD power
and backlight pins are not part of this block.

**Flash interface.** It gives a 32-bit view of the 4M x 16 NOR flash.
Word offset w covers the half-words {w, 0} (bits 15:0) and {w, 1} (bits
31:16).

* **Read.** Both halves are read in turn. CE# and OE# stay low for 100 ns
  (`T_ACC` = 10 clocks), and the data is taken in the last clock. One idle
  clock follows each half so the chip lets go of the bus. A read takes 24
  clocks.
* **Write.** Only halves with a byte enable set are cycled. Each half gets
  10 ns of setup, a 50 ns WE# pulse and 20 ns of hold. A 32-bit write takes
  18 clocks and a 16-bit write 10. Both bytes of a half are always written,
  because the chip has no byte strobes in 16-bit mode.

Erasing and programming are software. The processor sends the chip's
command sequences (unlock, program, erase) as 16-bit stores, and each
store becomes exactly one write cycle. `fl_rst_n` releases the chip one
clock after reset.

## Testbenches

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each compares the module against an independent model or against fixed
expected values. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`. Highlights:

* **`tb_vga_sync`** checks every count of two full fields at the table
  values. It also checks that a line takes 1600 clocks when the enable is
  high only every other clock.
* **`tb_vga_text_render`** and **`tb_vga_controller`** render a whole field.
  They compare each pixel with a model that places the four lines, and
  check that the syncs and the 25 MHz pixel rate line up.
* **`tb_i2s_dac_tx`** and **`tb_audio_controller`** include a model of the
  codec as master. It generates BCLK and DACLRC, samples DACDAT on the second
  rising edge after each DACLRC change, and compares the samples received
  with those sent. The audio test also checks full, empty, overflow and
  underrun.
* **`tb_lcd_controller`** uses a model of the LCD module. The model has
  display RAM, an address counter and a busy time. It checks every bus
  cycle against the module's setup, pulse, hold and cycle-time limits, and
  checks that no access is made while the module is busy. The testbench
  writes two lines, reads them back and checks the 56-clock waitrequest.
* **`tb_sdram_controller`** uses a model of the SDRAM that checks the
  command protocol. It checks the start-up order and mode register value,
  and tRCD, tRP, tRFC and tRC. Every READ and WRITE must auto-precharge,
  refresh may only come with all banks idle, and the refresh interval must
  be kept. The testbench runs 600 random reads and writes against a
  reference memory, and checks the 10-clock and 8-clock access times.
  The start-up wait and the refresh interval are shortened here, so that
  refreshes often collide with accesses.
* **`tb_flash_interface`** uses a model of a NOR flash that drives valid
  data only 90 ns after the address settles. It checks the WE# pulse, the
  data setup and that nobody else drives the bus. The model decodes the
  unlock-and-program command sequence. The testbench reads 240 words,
  programs 40 half-words through that sequence and reads them back. It
  checks the 24, 18 and 10 clock access times.
* **`tb_interval_timer`** measures the timeout period in clocks: exactly
  100,000.
* **`tb_music_player_top`** runs the whole SoC at its default parameters,
  playing the part of the processor. In about 10 s of simulation it:
  * writes the screen text and plays 300 random stereo frames through the
    FIFO, polling full, and checks every frame at the codec model;
  * pauses through the SW[1] switch, so underruns occur;
  * takes three 1 ms timer interrupts and reads a key press;
  * uses the LEDs, 7-segment digits, SD and I2C PIOs, SRAM, SDRAM (its
    first access waits out the 200 us start-up), flash and on-chip RAM,
    one unmapped address, and writes the title to the character LCD;
  * renders one VGA field and checks the text pixels.

  It counts each of these mechanisms, and fails if any count is 0.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -Irtl -y rtl rtl/music_player_pkg.sv tb/tb_music_player_top.sv \
  --top-module tb_music_player_top -o sim
obj_dir/sim
```

Replace the testbench name to run another one. The package must come
first on the command line. `-y rtl` finds the other modules.

## Departures and open points

* **Timing tables.** The two descriptions of 640 x 480 timing that this
  design derives from disagree. One gives 8-pixel porches with borders
  (800 x 525 total); the other gives 16/48-pixel porches and 521 lines.
  The 800 x 525 budget with borders is the one built.
* **Codec interface format.** The codec is run in I2S format, since that
  is what its timing requires. The codec's control port is I2C, which
  software bit-bangs through the PIOs.
* **Audio master clock.** This is nominally 18.432 MHz. The real PLL gave
  about 18.51 MHz, which only shifts the sample rate by 0.4 %.
* **Design choices.** The screen positions, the character code set, the
  register maps of the VGA, audio and LCD slaves, the FIFO depth and the
  unprinted base addresses are this design's own. Change them together
  with the software.
* **Memory and LCD timing.** Only the widths of the SDRAM, SRAM and flash
  are fixed by the system. Their controllers, and the LCD bridge, use
  cycle timings picked for typical parts at 100 MHz. Check them against
  the data sheets of the chips actually fitted.
* **Not built.** The codec's ADC direction, PIO interrupts and edge
  capture, and interrupt controllers are not built. Nor is a CPU.
* **Trust.** Every block passes its own testbench, and the SoC passes the
  end-to-end test at full size. Verilator lint and a Yosys synthesis show
  no latches, loops or multiple drivers. Nothing has been run on a board,
  and the behaviour of the real codec and monitor is modelled, not
  measured.
