// lcd_controller -- Avalon slave for the board's 2 x 16 character LCD.
//
// The player shows the title of the song and the volume on a 16 x 2
// character LCD module with an HD44780-type controller. The processor
// drives the module through this slave: each bus access becomes one
// complete bus cycle of the module, stretched with waitrequest to meet the
// module's timing. The software initialises the display, sets addresses and
// writes characters; it polls the busy flag through the status register
// before each command, as the module needs tens of microseconds per
// instruction.
//
// Register map (32-bit words, bits 7:0 used):
//   0  write  instruction (RS = 0)        1  read  busy flag (bit 7) and
//   2  write  character data (RS = 1)              address counter (6:0)
//   3  read   character data (RS = 1)
// Address bit 1 selects RS; the bus direction selects RW, so a read of
// word 0 also returns the status and a write to word 1 writes an
// instruction.
//
// Timing of one access, in clocks of clk (defaults at 100 MHz):
//   T_AS  RS/RW (and write data) set up before E rises     5  (50 ns)
//   T_PW  E high; read data sampled in the last clock      25 (250 ns)
//   T_H   E low, RS/RW/data held before the next access    25 (250 ns)
// RS/RW are registered in the clock the request is first seen, so
// waitrequest is high for 1 + T_AS + T_PW + T_H clocks (56 by default) and
// the access completes in the following clock. E rises at most once every
// 57 clocks (570 ns), above the module's 500 ns minimum cycle time. The
// data bus is split into data_out / data_oe / data_in for a tristate buffer
// at the chip edge.
//
// That the LCD shows the title and volume and sits on the bus as a system
// component follows the reference design; the register map and the cycle
// timing are this design's, chosen after the usual SOPC character-LCD
// component and the HD44780 bus timing.
module lcd_controller
  import music_player_pkg::*;
#(
  parameter int unsigned T_AS = 5,
  parameter int unsigned T_PW = 25,
  parameter int unsigned T_H  = 25
) (
  input  logic       clk,
  input  logic       rst,
  input  avm_req_t   avs_req,          // address = word offset
  output avm_rsp_t   avs_rsp,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en,
  output logic [7:0] lcd_data_out,
  output logic       lcd_data_oe,
  input  logic [7:0] lcd_data_in
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_ENABLE, S_HOLD, S_DONE} state_e;
  state_e      state;
  logic [7:0]  cnt;
  logic [7:0]  rdata;

  initial begin
    assert (T_AS >= 1 && T_PW >= 1 && T_H >= 1 && T_AS < 256 && T_PW < 256 && T_H < 256)
      else $error("lcd_controller: phase lengths must be 1..255 clocks");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      cnt          <= '0;
      rdata        <= '0;
      lcd_rs       <= 1'b0;
      lcd_rw       <= 1'b0;
      lcd_en       <= 1'b0;
      lcd_data_out <= '0;
      lcd_data_oe  <= 1'b0;
    end else begin
      case (state)
        S_IDLE:
          if (avs_req.read || avs_req.write) begin
            lcd_rs       <= avs_req.address[1];
            lcd_rw       <= avs_req.read;
            lcd_data_out <= avs_req.writedata[7:0];
            lcd_data_oe  <= avs_req.write;
            cnt          <= 8'(T_AS - 1);
            state        <= S_SETUP;
          end
        S_SETUP:
          if (cnt == 0) begin
            lcd_en <= 1'b1;
            cnt    <= 8'(T_PW - 1);
            state  <= S_ENABLE;
          end else cnt <= cnt - 1'b1;
        S_ENABLE:
          if (cnt == 0) begin
            lcd_en <= 1'b0;
            rdata  <= lcd_data_in;
            cnt    <= 8'(T_H - 1);
            state  <= S_HOLD;
          end else cnt <= cnt - 1'b1;
        S_HOLD:
          if (cnt == 0) begin
            lcd_data_oe <= 1'b0;
            state       <= S_DONE;
          end else cnt <= cnt - 1'b1;
        default:                         // S_DONE: the bus takes the result
          state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    avs_rsp.readdata    = {24'd0, rdata};
    avs_rsp.waitrequest = (avs_req.read || avs_req.write) && state != S_DONE;
  end

endmodule
