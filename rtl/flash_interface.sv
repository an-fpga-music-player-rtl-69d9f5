// flash_interface -- 32-bit Avalon slave on the board's 16-bit NOR flash.
//
// The flash (22-bit half-word address, 16-bit data) holds non-volatile
// memory for the processor. The interface turns each bus access into
// asynchronous flash bus cycles, one per 16-bit half:
//   read half   CE# and OE# low with the address for T_ACC clocks, data
//               sampled in the last of them, then one clock with CE#/OE#
//               high so the chip releases the bus
//   write half  address, CE# low and data driven for T_AS clocks, WE# low
//               for T_WP clocks, then T_WH clocks with WE# high while
//               address and data are held
// Word offset w addresses the half-words {w, 0} (bits 15:0) and {w, 1}
// (bits 31:16). A read always reads both halves. A write only cycles the
// halves whose byte enables are set, so a 16-bit store gives exactly one
// flash write cycle; this is what the flash's program and erase command
// sequences (written by software) need. Both bytes of a half are written
// together; the flash has no byte strobes in 16-bit mode.
//
// Timing: waitrequest stays high while the cycles run; the access
// completes in the clock after the last one. Defaults at 100 MHz suit a
// 90 ns part (100 ns access window, 50 ns write pulse): a read takes
// 1 + 2 x (T_ACC + 1) + 1 = 24 clocks, a 32-bit write
// 1 + 2 x (T_AS + T_WP + T_WH) + 1 = 18 clocks and a 16-bit write 10.
//
// The widths follow the reference system; the reference system's flash
// interface is a vendor bridge, and this cycle timing and the 32-bit view
// are this design's. fl_rst_n releases the chip one clock after reset.
module flash_interface
  import music_player_pkg::*;
#(
  parameter int ADDR_W = 22,
  parameter int T_ACC  = 10,
  parameter int T_AS   = 1,
  parameter int T_WP   = 5,
  parameter int T_WH   = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  avm_req_t          avs_req,        // address = 32-bit word offset
  output avm_rsp_t          avs_rsp,
  output logic [ADDR_W-1:0] fl_addr,
  output logic [15:0]       fl_dq_out,
  output logic              fl_dq_oe,
  input  logic [15:0]       fl_dq_in,
  output logic              fl_ce_n,
  output logic              fl_oe_n,
  output logic              fl_we_n,
  output logic              fl_rst_n
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_RD_REC, S_WR_SETUP, S_WR_PULSE, S_WR_HOLD, S_DONE} state_e;

  state_e      state;
  logic [7:0]  cnt;
  logic        half;                          // 0: bits 15:0, 1: bits 31:16
  logic [31:0] rdata;
  logic        lo_en, hi_en;

  assign lo_en = avs_req.read || avs_req.byteenable[1:0] != 2'b00;
  assign hi_en = avs_req.read || avs_req.byteenable[3:2] != 2'b00;

  initial begin
    assert (T_ACC >= 1 && T_AS >= 1 && T_WP >= 1 && T_WH >= 1 &&
            T_ACC < 256 && T_AS < 256 && T_WP < 256 && T_WH < 256)
      else $error("flash_interface: phase lengths must be 1..255 clocks");
  end

  always_ff @(posedge clk) begin
    logic go, go_h;                             // start the cycle for half go_h
    go   = 1'b0;
    go_h = 1'b0;
    if (rst) begin
      state     <= S_IDLE;
      cnt       <= '0;
      half      <= 1'b0;
      rdata     <= '0;
      fl_addr   <= '0;
      fl_dq_out <= '0;
      fl_dq_oe  <= 1'b0;
      fl_ce_n   <= 1'b1;
      fl_oe_n   <= 1'b1;
      fl_we_n   <= 1'b1;
      fl_rst_n  <= 1'b0;
    end else begin
      fl_rst_n <= 1'b1;
      case (state)
        S_IDLE:
          if (avs_req.read || avs_req.write) begin
            if (lo_en)      begin go = 1'b1; go_h = 1'b0; end
            else if (hi_en) begin go = 1'b1; go_h = 1'b1; end
            else            state <= S_DONE;     // write with no byte enables
          end
        S_RD:
          if (cnt == 0) begin
            if (half) rdata[31:16] <= fl_dq_in;
            else      rdata[15:0]  <= fl_dq_in;
            fl_ce_n <= 1'b1;
            fl_oe_n <= 1'b1;
            state   <= S_RD_REC;
          end else cnt <= cnt - 1'b1;
        S_RD_REC:
          if (!half) begin go = 1'b1; go_h = 1'b1; end
          else       state <= S_DONE;
        S_WR_SETUP:
          if (cnt == 0) begin
            fl_we_n <= 1'b0;
            cnt     <= 8'(T_WP - 1);
            state   <= S_WR_PULSE;
          end else cnt <= cnt - 1'b1;
        S_WR_PULSE:
          if (cnt == 0) begin
            fl_we_n <= 1'b1;
            cnt     <= 8'(T_WH - 1);
            state   <= S_WR_HOLD;
          end else cnt <= cnt - 1'b1;
        S_WR_HOLD:
          if (cnt == 0) begin
            fl_ce_n  <= 1'b1;
            fl_dq_oe <= 1'b0;
            if (!half && hi_en) begin go = 1'b1; go_h = 1'b1; end
            else                state <= S_DONE;
          end else cnt <= cnt - 1'b1;
        default:                                 // S_DONE
          state <= S_IDLE;
      endcase

      if (go) begin
        half    <= go_h;
        fl_addr <= ADDR_W'({avs_req.address[ADDR_W-2:0], go_h});
        fl_ce_n <= 1'b0;
        if (avs_req.write) begin
          fl_dq_out <= go_h ? avs_req.writedata[31:16] : avs_req.writedata[15:0];
          fl_dq_oe  <= 1'b1;
          cnt       <= 8'(T_AS - 1);
          state     <= S_WR_SETUP;
        end else begin
          fl_oe_n   <= 1'b0;
          cnt       <= 8'(T_ACC - 1);
          state     <= S_RD;
        end
      end
    end
  end

  always_comb begin
    avs_rsp.readdata    = rdata;
    avs_rsp.waitrequest = (avs_req.read || avs_req.write) && state != S_DONE;
  end

endmodule
