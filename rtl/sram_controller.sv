// sram_controller -- 32-bit Avalon slave on the board's 256K x 16 SRAM.
//
// Each 32-bit access is done as two 16-bit SRAM cycles: the low half at
// SRAM address {word, 0}, then the high half at {word, 1}. Every half
// drives address, chip enable, output enable or write enable and data from
// registers for two clocks (20 ns at 100 MHz); a read samples the data bus
// at the end of the second clock, a write holds WE low during the first
// clock and keeps the data on the bus through the second. Byte enables map
// to the SRAM's upper/lower byte strobes. waitrequest stays high for five
// clocks; in the sixth the access completes and a read returns its word.
//
// The SRAM's 18-bit address and 16-bit data bus follow the reference
// system; the two-cycle halves and the 32-bit view are this design's
// choices. The data bus is split into dq_out / dq_oe / dq_in for a tristate
// buffer at the chip edge.
module sram_controller
  import music_player_pkg::*;
#(
  parameter int ADDR_W = 18
) (
  input  logic              clk,
  input  logic              rst,
  input  avm_req_t          avs_req,     // address = 32-bit word offset
  output avm_rsp_t          avs_rsp,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [15:0]       sram_dq_out,
  output logic              sram_dq_oe,
  input  logic [15:0]       sram_dq_in,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output logic              sram_ub_n,
  output logic              sram_lb_n
);
  typedef enum logic [2:0] {S_IDLE, S_LO_A, S_LO_B, S_HI_A, S_HI_B, S_DONE} state_e;
  state_e      state;
  logic [15:0] lo, hi;
  logic        is_wr;
  logic [ADDR_W-2:0] wa;

  assign wa = avs_req.address[ADDR_W-2:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      sram_addr   <= '0;
      sram_dq_out <= '0;
      sram_dq_oe  <= 1'b0;
      sram_ce_n   <= 1'b1;
      sram_oe_n   <= 1'b1;
      sram_we_n   <= 1'b1;
      sram_ub_n   <= 1'b1;
      sram_lb_n   <= 1'b1;
      lo          <= '0;
      hi          <= '0;
      is_wr       <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (avs_req.read || avs_req.write) begin
          is_wr       <= avs_req.write;
          sram_addr   <= {wa, 1'b0};
          sram_dq_out <= avs_req.writedata[15:0];
          sram_dq_oe  <= avs_req.write;
          sram_ce_n   <= 1'b0;
          sram_oe_n   <= avs_req.write;
          sram_we_n   <= !avs_req.write;
          sram_lb_n   <= avs_req.write && !avs_req.byteenable[0];
          sram_ub_n   <= avs_req.write && !avs_req.byteenable[1];
          state       <= S_LO_A;
        end
        S_LO_A: begin
          sram_we_n <= 1'b1;
          state     <= S_LO_B;
        end
        S_LO_B: begin
          lo          <= sram_dq_in;
          sram_addr   <= {wa, 1'b1};
          sram_dq_out <= avs_req.writedata[31:16];
          sram_we_n   <= !is_wr;
          sram_lb_n   <= is_wr && !avs_req.byteenable[2];
          sram_ub_n   <= is_wr && !avs_req.byteenable[3];
          state       <= S_HI_A;
        end
        S_HI_A: begin
          sram_we_n <= 1'b1;
          state     <= S_HI_B;
        end
        S_HI_B: begin
          hi         <= sram_dq_in;
          sram_ce_n  <= 1'b1;
          sram_oe_n  <= 1'b1;
          sram_dq_oe <= 1'b0;
          sram_ub_n  <= 1'b1;
          sram_lb_n  <= 1'b1;
          state      <= S_DONE;
        end
        default: state <= S_IDLE;   // S_DONE: the master takes the answer
      endcase
    end
  end

  assign avs_rsp.waitrequest = (avs_req.read || avs_req.write) && (state != S_DONE);
  assign avs_rsp.readdata    = {hi, lo};

endmodule
