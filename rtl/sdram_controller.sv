// sdram_controller -- 32-bit Avalon slave on the board's 16-bit SDRAM.
//
// The SDRAM (16-bit data, 12-bit row, 8-bit column, 4 banks: 8 MB) is the
// processor's main memory. Every bus access is served as one burst of two
// 16-bit words with auto-precharge, so no row is ever left open:
//   ACTIVE (bank, row) -> T_RCD -> READ or WRITE (column, A10 = 1) -> ...
// A read captures the two half-words CAS_LATENCY + 1 and CAS_LATENCY + 2
// clocks after the READ command is issued (the command is registered, so
// the chip sees it one clock later). A write puts the low half-word with
// the WRITE command and the high half-word in the next clock; byte enables
// drive DQM. After the burst the controller waits for the auto-precharge
// (T_WR + T_RP after write data, T_RP after read data) before it finishes,
// so the next ACTIVE always finds every bank idle.
//
// Word offset w maps to column {w[6:0], 0}, row w[18:7], bank w[20:19]
// (with the default 12-bit row and 8-bit column).
//
// Start-up: INIT_CYCLES of NOP with CKE high, PRECHARGE ALL, two AUTO
// REFRESH, LOAD MODE REGISTER (burst length 2, sequential, CAS latency
// CAS_LATENCY, burst writes). Afterwards an AUTO REFRESH is issued every
// REFRESH_CYCLES clocks (7.8 us at 100 MHz, 4096 rows in 32 ms), between bus
// accesses; a pending refresh goes before a waiting access.
//
// Timing: waitrequest stays high until the access is complete. With the
// controller idle, a read takes 3 + T_RCD + CAS_LATENCY + T_RP clocks
// including the clock in which it completes, and a write takes
// 2 + T_RCD + T_WR + T_RP (10 and 8 clocks with the defaults). A refresh in
// progress or start-up can add to that. The pins are registered on clk; the chip's
// clock is expected to come from the PLL with the phase shift the board
// needs (the reference system uses -65 degrees at 100 MHz).
//
// The data and address widths follow the reference system; the controller
// itself (closed-page policy, two-word bursts, the timing defaults for a
// 100 MHz, -7 grade part) is this design's.
module sdram_controller
  import music_player_pkg::*;
#(
  parameter int ROW_W          = 12,
  parameter int COL_W          = 8,
  parameter int CAS_LATENCY    = 3,
  parameter int T_RCD          = 2,
  parameter int T_RP           = 2,
  parameter int T_RFC          = 7,
  parameter int T_MRD          = 2,
  parameter int T_WR           = 2,
  parameter int REFRESH_CYCLES = 780,
  parameter int INIT_CYCLES    = 20_000
) (
  input  logic             clk,
  input  logic             rst,
  input  avm_req_t         avs_req,        // address = 32-bit word offset
  output avm_rsp_t         avs_rsp,
  output logic [ROW_W-1:0] sdram_addr,
  output logic [1:0]       sdram_ba,
  output logic             sdram_cs_n,
  output logic             sdram_ras_n,
  output logic             sdram_cas_n,
  output logic             sdram_we_n,
  output logic             sdram_cke,
  output logic [1:0]       sdram_dqm,
  output logic [15:0]      sdram_dq_out,
  output logic             sdram_dq_oe,
  input  logic [15:0]      sdram_dq_in
);
  // {CS#, RAS#, CAS#, WE#}
  localparam logic [3:0] CMD_NOP = 4'b0111, CMD_ACT = 4'b0011, CMD_READ = 4'b0101,
                         CMD_WRITE = 4'b0100, CMD_PRE = 4'b0010, CMD_REF = 4'b0001,
                         CMD_MRS = 4'b0000;
  localparam int WAIT_W = $clog2(INIT_CYCLES + 1) + 1;

  localparam int WORD_W = COL_W - 1 + ROW_W + 2;   // word offset bits used

  typedef enum logic [2:0] {
    S_INIT, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS, S_IDLE, S_RW, S_WR_HI, S_DONE
  } state_e;

  state_e             state;
  logic [WAIT_W-1:0]  wait_cnt;
  logic [15:0]        refresh_cnt;
  logic               refresh_due;
  logic [3:0]         cmd;
  logic [CAS_LATENCY+1:0] rd_pipe;
  logic [31:0]        rdata;
  logic [WORD_W-1:0]  w;                   // word offset of the access
  logic [COL_W-2:0]   w_col;
  logic [ROW_W-1:0]   w_row;
  logic [1:0]         w_bank;

  assign w = avs_req.address[WORD_W-1:0];
  assign {w_bank, w_row, w_col} = w;
  assign {sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n} = cmd;

  initial begin
    assert (ROW_W >= 11 && COL_W >= 2 && COL_W <= 10 && CAS_LATENCY inside {2, 3}
            && REFRESH_CYCLES < 65536)
      else $error("sdram_controller: unsupported geometry or CAS latency");
  end

  // Refresh timer: runs from the end of start-up, request held until served.
  always_ff @(posedge clk) begin
    if (rst || state < S_IDLE) begin
      refresh_cnt <= 16'(REFRESH_CYCLES - 1);
      refresh_due <= 1'b0;
    end else begin
      if (refresh_cnt == 0) refresh_cnt <= 16'(REFRESH_CYCLES - 1);
      else                  refresh_cnt <= refresh_cnt - 1'b1;
      if (state == S_IDLE && wait_cnt == 0) refresh_due <= 1'b0;   // REF issued
      if (refresh_cnt == 0) refresh_due <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_INIT;
      wait_cnt     <= WAIT_W'(INIT_CYCLES);
      cmd          <= CMD_NOP;
      sdram_cke    <= 1'b0;
      sdram_addr   <= '0;
      sdram_ba     <= '0;
      sdram_dqm    <= 2'b11;
      sdram_dq_out <= '0;
      sdram_dq_oe  <= 1'b0;
      rd_pipe      <= '0;
      rdata        <= '0;
    end else begin
      cmd         <= CMD_NOP;
      sdram_cke   <= 1'b1;
      sdram_dq_oe <= 1'b0;
      rd_pipe     <= {rd_pipe[CAS_LATENCY:0], 1'b0};
      if (rd_pipe[CAS_LATENCY])   rdata[15:0]  <= sdram_dq_in;
      if (rd_pipe[CAS_LATENCY+1]) rdata[31:16] <= sdram_dq_in;

      if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1'b1;
      end else begin
        case (state)
          S_INIT: begin                          // power-up wait is over
            cmd            <= CMD_PRE;
            sdram_addr[10] <= 1'b1;              // all banks
            wait_cnt       <= WAIT_W'(T_RP - 1);
            state          <= S_INIT_REF1;
          end
          S_INIT_REF1: begin
            cmd      <= CMD_REF;
            wait_cnt <= WAIT_W'(T_RFC - 1);
            state    <= S_INIT_REF2;
          end
          S_INIT_REF2: begin
            cmd      <= CMD_REF;
            wait_cnt <= WAIT_W'(T_RFC - 1);
            state    <= S_INIT_MRS;
          end
          S_INIT_MRS: begin
            cmd        <= CMD_MRS;
            sdram_ba   <= 2'b00;
            sdram_addr <= ROW_W'({3'b000, 3'(CAS_LATENCY), 1'b0, 3'b001});
            wait_cnt   <= WAIT_W'(T_MRD - 1);
            state      <= S_IDLE;
          end
          S_IDLE:
            if (refresh_due) begin
              cmd      <= CMD_REF;
              wait_cnt <= WAIT_W'(T_RFC - 1);
            end else if (avs_req.read || avs_req.write) begin
              cmd        <= CMD_ACT;
              sdram_ba   <= w_bank;
              sdram_addr <= w_row;
              wait_cnt   <= WAIT_W'(T_RCD - 1);
              state      <= S_RW;
            end
          S_RW: begin
            sdram_addr     <= ROW_W'({w_col, 1'b0});
            sdram_addr[10] <= 1'b1;              // auto-precharge
            if (avs_req.write) begin
              cmd          <= CMD_WRITE;
              sdram_dq_out <= avs_req.writedata[15:0];
              sdram_dqm    <= ~avs_req.byteenable[1:0];
              sdram_dq_oe  <= 1'b1;
              state        <= S_WR_HI;
            end else begin
              cmd       <= CMD_READ;
              sdram_dqm <= 2'b00;
              rd_pipe[0] <= 1'b1;
              wait_cnt  <= WAIT_W'(CAS_LATENCY + 1 + T_RP);
              state     <= S_DONE;
            end
          end
          S_WR_HI: begin
            sdram_dq_out <= avs_req.writedata[31:16];
            sdram_dqm    <= ~avs_req.byteenable[3:2];
            sdram_dq_oe  <= 1'b1;
            wait_cnt     <= WAIT_W'(T_WR + T_RP - 1);
            state        <= S_DONE;
          end
          S_DONE: begin                          // waitrequest low this clock
            sdram_dqm <= 2'b11;
            state     <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    avs_rsp.readdata    = rdata;
    avs_rsp.waitrequest = (avs_req.read || avs_req.write) && !(state == S_DONE && wait_cnt == 0);
  end

endmodule
