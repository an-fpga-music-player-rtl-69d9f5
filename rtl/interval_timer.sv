// interval_timer -- 32-bit interval timer with a 1 ms default period.
//
// A down-counter is loaded with the period register and, while running,
// decrements once per clock. When it reaches zero the timeout flag TO is
// set and the counter reloads with the period; in continuous mode (CONT)
// it keeps running, otherwise it stops. The interrupt line is TO & ITO.
// The counter's value can be frozen into the snapshot registers at any time
// and read without disturbing the count.
//
// Register map (32-bit words, 16 bits used, no wait states):
//   0  status     bit 0 TO (any write clears it), bit 1 RUN (read only)
//   1  control    bit 0 ITO, bit 1 CONT, bit 2 START (write 1 starts),
//                 bit 3 STOP (write 1 stops)
//   2  periodl    period bits 15:0  \ a write stops the timer and reloads
//   3  periodh    period bits 31:16 / the counter
//   4  snapl      write: capture the counter; read: snapshot bits 15:0
//   5  snaph      read: snapshot bits 31:16
//
// A period register value of P gives a timeout every P+1 clocks; the
// default P = PERIOD_CYCLES - 1 gives 1 ms at 100 MHz. The 32-bit counter,
// 1 ms period, writable period, readable snapshot and start/stop control
// follow the reference system; the register layout is the customary one of
// the SOPC interval timer.
module interval_timer
  import music_player_pkg::*;
#(
  parameter int unsigned PERIOD_CYCLES = 100_000
) (
  input  logic     clk,
  input  logic     rst,
  input  avm_req_t avs_req,
  output avm_rsp_t avs_rsp,
  output logic     irq,
  output logic     timeout_pulse
);
  logic [31:0] period, count, snap;
  logic        to, run, ito, cont;
  logic [2:0]  a;
  logic        wr;

  assign a  = avs_req.address[2:0];
  assign wr = avs_req.write;

  always_ff @(posedge clk) begin
    if (rst) begin
      period <= 32'(PERIOD_CYCLES - 1);
      count  <= 32'(PERIOD_CYCLES - 1);
      snap   <= '0;
      to     <= 1'b0;
      run    <= 1'b0;
      ito    <= 1'b0;
      cont   <= 1'b0;
      timeout_pulse <= 1'b0;
    end else begin
      timeout_pulse <= 1'b0;
      // counting
      if (run) begin
        if (count == '0) begin
          to            <= 1'b1;
          timeout_pulse <= 1'b1;
          count         <= period;
          if (!cont) run <= 1'b0;
        end else begin
          count <= count - 32'd1;
        end
      end
      // register writes take priority over the count
      if (wr) begin
        case (a)
          3'd0: to <= 1'b0;
          3'd1: begin
            ito  <= avs_req.writedata[0];
            cont <= avs_req.writedata[1];
            if (avs_req.writedata[2]) run <= 1'b1;
            if (avs_req.writedata[3]) run <= 1'b0;
          end
          3'd2: begin
            period[15:0] <= avs_req.writedata[15:0];
            count        <= {period[31:16], avs_req.writedata[15:0]};
            run          <= 1'b0;
          end
          3'd3: begin
            period[31:16] <= avs_req.writedata[15:0];
            count         <= {avs_req.writedata[15:0], period[15:0]};
            run           <= 1'b0;
          end
          3'd4, 3'd5: snap <= count;
          default: ;
        endcase
      end
    end
  end

  assign irq = to && ito;

  always_comb begin
    avs_rsp.waitrequest = 1'b0;
    case (a)
      3'd0:    avs_rsp.readdata = {30'd0, run, to};
      3'd1:    avs_rsp.readdata = {28'd0, 2'b00, cont, ito};
      3'd2:    avs_rsp.readdata = {16'd0, period[15:0]};
      3'd3:    avs_rsp.readdata = {16'd0, period[31:16]};
      3'd4:    avs_rsp.readdata = {16'd0, snap[15:0]};
      3'd5:    avs_rsp.readdata = {16'd0, snap[31:16]};
      default: avs_rsp.readdata = '0;
    endcase
  end

endmodule
