// avalon_pio -- parallel I/O port on the Avalon bus.
//
// The player's buttons, switches and LEDs, and the software-driven SD card
// (1-bit mode) and I2C codec-control lines, are all PIO ports that the
// processor reads and writes bit by bit.
//
// Register map (32-bit words, no wait states):
//   0  data       write: output register; read: pin levels (input and
//                 bidirectional ports, through a two-flip-flop synchroniser)
//                 or the output register (output-only ports)
//   1  direction  bidirectional ports only: bit = 1 drives the pin; resets
//                 to all inputs
//
// A bidirectional pin is presented as three signals (pio_out, pio_oe,
// pio_in) for an I/O buffer at the chip edge. DIR selects the flavour:
// PIO_OUTPUT (pio_oe all ones), PIO_INPUT (pio_oe all zeros) or PIO_BIDIR.
// The data/direction register layout follows the usual SOPC PIO component;
// interrupts and edge capture are not included.
module avalon_pio
  import music_player_pkg::*;
#(
  parameter int          WIDTH       = 1,
  parameter pio_dir_e    DIR         = PIO_OUTPUT,
  parameter logic [31:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  avm_req_t         avs_req,
  output avm_rsp_t         avs_rsp,
  input  logic [WIDTH-1:0] pio_in,
  output logic [WIDTH-1:0] pio_out,
  output logic [WIDTH-1:0] pio_oe
);
  logic [WIDTH-1:0] dir, in_m, in_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      pio_out <= RESET_VALUE[WIDTH-1:0];
      dir     <= '0;
    end else if (avs_req.write) begin
      if (avs_req.address[1:0] == 2'd0 && DIR != PIO_INPUT)
        pio_out <= avs_req.writedata[WIDTH-1:0];
      if (avs_req.address[1:0] == 2'd1 && DIR == PIO_BIDIR)
        dir <= avs_req.writedata[WIDTH-1:0];
    end
  end

  always_ff @(posedge clk) begin
    in_m <= pio_in;
    in_s <= in_m;
  end

  always_comb begin
    case (DIR)
      PIO_OUTPUT: pio_oe = '1;
      PIO_INPUT:  pio_oe = '0;
      default:    pio_oe = dir;
    endcase
  end

  always_comb begin
    avs_rsp.waitrequest = 1'b0;
    avs_rsp.readdata    = '0;
    case (avs_req.address[1:0])
      2'd0: avs_rsp.readdata[WIDTH-1:0] = (DIR == PIO_OUTPUT) ? pio_out : in_s;
      2'd1: avs_rsp.readdata[WIDTH-1:0] = (DIR == PIO_BIDIR) ? dir : '0;
      default: ;
    endcase
  end

endmodule
