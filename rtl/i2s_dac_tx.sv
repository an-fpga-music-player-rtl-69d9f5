// i2s_dac_tx -- I2S serialiser for the codec's DAC input, codec as master.
//
// The codec drives the bit clock BCLK and the frame clock DACLRC; this block
// only follows them. It is clocked by the inverted BCLK (`clk_n` rises on
// every BCLK falling edge), because DACDAT has to change on falling edges
// so that the codec can sample it on the rising ones.
//
// DACLRC low is the left channel, high the right channel. DACLRC itself
// changes on a BCLK falling edge; at the next falling edge this block sees
// that it differs from the value it stored and puts the MSB of the new
// channel's sample on DACDAT, so the codec reads the MSB on the second
// rising BCLK edge after the DACLRC transition (I2S, one BCLK of delay). The
// remaining bits follow one per BCLK, MSB first, and zeros pad the rest of
// the channel slot.
//
// At the start of each left channel a stereo frame {left, right} is popped
// from a first-word-fall-through FIFO; its right half is held for the right
// channel. If the FIFO is empty the frame is sent as silence and `underrun`
// pulses, which is also how pausing the player sounds.
module i2s_dac_tx #(
  parameter int SW = 16            // bits per channel
) (
  input  logic          clk_n,     // inverted BCLK
  input  logic          rst,       // synchronous to clk_n
  input  logic          daclrc,
  input  logic [2*SW-1:0] fifo_rdata,   // {left, right}
  input  logic          fifo_empty,
  output logic          fifo_rd,
  output logic          dacdat,
  output logic          underrun,
  output logic          frame_start
);
  logic          lrc_q;
  logic [SW-1:0] shreg, right_hold;
  logic          edge_seen, left_start;
  logic [SW-1:0] word;

  assign edge_seen  = (daclrc != lrc_q);
  assign left_start = edge_seen && !daclrc;
  assign fifo_rd    = left_start && !fifo_empty;

  always_comb begin
    if (left_start) word = fifo_empty ? '0 : fifo_rdata[2*SW-1:SW];
    else            word = right_hold;
  end

  always_ff @(posedge clk_n) begin
    if (rst) begin
      lrc_q       <= 1'b1;
      shreg       <= '0;
      right_hold  <= '0;
      dacdat      <= 1'b0;
      underrun    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      lrc_q       <= daclrc;
      underrun    <= left_start && fifo_empty;
      frame_start <= left_start;
      if (edge_seen) begin
        dacdat <= word[SW-1];
        shreg  <= {word[SW-2:0], 1'b0};
        if (left_start)
          right_hold <= fifo_empty ? '0 : fifo_rdata[SW-1:0];
      end else begin
        dacdat <= shreg[SW-1];
        shreg  <= {shreg[SW-2:0], 1'b0};
      end
    end
  end

endmodule
