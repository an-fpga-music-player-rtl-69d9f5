// reset_sync -- brings an active-high reset into another clock domain.
//
// Two flip-flops in the destination domain; the reset is seen there two
// clock edges after it rises and released two edges after it falls, so the
// release is always clean with respect to the destination clock. The reset
// source must stay high for at least two destination clock periods.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic r1;
  always_ff @(posedge clk) begin
    r1      <= rst_in;
    rst_out <= r1;
  end
endmodule
