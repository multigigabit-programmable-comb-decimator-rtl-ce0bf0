// bit_counter: first integrator of the comb decimator ("counter13").
//
// An integrator whose input is a single bit reduces to a counter that is
// enabled by that bit: q(t+1) = q(t) + data(t) modulo 2^WIDTH.  The count
// wraps freely; the later differentiators remove the wrap as long as the
// true comb output fits in WIDTH bits.
// Timing: one fast clock per input bit; q is registered.  Synchronous
// active-high reset to zero (reset style is this design's choice).
module bit_counter #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             data,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (data) q <= q + 1'b1;
  end
endmodule
