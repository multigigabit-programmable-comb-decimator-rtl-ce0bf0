// comb_integrator: second integrator of the comb decimator (a fast adder
// with its output register fed back, "adder13_4" + "latch13_4").
//
// q(t+1) = q(t) + d(t) modulo 2^WIDTH, every fast clock, using the
// carry-look-ahead adder because this stage runs at the full input rate.
// Timing: q is registered, one clock of latency.  Synchronous active-high
// reset to zero (this design's choice).
module comb_integrator #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] sum;

  cla_adder #(.WIDTH(WIDTH)) u_add (.a(d), .b(q), .ci(1'b0), .s(sum));

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= sum;
  end
endmodule
