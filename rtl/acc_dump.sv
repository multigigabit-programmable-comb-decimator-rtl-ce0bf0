// acc_dump: accumulate-and-dump stage of the comb decimator ("adder13_4" +
// resettable "latch13_3").
//
// It replaces the third integrator, the rate compressor and the first
// differentiator: integrate, sample every M clocks and difference the
// samples is the same as summing each block of M inputs.  On the clock
// where dump is high the register's feedback into the adder is forced to
// zero, so the register restarts with the current input, while 'sum'
// (the register before that edge) holds the total of the previous M inputs
// and is taken by the next stage on the same edge.
// Timing: sum is the register output; it is complete in the cycle dump is
// high.  Synchronous active-high reset (this design's choice).
module acc_dump #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  input  logic             dump,   // acc_res strobe
  output logic [WIDTH-1:0] sum
);
  logic [WIDTH-1:0] fb, nxt;

  assign fb = dump ? '0 : sum;     // reset of the latch seen by the adder

  cla_adder #(.WIDTH(WIDTH)) u_add (.a(d), .b(fb), .ci(1'b0), .s(nxt));

  always_ff @(posedge clk) begin
    if (rst) sum <= '0;
    else     sum <= nxt;
  end
endmodule
