// comb_differentiator: one low-rate differentiator of the comb decimator
// ("latch13_4" + "inv_array" + "adder13_6").
//
// On each strobe en: q <= d - d_prev and d_prev <= d, where the subtraction
// is d + ~d_prev + 1 on the alternating-carry ripple adder (slow parts are
// good enough at the decimated rate).  All arithmetic is modulo 2^WIDTH.
// Timing: q and d_prev change only on clocks where en is high.
// Synchronous active-high reset clears both registers.
module comb_differentiator #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] d_prev, diff;

  alt_carry_adder #(.WIDTH(WIDTH)) u_sub (.a(d), .b(~d_prev), .ci(1'b1), .s(diff));

  always_ff @(posedge clk) begin
    if (rst) begin
      d_prev <= '0;
      q      <= '0;
    end else if (en) begin
      d_prev <= d;
      q      <= diff;
    end
  end
endmodule
