// hb_bottom_shift_reg: the "bottom" shift register of the half-band second
// stage, a plain NP-word delay line for the odd-phase samples.
//
// It shifts once per odd sample (en) and never rotates.  Its last word is
// x25 = x(2n-25), the only odd-phase sample with a non-zero coefficient
// (the centre tap, 0.5).  Registered; synchronous reset to zero.
module hb_bottom_shift_reg
  import decim_pkg::*;
#(
  parameter int unsigned NP = HB_NP,
  parameter int unsigned SW = HB_S
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [SW-1:0] x,
  output logic signed [SW-1:0] x25
);
  logic signed [SW-1:0] sr [NP];

  assign x25 = sr[NP-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NP; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= x;
      for (int i = 1; i < NP; i++) sr[i] <= sr[i-1];
    end
  end
endmodule
