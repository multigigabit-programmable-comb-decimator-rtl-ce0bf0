// hb_arith: arithmetic unit of the half-band second stage.
//
// Per clock with mac high: the two taps of the top register are added
// (the filter is symmetric, so each coefficient multiplies a pair of
// samples), the S+1-bit sum is multiplied by the C-bit coefficient in the
// single parallel multiplier, and the product is added to the accumulator.
// clear empties the accumulator and captures the centre-tap sample x25.
// On the clock with last high the output register takes the accumulator
// plus the last product plus x25 * 0.5, where 0.5 = 2^(C-2) in the
// coefficient scale, so the multiplication by the centre tap is a shift.
// Timing: y/y_valid are registered; y_valid pulses for one clock after
// the last product.  Widths: product, accumulator and output are S+C+1 bits,
// which holds the largest possible output of this coefficient set.
module hb_arith
  import decim_pkg::*;
#(
  parameter int unsigned SW = HB_S,
  parameter int unsigned CW = HB_C
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clear,
  input  logic                      mac,
  input  logic                      last,
  input  logic signed [SW-1:0]      tap_lo,
  input  logic signed [SW-1:0]      tap_hi,
  input  logic signed [CW-1:0]      coeff,
  input  logic signed [SW-1:0]      x25,
  output logic signed [SW+CW:0]     y,
  output logic                      y_valid
);
  localparam int unsigned YW = SW + CW + 1;

  logic signed [SW:0]   pair;
  logic signed [YW-1:0] prod, acc, acc_nxt, centre;
  logic signed [SW-1:0] x25_q;

  assign pair    = SW'(0) + tap_lo + tap_hi;   // S+1 bits, no overflow
  par_multiplier #(.XW(SW+1), .YW(CW)) u_mul (.x(pair), .y(coeff), .p(prod));
  assign acc_nxt = acc + prod;
  assign centre  = YW'(x25_q) <<< (HB_FRAC - 1); // x25 * 0.5

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      x25_q   <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= mac && last;
      if (clear) begin
        acc   <= '0;
        x25_q <= x25;
      end else if (mac) begin
        acc <= acc_nxt;
      end
      if (mac && last) y <= acc_nxt + centre;
    end
  end
endmodule
