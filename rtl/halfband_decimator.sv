// halfband_decimator: second-stage decimator by 2, a 51-tap half-band FIR
// filter in polyphase form with one multiplier.
//
// y(n) = sum_{j=0}^{50} h(j) x(2n - j), evaluated as
//   sum_{m=0}^{12} h(2m) [x(2n-2m) + x(2n-50+2m)] + 0.5 x(2n-25):
// the odd taps of a half-band filter are zero except the centre one, and the
// even taps are symmetric.  Even-phase samples x(2n) go to the rotating top
// register, odd-phase samples to the bottom delay line; each even sample
// starts NP = 13 multiply-accumulate clocks.  The first sample after reset
// is x(0).  Input: x/x_valid, at least 7 clocks between samples.  Output:
// y/y_valid, S+C+1 bits in the scale of x times 2^10 (coefficient 1.0 =
// 1024), y_valid 14 clocks after the even sample that completes y(n).
module halfband_decimator
  import decim_pkg::*;
#(
  parameter int unsigned SW = HB_S
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic signed [SW-1:0]      x,
  input  logic                      x_valid,
  output logic signed [SW+HB_C:0]   y,
  output logic                      y_valid
);
  logic                      shift_in, odd_en, rotate, clear, mac, last;
  logic [HB_AW-1:0]          addr;
  logic signed [SW-1:0]      tap_lo, tap_hi, x25;
  logic signed [HB_C-1:0]    coeff;

  hb_control #(.NP(HB_NP)) u_ctl (
    .clk, .rst, .in_valid(x_valid), .even(), .shift_in, .odd_en, .rotate,
    .addr, .clear, .mac, .last, .busy()
  );

  hb_top_shift_reg #(.NP(HB_NP), .SW(SW)) u_top (
    .clk, .rst, .shift_in, .rotate, .x, .tap_lo, .tap_hi
  );

  hb_bottom_shift_reg #(.NP(HB_NP), .SW(SW)) u_bot (
    .clk, .rst, .en(odd_en), .x, .x25
  );

  hb_coeff_rom u_rom (.addr, .coeff);

  hb_arith #(.SW(SW), .CW(HB_C)) u_ar (
    .clk, .rst, .clear, .mac, .last, .tap_lo, .tap_hi, .coeff, .x25, .y, .y_valid
  );
endmodule
