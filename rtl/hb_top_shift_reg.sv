// hb_top_shift_reg: the rotating "top" shift register of the half-band
// second stage; it holds the 2*NP = 26 most recent even-phase samples.
//
// Two circular paths: a lower path of NP words and a higher path of NP+2
// words (the extra words are the slots the oldest sample leaves through).
// On a shift_in clock (selector S = 0) the new sample enters the lower path,
// the last word of the lower path enters the higher path, and the last word
// of the higher path is dropped.  On a rotate clock (S = 1) both paths feed
// their last word back to their first.  With one shift_in followed by NP
// rotations per input sample, the higher path, which is one word longer than
// a whole period of clocks, slips one place each period; this leaves its
// contents in reverse age order, so after clock k (k = 0 for the shift_in)
//   tap_lo = x_e(n - (NP-1-k))   and   tap_hi = x_e(n - NP - k),
// where x_e(n) is the newest even sample: the symmetric pairs
// (x0,x50), (x2,x48), ..., (x24,x26) in the notation of the full rate,
// newest pair last.  Words hold reset zero until real samples replace them.
module hb_top_shift_reg
  import decim_pkg::*;
#(
  parameter int unsigned NP = HB_NP,
  parameter int unsigned SW = HB_S
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 shift_in,  // S = 0
  input  logic                 rotate,    // S = 1
  input  logic signed [SW-1:0] x,
  output logic signed [SW-1:0] tap_lo,
  output logic signed [SW-1:0] tap_hi
);
  logic signed [SW-1:0] lo [NP];
  logic signed [SW-1:0] hi [NP+2];

  assign tap_lo = lo[NP-1];
  assign tap_hi = hi[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NP; i++)   lo[i] <= '0;
      for (int i = 0; i < NP+2; i++) hi[i] <= '0;
    end else if (shift_in || rotate) begin
      lo[0] <= shift_in ? x : lo[NP-1];
      hi[0] <= shift_in ? lo[NP-1] : hi[NP+1];
      for (int i = 1; i < NP; i++)   lo[i] <= lo[i-1];
      for (int i = 1; i < NP+2; i++) hi[i] <= hi[i-1];
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(shift_in && rotate))
    else $error("hb_top_shift_reg: shift_in and rotate together");
endmodule
