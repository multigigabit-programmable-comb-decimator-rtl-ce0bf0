// two_stage_decimator: complete two-stage decimator for a 1-bit
// sigma-delta stream: a programmable third-order comb decimator (ratio
// M1 = 8..64) followed by a half-band FIR decimator by 2, for a total
// ratio 2*M1 (32 for the main configuration M1 = 16, r = 1).
//
// The comb output is an unsigned count of ones weighted by the comb
// response, 0..M1^3.  The half-band stage takes S = 10-bit signed samples:
// the top S bits of the comb word with the most significant bit inverted,
// i.e. the comb output minus half of the 13-bit range (2^12), divided by 8.
// For M1 = 16 a mid-scale input (half ones) maps to zero.  This coupling is
// this design's choice.
// Interface: one data bit per clk; comb_q/comb_valid and y/y_valid are the
// outputs of the two stages.  The comb stage delivers a sample every M1
// clocks, far more than the 7 the second stage needs.
module two_stage_decimator
  import decim_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      data,
  input  logic [2:0]                r,
  output logic [COMB_W-1:0]         comb_q,
  output logic                      comb_valid,
  output logic signed [HB_YW-1:0]   y,
  output logic                      y_valid
);
  logic signed [HB_S-1:0] hb_x;

  comb_decimator #(.WIDTH(COMB_W)) u_comb (
    .clk, .rst, .data, .r, .q(comb_q), .q_valid(comb_valid)
  );

  assign hb_x = {~comb_q[COMB_W-1], comb_q[COMB_W-2 -: HB_S-1]};

  halfband_decimator #(.SW(HB_S)) u_hb (
    .clk, .rst, .x(hb_x), .x_valid(comb_valid), .y, .y_valid
  );
endmodule
