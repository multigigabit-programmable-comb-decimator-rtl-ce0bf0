// decim_pkg: constants shared by the two-stage decimator.
//
// The first stage is a third-order comb decimator whose adders and
// registers are COMB_W bits wide: with modulo (two's complement wrap-around)
// arithmetic the register length only has to match the output word,
// B = 1 + R*log2(M1) = 13 for R = 3 stages and M1 = 16.  The second stage is
// a 51-tap half-band FIR with 10-bit input samples and 11-bit coefficients,
// evaluated with one multiplier in polyphase form.
package decim_pkg;
  // comb decimator
  localparam int unsigned COMB_W     = 13;  // adder/latch width
  // half-band FIR second stage
  localparam int unsigned HB_N    = 51;                 // filter length
  localparam int unsigned HB_S    = 10;                 // input sample width
  localparam int unsigned HB_C    = 11;                 // coefficient width
  localparam int unsigned HB_NP   = (HB_N + 1) / 4;     // 13 symmetric pairs = products per output
  localparam int unsigned HB_AW   = $clog2(HB_NP);      // ROM address width (4)
  localparam int unsigned HB_YW   = HB_S + HB_C + 1;    // product / accumulator / output width (22)
  localparam int unsigned HB_FRAC = HB_C - 1;           // coefficient fraction bits: 1.0 = 2**10
endpackage
