// comb_decimator: complete first stage, a third-order comb filter
// H(z) = [(1 - z^-M)/(1 - z^-1)]^3 followed by decimation by M.
//
// Structure (left to right): the input bit enables a counter (integrator 1),
// a fast adder/register pair integrates again (integrator 2), and an
// accumulate-and-dump stage stands for integrator 3, the compressor and
// differentiator 1.  At the low rate a hand-over register and two
// differentiators (the remaining two comb sections) and an output register
// follow.  All registers are WIDTH bits with wrap-around arithmetic, which
// is exact while the output range fits: M^3 + 1 values need
// 1 + 3*log2(M) bits, i.e. 13 bits for M = 16.  For larger M the output is
// the exact result modulo 2^WIDTH.
// Ratio: M = 8*(R+1) set by r[2:0]; pdiv divides by R+1 and divide8 by 8.
// Timing: one input bit per clock.  If the dump happens at clock T, q_valid
// pulses three clocks later (after fb_4) with
//   q = sum_k h[k] * data(T - 3 - k),  h = coefficients of H(z),
// data(t) being the bit sampled at clock edge t.  Synchronous reset.
module comb_decimator
  import decim_pkg::*;
#(
  parameter int unsigned WIDTH = COMB_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             data,
  input  logic [2:0]       r,
  output logic [WIDTH-1:0] q,
  output logic             q_valid
);
  logic [WIDTH-1:0] c1, i2, dsum, held, d1, d2;
  logic             pd, acc_res;
  logic [3:0]       fb;

  // high-rate section
  bit_counter     #(.WIDTH(WIDTH)) u_cnt (.clk, .rst, .data, .q(c1));
  comb_integrator #(.WIDTH(WIDTH)) u_int (.clk, .rst, .d(c1), .q(i2));
  acc_dump        #(.WIDTH(WIDTH)) u_ad  (.clk, .rst, .d(i2), .dump(acc_res), .sum(dsum));

  // rate control
  pdiv    u_pdiv (.clk, .rst, .r, .clkout(pd));
  // clkout duplicates acc_res and acc is its complement; neither is needed
  // with a single clock and enables.
  divide8 u_div8 (.clk, .rst, .clkin(pd), .clkout(), .acc_res, .acc(), .fb);

  // low-rate section
  always_ff @(posedge clk) begin
    if (rst)        held <= '0;
    else if (fb[0]) held <= dsum;
  end

  comb_differentiator #(.WIDTH(WIDTH)) u_dif1 (.clk, .rst, .en(fb[1]), .d(held), .q(d1));
  comb_differentiator #(.WIDTH(WIDTH)) u_dif2 (.clk, .rst, .en(fb[2]), .d(d1),   .q(d2));

  always_ff @(posedge clk) begin
    if (rst) begin
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= fb[3];
      if (fb[3]) q <= d2;
    end
  end
endmodule
