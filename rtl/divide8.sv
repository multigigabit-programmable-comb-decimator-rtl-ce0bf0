// divide8: divide-by-8 of the pre-divider strobe and generator of the
// comb decimator's control strobes.
//
// Counts clkin strobes modulo 8.  On the eighth it raises acc_res (and
// clkout) for one fast clock: the accumulate-and-dump stage hands over its
// sum and restarts.  fb[0..3] (fb_1..fb_4) are one-clock strobes on that
// clock and the three clocks after it; they clock, in order, the hand-over
// register, the two differentiators and the output register, so that each
// low-rate stage sees the settled output of the one before.  acc is the
// complement of acc_res.  Needs M >= 4 fast clocks per period (M >= 8 here).
// Synchronous active-high reset.
module divide8 (
  input  logic       clk,
  input  logic       rst,
  input  logic       clkin,
  output logic       clkout,
  output logic       acc_res,
  output logic       acc,
  output logic [3:0] fb
);
  logic [2:0] cnt;
  logic [2:0] fb_d;   // delayed copies of acc_res for fb_2..fb_4

  assign acc_res = clkin && (cnt == 3'd7);
  assign clkout  = acc_res;
  assign acc     = ~acc_res;
  assign fb      = {fb_d, acc_res};

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      fb_d <= '0;
    end else begin
      if (clkin) cnt <= cnt + 1'b1;
      fb_d <= {fb_d[1:0], acc_res};
    end
  end
endmodule
