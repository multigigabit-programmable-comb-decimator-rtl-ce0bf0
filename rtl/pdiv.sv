// pdiv: programmable pre-divider of the decimation clock.
//
// Counts fast clocks and emits a one-clock strobe clkout every R+1 clocks,
// R = r[2:0] = 0..7.  Followed by the fixed divide-by-8 this gives the
// comb decimation ratio M = 8*(R+1) = 8, 16, ..., 64.  The count restarts
// after the strobe, and a new R takes effect from the next strobe.
// Synchronous active-high reset; the first strobe comes R+1 clocks after
// reset is released.
module pdiv (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] r,
  output logic       clkout
);
  logic [2:0] cnt;

  assign clkout = (cnt == r);

  always_ff @(posedge clk) begin
    if (rst || clkout) cnt <= '0;
    else               cnt <= cnt + 1'b1;
  end
endmodule
