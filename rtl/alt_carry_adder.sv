// alt_carry_adder: WIDTH-bit ripple-carry adder with alternating carry
// polarity (the "cascade" adder).
//
// Even-numbered stages take an active-high carry and produce an active-low
// one; odd-numbered stages take that active-low carry and produce an
// active-high one again.  No inverter sits in the carry path, which shortens
// the ripple delay.  The carry out of the top bit is dropped: every register
// of the comb decimator uses modulo 2^WIDTH arithmetic.
// Combinational; ci is active high.
module alt_carry_adder #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s
);
  // c[i] is the carry into stage i, in the polarity that stage expects
  logic [WIDTH:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    sdcfl_full_adder #(.CIN_ACTIVE_LOW(i % 2 == 1)) u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end
  // c[WIDTH] (the carry out) is intentionally unused: modulo arithmetic.
endmodule
