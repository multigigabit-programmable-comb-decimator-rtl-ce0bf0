// cla_adder: fast WIDTH-bit adder made of four-bit carry-look-ahead groups
// plus the sum half of a full adder for the single top bit (13 = 3 x 4 + 1).
//
// The group carries ripple from group to group; inside a group they are
// looked ahead.  The top bit needs no carry out because all comb registers
// use modulo 2^WIDTH arithmetic.  WIDTH - 1 must be a multiple of 4.
// Combinational; ci is active high.
module cla_adder #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s
);
  localparam int unsigned NG = (WIDTH - 1) / 4;

  logic [NG:0] gc;  // carry into each group, gc[NG] into the top bit
  assign gc[0] = ci;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla4 u_cla (
      .a (a[4*k +: 4]),
      .b (b[4*k +: 4]),
      .ci(gc[k]),
      .s (s[4*k +: 4]),
      .co(gc[k+1])
    );
  end

  // sum part of a full adder for the most significant bit
  assign s[WIDTH-1] = a[WIDTH-1] ^ b[WIDTH-1] ^ gc[NG];

  initial assert ((WIDTH - 1) % 4 == 0)
    else $error("cla_adder: WIDTH-1 must be a multiple of 4");
endmodule
