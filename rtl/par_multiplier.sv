// par_multiplier: signed parallel (array) multiplier, XW x YW bits.
//
// Built as a Baugh-Wooley array: the partial-product bits are ANDs, those
// that involve exactly one sign bit are inverted, and the two correction
// ones are added, so only additions of unsigned rows remain; each row adds
// like a row of full adders in a parallel array.  Combinational; p is the
// exact XW+YW-bit two's complement product.
module par_multiplier #(
  parameter int unsigned XW = 11,
  parameter int unsigned YW = 11
) (
  input  logic signed [XW-1:0]    x,
  input  logic signed [YW-1:0]    y,
  output logic signed [XW+YW-1:0] p
);
  localparam int unsigned PW = XW + YW;

  always_comb begin
    logic [PW-1:0] acc;
    logic          bit_ij;
    acc = '0;
    for (int j = 0; j < YW; j++) begin
      logic [PW-1:0] row;
      row = '0;
      for (int i = 0; i < XW; i++) begin
        bit_ij = x[i] & y[j];
        // invert the products that combine one sign bit with a magnitude bit
        if ((i == XW-1) != (j == YW-1)) bit_ij = ~bit_ij;
        row[i+j] = bit_ij;
      end
      acc = acc + row;
    end
    // correction terms: +2^(XW-1) + 2^(YW-1) - 2^(PW-1), i.e. adding 2^(PW-1) mod 2^PW
    acc = acc + (PW'(1) << (XW-1)) + (PW'(1) << (YW-1)) + (PW'(1) << (PW-1));
    p = signed'(acc);
  end
endmodule
