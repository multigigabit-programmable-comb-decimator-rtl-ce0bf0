// sdcfl_full_adder: one-bit full adder in the form of the seven-gate
// source-follower DCFL cell.
//
// The cell forms p = A xor B with an AOI22 gate fed by A, B and their
// complements, re-inverts it, and then uses an OAI22 gate for the sum and an
// AOI22 gate for the carry.  The carry gate therefore produces an active-low
// carry-out from an active-high carry-in (CIN_ACTIVE_LOW = 0).  The mirrored
// cell (CIN_ACTIVE_LOW = 1) takes an active-low carry-in; its carry gate sees
// inverted inputs and is an OAI22, so its carry-out is active high.  Chaining
// the two kinds alternately gives a carry chain with no inverters in it.
//
// The gate types (AOI2, OAI2, inverters) follow the published cell; the exact
// pin-to-pin wiring is inferred from the gate types and the function.
// Purely combinational.
module sdcfl_full_adder #(
  parameter bit CIN_ACTIVE_LOW = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic ci,   // carry in, active high if CIN_ACTIVE_LOW = 0
  output logic s,
  output logic co    // carry out, always the opposite polarity to ci
);
  logic a_n, b_n, p, p_n, ci_n;

  always_comb begin
    a_n  = ~a;
    b_n  = ~b;
    p    = ~((a & b) | (a_n & b_n));        // AOI22 -> a xor b
    p_n  = ~p;                              // inverter
    ci_n = ~ci;                             // inverter on carry in
    if (!CIN_ACTIVE_LOW) begin
      s  = ~((p | ci_n) & (p_n | ci));      // OAI22 -> p xor ci
      co = ~((a & b) | (p & ci));           // AOI22 -> active-low carry
    end else begin
      // ci is the complement of the true carry
      s  = ~((p | ci) & (p_n | ci_n));      // OAI22 -> p xor ~ci
      co = ~((a_n | b_n) & (p_n | ci));     // OAI22 on inverted inputs -> active-high carry
    end
  end
endmodule
