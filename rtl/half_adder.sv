// half_adder: one-bit half adder, the 2:2 counter used by the tree reduction.
// Two bits of equal weight go in; the sum keeps that weight and the carry moves one
// column up. Purely combinational. The cell follows the document; the equations are
// the standard ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
