// full_adder: one-bit full adder, the 3:2 counter every multiplier here is built from.
// Three bits of equal weight go in; the sum keeps that weight and the carry moves one
// column up. Purely combinational, no clock. The cell follows the document; the
// XOR/majority form of the equations is the usual one and this design's own choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
