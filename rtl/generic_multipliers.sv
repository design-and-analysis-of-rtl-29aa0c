// generic_multipliers: the four generic N x N multipliers side by side, for comparing
// them on the same operands. a is the multiplicand and b the multiplier of all four.
// The carry-save array, column bypass and tree multipliers read them as unsigned
// numbers; the radix-4 modified Booth multiplier reads them as two's complement
// numbers, as Booth recoding is a signed method. Each product is 2N bits wide. All
// four are combinational: a product is valid one settling time after the operands
// change, and the tree and Booth versions settle faster than the two arrays. N is
// generic; its default, 16, is the largest size the document evaluates (it also
// evaluates 4 and 8). Putting the four in one top is this design's choice.
module generic_multipliers #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,          // multiplicand
  input  logic [N-1:0]   b,          // multiplier
  output logic [2*N-1:0] p_array,    // unsigned a*b, carry-save array
  output logic [2*N-1:0] p_bypass,   // unsigned a*b, column bypass array
  output logic [2*N-1:0] p_booth,    // signed a*b, radix-4 modified Booth
  output logic [2*N-1:0] p_wallace   // unsigned a*b, tree
);
  array_multiplier #(.N(N)) u_array (.a(a), .b(b), .p(p_array));
  column_bypass_multiplier #(.N(N)) u_bypass (.a(a), .b(b), .p(p_bypass));
  booth_multiplier #(.N(N)) u_booth (.y(a), .x(b), .p(p_booth));
  wallace_multiplier #(.N(N)) u_wallace (.a(a), .b(b), .p(p_wallace));
endmodule
