// booth_encoder: radix-4 modified Booth encoder for one digit of the multiplier.
// It looks at the overlapping bit triple x[2i+1], x[2i], x[2i-1] and produces the
// three select lines of the document's encoding table: one_x (choose Y), two_x
// (choose 2Y) and neg (take the negative). The resulting multiple is -2Y, -Y, 0, Y
// or 2Y. The triple 111 gives neg = 1 with no multiple chosen, i.e. "-0": the
// inverted all-zero row plus the neg bit added at its least significant position
// sums to zero. neg is x_hi itself, so that output is a plain wire. Combinational.
// The table is the document's; the equations are the minimal sum-of-products of it.
module booth_encoder (
  input  logic x_hi,   // x[2i+1]
  input  logic x_mid,  // x[2i]
  input  logic x_lo,   // x[2i-1]
  output logic one_x,  // X_i  : |digit| = 1
  output logic two_x,  // 2X_i : |digit| = 2
  output logic neg     // M_i  : digit negative
);
  always_comb begin
    one_x = x_mid ^ x_lo;
    two_x = (x_hi & ~x_mid & ~x_lo) | (~x_hi & x_mid & x_lo);
    neg   = x_hi;
  end
endmodule
