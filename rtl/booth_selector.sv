// booth_selector: one bit of a radix-4 Booth partial product. Bit j of the row is
// multiplicand bit y[j] when one_x selects Y, y[j-1] when two_x selects 2Y (the shift
// by one is done by taking the neighbouring bit), 0 when neither is set, and is then
// inverted when neg is set (one's complement; the +1 that completes the two's
// complement is added by the multiplier as the row's S bit). Combinational. The
// function follows the document's encoder/selector figure and table; the gate
// equations are this design's own.
module booth_selector (
  input  logic y_j,    // multiplicand bit j
  input  logic y_jm1,  // multiplicand bit j-1 (0 for j = 0)
  input  logic one_x,
  input  logic two_x,
  input  logic neg,
  output logic pp      // partial-product bit j
);
  always_comb pp = ((y_j & one_x) | (y_jm1 & two_x)) ^ neg;
endmodule
