// bypass_fa_cell: the modified full-adder cell of the column bypass multiplier.
// The cell sits in column j of the carry-save array and adds its partial-product bit
// pp = a[j]&b[i], the sum s_in arriving from the row above (one column to the left)
// and the carry c_in from the row above in the same column. Its enable is the
// multiplicand bit a[j]. When en is 1 it is an ordinary full adder. When en is 0 the
// whole column carries only zeros, so the cell's true sum is s_in and its carry 0:
// the adder's pp and s_in inputs are isolated and the output multiplexer passes s_in round it.
// The document isolates the inputs with tri-state buffers that leave the adder
// floating; two-state synthesizable logic cannot float a node, so this cell isolates
// them with AND gates instead (the adder then sees constant zeros and does not
// switch), which is this design's choice. Combinational.
module bypass_fa_cell (
  input  logic en,     // multiplicand bit of this column
  input  logic pp,     // partial-product bit a[j]&b[i]
  input  logic s_in,   // sum from the row above
  input  logic c_in,   // carry from the row above
  output logic s_out,
  output logic c_out
);
  logic pp_g, s_g, fa_s;
  always_comb begin
    pp_g = pp   & en;
    s_g  = s_in & en;
  end
  // c_in is not isolated, as in the document's cell: inside a disabled column it is 0
  full_adder u_fa (.a(pp_g), .b(s_g), .ci(c_in), .s(fa_s), .co(c_out));
  always_comb s_out = en ? fa_s : s_in;
endmodule
