// vector_merging_adder: the final carry-propagate adder of a multiplier. A carry-save
// reduction leaves every bit weight with at most two bits; this adder merges the two
// rows x and y into one W-bit result z; the top bit is a sum only, since the carry out
// of it is never needed (a product always fits). It is a ripple chain of full adders
// with carry in 0, the
// simplest adder that does the job: the document names the adder but does not say
// which kind it is. Combinational; delay grows linearly with W.
module vector_merging_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);
  logic [W-1:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < W - 1; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(c[i]), .s(z[i]), .co(c[i+1]));
  end
  assign z[W-1] = x[W-1] ^ y[W-1] ^ c[W-1];
endmodule
