// array_multiplier: generic N x N unsigned carry-save array multiplier.
//
// Partial-product bit pp[i][j] = a[j] & b[i] has weight i+j (a is the multiplicand,
// b the multiplier). Row 0 of the array is just pp[0]. Each further row i = 1..N-1 is
// N-1 full adders; the adder in column j (weight i+j) adds pp[i][j], the sum of row
// i-1 column j+1 and the carry of row i-1 column j, so carries go down into the next
// row instead of along the row (carry save). The top bit of each row, pp[i][N-1],
// has no adder and drops straight into the next row. Product bit k < N is the sum of
// column 0 of row k. The two rows left at the bottom are merged by a ripple adder of
// N-1 full adders (a carry in of 0), whose carry out is the top product bit. That is
// N(N-1) full adders in all, N-1 rows of N-1-bit adders plus the merging row.
// The structure is the document's generic array; the ripple merging row is as drawn
// there. Combinational; the critical path runs down the N-1 rows and then along the
// merging row, about 2N full-adder delays.
module array_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,  // multiplicand
  input  logic [N-1:0]   b,  // multiplier
  output logic [2*N-1:0] p   // a * b
);
  if (N < 2) begin : g_bad
    $error("array_multiplier needs N >= 2");
  end

  logic [N-1:0] sum   [N];  // sum[i][j]: weight i+j; sum[i][N-1] is pp[i][N-1]
  logic [N-2:0] carry [N];  // carry[i][j]: weight i+j+1

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] pp;
    assign pp = a & {N{b[i]}};
    if (i == 0) begin : g_first
      assign sum[0]   = pp;
      assign carry[0] = '0;
    end else begin : g_csa
      for (genvar j = 0; j < N - 1; j++) begin : g_col
        full_adder u_fa (.a(pp[j]), .b(sum[i-1][j+1]), .ci(carry[i-1][j]),
                         .s(sum[i][j]), .co(carry[i][j]));
      end
      assign sum[i][N-1] = pp[N-1];
    end
    assign p[i] = sum[i][0];
  end

  // merging row: weights N .. 2N-1
  logic [N-1:0] mx, my, mz;
  assign mx = {1'b0, sum[N-1][N-1:1]};
  assign my = {1'b0, carry[N-1]};
  vector_merging_adder #(.W(N)) u_vma (.x(mx), .y(my), .z(mz));
  assign p[2*N-1:N] = mz;
endmodule
