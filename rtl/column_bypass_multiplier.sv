// column_bypass_multiplier: generic N x N unsigned carry-save array multiplier with
// column bypassing, for lower switching activity.
//
// The array is the carry-save array of array_multiplier (row i adds partial products
// a[j]&b[i]; the cell in column j takes the sum from column j+1 and the carry from
// column j of the row above), but every adder cell is a bypass_fa_cell enabled by its
// multiplicand bit a[j]. Where a[j] = 0 every partial product of column j is 0, so
// the column's cells are switched off and their sums pass round them; carries inside
// such a column are 0. The column of a[N-1] has no adder cells (its bits drop into the
// next row) and so no bypass. The carries leaving the last row are ANDed with their
// column's a[j] before the ripple merging row, as in the document, so that a cell
// that is switched off can never leak a stale carry into the result. The merging row
// is a plain ripple of N-1 full adders. The result equals a*b for every input; only
// the activity changes. Combinational; worst-case delay as the plain array.
module column_bypass_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,  // multiplicand (its bits enable the columns)
  input  logic [N-1:0]   b,  // multiplier
  output logic [2*N-1:0] p   // a * b
);
  if (N < 2) begin : g_bad
    $error("column_bypass_multiplier needs N >= 2");
  end

  logic [N-1:0] sum   [N];
  logic [N-2:0] carry [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] pp;
    assign pp = a & {N{b[i]}};
    if (i == 0) begin : g_first
      assign sum[0]   = pp;
      assign carry[0] = '0;
    end else begin : g_csa
      for (genvar j = 0; j < N - 1; j++) begin : g_col
        bypass_fa_cell u_cell (.en(a[j]), .pp(pp[j]), .s_in(sum[i-1][j+1]),
                               .c_in(carry[i-1][j]), .s_out(sum[i][j]),
                               .c_out(carry[i][j]));
      end
      assign sum[i][N-1] = pp[N-1];
    end
    assign p[i] = sum[i][0];
  end

  logic [N-1:0] mx, my, mz;
  assign mx = {1'b0, sum[N-1][N-1:1]};
  assign my = {1'b0, carry[N-1] & a[N-2:0]};
  vector_merging_adder #(.W(N)) u_vma (.x(mx), .y(my), .z(mz));
  assign p[2*N-1:N] = mz;
endmodule
