// booth_multiplier: generic N x N signed (two's complement) radix-4 modified Booth
// multiplier.
//
// The multiplier x is cut into R = ceil(N/2) overlapping triples x[2i+1], x[2i],
// x[2i-1] (x[-1] = 0; for odd N, x is sign-extended by one bit). A booth_encoder turns
// each triple into a digit in {-2,-1,0,1,2}, and N+1 booth_selectors form row i:
// the (N+1)-bit multiple +-Y or +-2Y of the sign-extended multiplicand y, in one's
// complement when the digit is negative. The missing +1 of a negative row is its S
// bit, added at weight 2i. Instead of extending every row's sign to 2N bits, each row
// carries a few extra bits, with E = NOT(row sign):
//   row 0:       E, ~E, ~E above its N+1 bits
//   row i >= 1:  1, E above its N+1 bits
// and bits at weight 2N or above are dropped, as the product is taken modulo 2^(2N).
// The R rows and the row of S bits are summed by a linear carry-save array (one
// 2N-bit row of full adders per extra operand) and a ripple vector merging adder.
// Row layout, S and E bits follow the document's generic dot diagram; the carry-save
// array for the summation follows its remark that fewer rows give a smaller CSA
// array; the odd-N extension and the ripple merging adder are this design's choice.
// Combinational.
module booth_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   y,  // multiplicand, two's complement
  input  logic [N-1:0]   x,  // multiplier, two's complement
  output logic [2*N-1:0] p   // y * x, two's complement
);
  import mult_pkg::*;

  localparam int unsigned R  = (N + 1) / 2;  // partial-product rows
  localparam int unsigned W  = 2 * N;        // product width
  localparam int unsigned OP = R + 1;        // operands: R rows and the S row

  if (N < 2) begin : g_bad
    $error("booth_multiplier needs N >= 2");
  end

  logic [N:0]    ye;       // multiplicand, sign-extended to N+1 bits
  logic [2*R:0]  xe;       // {sign extension, x, 0}: xe[k+1] = x[k], xe[0] = x[-1]
  assign ye = {y[N-1], y};
  if (2 * R == N) begin : g_even
    assign xe = {x, 1'b0};
  end else begin : g_odd
    assign xe = {x[N-1], x, 1'b0};
  end

  booth_sel_t   sel [R];
  logic [W-1:0] ops [OP];   // operands of the summation
  logic [R-1:0] sbit;       // S bits: 1 for a negative row

  for (genvar i = 0; i < R; i++) begin : g_row
    logic [N:0]   ppr;      // selected multiple, N+1 bits
    logic         e;
    logic [W-1:0] rowv;

    booth_encoder u_enc (.x_hi(xe[2*i+2]), .x_mid(xe[2*i+1]), .x_lo(xe[2*i]),
                         .one_x(sel[i].one_x), .two_x(sel[i].two_x), .neg(sel[i].neg));
    for (genvar j = 0; j <= N; j++) begin : g_sel
      booth_selector u_sel (.y_j(ye[j]), .y_jm1((j == 0) ? 1'b0 : ye[(j == 0) ? 0 : j-1]),
                            .one_x(sel[i].one_x), .two_x(sel[i].two_x),
                            .neg(sel[i].neg), .pp(ppr[j]));
    end
    assign e       = ~ppr[N];
    assign sbit[i] = sel[i].neg;

    always_comb begin
      rowv = '0;
      for (int unsigned j = 0; j <= N; j++)
        if (2 * i + j < W) rowv[2*i+j] = ppr[j];
      if (i == 0) begin
        if (N + 1 < W) rowv[N+1] = ~e;
        if (N + 2 < W) rowv[N+2] = ~e;
        if (N + 3 < W) rowv[N+3] = e;
      end else begin
        if (2 * i + N + 1 < W) rowv[2*i+N+1] = e;
        if (2 * i + N + 2 < W) rowv[2*i+N+2] = 1'b1;
      end
    end
    assign ops[i] = rowv;
  end

  // row of S bits: S_i at weight 2i
  always_comb begin
    ops[R] = '0;
    for (int unsigned i = 0; i < R; i++) ops[R][2*i] = sbit[i];
  end

  // linear carry-save array: keep (s, c), fold in one operand per row
  logic [W-1:0] cs_s [OP];
  logic [W-1:0] cs_c [OP];
  assign cs_s[1] = ops[0];
  assign cs_c[1] = ops[1];
  for (genvar k = 2; k < OP; k++) begin : g_csa
    logic [W-2:0] co;
    for (genvar w = 0; w < W - 1; w++) begin : g_fa
      full_adder u_fa (.a(cs_s[k-1][w]), .b(cs_c[k-1][w]), .ci(ops[k][w]),
                       .s(cs_s[k][w]), .co(co[w]));
    end
    // top column: its carry would have weight 2N, so only the sum is formed
    assign cs_s[k][W-1] = cs_s[k-1][W-1] ^ cs_c[k-1][W-1] ^ ops[k][W-1];
    assign cs_c[k] = {co, 1'b0};
  end
  assign cs_s[0] = '0;
  assign cs_c[0] = '0;

  vector_merging_adder #(.W(W)) u_vma (.x(cs_s[OP-1]), .y(cs_c[OP-1]), .z(p));
endmodule
