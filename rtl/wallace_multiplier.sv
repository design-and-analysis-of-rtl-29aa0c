// wallace_multiplier: generic N x N unsigned tree multiplier.
//
// The N*N partial-product bits a[j]&b[i] form a matrix of 2N-1 columns (column c holds
// the bits of weight c). Stages of full adders (3:2 counters) and half adders (2:2
// counters) work on all columns in parallel: each stage replaces the bits it covers
// by sums in the same column and carries in the next one, until no column holds more
// than two bits. A ripple vector merging adder then adds the two remaining rows. The
// schedule (how many counters each stage puts in each column) is computed while the
// design elaborates by mult_pkg::tree_count; see mult_pkg for the rule. Stage count
// grows as log base 3/2 of N (2 stages at N = 4, 4 at N = 8, 6 at N = 16).
// Each stage has its own cur/nxt matrix, indexed [column][bit]. Inside a column the
// bits of cur are taken in order: full adders take bits 0..3F-1, half adders the next
// 2H, the rest pass through. Bits above a column's height are tied to 0. The top
// column (weight 2N-1) starts empty and only ever receives carries, so no stage reads
// it and lint reports those cur bits as unused. A stage's output column is
// its sums, then the passed bits, then the carries of the column below.
// The tree reduction with full and half adders followed by a merging adder is the
// document's; the per-column schedule follows its 4 x 4 example; bit ordering and the
// ripple merging adder are this design's choice. Combinational.
module wallace_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,  // multiplicand
  input  logic [N-1:0]   b,  // multiplier
  output logic [2*N-1:0] p   // a * b
);
  import mult_pkg::*;

  localparam int unsigned W  = 2 * N;
  localparam int unsigned ST = tree_stages(N);

  if (N < 2 || N > MAX_COLS / 2) begin : g_bad
    $error("wallace_multiplier needs 2 <= N <= %0d", MAX_COLS / 2);
  end

  // m0[c][k]: bit k of column c of the partial-product matrix
  logic [W-1:0][N-1:0] m0;
  for (genvar c = 0; c < W; c++) begin : g_pp
    localparam int unsigned H0   = tree_count(N, 0, c, 0);
    localparam int unsigned ILO  = (c > N - 1) ? c - (N - 1) : 0;
    for (genvar k = 0; k < N; k++) begin : g_k
      if (k < H0) begin : g_used
        assign m0[c][k] = a[c-(ILO+k)] & b[ILO+k];
      end else begin : g_unused
        assign m0[c][k] = 1'b0;
      end
    end
  end

  // stage s reads cur (the matrix after stage s-1) and drives nxt
  for (genvar s = 0; s < ST; s++) begin : g_stage
    logic [W-1:0][N-1:0] cur, nxt;
    if (s == 0) begin : g_from_pp
      assign cur = m0;
    end else begin : g_from_stage
      assign cur = g_stage[s-1].nxt;
    end
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned H    = tree_count(N, s, c, 0);
      localparam int unsigned NFA  = tree_count(N, s, c, 1);
      localparam int unsigned NHA  = tree_count(N, s, c, 2);
      localparam int unsigned NPS  = H - 3 * NFA - 2 * NHA;  // bits passed through
      localparam int unsigned NCI  = (c == 0) ? 0 : tree_count(N, s, c - 1, 1) + tree_count(N, s, c - 1, 2);
      localparam int unsigned HOUT = NFA + NHA + NPS + NCI;
      // where this column's carries land in column c+1 of the next stage
      localparam int unsigned NFA1 = (c + 1 < W) ? tree_count(N, s, c + 1, 1) : 0;
      localparam int unsigned NHA1 = (c + 1 < W) ? tree_count(N, s, c + 1, 2) : 0;
      localparam int unsigned H1   = (c + 1 < W) ? tree_count(N, s, c + 1, 0) : 0;
      localparam int unsigned CB   = NFA1 + NHA1 + (H1 - 3 * NFA1 - 2 * NHA1);

      if (3 * NFA + 2 * NHA > H || HOUT != tree_count(N, s + 1, c, 0) || HOUT > N ||
          (c == W - 1 && NFA + NHA != 0)) begin : g_bad_schedule
        $error("wallace_multiplier: inconsistent reduction schedule");
      end

      for (genvar f = 0; f < NFA; f++) begin : g_fa
        full_adder u_fa (.a(cur[c][3*f]), .b(cur[c][3*f+1]), .ci(cur[c][3*f+2]),
                         .s(nxt[c][f]), .co(nxt[(c+1)%W][CB+f]));
      end
      for (genvar h = 0; h < NHA; h++) begin : g_ha
        half_adder u_ha (.a(cur[c][3*NFA+2*h]), .b(cur[c][3*NFA+2*h+1]),
                         .s(nxt[c][NFA+h]), .co(nxt[(c+1)%W][CB+NFA+h]));
      end
      for (genvar q = 0; q < NPS; q++) begin : g_pass
        assign nxt[c][NFA+NHA+q] = cur[c][3*NFA+2*NHA+q];
      end
      for (genvar k = HOUT; k < N; k++) begin : g_unused
        assign nxt[c][k] = 1'b0;
      end
    end
  end

  // vector merging adder on the (at most) two bits left in each column
  logic [W-1:0][N-1:0] tree_out;
  if (ST == 0) begin : g_no_tree
    assign tree_out = m0;
  end else begin : g_tree
    assign tree_out = g_stage[ST-1].nxt;
  end
  logic [W-1:0] vx, vy;
  for (genvar c = 0; c < W; c++) begin : g_vma_in
    assign vx[c] = tree_out[c][0];
    assign vy[c] = tree_out[c][1];
  end
  vector_merging_adder #(.W(W)) u_vma (.x(vx), .y(vy), .z(p));
endmodule
