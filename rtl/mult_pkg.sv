// mult_pkg: types and elaboration-time functions shared by the generic multipliers.
//
// booth_sel_t bundles the three select lines of a radix-4 Booth digit.
//
// The tree multiplier builds its reduction network from the functions below. The
// partial-product matrix of an N x N multiplication has 2N-1 columns; column c holds
// min(c, 2N-2-c)+1 bits. Reduction runs in stages with height limits taken from the
// sequence 2, 3, 4, 6, 9, 13, ... (each term is 3/2 of the one before, rounded down):
// the first stage lowers every column to the largest limit below N, the last to 2.
// Walking the columns from the least significant one, a column whose height (its own
// bits plus the carries arriving from the column below in the same stage) exceeds the
// limit gets a half adder if it is one bit too high and a full adder otherwise, until
// it fits. This is the schedule of the document's 4 x 4 example (two half adders in
// the first stage, then adders in columns 2 to 5); the rule that extends it to any N
// is this design's choice.
package mult_pkg;

  typedef struct packed {
    logic one_x;  // select +-Y
    logic two_x;  // select +-2Y
    logic neg;    // negate (invert, plus 1 at the row's least significant bit)
  } booth_sel_t;

  localparam int unsigned MAX_COLS = 256;  // supports N up to 128

  // number of reduction stages for an N x N matrix (0 when N <= 2)
  function automatic int unsigned tree_stages(int unsigned n);
    int unsigned d = 2;
    int unsigned k = 0;
    while (d < n) begin
      d = d * 3 / 2;
      k++;
    end
    return k;
  endfunction

  // height limit that stage s (0 = first) reduces every column to
  function automatic int unsigned tree_limit(int unsigned n, int unsigned s);
    int unsigned st = tree_stages(n);
    int unsigned d  = 2;
    for (int unsigned k = s + 1; k < st; k++) d = d * 3 / 2;
    return d;
  endfunction

  // kind 0: number of bits in column col at the input of stage `stage`
  //         (stage == tree_stages(n) gives the two-row result of the tree)
  // kind 1: number of full adders stage `stage` places in column col
  // kind 2: number of half adders stage `stage` places in column col
  function automatic int unsigned tree_count(int unsigned n, int unsigned stage,
                                             int unsigned col, int unsigned kind);
    int unsigned h  [MAX_COLS];
    int unsigned hn [MAX_COLS];
    int unsigned cin, eff, d, nfa, nha;
    for (int unsigned c = 0; c < 2 * n; c++) begin
      if (c < 2 * n - 1) h[c] = ((c < 2 * n - 2 - c) ? c : 2 * n - 2 - c) + 1;
      else               h[c] = 0;
      hn[c] = 0;
    end
    for (int unsigned s = 0; s <= stage; s++) begin
      if (s == stage && kind == 0) return h[col];
      d   = tree_limit(n, s);
      cin = 0;
      for (int unsigned c = 0; c < 2 * n; c++) begin
        eff = h[c] + cin;
        nfa = 0;
        nha = 0;
        while (eff > d) begin
          if (eff == d + 1) begin
            nha++;
            eff -= 1;
          end else begin
            nfa++;
            eff -= 2;
          end
        end
        if (s == stage && c == col) return (kind == 1) ? nfa : nha;
        hn[c] = eff;
        cin   = nfa + nha;
      end
      for (int unsigned c = 0; c < 2 * n; c++) h[c] = hn[c];
    end
    return 0;
  endfunction

endpackage
