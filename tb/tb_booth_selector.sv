// tb_booth_selector: exhaustive self-checking test of one Booth selector bit. For every
// multiplicand bit pair and every legal select combination (at most one of X and 2X)
// the output must be the chosen bit (y[j] for X, y[j-1] for 2X, 0 for none),
// inverted when M is set.
module tb_booth_selector;
  logic y_j, y_jm1, one_x, two_x, neg, pp;
  logic expv;
  int checks = 0, failures = 0;
  booth_selector dut (.y_j(y_j), .y_jm1(y_jm1), .one_x(one_x), .two_x(two_x),
                      .neg(neg), .pp(pp));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      {y_j, y_jm1, one_x, two_x, neg} = 5'(v);
      if (one_x && two_x) continue;
      #1;
      if (one_x)      expv = y_j;
      else if (two_x) expv = y_jm1;
      else            expv = 1'b0;
      if (neg) expv = !expv;
      checks++;
      if (pp != expv) begin
        failures++;
        $display("FAIL y_j=%0b y_jm1=%0b X=%0b 2X=%0b M=%0b -> %0b", y_j, y_jm1, one_x,
                 two_x, neg, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
