// tb_booth_encoder: exhaustive self-checking test of the radix-4 Booth encoder against
// the encoding table: for each bit triple x[2i+1] x[2i] x[2i-1] the expected select
// lines (X, 2X, M) are listed below, and the digit they stand for is also checked
// against the radix-4 value -2*x[2i+1] + x[2i] + x[2i-1].
module tb_booth_encoder;
  logic x_hi, x_mid, x_lo, one_x, two_x, neg;
  int checks = 0, failures = 0;
  // expected {X, 2X, M} for triple 000 .. 111
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b100, 3'b100, 3'b010,
                                     3'b011, 3'b101, 3'b101, 3'b001};
  booth_encoder dut (.x_hi(x_hi), .x_mid(x_mid), .x_lo(x_lo),
                     .one_x(one_x), .two_x(two_x), .neg(neg));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int digit, mag;
    for (int v = 0; v < 8; v++) begin
      {x_hi, x_mid, x_lo} = 3'(v);
      #1;
      checks++;
      if ({one_x, two_x, neg} != EXP[v]) begin
        failures++;
        $display("FAIL triple=%03b -> X=%0b 2X=%0b M=%0b", v[2:0], one_x, two_x, neg);
      end
      digit = -2 * int'(x_hi) + int'(x_mid) + int'(x_lo);
      mag   = int'(one_x) + 2 * int'(two_x);
      checks++;
      if ((neg ? -mag : mag) != digit) begin
        failures++;
        $display("FAIL triple=%03b digit %0d", v[2:0], digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
