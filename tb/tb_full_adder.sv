// tb_full_adder: exhaustive self-checking test of full_adder. All eight input
// combinations are applied; {co, s} must equal the arithmetic sum a + b + ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
