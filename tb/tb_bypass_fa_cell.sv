// tb_bypass_fa_cell: exhaustive self-checking test of the column-bypass adder cell.
// Enabled, it must add pp + s_in + c_in. Disabled (its multiplicand bit is 0, so in
// the array pp and c_in are then 0), s_out must be s_in and c_out 0; with en = 0 the
// sum must pass s_in whatever the other inputs are.
module tb_bypass_fa_cell;
  logic en, pp, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;
  bypass_fa_cell dut (.en(en), .pp(pp), .s_in(s_in), .c_in(c_in), .s_out(s_out),
                      .c_out(c_out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {en, pp, s_in, c_in} = 4'(v);
      #1;
      checks++;
      if (en) begin
        if ({c_out, s_out} != 2'(int'(pp) + int'(s_in) + int'(c_in))) begin
          failures++;
          $display("FAIL enabled pp=%0b s=%0b c=%0b -> c=%0b s=%0b", pp, s_in, c_in,
                   c_out, s_out);
        end
      end else begin
        if (s_out != s_in || (!c_in && c_out)) begin
          failures++;
          $display("FAIL bypassed pp=%0b s=%0b c=%0b -> c=%0b s=%0b", pp, s_in, c_in,
                   c_out, s_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
