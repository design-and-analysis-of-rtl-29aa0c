// tb_vector_merging_adder: self-checking test of the ripple merging adder. An 8-bit
// instance is tried on all 65536 operand pairs and the default 32-bit instance on
// random and corner operands (including the longest carry ripple); z must equal
// (x + y) modulo 2^W. The adder is combinational, so z is checked 1 time unit after
// the operands change.
module tb_vector_merging_adder;
  logic [7:0]  x8, y8, z8;
  logic [31:0] x32, y32, z32;
  int checks = 0, failures = 0;
  vector_merging_adder #(.W(8)) dut8 (.x(x8), .y(y8), .z(z8));
  vector_merging_adder dut32 (.x(x32), .y(y32), .z(z32));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check32(input logic [31:0] xv, input logic [31:0] yv);
    longint unsigned sum;
    x32 = xv;
    y32 = yv;
    #1;
    sum = longint'(xv) + longint'(yv);
    checks++;
    if (z32 != sum[31:0]) begin
      failures++;
      $display("FAIL W=32 x=%h y=%h z=%h", xv, yv, z32);
    end
  endtask
  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i);
        y8 = 8'(j);
        #1;
        checks++;
        if (z8 != 8'(i + j)) begin
          failures++;
          $display("FAIL W=8 x=%0d y=%0d z=%0d", i, j, z8);
        end
      end
    end
    check32(32'hFFFF_FFFF, 32'h0000_0001);
    check32(32'h7FFF_FFFF, 32'h0000_0001);
    check32(32'hAAAA_AAAA, 32'h5555_5555);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int k = 0; k < 2000; k++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
