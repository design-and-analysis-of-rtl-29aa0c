// tb_booth_multiplier: self-checking test of booth_multiplier (signed radix-4 Booth multiplier). The block is
// combinational, so each product is checked 1 time unit after the operands change.
// Instances at N = 4, 5 (odd) and 8 are tried on every operand pair; the default
// N = 16 instance on corner operands and 20000 random pairs. Expected products are
// formed with the simulator's own signed multiplication.
module tb_booth_multiplier;
  int checks = 0, failures = 0;

  logic [3:0]  a4,  b4;  logic [7:0]  p4;
  logic [4:0]  a5,  b5;  logic [9:0]  p5;
  logic [7:0]  a8,  b8;  logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;

  booth_multiplier #(.N(4)) dut4 (.y(a4), .x(b4), .p(p4));
  booth_multiplier #(.N(5)) dut5 (.y(a5), .x(b5), .p(p5));
  booth_multiplier #(.N(8)) dut8 (.y(a8), .x(b8), .p(p8));
  booth_multiplier dut16 (.y(a16), .x(b16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_mul(input longint unsigned av,
                                              input longint unsigned bv, input int n);
    longint sa, sb;
    longint unsigned mask;
    mask = (64'd1 << (2 * n)) - 1;
    sa = longint'(av << (64 - n)) >>> (64 - n);
    sb = longint'(bv << (64 - n)) >>> (64 - n);
    return longint'(sa * sb) & mask;
  endfunction

  task automatic check(input int n, input longint unsigned got,
                       input longint unsigned av, input longint unsigned bv);
    longint unsigned exp_p;
    exp_p = ref_mul(av, bv, n);
    checks++;
    if (got != exp_p) begin
      failures++;
      if (failures < 20)
        $display("FAIL N=%0d a=%h b=%h p=%h expected %h", n, av, bv, got, exp_p);
    end
  endtask

  task automatic run16(input logic [15:0] av, input logic [15:0] bv);
    a16 = av;
    b16 = bv;
    #1;
    check(16, longint'(p16), longint'(av), longint'(bv));
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check(4, longint'(p4), longint'(a4), longint'(b4));
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        check(5, longint'(p5), longint'(a5), longint'(b5));
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check(8, longint'(p8), longint'(a8), longint'(b8));
      end
    run16(16'h0000, 16'h0000);
    run16(16'hFFFF, 16'hFFFF);
    run16(16'h8000, 16'h8000);
    run16(16'h7FFF, 16'h8000);
    run16(16'h7FFF, 16'h7FFF);
    run16(16'hFFFF, 16'h0001);
    run16(16'h5555, 16'hAAAA);
    for (int k = 0; k < 20000; k++) run16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
