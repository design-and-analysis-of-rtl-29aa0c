// tb_generic_multipliers: end-to-end self-checking test of generic_multipliers at its
// default size (N = 16, no parameter override). Operands are corner values and 50000
// random pairs, some with sparse multiplicands so that many columns are bypassed.
// Each of the four products is checked 1 time unit after the operands change against
// the simulator's own multiplication (unsigned for the array, bypass and tree
// versions, two's complement for the Booth version). The testbench also counts, from
// the operands, how often each mechanism of the design is exercised: columns of the
// bypass array switched off (some, all, none), every radix-4 Booth digit -2 .. +2 and
// the "-0" triple 111, and negative-by-negative Booth products. A mechanism that never
// occurs counts as a failure.
module tb_generic_multipliers;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_array, p_bypass, p_booth, p_wallace;
  int checks = 0, failures = 0;

  int n_some_bypass = 0, n_all_bypass = 0, n_no_bypass = 0;
  int n_digit [5];   // Booth digits -2 .. +2
  int n_minus_zero = 0, n_neg_neg = 0;

  generic_multipliers dut (.a(a), .b(b), .p_array(p_array), .p_bypass(p_bypass),
                           .p_booth(p_booth), .p_wallace(p_wallace));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [2*N-1:0] got,
                           input logic [2*N-1:0] exp_p);
    checks++;
    if (got != exp_p) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h got %h expected %h", what, a, b, got, exp_p);
    end
  endtask

  task automatic apply(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N-1:0] up, sp;
    logic [N:0]     bx;
    int             d;
    a = av;
    b = bv;
    #1;
    up = (2*N)'(longint'(av) * longint'(bv));
    sp = (2*N)'(longint'(signed'(av)) * longint'(signed'(bv)));
    expect_eq("array",   p_array,   up);
    expect_eq("bypass",  p_bypass,  up);
    expect_eq("wallace", p_wallace, up);
    expect_eq("booth",   p_booth,   sp);
    // mechanism coverage
    if (av[N-2:0] == '0)       n_all_bypass++;
    else if (&av[N-2:0])       n_no_bypass++;
    else                       n_some_bypass++;
    bx = {bv, 1'b0};
    for (int i = 0; i < N / 2; i++) begin
      d = -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
      n_digit[d+2]++;
      if (bx[2*i+2 -: 3] == 3'b111) n_minus_zero++;
    end
    if (av[N-1] && bv[N-1]) n_neg_neg++;
  endtask

  initial begin
    logic [N-1:0] ra, rb;
    foreach (n_digit[k]) n_digit[k] = 0;
    apply('0, '0);
    apply('1, '1);
    apply(16'h8000, 16'h8000);
    apply(16'h7FFF, 16'h8000);
    apply(16'h7FFF, 16'h7FFF);
    apply(16'h0001, 16'hFFFF);
    apply(16'h5555, 16'hAAAA);
    apply(16'h0000, 16'h1234);
    for (int k = 0; k < 50000; k++) begin
      ra = 16'($urandom);
      rb = 16'($urandom);
      if (k % 4 == 1) ra = ra & 16'($urandom) & 16'($urandom);  // sparse multiplicand
      apply(ra, rb);
    end
    $display("bypass columns: some=%0d all=%0d none=%0d", n_some_bypass, n_all_bypass,
             n_no_bypass);
    $display("booth digits: -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d  -0:%0d  neg*neg:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_minus_zero,
             n_neg_neg);
    if (n_some_bypass == 0 || n_all_bypass == 0 || n_no_bypass == 0) failures++;
    foreach (n_digit[k]) if (n_digit[k] == 0) failures++;
    if (n_minus_zero == 0 || n_neg_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
