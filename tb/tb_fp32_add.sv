// tb_fp32_add: checks the single-precision adder against sums worked out in
// double precision and rounded once to single: directed cases (exact
// cancellation, carries, infinities, NaN, far-apart exponents, a rounding
// tie) and random operands, with close exponents and opposite signs mixed in
// so that long normalisation shifts are exercised.
module tb_fp32_add;
  import tb_fp_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] ia, logic [31:0] ib, logic [31:0] exp_y);
    a = ia;
    b = ib;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h expected %h", ia, ib, y, exp_y);
    end
  endtask

  logic [31:0] ra, rb;

  initial begin
    check(32'h3f800000, 32'h40000000, 32'h40400000);  // 1+2 = 3
    check(32'h41800000, 32'h41d80000, 32'h422c0000);  // 16+27 = 43
    check(32'h40a00000, 32'hc0a00000, 32'h00000000);  // 5-5 = +0
    check(32'h00000000, 32'hc0a00000, 32'hc0a00000);  // 0-5
    check(32'h7f800000, 32'hff800000, 32'h7fc00000);  // inf-inf
    check(32'h7f800000, 32'h3f800000, 32'h7f800000);  // inf+1
    check(32'h3f800000, 32'h33000000, 32'h3f800000);  // 1+2^-25
    check(32'h3f800000, 32'h33800000, 32'h3f800000);  // 1+2^-24: tie, to even
    check(32'h3f800001, 32'h33800000, 32'h3f800002);  // (1+u)+2^-24: tie, up to even
    check(32'h7f7fffff, 32'h7f7fffff, 32'h7f800000);  // overflow
    for (int i = 0; i < 30000; i++) begin
      ra = rand_f(30);
      rb = rand_f(30);
      if (i % 3 == 1) rb = {~ra[31], ra[30:23], 23'($urandom)};
      if (i % 3 == 2) rb = {ra[31] ^ 1'($urandom), 8'(int'(ra[30:23]) - 1), 23'($urandom)};
      check(ra, rb, r2f(f2r(ra) + f2r(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
