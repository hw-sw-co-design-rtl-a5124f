// tb_fp32_mul: checks the single-precision multiplier against products worked
// out in double precision and rounded once to single, for directed cases
// (exact small integers, signs, zero, infinity, NaN, overflow, a rounding
// tie) and for random normal operands.
module tb_fp32_mul;
  import tb_fp_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0, cycles = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

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
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", ia, ib, y, exp_y);
    end
  endtask

  logic [31:0] ra, rb;

  initial begin
    check(32'h40000000, 32'h40400000, 32'h40c00000);  // 2*3 = 6
    check(32'hbf800000, 32'h40a00000, 32'hc0a00000);  // -1*5 = -5
    check(32'h00000000, 32'h40a00000, 32'h00000000);  // 0*5
    check(32'h7f800000, 32'h40000000, 32'h7f800000);  // inf*2
    check(32'h7f800000, 32'h00000000, 32'h7fc00000);  // inf*0
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);  // overflow
    check(32'h3f800001, 32'h3f800001, 32'h3f800002);  // (1+u)^2 rounds to 1+2u
    check(32'h3fc00000, 32'h3f800001, 32'h3fc00002);  // 1.5*(1+u): tie, to even
    check(32'h3f800003, 32'h3fc00000, 32'h3fc00004);  // (1+3u)*1.5: tie, down to even
    for (int i = 0; i < 20000; i++) begin
      ra = rand_f(40);
      rb = rand_f(40);
      check(ra, rb, r2f(f2r(ra) * f2r(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
