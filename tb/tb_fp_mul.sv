// tb_fp_mul: self-checking test of the single precision multiplier.
//
// Checks the worked example (9.75 * 0.525 = 0x40A3CCCC), corner cases
// (signed zeros, infinity times zero, overflow, gradual underflow, subnormal
// operands) and 40000 random operand pairs against fp_ref_pkg.
module tb_fp_mul;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, result;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  fp_mul dut (.a(a), .b(b), .result(result), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] expect_v);
    a = x; b = y;
    #1;
    checks++;
    if (result !== expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", x, y, result, expect_v);
    end
  endtask

  initial begin
    check(32'h411C0000, 32'h3F066666, 32'h40A3CCCC);   // worked example
    check(32'h40400000, 32'hC0000000, 32'hC0C00000);   // 3 * -2 = -6
    check(32'h80000000, 32'h3F800000, 32'h80000000);   // -0 * 1 = -0
    check(32'h7F800000, 32'h00000000, 32'h7FC00000);   // inf * 0 = NaN
    if (!flags.invalid) failures++;
    checks++;
    check(32'h7F000000, 32'h40000000, 32'h7F800000);   // overflow to inf
    if (!flags.overflow) failures++;
    checks++;
    check(32'h00800000, 32'h3F000000, 32'h00400000);   // into subnormal range
    check(32'h00000001, 32'h4B000000, 32'h00800000);   // subnormal operand, 2^-149 * 2^23
    check(32'h00000001, 32'h3F000000, 32'h00000000);   // tie at 2^-150 -> 0
    check(32'h00000003, 32'h3F000000, 32'h00000002);   // 1.5 ulp -> 2 (even)
    for (int i = 0; i < 40000; i++) begin
      logic [31:0] x, y;
      x = rand_fp();
      y = rand_fp();
      if (i % 4 == 0) y[30:23] = 8'(254 - x[30:23] + $urandom_range(0, 2)); // near 1.0 product scale
      check(x, y, ref_op(x, y, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
