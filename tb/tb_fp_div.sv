// tb_fp_div: self-checking test of the single precision multiplier.
//
// Checks the worked example (9.75 * 0.525 = 0x40A3CCCC), corner cases
// (signed zeros, infinity times zero, overflow, gradual underflow, subnormal
// operands) and 40000 random operand pairs against fp_ref_pkg.
module tb_fp_div;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, result;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  fp_div dut (.a(a), .b(b), .result(result), .flags(flags));

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
      if (failures < 10) $display("FAIL %h / %h: got %h expected %h", x, y, result, expect_v);
    end
  endtask

  initial begin
    // 9.75 / 0.525: the correctly rounded quotient is 0x4194924A (18.5714...)
    check(32'h411C0000, 32'h3F066666, 32'h4194924A);
    check(32'h40C00000, 32'hC0000000, 32'hC0400000);   // 6 / -2 = -3
    check(32'h3F800000, 32'h40400000, 32'h3EAAAAAB);   // 1/3 rounds up
    check(32'h3F800000, 32'h00000000, 32'h7F800000);   // 1/0 = inf
    if (!flags.div_zero) failures++;
    checks++;
    check(32'h00000000, 32'h00000000, 32'h7FC00000);   // 0/0 = NaN
    if (!flags.invalid) failures++;
    checks++;
    check(32'h7F800000, 32'h7F800000, 32'h7FC00000);   // inf/inf = NaN
    check(32'h3F800000, 32'hFF800000, 32'h80000000);   // 1/-inf = -0
    check(32'h7F000000, 32'h3E800000, 32'h7F800000);   // overflow
    check(32'h00800000, 32'h40000000, 32'h00400000);   // subnormal result
    check(32'h00400000, 32'h00200000, 32'h40000000);   // subnormal operands
    for (int i = 0; i < 40000; i++) begin
      logic [31:0] x, y;
      x = rand_fp();
      y = rand_fp();
      if (i % 4 == 0) y[22:0] = x[22:0] ^ 23'($urandom_range(0, 3)); // quotient near 1.0
      check(x, y, ref_op(x, y, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
