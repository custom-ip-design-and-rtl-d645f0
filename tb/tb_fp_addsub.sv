// tb_fp_addsub: self-checking test of the single precision adder/subtractor.
//
// Checks the worked examples (9.75 + 0.525 = 0x41246666 and
// 9.75 - 0.525 = 0x4113999A), a list of corner cases (signed zeros,
// infinities, NaN, cancellation to zero, overflow, subnormal results), and
// 40000 random operand pairs, half of them close in magnitude so that the
// subtraction cancels leading bits. Expected values come from fp_ref_pkg.
module tb_fp_addsub;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, result;
  logic        sub;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  fp_addsub dut (.a(a), .b(b), .sub(sub), .result(result), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y, logic s, logic [31:0] expect_v);
    a = x; b = y; sub = s;
    #1;
    checks++;
    if (result !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h expected %h", x, s ? "-" : "+", y, result, expect_v);
    end
  endtask

  task automatic check_ref(logic [31:0] x, logic [31:0] y, logic s);
    check(x, y, s, ref_op(x, y, s ? 1 : 0));
  endtask

  initial begin
    // worked examples
    check(32'h411C0000, 32'h3F066666, 1'b0, 32'h41246666);
    check(32'h411C0000, 32'h3F066666, 1'b1, 32'h4113999A);
    // corner cases with known answers
    check(32'h3F800000, 32'h3F800000, 1'b0, 32'h40000000);   // 1 + 1 = 2
    check(32'h3F800000, 32'h3F800000, 1'b1, 32'h00000000);   // 1 - 1 = +0
    check(32'h80000000, 32'h00000000, 1'b1, 32'h80000000);   // -0 - +0 = -0
    check(32'h80000000, 32'h00000000, 1'b0, 32'h00000000);   // -0 + +0 = +0
    check(32'h7F800000, 32'h7F800000, 1'b1, 32'h7FC00000);   // inf - inf = NaN
    check(32'h7F800000, 32'h3F800000, 1'b1, 32'h7F800000);   // inf - 1 = inf
    check(32'h3F800000, 32'h7F800000, 1'b1, 32'hFF800000);   // 1 - inf = -inf
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 1'b0, 32'h7F800000);   // overflow
    check(32'h00800000, 32'h00400000, 1'b1, 32'h00400000);   // subnormal result
    check(32'h3F800000, 32'h33800000, 1'b0, 32'h3F800000);   // tie, rounds to even
    check(32'h3F800001, 32'h33800000, 1'b0, 32'h3F800002);   // tie, rounds up to even
    check(32'h7FC00001, 32'h3F800000, 1'b0, 32'h7FC00000);   // NaN in
    if (!flags.invalid) begin failures++; $display("FAIL invalid flag"); end
    checks++;
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = rand_fp();
      y = rand_fp();
      check_ref(x, y, 1'($urandom_range(0, 1)));
      check_ref(x, rand_near(x), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
