// tb_fpau: self-checking test of the arithmetic unit core.
//
// Replays the document's waveform sequence (A = 9.75, B = 0.525, select
// stepping 00, 01, 10, 11) and checks each registered result, then runs
// 20000 random operations with a random select per cycle. Checks that the
// result appears exactly one clock edge after the inputs are presented, and
// that the flags register follows the same operation.
module tb_fpau;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, result;
  fpau_op_e    sel;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;

  fpau dut (.clk(clk), .a(a), .b(b), .sel(sel), .result(result), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present inputs, then check after one edge; also check the output did
  // not change prev_result that edge
  task automatic run(logic [31:0] x, logic [31:0] y, fpau_op_e op, logic [31:0] expect_v);
    logic [31:0] prev_result;
    @(negedge clk);
    a = x; b = y; sel = op;
    prev_result = result;
    #1;
    checks++;
    if (result !== prev_result) begin
      failures++;
      $display("FAIL result changed prev_result the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    if (result !== expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h op%0d %h: got %h expected %h", x, op, y, result, expect_v);
    end
  endtask

  initial begin
    a = '0; b = '0; sel = OP_ADD;
    @(posedge clk);
    // the document's sequence
    run(32'h411C0000, 32'h3F066666, OP_ADD, 32'h41246666);
    run(32'h411C0000, 32'h3F066666, OP_SUB, 32'h4113999A);
    run(32'h411C0000, 32'h3F066666, OP_MUL, 32'h40A3CCCC);
    run(32'h411C0000, 32'h3F066666, OP_DIV, 32'h4194924A);
    // flags follow the selected operation
    run(32'h3F800000, 32'h00000000, OP_DIV, 32'h7F800000);
    checks++;
    if (!flags.div_zero) begin failures++; $display("FAIL div_zero flag"); end
    run(32'h3F800000, 32'h00000000, OP_ADD, 32'h3F800000);
    checks++;
    if (flags != '0) begin failures++; $display("FAIL flags after exact add"); end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      int op;
      x  = rand_fp();
      y  = rand_fp();
      op = $urandom_range(0, 3);
      run(x, y, fpau_op_e'(op), ref_op(x, y, op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
