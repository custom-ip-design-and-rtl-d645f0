// tb_fx_to_ieee: self-checking test of the binary (Q16.16) to IEEE 754 converter.
//
// Checks known conversions (9.75 -> 0x411C0000, -1 -> 0xBF800000, 0 -> +0,
// the most negative number -32768 -> 0xC7000000, the smallest step 2^-16) and
// 20000 random inputs, whose exact value x / 2^16 is a double precision
// number, rounded to single precision by fp_ref_pkg. A second instance with
// no fraction bits converts plain integers and is checked the same way.
module tb_fx_to_ieee;
  import fp_ref_pkg::*;

  logic [31:0] x, r_q, r_i;
  logic        inx_q, inx_i;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  fx_to_ieee #(.W(32), .FRAC_BITS(16)) dut_q (.x(x), .result(r_q), .inexact(inx_q));
  fx_to_ieee #(.W(32), .FRAC_BITS(0))  dut_i (.x(x), .result(r_i), .inexact(inx_i));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] v, logic [31:0] exp_q, logic [31:0] exp_i);
    x = v;
    #1;
    checks += 2;
    if (r_q !== exp_q) begin
      failures++;
      if (failures < 10) $display("FAIL Q16.16 %h: got %h expected %h", v, r_q, exp_q);
    end
    if (r_i !== exp_i) begin
      failures++;
      if (failures < 10) $display("FAIL int %h: got %h expected %h", v, r_i, exp_i);
    end
  endtask

  function automatic logic [31:0] ref_cvt(logic [31:0] v, int fbits);
    return r2f(real'($signed(v)) / (2.0 ** fbits));
  endfunction

  initial begin
    check(32'h0009_C000, 32'h411C0000, 32'h491C0000);   // 9.75 (Q16.16), 639 Ki (int)
    check(32'hFFFF_0000, 32'hBF800000, 32'hC7800000);   // -1.0, -65536
    check(32'h0000_0000, 32'h00000000, 32'h00000000);
    check(32'h8000_0000, 32'hC7000000, 32'hCF000000);   // most negative
    check(32'h0000_0001, 32'h37800000, 32'h3F800000);   // 2^-16, 1
    check(32'h7FFF_FFFF, 32'h47000000, 32'h4F000000);   // rounds up to 2^15, 2^31
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] v;
      v = $urandom;
      if (i % 3 == 1) v = v >> $urandom_range(0, 31);
      if (i % 3 == 2) v = -(v >> $urandom_range(0, 31));
      check(v, ref_cvt(v, 16), ref_cvt(v, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
