// fpau: 32-bit floating point arithmetic unit (the FPU32 core).
//
// Performs one of four IEEE 754 single precision operations on operands A
// and B, chosen by a two-bit select: 00 A + B, 01 A - B, 10 A * B, 11 A / B.
// As in the document, the unit is a case statement on the select lines over
// an adder/subtractor, a multiplier and a divider, and the 32-bit result is
// held in a register: a standalone core needs clk, A, B, sel and result,
// 99 pins in all, and 32 flip-flops.
//
// Timing: A, B and sel are sampled on a rising clock edge and the rounded
// result appears on `result` right after that edge (one cycle of latency,
// one operation per cycle). The arithmetic between the inputs and the
// register is combinational.
//
// The exception flags output (invalid, divide by zero, overflow, underflow,
// inexact) is registered alongside the result; the flags, the absence of a
// reset (the document's pin count leaves no pin for one) and round to nearest
// even are this implementation's choices.
module fpau
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  fpau_op_e    sel,
  output logic [31:0] result,
  output fp_flags_t   flags
);

  logic [31:0] r_addsub, r_mul, r_div;
  fp_flags_t   f_addsub, f_mul, f_div;
  logic [31:0] r_next;
  fp_flags_t   f_next;

  fp_addsub u_addsub (.a(a), .b(b), .sub(sel == OP_SUB), .result(r_addsub), .flags(f_addsub));
  fp_mul    u_mul    (.a(a), .b(b), .result(r_mul), .flags(f_mul));
  fp_div    u_div    (.a(a), .b(b), .result(r_div), .flags(f_div));

  always_comb begin
    unique case (sel)
      OP_ADD, OP_SUB: begin r_next = r_addsub; f_next = f_addsub; end
      OP_MUL:         begin r_next = r_mul;    f_next = f_mul;    end
      default:        begin r_next = r_div;    f_next = f_div;    end
    endcase
  end

  always_ff @(posedge clk) begin
    result <= r_next;
    flags  <= f_next;
  end

endmodule
