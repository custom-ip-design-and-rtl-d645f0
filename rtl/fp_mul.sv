// fp_mul: IEEE 754 single precision multiplier.
//
// Follows the multiplication flow of the unit: the sign is the XOR of the two
// sign bits, the exponents are added and the bias subtracted once, the two
// 24-bit significands are multiplied, and the 48-bit product is normalised
// and rounded.
//
// How it works: the product of two significands in [1, 2) lies in [1, 4), so
// it has its leading one at bit 47 or 46. Counting the leading zeros of the
// whole product also covers subnormal operands, whose significands start
// below bit 23. The normalised product keeps its top 26 bits and ORs the
// rest into the sticky bit before fp_round rounds to nearest even.
//
// Special cases (this implementation's choice, the document does not cover
// them): NaN or infinity times zero gives the quiet NaN with the invalid
// flag; otherwise an infinite operand gives infinity and a zero operand a
// signed zero.
//
// Combinational. Ports: a, b, result, flags.
module fp_mul
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output fp_flags_t   flags
);

  localparam int unsigned PW = 2 * MAN_W;   // 48-bit product

  fp32_t     fa, fb;
  fp_class_t ca, cb;
  logic      s_res;
  logic [PW-1:0] prod, prod_n;
  logic [$clog2(PW+1)-1:0] lz;
  logic signed [EXPI_W-1:0] e_res;
  logic [SIG_W-1:0] sig;
  logic [31:0] rnd_result;
  logic        rnd_ovf, rnd_unf, rnd_inx;

  fp_lzc #(.W(PW)) u_lzc (.in(prod), .count(lz));

  fp_round u_round (
    .sign(s_res), .exp(e_res), .sig(sig),
    .result(rnd_result), .overflow(rnd_ovf), .underflow(rnd_unf), .inexact(rnd_inx)
  );

  always_comb begin
    fa    = fp32_t'(a);
    fb    = fp32_t'(b);
    ca    = classify(fa);
    cb    = classify(fb);
    s_res = fa.sign ^ fb.sign;

    prod   = mantissa(fa) * mantissa(fb);
    prod_n = prod << lz;
    // value = prod * 2^(ea + eb - 2*BIAS - 46); the rounder wants bit 26 of
    // its significand to weigh 2^(e - BIAS), hence ea + eb - BIAS + 1 - lz
    e_res  = eff_exp(fa) + eff_exp(fb) - EXPI_W'(BIAS) + 1 - EXPI_W'(lz);
    sig    = {prod_n[PW-1 -: SIG_W-1], |prod_n[PW-SIG_W:0]};

    flags  = '0;
    result = rnd_result;
    if (ca.is_nan || cb.is_nan || (ca.is_inf && cb.is_zero) || (ca.is_zero && cb.is_inf)) begin
      result        = QNAN;
      flags.invalid = 1'b1;
    end else if (ca.is_inf || cb.is_inf) begin
      result = {s_res, EXP_MAX, 23'd0};
    end else if (ca.is_zero || cb.is_zero) begin
      result = {s_res, 31'd0};
    end else begin
      flags.overflow  = rnd_ovf;
      flags.underflow = rnd_unf;
      flags.inexact   = rnd_inx;
    end
  end

endmodule
