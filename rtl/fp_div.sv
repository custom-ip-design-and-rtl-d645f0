// fp_div: IEEE 754 single precision divider.
//
// Follows the division flow of the unit: the sign is the XOR of the two sign
// bits, the divisor's exponent is subtracted from the dividend's and the bias
// added back, the significands are divided and the quotient is normalised
// and rounded.
//
// How it works: both significands are first normalised (a subnormal operand
// is shifted up and its exponent lowered). The quotient of two values in
// [1, 2) lies in (0.5, 2). A restoring long division, one compare-subtract
// per quotient bit, produces 27 quotient bits; a non-zero final remainder
// sets the sticky bit. If the quotient is below one, its first bit is zero
// and it is shifted up by one place with the exponent lowered by one.
// fp_round then rounds to nearest even, so the quotient is correctly rounded.
//
// Special cases (this implementation's choice, the document does not cover
// them): NaN operands, 0/0 and inf/inf give the quiet NaN with the invalid
// flag; x/0 gives a signed infinity with the divide-by-zero flag; inf/x
// gives infinity; 0/x and x/inf give a signed zero.
//
// Combinational (a 27-stage subtractor array). Ports: a (dividend),
// b (divisor), result, flags.
module fp_div
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output fp_flags_t   flags
);

  localparam int unsigned QW = SIG_W;        // quotient bits

  fp32_t     fa, fb;
  fp_class_t ca, cb;
  logic      s_res;
  logic [MAN_W-1:0] ma, mb, ma_n, mb_n;
  logic [$clog2(MAN_W+1)-1:0] lza, lzb;
  logic [MAN_W:0]   rem;
  logic [QW-1:0]    q;
  logic             rem_nz;
  logic signed [EXPI_W-1:0] e_res;
  logic [SIG_W-1:0] sig;
  logic [31:0] rnd_result;
  logic        rnd_ovf, rnd_unf, rnd_inx;

  fp_lzc #(.W(MAN_W)) u_lzc_a (.in(ma), .count(lza));
  fp_lzc #(.W(MAN_W)) u_lzc_b (.in(mb), .count(lzb));

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
    ma    = mantissa(fa);
    mb    = mantissa(fb);
    ma_n  = ma << lza;
    mb_n  = mb << lzb;

    // restoring division: q = floor(ma_n * 2^(QW-1) / mb_n)
    rem = {1'b0, ma_n};
    q   = '0;
    for (int i = QW - 1; i >= 0; i--) begin
      if (rem >= {1'b0, mb_n}) begin
        q[i] = 1'b1;
        rem  = rem - {1'b0, mb_n};
      end
      rem = rem << 1;
    end
    rem_nz = (rem != '0);

    if (q[QW-1]) begin
      sig   = {q[QW-1:1], q[0] | rem_nz};
      e_res = eff_exp(fa) - EXPI_W'(lza) - eff_exp(fb) + EXPI_W'(lzb) + EXPI_W'(BIAS);
    end else begin
      sig   = {q[QW-2:0], rem_nz};
      e_res = eff_exp(fa) - EXPI_W'(lza) - eff_exp(fb) + EXPI_W'(lzb) + EXPI_W'(BIAS) - 1;
    end

    flags  = '0;
    result = rnd_result;
    if (ca.is_nan || cb.is_nan || (ca.is_zero && cb.is_zero) || (ca.is_inf && cb.is_inf)) begin
      result        = QNAN;
      flags.invalid = 1'b1;
    end else if (ca.is_inf) begin
      result = {s_res, EXP_MAX, 23'd0};
    end else if (cb.is_zero) begin
      result         = {s_res, EXP_MAX, 23'd0};
      flags.div_zero = 1'b1;
    end else if (ca.is_zero || cb.is_inf) begin
      result = {s_res, 31'd0};
    end else begin
      flags.overflow  = rnd_ovf;
      flags.underflow = rnd_unf;
      flags.inexact   = rnd_inx;
    end
  end

endmodule
