// fp_addsub: IEEE 754 single precision adder / subtractor.
//
// Follows the addition and subtraction flow of the unit: check the signs,
// bring both operands to a common exponent, add the significands when the
// effective signs agree and subtract them (a two's complement addition) when
// they differ, then normalise and round. Subtraction is addition with the
// sign of B inverted.
//
// How it works: the operand of larger magnitude is put first, so the
// difference of significands is never negative. The smaller significand is
// shifted right by the exponent difference; the bits shifted out are kept
// as a sticky bit so rounding stays exact. After the add a carry-out shifts
// the sum right by one; after a subtract the leading zeros are counted and
// shifted out. fp_round then rounds to nearest even.
//
// Special cases (this implementation's choice, the document does not cover
// them): a NaN operand or inf - inf gives the quiet NaN 0x7FC00000 with the
// invalid flag; an infinite operand gives that infinity; an exact zero sum
// is +0 unless both operands are zeros of the same negative sign.
//
// Combinational. Ports: a, b, sub (0 = a + b, 1 = a - b), result, flags.
module fp_addsub
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] result,
  output fp_flags_t   flags
);

  fp32_t     fa, fb, op_big, op_sml;
  fp_class_t ca, cb;
  logic      sb_eff, swap, eff_sub;
  logic signed [EXPI_W-1:0] e_big, e_small, e_norm;
  logic [EXPI_W-1:0]        diff;
  logic [SIG_W-1:0]         m_big, m_small;
  logic [2*SIG_W-1:0]       al_wide;
  logic [SIG_W-1:0]         m_al;
  logic                     al_sticky;
  logic [SIG_W:0]           sum;
  logic [SIG_W-1:0]         sig_norm, sig_pre;
  logic [$clog2(SIG_W+1)-1:0] lz;
  logic                     s_big, s_small, s_res;
  logic [31:0]              rnd_result;
  logic                     rnd_ovf, rnd_unf, rnd_inx;

  fp_lzc #(.W(SIG_W)) u_lzc (.in(sig_pre), .count(lz));

  fp_round u_round (
    .sign(s_res), .exp(e_norm), .sig(sig_norm),
    .result(rnd_result), .overflow(rnd_ovf), .underflow(rnd_unf), .inexact(rnd_inx)
  );

  always_comb begin
    fa = fp32_t'(a);
    fb = fp32_t'(b);
    ca = classify(fa);
    cb = classify(fb);
    sb_eff = fb.sign ^ sub;

    // order by magnitude
    swap    = (b[30:0] > a[30:0]);
    op_big     = swap ? fb : fa;
    op_sml   = swap ? fa : fb;
    s_big   = swap ? sb_eff : fa.sign;
    s_small = swap ? fa.sign : sb_eff;
    eff_sub = s_big ^ s_small;

    e_big   = eff_exp(op_big);
    e_small = eff_exp(op_sml);
    diff    = e_big - e_small;
    m_big   = {mantissa(op_big), 3'b000};
    m_small = {mantissa(op_sml), 3'b000};

    // alignment shift with sticky
    if (diff > EXPI_W'(SIG_W)) diff = EXPI_W'(SIG_W);
    al_wide   = {m_small, {SIG_W{1'b0}}} >> diff;
    al_sticky = |al_wide[SIG_W-1:0];
    m_al      = al_wide[2*SIG_W-1 -: SIG_W] | {{(SIG_W-1){1'b0}}, al_sticky};

    sum = eff_sub ? ({1'b0, m_big} - {1'b0, m_al}) : ({1'b0, m_big} + {1'b0, m_al});

    // normalisation
    sig_pre = sum[SIG_W-1:0];
    if (sum[SIG_W]) begin
      sig_norm = {sum[SIG_W:2], |sum[1:0]};
      e_norm   = e_big + 1;
    end else begin
      sig_norm = sig_pre << lz;
      e_norm   = e_big - EXPI_W'(lz);
    end

    // sign of the result; an exact zero is +0 unless both addends are -0
    if (sum == '0) s_res = s_big & s_small;
    else           s_res = s_big;

    flags  = '0;
    result = rnd_result;
    if (ca.is_nan || cb.is_nan || (ca.is_inf && cb.is_inf && eff_sub)) begin
      result        = QNAN;
      flags.invalid = 1'b1;
    end else if (ca.is_inf) begin
      result = {fa.sign, EXP_MAX, 23'd0};
    end else if (cb.is_inf) begin
      result = {sb_eff, EXP_MAX, 23'd0};
    end else begin
      flags.overflow  = rnd_ovf;
      flags.underflow = rnd_unf;
      flags.inexact   = rnd_inx;
    end
  end

endmodule
