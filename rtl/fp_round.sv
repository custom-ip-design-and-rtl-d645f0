// fp_round: rounds and packs an unrounded result into an IEEE 754 binary32 word.
//
// Every arithmetic block of the unit ends its flow chart with "normalise the
// mantissa"; this helper is that common last step. Its input is a sign, a
// signed biased exponent and a 27-bit significand that is already normalised
// (bit 26 set) or zero. Bits 25:3 become the fraction, bit 2 is the guard bit
// and bits 1:0 are folded into a sticky bit.
//
// Exponents of 0 or below fall into the subnormal range: the significand is
// shifted right by (1 - exp) with the lost bits kept as sticky, and the word
// is packed with a zero exponent field. Rounding is round to nearest, ties to
// even: the increment is added to the packed {exponent, fraction} field, so a
// carry out of the fraction bumps the exponent by itself (1.111..1 -> 10.0,
// largest subnormal -> smallest normal, largest normal -> infinity).
// Exponents of 255 or more give infinity.
//
// Purely combinational. Round to nearest even, subnormal support and the
// flags are this implementation's choices; the document names no rounding
// mode, but its worked examples agree with round to nearest even.
module fp_round
  import fp_pkg::*;
(
  input  logic                     sign,
  input  logic signed [EXPI_W-1:0] exp,
  input  logic [SIG_W-1:0]         sig,
  output logic [31:0]              result,
  output logic                     overflow,
  output logic                     underflow,
  output logic                     inexact
);

  logic [2*SIG_W-1:0]   wide;
  logic [SIG_W-1:0]     sig_s;
  logic [EXPI_W-1:0]    shamt;
  logic [MAN_W-1:0]     man;
  logic                 guard, sticky, inc, tiny;
  logic [EXP_W-1:0]     exp_field;
  logic [30:0]          packed_mag;
  logic [30:0]          rounded;

  always_comb begin
    tiny  = (exp <= 0);
    shamt = tiny ? EXPI_W'(1) - exp : '0;
    if (shamt > EXPI_W'(SIG_W)) shamt = EXPI_W'(SIG_W);
    wide   = {sig, {SIG_W{1'b0}}} >> shamt;
    sig_s  = wide[2*SIG_W-1 -: SIG_W];
    man    = sig_s[SIG_W-1 -: MAN_W];
    guard  = sig_s[2];
    sticky = (|sig_s[1:0]) | (|wide[SIG_W-1:0]);
    inc    = guard & (sticky | man[0]);

    exp_field  = tiny ? '0 : exp[EXP_W-1:0];
    packed_mag = {exp_field, man[FRAC_W-1:0]};
    rounded    = packed_mag + 31'(inc);

    inexact   = guard | sticky;
    overflow  = 1'b0;
    underflow = 1'b0;

    if (sig == '0) begin
      result  = {sign, 31'd0};
      inexact = 1'b0;
    end else if (exp >= EXPI_W'(255)) begin
      result   = {sign, EXP_MAX, 23'd0};
      overflow = 1'b1;
      inexact  = 1'b1;
    end else begin
      result    = {sign, rounded};
      overflow  = (rounded[30:23] == EXP_MAX);
      underflow = tiny & inexact;
    end
  end

endmodule
