// fx_to_ieee: converts a signed binary (fixed point) number to IEEE 754 single precision.
//
// The unit works on IEEE 754 operands, so a binary operand is converted
// first. The steps are the textbook ones: write the number in scientific
// notation (find its leading one), take the sign bit from the number's sign,
// and take the exponent from the position of the leading one plus the bias
// of 127; the bits after the leading one form the fraction.
//
// How it works: the two's complement input is turned into sign and
// magnitude, a leading zero count locates the first one, the magnitude is
// shifted up until that one sits at the top, and fp_round rounds the bits
// beyond the 24-bit significand to nearest even. Zero converts to +0.
//
// The input is a W-bit two's complement number with FRAC_BITS bits after the
// binary point (value = x / 2^FRAC_BITS). The default of 32 bits with 16
// fraction bits (Q16.16), so that numbers such as 9.75 can be written, is
// this implementation's choice; FRAC_BITS = 0 converts plain integers.
// Combinational.
module fx_to_ieee
  import fp_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter int unsigned FRAC_BITS = 16
) (
  input  logic [W-1:0] x,
  output logic [31:0]  result,
  output logic         inexact
);

  logic                     sign;
  logic [W-1:0]             mag, mag_n;
  logic [$clog2(W+1)-1:0]   lz;
  logic signed [EXPI_W-1:0] e;
  logic [SIG_W-1:0]         sig;
  logic                     ovf_unused, unf_unused;

  fp_lzc #(.W(W)) u_lzc (.in(mag), .count(lz));

  fp_round u_round (
    .sign(sign), .exp(e), .sig(sig),
    .result(result), .overflow(ovf_unused), .underflow(unf_unused), .inexact(inexact)
  );

  always_comb begin
    sign  = x[W-1];
    mag   = sign ? (~x + 1'b1) : x;
    mag_n = mag << lz;
    // leading one at bit (W-1-lz) weighs 2^(W-1-lz-FRAC_BITS)
    e     = EXPI_W'(BIAS) + EXPI_W'(W - 1 - FRAC_BITS) - EXPI_W'(lz);
    sig   = {mag_n[W-1 -: SIG_W-1], |mag_n[W-SIG_W:0]};
  end

endmodule
