// fp_pkg: types and constants shared by the single precision arithmetic unit.
//
// An IEEE 754 binary32 word is one sign bit, an 8-bit exponent stored with a
// bias of 127 and 23 stored fraction bits, with an implicit leading one for
// normal numbers. The two-bit operation select follows the unit's published
// encoding: 00 add, 01 subtract, 10 multiply, 11 divide.
//
// Internally the arithmetic blocks hand the rounder an unrounded result as a
// sign, a signed biased exponent and a 27-bit significand (fp_sig_t): bit 26
// is the integer bit, bits 25:3 the fraction, bit 2 the guard bit, bit 1 the
// round bit and bit 0 a sticky bit (the OR of everything below it). This
// internal format, the canonical quiet NaN and the exception flags are
// choices of this implementation.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MAN_W  = FRAC_W + 1;   // with the hidden bit
  localparam int unsigned BIAS   = 127;
  localparam int unsigned SIG_W  = MAN_W + 3;    // mantissa, guard, round, sticky
  localparam int unsigned EXPI_W = 11;           // signed working exponent

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_DIV = 2'b11
  } fpau_op_e;

  // IEEE 754 exception flags
  typedef struct packed {
    logic invalid;
    logic div_zero;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

  localparam logic [31:0] QNAN     = 32'h7FC0_0000;
  localparam logic [7:0]  EXP_MAX  = 8'hFF;

  // Classification of one operand
  typedef struct packed {
    logic is_zero;
    logic is_sub;    // subnormal
    logic is_inf;
    logic is_nan;
  } fp_class_t;

  function automatic fp_class_t classify(fp32_t x);
    fp_class_t c;
    c.is_zero = (x.exp == '0) && (x.frac == '0);
    c.is_sub  = (x.exp == '0) && (x.frac != '0);
    c.is_inf  = (x.exp == EXP_MAX) && (x.frac == '0);
    c.is_nan  = (x.exp == EXP_MAX) && (x.frac != '0);
    return c;
  endfunction

  // Significand with the hidden bit made explicit (0 for zero and subnormals)
  function automatic logic [MAN_W-1:0] mantissa(fp32_t x);
    return {(x.exp != '0), x.frac};
  endfunction

  // Exponent as the rounder expects it; subnormals use the minimum exponent 1
  function automatic logic signed [EXPI_W-1:0] eff_exp(fp32_t x);
    return (x.exp == '0) ? EXPI_W'(1) : EXPI_W'({3'b000, x.exp});
  endfunction

endpackage
