# FPAU: a single precision floating point arithmetic unit as a custom IP

This is a small IEEE 754 single precision (binary32) arithmetic unit. It
computes A + B, A − B, A × B or A ÷ B on two 32-bit floating point words. A
2-bit select picks the operation, and the result is registered once per
clock. The unit is meant to be dropped into a processor-based FPGA system.
For that it is also packaged as an AXI4-Lite peripheral: software writes two
operands and an operation code, then reads the result back. Operands can also
be written as signed fixed point binary numbers, which are converted to IEEE
754 on the way in.

The design follows a published description of a 32-bit FPAU built as a custom
IP for a Zynq-type system, with a processor, an AXI interconnect and the
custom IP. That description gives the select encoding, the operation flows
and a worked example. It gives no rounding mode, no special-value behaviour,
no register map and no bus handshake. Those parts are this design's own
choices and are marked as such below and in each file's header.

## Number format

A binary32 word is `{sign[31], exponent[30:23], fraction[22:0]}`, with the
exponent biased by 127. Normal numbers have an implicit leading 1, so the
significand is 24 bits. Exponent 0 encodes zero and subnormals (no implicit
1, scale 2^−126). Exponent 255 encodes infinity (fraction 0) and NaN
(fraction non-zero). `rtl/fp_pkg.sv` holds these widths, the `fp32_t` struct,
the operation enum and the exception-flag struct.

| sel | operation |
|-----|-----------|
| 00  | A + B     |
| 01  | A − B     |
| 10  | A × B     |
| 11  | A ÷ B     |

## The shared last step: normalise and round (`fp_round`)

Each operation ends by normalising and rounding, so that step is one module.
Each arithmetic block hands it three things:

- a sign;
- a signed biased exponent (11 bits, so it can go below 0 or above 255);
- a 27-bit significand, normalised (bit 26 set) or zero.

In the 27-bit significand, bits 25:3 are the fraction, bit 2 is the guard
bit, bit 1 is the round bit and bit 0 is a sticky bit (the OR of everything
less significant that was shifted away).

Rounding is **round to nearest, ties to even**. The increment is added to the
packed `{exponent, fraction}` field rather than to the fraction alone. A
carry out of the fraction therefore bumps the exponent with no extra logic:

- 1.11…1 rounds up to the next power of two;
- the largest subnormal rounds up to the smallest normal;
- the largest finite number rounds up to infinity.

If the exponent is 0 or below, the result is in the subnormal range. The
significand is shifted right by `1 − exp` first, with the lost bits kept as
sticky. An exponent of 255 or more gives infinity.

The source description names no rounding mode. Its printed results agree
with round to nearest even, however. 9.75 − 0.525 is shown as 0x4113999A,
where truncation would give 0x41139999.

## The operations

**Add / subtract (`fp_addsub`).** Subtraction is addition with B's sign
flipped. The operands are ordered by magnitude (a compare of bits 30:0), so
the larger one is always first. The smaller significand is shifted right by
the exponent difference, and the bits shifted out are ORed into the sticky
bit. If the effective signs agree, the significands are added; a carry-out
shifts the sum right by one. If the signs differ, the smaller is subtracted
from the larger. Ordering by magnitude keeps this difference non-negative
and plays the role of the two's complement step in the original flow. A
leading-zero count (`fp_lzc`) then renormalises the difference.

An exact zero is +0, except (−0) + (−0) = −0, as IEEE 754 requires in this
rounding mode.

**Multiply (`fp_mul`).**

- The sign is the XOR of the two sign bits.
- The exponent is the sum of the exponents minus the bias.
- The 24 × 24-bit significand product is one `*` operator, which maps to DSP
  blocks on an FPGA.
- The leading zeros of the 48-bit product are counted and shifted out. This
  handles the [1, 4) range of two normal significands and also subnormal
  inputs.
- The top 26 bits are kept, and the rest goes into the sticky bit.

**Divide (`fp_div`).**

- The sign is the XOR of the two sign bits.
- The exponent is the divisor's exponent subtracted from the dividend's,
  plus the bias.
- Subnormal operands are normalised first with a leading-zero count.
- A restoring division makes 27 quotient bits with one compare-and-subtract
  per bit, which is purely combinational. A non-zero remainder sets the
  sticky bit, so the quotient is correctly rounded.
- If the quotient is below 1, its first bit is 0: it is shifted up one place
  and the exponent lowered by one.

**Special values** (this design's choice, which matches IEEE 754 default
handling):

- A NaN input, ∞ − ∞, 0 × ∞, 0 ÷ 0 and ∞ ÷ ∞ return the quiet NaN
  0x7FC00000 and set *invalid*.
- x ÷ 0 returns ±∞ and sets *divide-by-zero*.
- Overflow returns ±∞.
- Underflow is gradual (subnormal results).

Each block also reports the five IEEE flags {invalid, divide-by-zero,
overflow, underflow, inexact}.

## The core (`fpau`)

`fpau` instantiates the adder/subtractor, the multiplier and the divider side
by side. A `case` on `sel` chooses one result, and that result and its flags
are registered on the rising edge of `clk`.

Ports: `clk`, `a[31:0]`, `b[31:0]`, `sel[1:0]`, `result[31:0]` and
`flags[4:0]`. Without the flags that is 99 pins and 32 flip-flops, the
figures given for the standalone unit. The flags output adds 5 pins and 5
flip-flops. There is no reset.

**Timing:** inputs are sampled on a rising edge and the result is valid right
after it. The latency is one clock and the unit starts one operation per
clock. All the arithmetic sits in one combinational stage. The divider's
27-step subtract array is the longest path. The source reports a 100 MHz
constraint met on a 28 nm FPGA; that has not been checked here.

## Binary operands (`fx_to_ieee`)

This module converts a W-bit two's complement fixed point number with
FRAC_BITS bits after the binary point to binary32. The default is W = 32 and
FRAC_BITS = 16, i.e. Q16.16. FRAC_BITS = 0 converts plain integers.

It follows the textbook recipe:

1. Split the number into sign and magnitude.
2. Find the leading one. The exponent is that bit's position relative to the
   binary point, plus 127.
3. Shift the magnitude up until the leading one is at the top. The bits below
   it form the fraction, rounded to nearest even.

A Q16.16 value converts exactly when it has at most 24 significant bits;
longer values are rounded. The input width and binary
point are this design's choice: the source says only that binary operands are
converted to IEEE 754 before the arithmetic.

## The peripheral (`fpau_axi`, the top)

`fpau_axi` holds the operand and control registers, two converters and the
core, behind an AXI4-Lite slave port (4-bit byte address, 32-bit data). The
register map is this design's own:

| offset | name   | access | contents |
|--------|--------|--------|----------|
| 0x0    | OPA    | R/W    | operand A (IEEE 754, or Q16.16 if CTRL[2]) |
| 0x4    | OPB    | R/W    | operand B (IEEE 754, or Q16.16 if CTRL[3]) |
| 0x8    | CTRL   | R/W    | [1:0] operation, [2] convert A, [3] convert B |
|        |        | RO     | [12:8] flags of the current result: {invalid, div-by-zero, overflow, underflow, inexact} |
| 0xC    | RESULT | RO     | A op B |

A software sequence is: write OPA, write CTRL, write OPB, read RESULT (and
CTRL for the flags). Writes honour WSTRB. Writes to RESULT are ignored. Every
response is OKAY.

**Handshake.**

- *Writes.* A write is accepted in a cycle where AWVALID and WVALID are both
  high and no write response is outstanding. AWREADY and WREADY are that
  condition, driven combinationally. BVALID rises on the next edge and stays
  high until BREADY.
- *Reads.* A read is accepted when ARVALID is high, no read data is waiting
  and the unit is not *pending*. RDATA and RVALID follow one edge later and
  are held until RREADY.
- *The pending cycle.* The core registers its result one edge after its
  inputs change. So a write to OPA, OPB or CTRL sets a one-cycle *pending*
  bit, and ARREADY stays low while it is set. A read issued right after a
  write therefore stalls for that cycle and returns the new result, never
  the old one.

`s_axi_aresetn` is active low and synchronous. It clears the registers and
both response channels. AWPROT and ARPROT are ignored.

The processor, the AXI interconnect, the on-board debug core and the serial
console of the original system are vendor parts and are not included. The top
exposes the AXI slave port that the interconnect would drive.

## Where this departs from the source description

- **Division example.** The source works 9.75 ÷ 0.52, and its operand
  0x3F066666 is actually 0.525. It prints 0x4195999A (18.7) as the result.
  That value is what you get by subtracting the raw bit patterns
  (A − B + 0x3F800000), a log-domain approximation, not an IEEE quotient.
  The source also says the division uses IEEE 754 single precision
  arithmetic. This design follows that statement and returns the correctly
  rounded 0x4194924A (18.5714…). The add, subtract and multiply examples
  (0x41246666, 0x4113999A, 0x40A3CCCC) are reproduced exactly.
- **Add/subtract structure.** The original flow takes a two's complement of
  the negative operand and adds. This design orders the operands by
  magnitude and subtracts. The results are the same.
- **Extras.** The exception flags, full subnormal/NaN/infinity handling,
  round to nearest even, the fixed point format, and the whole bus interface
  (register map, handshake, pending cycle) are choices made here where the
  source is silent.
- **Resources.** The core has 37 flip-flops (32 + 5 flags), where the source
  reports 32. FPGA LUT and DSP counts, power and timing have not been
  reproduced.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/fp_ref_pkg.sv`, a reference that does not share code with the RTL:

1. Each binary32 operand is widened exactly to a double precision `real`.
2. The operation is done in double precision.
3. The double is rounded back to binary32 (nearest even, subnormals,
   overflow).

Rounding twice like this gives the correctly rounded single precision result
for +, −, × and ÷, because 53 ≥ 2·24 + 2. The random operand generator
favours zeros, subnormals, infinities, NaNs, the exponent extremes and
nearly-equal operands, to exercise cancellation.

| testbench | what it covers |
|-----------|----------------|
| `tb_fp_addsub`  | worked examples, signed zeros, ∞ − ∞, overflow, ties to even, 40 000 random pairs (half near-cancelling) |
| `tb_fp_mul`     | worked example, 0 × ∞, overflow, subnormal inputs and outputs, 40 000 random pairs |
| `tb_fp_div`     | 9.75 ÷ 0.525, 1/3, x/0, 0/0, ∞/∞, subnormals, 40 000 random pairs |
| `tb_fx_to_ieee` | Q16.16 and integer conversion, extremes, 20 000 random values |
| `tb_fpau`       | the example waveform sequence (sel 00→11), the one-clock latency, flags, 20 000 random operations |
| `tb_fpau_axi`   | end to end over AXI4-Lite at default parameters: the example, converted operands, strobed writes, the pending-cycle stall, response back-pressure, flag read-back, 400 random operations in random formats; AXI hold rules as assertions; counts each mechanism and fails if one never happened |

Each testbench has also been run against a copy of its block with one
deliberate bug, and it fails each time. The bugs were: the sticky bit
dropped in alignment, the product's low bits or the division remainder
ignored in rounding, a one's complement magnitude in the converter, the mul
and div select codes swapped, and no pending cycle after an OPB write.

To run one with plain Verilator (5.x), from the top folder:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpau_axi.sv --top-module tb_fpau_axi
./obj_dir/Vtb_fpau_axi
```

Replace `tb_fpau_axi` with any testbench name. Each run takes a few seconds.

## Files

- `rtl/fp_pkg.sv`: formats, select encoding, flag struct, classification helpers
- `rtl/fp_lzc.sv`: leading-zero counter
- `rtl/fp_round.sv`: normalise, round to nearest even and pack
- `rtl/fp_addsub.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`: the three arithmetic blocks
- `rtl/fpau.sv`: the core, with the operation select and result register
- `rtl/fx_to_ieee.sv`: fixed point to binary32 converter
- `rtl/fpau_axi.sv`: AXI4-Lite peripheral, the top
- `tb/fp_ref_pkg.sv`: reference model and random operand generator
- `tb/tb_*.sv`: testbenches
