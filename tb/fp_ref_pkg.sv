// fp_ref_pkg: reference model used by the testbenches of the arithmetic unit.
//
// Works independently of the RTL: an IEEE 754 single precision word is
// widened exactly to a double precision `real`, the operation is done in
// double precision by the simulator, and the double is rounded back to
// single precision (round to nearest, ties to even, with subnormals,
// overflow to infinity). Rounding twice this way gives the correctly
// rounded single precision answer for +, -, * and / because 53 >= 2*24 + 2.
// Any NaN maps to the canonical quiet NaN 0x7FC00000.
// It also holds a random operand generator that favours the corner cases.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] x);
    logic [63:0] d;
    real         r;
    if (x[30:23] == 8'hFF) begin
      d = {x[31], 11'h7FF, x[22:0], 29'd0};
      r = $bitstoreal(d);
    end else if (x[30:23] == 8'h00) begin
      r = real'(x[22:0]) * (2.0 ** -149);
      if (x[31]) r = -r;
      if (x[22:0] == 0) r = $bitstoreal({x[31], 63'd0});
    end else begin
      d = {x[31], 11'(x[30:23]) + 11'd896, x[22:0], 29'd0};
      r = $bitstoreal(d);
    end
    return r;
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0]  d;
    logic         s;
    int           e, fe, sh;
    logic [52:0]  m;
    logic [116:0] w;
    logic [23:0]  man;
    logic         g, st, inc;
    logic [30:0]  mag;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'h000) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023;
    fe = e + 127;
    m  = {1'b1, d[51:0]};
    if (fe >= 255) return {s, 8'hFF, 23'd0};
    sh = (fe >= 1) ? 0 : 1 - fe;
    if (sh > 60) return {s, 31'd0};
    w   = {m, 64'd0} >> sh;
    man = w[116 -: 24];
    g   = w[92];
    st  = |w[91:0];
    inc = g & (st | man[0]);
    mag = {(fe >= 1) ? 8'(fe) : 8'd0, man[22:0]} + 31'(inc);
    return {s, mag};
  endfunction

  // Expected result of the unit: 0 add, 1 sub, 2 mul, 3 div
  function automatic logic [31:0] ref_op(logic [31:0] a, logic [31:0] b, int op);
    real x, y;
    x = f2r(a);
    y = f2r(b);
    case (op)
      0: return r2f(x + y);
      1: return r2f(x - y);
      2: return r2f(x * y);
      default: return r2f(x / y);
    endcase
  endfunction

  // Random operand, weighted towards zeros, subnormals, infinities, NaNs and
  // the extremes of the exponent range.
  function automatic logic [31:0] rand_fp();
    logic [31:0] x;
    int          k;
    x = $urandom;
    k = $urandom_range(0, 15);
    case (k)
      0: x[30:0] = '0;
      1: x[30:23] = 8'h00;
      2: begin x[30:23] = 8'hFF; x[22:0] = '0; end
      3: x[30:23] = 8'hFF;
      4: x[30:23] = 8'(254 - $urandom_range(0, 3));
      5: x[30:23] = 8'(1 + $urandom_range(0, 3));
      6: x = $urandom;
      default: x[30:23] = 8'(127 - 20 + $urandom_range(0, 40));
    endcase
    return x;
  endfunction

  // Operand close in magnitude to a, to exercise cancellation
  function automatic logic [31:0] rand_near(logic [31:0] a);
    logic [31:0] x;
    x = a;
    x[31] = $urandom_range(0, 1);
    x[22:0] = x[22:0] ^ 23'($urandom_range(0, 255));
    if ($urandom_range(0, 1) == 1 && x[30:23] > 1 && x[30:23] < 254) x[30:23] = x[30:23] + 8'($urandom_range(0, 2)) - 8'd1;
    return x;
  endfunction

endpackage
