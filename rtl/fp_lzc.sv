// fp_lzc: leading zero counter.
//
// Counts the zeros above the most significant one of a W-bit vector; an
// all-zero input gives W. Used to normalise after a subtraction that cancels
// leading bits, to normalise subnormal operands and in the integer to float
// converter. Combinational, a priority scan from the top bit down.
module fp_lzc #(
  parameter int unsigned W  = 27,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  in,
  output logic [CW-1:0] count
);

  always_comb begin
    count = CW'(W);
    for (int i = 0; i < int'(W); i++) begin
      if (in[i]) count = CW'(int'(W) - 1 - i);
    end
  end

endmodule
