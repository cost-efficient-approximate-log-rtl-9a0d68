// error_term_calc: Error Term Calculator of the two-stage iterative log
// multiplier.
//
// The error of a Mitchell product is a product of the operands' mantissa
// parts. When the first-stage mantissa sum (with its 2^-n1 rounding term)
// stays below one, the second-stage operand is x * 2^k, the operand with its
// leading one removed (the residue). When the sum reaches one (carry-out set),
// it is (1 - x) * 2^k - 1, which is the one's complement of the residue within
// the k bits below the leading one. Combinational.
module error_term_calc #(
  parameter int unsigned N = 16
) (
  input  logic [N-2:0] res,
  input  logic [N-2:0] mask,
  input  logic         carry,
  output logic [N-2:0] e
);
  assign e = carry ? (~res & mask) : res;
endmodule
