// is_zero_c1: zero handling for operands in one's-complement (C1) sign mode.
//
// With C1 sign handling an operand O is first XORed with its sign bit, giving
// the positive-domain value O+ with characteristic k(O+). O is non-zero when
// k(O+) > 0, or its MSB (sign) is '1', or its LSB is '1' (the document's truth
// table). The product is non-zero when both operands are; otherwise the
// output is forced to zero, after the sign correction of the product.
// Combinational.
module is_zero_c1 #(
  parameter int unsigned N = 32,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [S-1:0]   a_k,
  input  logic           a_msb,
  input  logic           a_lsb,
  input  logic [S-1:0]   b_k,
  input  logic           b_msb,
  input  logic           b_lsb,
  input  logic [2*N-1:0] d,
  output logic [2*N-1:0] p
);
  logic nz_a, nz_b;
  assign nz_a = (|a_k) | a_msb | a_lsb;
  assign nz_b = (|b_k) | b_msb | b_lsb;
  assign p    = (nz_a & nz_b) ? d : '0;
endmodule
