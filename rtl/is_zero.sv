// is_zero: zero detection and zero forcing for the unsigned log multipliers.
//
// An operand is zero exactly when its encoded leading-one position is zero and
// its LSB is '0', so an OR over the log2(N) encoder bits and the LSB gives
// "not zero" without an N-bit comparator. The product is forced to zero when
// either operand is zero. Combinational.
module is_zero #(
  parameter int unsigned N = 32,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [S-1:0]   a_enc,
  input  logic           a_lsb,
  input  logic [S-1:0]   b_enc,
  input  logic           b_lsb,
  input  logic [2*N-1:0] d,
  output logic [2*N-1:0] p
);
  logic nz;
  assign nz = (|{a_enc, a_lsb}) & (|{b_enc, b_lsb});
  assign p  = d & {(2*N){nz}};
endmodule
