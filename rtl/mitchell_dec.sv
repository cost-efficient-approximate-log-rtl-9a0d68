// mitchell_dec: antilogarithm (decoder) of the full-precision Mitchell
// multiplier.
//
// L = {lr, c, mant} is the sum of the two log-domain operands: lr is the MSB of
// the (log2 N + 1)-bit characteristic, c its low log2 N bits, mant the N-1
// mantissa bits. The value is 2^(lr*N + c) * (1 + mant/2^(N-1)).
// If lr = 1 the mantissa {1, mant} must move left by c + 1 places: a 2N-bit
// left shifter whose input is pre-wired one position to the left does this
// without an adder for the +1. Its upper N bits are ANDed with lr.
// If lr = 0 the result is below 2^N and {1, mant} moves right by N-1-c, which
// is the one's complement of c because N is a power of two. A multiplexer
// selects the lower N bits from either shifter. Combinational.
module mitchell_dec #(
  parameter int unsigned N = 32,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [N+S-1:0] l,
  output logic [2*N-1:0] d
);
  logic            lr;
  logic [S-1:0]    c;
  logic [N-2:0]    mant;
  logic [2*N-1:0]  l1;   // left shifter, one extra place built into its input
  logic [N-1:0]    r;    // right shifter

  assign lr   = l[N+S-1];
  assign c    = l[N+S-2:N-1];
  assign mant = l[N-2:0];

  assign l1 = {{(N-1){1'b0}}, 1'b1, mant, 1'b0} << c;
  assign r  = {1'b1, mant} >> (~c);

  assign d[2*N-1:N] = l1[2*N-1:N] & {N{lr}};
  assign d[N-1:0]   = lr ? l1[N-1:0] : r;
endmodule
