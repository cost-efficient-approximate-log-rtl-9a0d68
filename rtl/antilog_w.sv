// antilog_w: customizable antilogarithm block of the truncated Mitchell
// multiplier Mitch-w.
//
// L = {lr, c, mant} carries a (log2 N + 1)-bit characteristic and W-1 mantissa
// bits, so the value is 2^(lr*N + c) * m / 2^(W-1) with m = {1, mant}.
// The output D is built from three fields, as in the document's block diagram:
//   D[2N-1:N]    upper N bits of an (N+W)-bit left shifter, ANDed with lr;
//   D[N-1:N-W]   W bits chosen by a multiplexer: the low W bits of the left
//                shifter when lr = 1, a W-bit right shifter when lr = 0;
//   D[N-W-1:0]   constant zero.
// The left shifter shifts {0..0, m} by c + 1, the +1 being wired into its
// input. For lr = 0 the right shifter delivers bits N-1..N-W of m shifted right
// by N-1-c (= ~c); shifts of W or more give zero. This choice is this design's
// own reading: the block diagram routes only log2(W) characteristic bits to the
// right shifter, which would not give the arithmetic result, so the full ~c is
// used and the output is the exact value truncated below bit N-W.
// Combinational.
module antilog_w #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 6,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [W+S-1:0] l,
  output logic [2*N-1:0] d
);
  logic           lr;
  logic [S-1:0]   c;
  logic [W-1:0]   m;
  logic [N+W-1:0] l1;
  logic [W-1:0]   r;

  if (W < 2 || W >= N) begin : g_chk
    $error("antilog_w: W must satisfy 2 <= W < N");
  end

  assign lr = l[W+S-1];
  assign c  = l[W+S-2:W-1];
  assign m  = {1'b1, l[W-2:0]};

  assign l1 = {{(N-1){1'b0}}, m, 1'b0} << c;
  assign r  = m >> (~c);

  assign d[2*N-1:N]   = l1[N+W-1:W] & {N{lr}};
  assign d[N-1:N-W]   = lr ? l1[W-1:0] : r;
  assign d[N-W-1:0]   = '0;
endmodule
