// feature_extractor: encodes one operand into the tuple used by the reduced
// multiplier RMitch-w.
//
// This is the front half of Mitch-w with C1 sign handling, taken out of the
// multiplier so that an input pixel shared by all multipliers of the
// convolution core is encoded only once (weights are encoded the same way
// ahead of time). The operand is XORed with its sign bit, a leading-one
// detector and OR-tree encoder give k, a left barrel shift by ~k normalises
// it, and the W-1 bits under the leading one are kept.
// Output tuple, MSB first:  {A[0], A[N-1], k[log2 N - 1:0], mant[W-2:0]},
// log2 N + W + 1 bits (10 bits for N = 32, W = 4). Combinational.
module feature_extractor #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 4,
  localparam int unsigned S  = $clog2(N),
  localparam int unsigned TW = S + W + 1
) (
  input  logic [N-1:0]  a,
  output logic [TW-1:0] t
);
  logic [N-1:0] ap, h, x;
  logic [S-1:0] k;

  if (N != (1 << S) || W < 2 || W >= N) begin : g_chk
    $error("feature_extractor: N must be a power of two and 2 <= W < N");
  end

  assign ap = a ^ {N{a[N-1]}};
  lod     #(.N(N)) u_lod (.z(ap), .h(h));
  lod_enc #(.N(N)) u_enc (.h(h), .k(k));
  assign x = ap << (~k);
  assign t = {a[0], a[N-1], k, x[N-2:N-W]};
endmodule
