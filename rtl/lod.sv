// lod: fully parallel leading-one detector.
//
// Produces a one-hot vector h that marks the most significant '1' of z (all
// zero when z is zero). An OR prefix network built like the carry tree of a
// Kogge-Stone adder computes, for each bit j, whether any bit above it is set:
// level i ORs pairs of signals 2^(i-1) apart, so after log2(N) levels m[j]
// covers every bit from j upwards. Then h[j] = z[j] & ~m[j+1] and the top bit
// passes straight through. The network follows the document's equations
// for the parallel LOD; it is purely combinational.
module lod #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] h
);
  localparam int unsigned S = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] m [S+1];

  assign m[0] = z;
  for (genvar i = 1; i <= S; i++) begin : g_lvl
    for (genvar j = 0; j < N; j++) begin : g_bit
      if ((N - 1 - j) < (1 << (i - 1))) begin : g_pass
        assign m[i][j] = m[i-1][j];
      end else begin : g_or
        assign m[i][j] = m[i-1][j] | m[i-1][j + (1 << (i - 1))];
      end
    end
  end

  assign h[N-1] = z[N-1];
  for (genvar j = 0; j < N - 1; j++) begin : g_h
    assign h[j] = z[j] & ~m[S][j+1];
  end
endmodule
