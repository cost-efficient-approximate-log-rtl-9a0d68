// lod_enc: OR-tree encoder for a one-hot leading-one vector.
//
// Because the leading-one detector delivers a one-hot vector, the binary
// position k needs no priority encoder: bit i of k is the OR of every h[j]
// whose index j has bit i set. An all-zero input encodes to zero, which the
// zero detectors resolve with the operand's LSB. Combinational.
module lod_enc #(
  parameter int unsigned N = 32,
  localparam int unsigned S = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] h,
  output logic [S-1:0] k
);
  always_comb begin
    k = '0;
    for (int unsigned j = 0; j < N; j++) begin
      for (int unsigned i = 0; i < S; i++) begin
        if (((j >> i) & 1) == 1) k[i] = k[i] | h[j];
      end
    end
  end
endmodule
