// mitchell_mult: unsigned N x N -> 2N Mitchell logarithmic multiplier.
//
// Each operand passes a parallel leading-one detector and an OR-tree encoder
// that give its characteristic k. A left barrel shifter by N-1-k (the one's
// complement of k, N being a power of two) normalises the operand; the bits
// below the leading one form the mantissa. The log-domain operands
// {0, k, mantissa} are added in one (N + log2 N)-bit adder, the Mitchell
// decoder takes the antilogarithm, and the Is-Zero block forces an exact zero
// when an operand is zero. The approximation never exceeds the exact product
// and is at most 11.1 % below it. Purely combinational, as in the document.
module mitchell_mult #(
  parameter int unsigned N = 32,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0]   ha, hb, xa, xb;
  logic [S-1:0]   ka, kb;
  logic [N+S-1:0] op1, op2, l;
  logic [2*N-1:0] d;

  if (N != (1 << S)) begin : g_chk
    $error("mitchell_mult: N must be a power of two");
  end

  lod     #(.N(N)) u_lod_a (.z(a), .h(ha));
  lod     #(.N(N)) u_lod_b (.z(b), .h(hb));
  lod_enc #(.N(N)) u_enc_a (.h(ha), .k(ka));
  lod_enc #(.N(N)) u_enc_b (.h(hb), .k(kb));

  assign xa  = a << (~ka);
  assign xb  = b << (~kb);
  assign op1 = {1'b0, ka, xa[N-2:0]};
  assign op2 = {1'b0, kb, xb[N-2:0]};
  assign l   = op1 + op2;

  mitchell_dec #(.N(N)) u_dec (.l(l), .d(d));
  is_zero      #(.N(N)) u_zero (.a_enc(ka), .a_lsb(a[0]), .b_enc(kb), .b_lsb(b[0]),
                                .d(d), .p(p));
endmodule
