// mitch_w: truncated Mitchell log multiplier, Mitch-w (N x N -> 2N).
//
// Only the W most significant bits of each operand take part: the leading one
// (encoded in the characteristic k) and the next W-1 bits, taken from the
// normalised operand after the left barrel shift by ~k. The log-domain
// operands {0, k, mantissa[W-2:0]} are added in a (W + log2 N)-bit adder and
// the customizable antilogarithm block produces the 2N-bit result.
//
// SIGNED = 1 selects the one's-complement (C1) sign handling: each operand is
// XORed with its sign bit before the leading-one detector, the result is
// XORed with sign(A) ^ sign(B), and zero is detected from k, MSB and LSB.
// A negative result is therefore the one's complement of the magnitude
// (one unit below the two's-complement value). SIGNED = 0 is the unsigned
// Mitch-w with the Is-Zero block of the Mitchell multiplier.
//
// UNBIASED = 1 applies the two unbiasing techniques: the LSB of each adder
// operand is replaced by '1', and the binary mantissa 0.0001 (2^-4) is added
// to the sum. For W < 5 that constant has no bit in the mantissa and is left
// out. An overflow of the characteristic caused by the constant saturates the
// product to all ones; this guard is this design's own.
//
// Defaults: 32-bit Mitch-w6 with C1, the configuration used for the CNN
// experiments. Purely combinational.
module mitch_w #(
  parameter int unsigned N        = 32,
  parameter int unsigned W        = 6,
  parameter bit          SIGNED   = 1'b1,
  parameter bit          UNBIASED = 1'b0,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam logic [W+S:0] UB_CONST = (UNBIASED && W >= 5) ? (W+S+1)'(1 << (W - 5)) : '0;

  logic [N-1:0]   ap, bp, ha, hb, xa, xb;
  logic [S-1:0]   ka, kb;
  logic [W-2:0]   ma, mb;
  logic [W+S:0]   lsum;
  logic [2*N-1:0] d, dsat, dx;
  logic           sgn;

  if (N != (1 << S)) begin : g_chk
    $error("mitch_w: N must be a power of two");
  end

  assign ap = SIGNED ? (a ^ {N{a[N-1]}}) : a;
  assign bp = SIGNED ? (b ^ {N{b[N-1]}}) : b;

  lod     #(.N(N)) u_lod_a (.z(ap), .h(ha));
  lod     #(.N(N)) u_lod_b (.z(bp), .h(hb));
  lod_enc #(.N(N)) u_enc_a (.h(ha), .k(ka));
  lod_enc #(.N(N)) u_enc_b (.h(hb), .k(kb));

  assign xa = ap << (~ka);
  assign xb = bp << (~kb);

  always_comb begin
    ma = xa[N-2:N-W];
    mb = xb[N-2:N-W];
    if (UNBIASED) begin
      ma[0] = 1'b1;
      mb[0] = 1'b1;
    end
  end

  assign lsum = {2'b00, ka, ma} + {2'b00, kb, mb} + UB_CONST;

  antilog_w #(.N(N), .W(W)) u_alog (.l(lsum[W+S-1:0]), .d(d));

  assign dsat = lsum[W+S] ? '1 : d;
  assign sgn  = SIGNED ? (a[N-1] ^ b[N-1]) : 1'b0;
  assign dx   = dsat ^ {(2*N){sgn}};

  if (SIGNED) begin : g_c1
    is_zero_c1 #(.N(N)) u_zero (.a_k(ka), .a_msb(a[N-1]), .a_lsb(a[0]),
                                .b_k(kb), .b_msb(b[N-1]), .b_lsb(b[0]),
                                .d(dx), .p(p));
  end else begin : g_us
    is_zero #(.N(N)) u_zero (.a_enc(ka), .a_lsb(a[0]), .b_enc(kb), .b_lsb(b[0]),
                             .d(dx), .p(p));
  end
endmodule
