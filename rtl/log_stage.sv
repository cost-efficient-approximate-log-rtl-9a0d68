// log_stage: one stage of the truncated two-stage iterative log multiplier.
//
// Like an unbiased Mitch-w with MB mantissa bits: a leading-one detector and
// OR-tree encoder give the characteristics k_a, k_b; left shifters normalise
// the operands and keep the MB bits below the leading one; a separate
// (MB+1)-bit mantissa adder with carry-in '1' (the 2^-MB rounding term) sums
// them, and its carry-out enters the characteristic sum. A 2N-bit shifter
// turns {1, mantissa sum} and the characteristic into the stage product c,
// truncated to an integer. Besides c the stage outputs what the error term
// calculators need: the carry-out, each operand with its leading one removed
// (residue) and the mask 2^k - 1 of the bits below the leading one.
// c is forced to zero when an operand is zero. Combinational.
module log_stage #(
  parameter int unsigned N  = 16,
  parameter int unsigned MB = 6,
  localparam int unsigned S = $clog2(N)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c,
  output logic           carry,
  output logic [N-2:0]   res_a,
  output logic [N-2:0]   res_b,
  output logic [N-2:0]   mask_a,
  output logic [N-2:0]   mask_b,
  output logic           nz
);
  logic [N-1:0]      ha, hb, xa, xb, ma_full, mb_full;
  logic [S-1:0]      ka, kb;
  logic [MB:0]       msum;
  logic [S:0]        chr;
  logic [2*N+MB-1:0] shf;

  if (N != (1 << S) || MB < 1 || MB > N - 1) begin : g_chk
    $error("log_stage: N must be a power of two and 1 <= MB <= N-1");
  end

  lod     #(.N(N)) u_lod_a (.z(a), .h(ha));
  lod     #(.N(N)) u_lod_b (.z(b), .h(hb));
  lod_enc #(.N(N)) u_enc_a (.h(ha), .k(ka));
  lod_enc #(.N(N)) u_enc_b (.h(hb), .k(kb));

  assign xa    = a << (~ka);
  assign xb    = b << (~kb);
  assign msum  = {1'b0, xa[N-2:N-1-MB]} + {1'b0, xb[N-2:N-1-MB]} + (MB+1)'(1);
  assign carry = msum[MB];
  assign chr   = {1'b0, ka} + {1'b0, kb} + {{S{1'b0}}, carry};
  assign shf   = {{(2*N-1){1'b0}}, 1'b1, msum[MB-1:0]} << chr;

  assign nz = ((|ka) | a[0]) & ((|kb) | b[0]);
  assign c  = nz ? shf[2*N+MB-1:MB] : '0;

  // Residue and mask: the one-hot leading one minus one covers every bit below it.
  assign ma_full = (|ha) ? (ha - N'(1)) : '0;
  assign mb_full = (|hb) ? (hb - N'(1)) : '0;
  assign mask_a  = ma_full[N-2:0];
  assign mask_b  = mb_full[N-2:0];
  assign res_a   = a[N-2:0] & mask_a;
  assign res_b   = b[N-2:0] & mask_b;
endmodule
