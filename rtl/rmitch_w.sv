// rmitch_w: reduced truncated Mitchell log multiplier, RMitch-w.
//
// Takes two operands already encoded by feature_extractor, tuples
// {lsb, msb, k, mant}, so it holds no leading-one detector, encoder or
// normalising shifter. It adds {0, k, mant} of both tuples in a
// (W + log2 N)-bit adder, takes the antilogarithm, XORs the result with
// msb_a ^ msb_b (C1 sign handling, carried by the tuple's MSB field) and
// forces zero from k, msb and lsb. Its result equals mitch_w with SIGNED = 1
// and UNBIASED = 0 on the original operands. Combinational.
module rmitch_w #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 4,
  localparam int unsigned S   = $clog2(N),
  localparam int unsigned OPW = S + W - 1,
  localparam int unsigned TW  = S + W + 1
) (
  input  logic [TW-1:0]  ta,
  input  logic [TW-1:0]  tb,
  output logic [2*N-1:0] p
);
  logic [W+S-1:0] l;
  logic [2*N-1:0] d, dx;
  logic           sgn;

  assign l   = {1'b0, ta[OPW-1:0]} + {1'b0, tb[OPW-1:0]};
  antilog_w #(.N(N), .W(W)) u_alog (.l(l), .d(d));
  assign sgn = ta[OPW] ^ tb[OPW];
  assign dx  = d ^ {(2*N){sgn}};

  is_zero_c1 #(.N(N)) u_zero (.a_k(ta[OPW-1:W-1]), .a_msb(ta[OPW]), .a_lsb(ta[OPW+1]),
                              .b_k(tb[OPW-1:W-1]), .b_msb(tb[OPW]), .b_lsb(tb[OPW+1]),
                              .d(dx), .p(p));
endmodule
