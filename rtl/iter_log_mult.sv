// iter_log_mult: truncated two-stage iterative log multiplier (unsigned,
// N x N -> 2N).
//
// The first stage is an unbiased truncated Mitchell multiplier with N1
// mantissa bits; it yields C(1). Two error term calculators derive the
// (N-1)-bit operands A(2), B(2) of the second stage from the first stage's
// residues and mantissa carry-out. The second stage, a truncated Mitchell
// multiplier with N2 mantissa bits, yields the correction C(2), and the
// output is C(1) + C(2), forced to zero when an input is zero.
// The second stage here reuses the N-bit stage with A(2), B(2) zero-extended
// by one bit, which gives the same result as an (N-1)-bit stage.
// Defaults n = 16, n1 = 6, n2 = 2 follow the configuration the document
// synthesises for 16 and 32 bits. Purely combinational; the document notes a
// pipeline register between the stages as an option, not built here.
module iter_log_mult #(
  parameter int unsigned N  = 16,
  parameter int unsigned N1 = 6,
  parameter int unsigned N2 = 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] c1, c2;
  logic           carry1, nz1;
  logic [N-2:0]   ra, rb, ma, mb, a2, b2;

  log_stage #(.N(N), .MB(N1)) u_st1 (
    .a(a), .b(b), .c(c1), .carry(carry1),
    .res_a(ra), .res_b(rb), .mask_a(ma), .mask_b(mb), .nz(nz1));

  error_term_calc #(.N(N)) u_eta (.res(ra), .mask(ma), .carry(carry1), .e(a2));
  error_term_calc #(.N(N)) u_etb (.res(rb), .mask(mb), .carry(carry1), .e(b2));

  log_stage #(.N(N), .MB(N2)) u_st2 (
    .a({1'b0, a2}), .b({1'b0, b2}), .c(c2), .carry(),
    .res_a(), .res_b(), .mask_a(), .mask_b(), .nz());

  assign p = nz1 ? (c1 + c2) : '0;
endmodule
