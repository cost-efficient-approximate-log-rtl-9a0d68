// approx_log_top: the approximate log multiplier designs side by side.
//
// 1. The multi-kernel convolution accelerator (conv_accel): NK = 16 cores of
//    3x3 RMitch-w4 multipliers on 32-bit Q16.16 data, with a shared feature
//    extractor, per-core weight storage and channel accumulation through the
//    Delayer. Its ports are those of conv_accel, prefixed cv_.
// 2. The stand-alone multipliers, each with its own operand and product
//    ports, combinational:
//      mm_*  32-bit unsigned Mitchell log multiplier;
//      mw_*  32-bit Mitch-w6 with C1 sign handling (biased), the multiplier
//            used for the CNN experiments;
//      il_*  16-bit truncated two-stage iterative log multiplier (n1=6, n2=2).
// The parts share no signals. The parameters size the accelerator; their
// defaults are the configuration described above.
module approx_log_top
  import alm_pkg::*;
#(
  parameter int unsigned NK     = CNN_NK,
  parameter int unsigned IMG_H  = IMG_H_DEF,
  parameter int unsigned IMG_W  = IMG_W_DEF,
  parameter int unsigned MAX_CH = MAX_CH_DEF,
  localparam int unsigned SW    = (NK > 1) ? $clog2(NK) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // convolution accelerator
  input  logic                                cv_start,
  input  logic [$clog2(MAX_CH+1)-1:0]     cv_num_ch,
  input  logic                                cv_in_valid,
  input  logic [CNN_N-1:0]                    cv_in_data,
  input  logic                                cv_w_clear,
  input  logic                                cv_w_valid,
  input  logic [SW-1:0]           cv_w_sel,
  input  logic [tuple_w(CNN_N, CNN_W)-1:0]    cv_w_tuple,
  output logic [NK-1:0][$clog2(MAX_CH*CNN_K*CNN_K+1)-1:0] cv_w_count,
  output logic                                cv_out_valid,
  output logic [NK-1:0][CNN_N-1:0]        cv_out_data,
  output logic                                cv_out_last,
  // Mitchell log multiplier
  input  logic [CNN_N-1:0]                    mm_a,
  input  logic [CNN_N-1:0]                    mm_b,
  output logic [2*CNN_N-1:0]                  mm_p,
  // Mitch-w6 with C1 sign handling
  input  logic [MW_N-1:0]                     mw_a,
  input  logic [MW_N-1:0]                     mw_b,
  output logic [2*MW_N-1:0]                   mw_p,
  // truncated two-stage iterative log multiplier
  input  logic [IT_N-1:0]                     il_a,
  input  logic [IT_N-1:0]                     il_b,
  output logic [2*IT_N-1:0]                   il_p
);
  conv_accel #(.NK(NK), .IMG_H(IMG_H), .IMG_W(IMG_W), .MAX_CH(MAX_CH)) u_cv (
    .clk, .rst_n, .start(cv_start), .num_ch(cv_num_ch), .in_valid(cv_in_valid),
    .in_data(cv_in_data), .w_clear(cv_w_clear), .w_valid(cv_w_valid), .w_sel(cv_w_sel),
    .w_tuple(cv_w_tuple), .w_count(cv_w_count), .out_valid(cv_out_valid),
    .out_data(cv_out_data), .out_last(cv_out_last));

  mitchell_mult #(.N(CNN_N)) u_mm (.a(mm_a), .b(mm_b), .p(mm_p));

  mitch_w #(.N(MW_N), .W(MW_W), .SIGNED(1'b1), .UNBIASED(1'b0)) u_mw (
    .a(mw_a), .b(mw_b), .p(mw_p));

  iter_log_mult #(.N(IT_N), .N1(IT_N1), .N2(IT_N2)) u_il (.a(il_a), .b(il_b), .p(il_p));
endmodule
