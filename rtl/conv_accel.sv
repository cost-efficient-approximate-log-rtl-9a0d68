// conv_accel: NK convolution cores working in parallel on one input stream.
//
// The raw Q16.16 input pixels are encoded once by a shared Feature Extractor
// and the resulting tuple is broadcast to all NK cores; each core holds the
// kernel of one output channel in its own weight storage, so NK output
// channels are produced per pass over the input (NK-fold throughput).
// Weight tuples, encoded ahead of time, are written to the core selected by
// w_sel. Timing is that of conv_core: the outputs of all cores are valid on
// the same cycle, one cycle after the window's last pixel. The default NK = 16
// is the largest core count the document evaluates.
module conv_accel
  import alm_pkg::*;
#(
  parameter int unsigned NK     = CNN_NK,
  parameter int unsigned N      = CNN_N,
  parameter int unsigned W      = CNN_W,
  parameter int unsigned K      = CNN_K,
  parameter int unsigned IMG_H  = IMG_H_DEF,
  parameter int unsigned IMG_W  = IMG_W_DEF,
  parameter int unsigned MAX_CH = MAX_CH_DEF,
  parameter int unsigned FRAC   = CNN_FRAC,
  parameter int unsigned ACC_W  = CNN_N,
  localparam int unsigned TW    = $clog2(N) + W + 1,
  localparam int unsigned NCW   = $clog2(MAX_CH + 1),
  localparam int unsigned SW    = (NK > 1) ? $clog2(NK) : 1,
  localparam int unsigned WAW   = $clog2(MAX_CH * K * K + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [NCW-1:0]            num_ch,
  input  logic                      in_valid,
  input  logic [N-1:0]              in_data,
  input  logic                      w_clear,
  input  logic                      w_valid,
  input  logic [SW-1:0]             w_sel,
  input  logic [TW-1:0]             w_tuple,
  output logic [NK-1:0][WAW-1:0]    w_count,
  output logic                      out_valid,
  output logic [NK-1:0][ACC_W-1:0]  out_data,
  output logic                      out_last
);
  logic [TW-1:0]  in_tuple;
  logic [NK-1:0]  ov, ol;

  feature_extractor #(.N(N), .W(W)) u_fe (.a(in_data), .t(in_tuple));

  for (genvar i = 0; i < NK; i++) begin : g_core
    conv_core #(.N(N), .W(W), .K(K), .IMG_H(IMG_H), .IMG_W(IMG_W), .MAX_CH(MAX_CH),
                .FRAC(FRAC), .ACC_W(ACC_W)) u_core (
      .clk, .rst_n, .start, .num_ch, .in_valid, .in_tuple,
      .w_clear, .w_valid(w_valid && (w_sel == SW'(i))), .w_tuple,
      .w_count(w_count[i]), .out_valid(ov[i]), .out_data(out_data[i]), .out_last(ol[i]));
  end

  // All cores share counters and timing; core 0 speaks for them.
  assign out_valid = ov[0];
  assign out_last  = ol[0];
endmodule
