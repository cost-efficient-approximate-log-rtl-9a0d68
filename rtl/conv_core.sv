// conv_core: K x K convolution core with reduced log multipliers (RMitch-w).
//
// The input feature map streams in raster order, one encoded pixel tuple per
// in_valid cycle, channel after channel. Every pixel is broadcast to all K*K
// multipliers (input sharing); multiplier (r, c) multiplies it by weight
// (r, c) of the current channel, supplied by the core's weight storage.
// Products are Q32.32 (C1 sign handling, so negative values are one below the
// two's complement); bits FRAC+ACC_W-1..FRAC are kept, giving Q16.16.
// Each filter row is a chain of K adders, each followed by a register, so a
// partial sum moves one column per pixel. The end of row r enters row r+1
// through a shift register of IMG_W-K stages, so it meets the pixels of the
// next image row; the last register of the last row holds a complete window.
// Row 0 starts from the Delayer: for channel 0 it starts from zero, for later
// channels from the window's sum over the previous channels, which the
// Delayer returns H*W - (K-1)*(W+1) pixels after storing it. The sums of all
// channels thus accumulate without an output buffer or an extra adder.
//
// Timing: every register advances only on in_valid, so stalls in the input
// stream are allowed. The output for the window whose lower-right pixel
// arrives on a given in_valid cycle appears on the next cycle (out_valid), for
// the last channel (num_ch - 1) and windows that lie fully inside the map
// (valid convolution, stride 1, no padding); out_last marks the last window.
// start resets the pixel and channel counters for a new map; weights must be
// loaded (w_valid, num_ch*K*K tuples, channel-major) before streaming.
// The register array, line delays and Delayer follow the document's block
// diagram; the Q16.16 scaling of products, the counters and the handshake are
// this design's own choices.
module conv_core #(
  parameter int unsigned N      = 32,
  parameter int unsigned W      = 4,
  parameter int unsigned K      = 3,
  parameter int unsigned IMG_H  = 28,
  parameter int unsigned IMG_W  = 28,
  parameter int unsigned MAX_CH = 20,
  parameter int unsigned FRAC   = 16,
  parameter int unsigned ACC_W  = 32,
  localparam int unsigned TW    = $clog2(N) + W + 1,
  localparam int unsigned CW    = (MAX_CH > 1) ? $clog2(MAX_CH) : 1,
  localparam int unsigned NCW   = $clog2(MAX_CH + 1),
  localparam int unsigned WAW   = $clog2(MAX_CH * K * K + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NCW-1:0]   num_ch,
  input  logic             in_valid,
  input  logic [TW-1:0]    in_tuple,
  input  logic             w_clear,
  input  logic             w_valid,
  input  logic [TW-1:0]    w_tuple,
  output logic [WAW-1:0]   w_count,
  output logic             out_valid,
  output logic [ACC_W-1:0] out_data,
  output logic             out_last
);
  localparam int unsigned LINE  = IMG_W - K;
  localparam int unsigned DDEP  = IMG_H * IMG_W - (K - 1) * (IMG_W + 1);
  localparam int unsigned RW    = $clog2(IMG_H);
  localparam int unsigned XW    = $clog2(IMG_W);

  if (K < 1 || IMG_W < K || IMG_H < K || FRAC + ACC_W > 2 * N) begin : g_chk
    $error("conv_core: need 1 <= K <= IMG_W, IMG_H and FRAC + ACC_W <= 2N");
  end

  // ---- pixel / channel counters ------------------------------------------
  logic [XW-1:0] col;
  logic [RW-1:0] row;
  logic [CW-1:0] ch;
  logic          beat, last_px, first_ch, last_ch, win_ok;

  assign beat     = in_valid;
  assign last_px  = (col == XW'(IMG_W - 1)) && (row == RW'(IMG_H - 1));
  assign first_ch = (ch == '0);
  assign last_ch  = (NCW'(ch) == num_ch - NCW'(1));
  assign win_ok   = (row >= RW'(K - 1)) && (col >= XW'(K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; ch <= '0;
    end else if (start) begin
      col <= '0; row <= '0; ch <= '0;
    end else if (beat) begin
      if (col == XW'(IMG_W - 1)) begin
        col <= '0;
        if (row == RW'(IMG_H - 1)) begin
          row <= '0;
          ch  <= last_ch ? '0 : ch + CW'(1);
        end else begin
          row <= row + RW'(1);
        end
      end else begin
        col <= col + XW'(1);
      end
    end
  end

  // ---- weights -----------------------------------------------------------
  logic [K*K-1:0][TW-1:0] kernel;

  weight_storage #(.K(K), .MAX_CH(MAX_CH), .TW(TW)) u_wst (
    .clk, .rst_n, .clear(w_clear), .w_valid, .w_tuple, .ch,
    .kernel, .count(w_count), .full());

  // ---- multipliers -------------------------------------------------------
  logic [ACC_W-1:0] prod [K][K];

  for (genvar r = 0; r < K; r++) begin : g_row
    for (genvar c = 0; c < K; c++) begin : g_col
      logic [2*N-1:0] p;
      rmitch_w #(.N(N), .W(W)) u_mul (.ta(in_tuple), .tb(kernel[r*K + c]), .p(p));
      assign prod[r][c] = p[FRAC+ACC_W-1:FRAC];
    end
  end

  // ---- adder array, line delays, delayer ---------------------------------
  logic [ACC_W-1:0] acc  [K][K];   // registers after each adder
  logic [ACC_W-1:0] rin  [K];      // partial sum entering each row
  logic [ACC_W-1:0] nxt_last;      // next value of the final register
  logic [ACC_W-1:0] dly_out;

  if (K == 1) begin : g_k1
    assign nxt_last = rin[0] + prod[0][0];
  end else begin : g_kn
    assign nxt_last = acc[K-1][K-2] + prod[K-1][K-1];
  end

  delayer #(.WIDTH(ACC_W), .DEPTH(DDEP)) u_dly (
    .clk, .rst_n, .en(beat), .din(nxt_last), .dout(dly_out));

  assign rin[0] = first_ch ? '0 : dly_out;

  for (genvar r = 1; r < K; r++) begin : g_line
    if (LINE == 0) begin : g_direct
      assign rin[r] = acc[r-1][K-1];
    end else begin : g_sr
      logic [ACC_W-1:0] sr [LINE];
      always_ff @(posedge clk) begin
        if (beat) begin
          sr[0] <= acc[r-1][K-1];
          for (int unsigned i = 1; i < LINE; i++) sr[i] <= sr[i-1];
        end
      end
      assign rin[r] = sr[LINE-1];
    end
  end

  always_ff @(posedge clk) begin
    if (beat) begin
      for (int unsigned r = 0; r < K; r++) begin
        acc[r][0] <= rin[r] + prod[r][0];
        for (int unsigned c = 1; c < K; c++) acc[r][c] <= acc[r][c-1] + prod[r][c];
      end
    end
  end

  assign out_data = acc[K-1][K-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= beat && !start && last_ch && win_ok;
      out_last  <= beat && !start && last_ch && last_px;
    end
  end

  a_num_ch: assert property (@(posedge clk) disable iff (!rst_n)
                             beat |-> (num_ch >= NCW'(1) && num_ch <= NCW'(MAX_CH)))
    else $error("conv_core: num_ch out of range");
endmodule
