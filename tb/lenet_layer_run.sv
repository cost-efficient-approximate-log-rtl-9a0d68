// lenet_layer_run: drives one convolution layer through a conv_accel sized
// for it and checks every output. A layer of NKER kernels is run in
// NKER / NK passes; each pass clears and reloads the weight stores with the
// next NK kernels (as pre-encoded tuples), restarts the accelerator and
// streams the whole CH x H x WD input map with random stalls. Every output
// of every core is compared with a convolution computed from the arithmetic
// model of the RMitch-w product (Q16.16), and the output cycle is checked
// (one cycle after the window's last pixel).
// Interface: pulse `go` for one cycle; `done` rises when all passes are
// finished, with the running totals on `checks` and `failures`.
// The layer sizes are parameters of this helper; the testbench that uses it
// sets them. Pixel and weight values are random, not trained data.
module lenet_layer_run #(
  parameter int K = 5, parameter int H = 28, parameter int WD = 28, parameter int CH = 1,
  parameter int NKER = 20, parameter int NK = 2
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  import tb_ref_pkg::*;
  localparam int N = 32, W = 4, FRAC = 16, ACC = 32;
  localparam int TW = 10, OH = H - K + 1, OW = WD - K + 1;
  localparam int SW = (NK > 1) ? $clog2(NK) : 1, NCW = $clog2(CH + 1), WAW = $clog2(CH * K * K + 1);

  logic rst_n = 0, start = 0, in_valid = 0, w_clear = 0, w_valid = 0;
  logic [NCW-1:0] num_ch;
  logic [SW-1:0] w_sel;
  logic [N-1:0] in_data;
  logic [TW-1:0] w_tuple;
  logic [NK-1:0][WAW-1:0] w_count;
  logic out_valid, out_last;
  logic [NK-1:0][ACC-1:0] out_data;

  conv_accel #(.NK(NK), .N(N), .W(W), .K(K), .IMG_H(H), .IMG_W(WD), .MAX_CH(CH),
               .FRAC(FRAC), .ACC_W(ACC)) dut (
    .clk, .rst_n, .start, .num_ch, .in_valid, .in_data, .w_clear, .w_valid, .w_sel,
    .w_tuple, .w_count, .out_valid, .out_data, .out_last);

  logic [31:0] pix [CH][H][WD];
  logic [31:0] wts [NK][CH][K][K];
  logic [31:0] expv [NK][OH][OW];
  int cyc_q [$];
  int cyc = 0, oi = 0, n_out = 0, n_last = 0;
  // run-time copies of the sizes keep the model loops rolled in simulation
  int nk_v = NK, ch_v = CH, k_v = K, oh_v = OH, ow_v = OW;

  initial begin done = 0; checks = 0; failures = 0; stalls = 0; end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      checks++;
      if (cyc_q.size() == 0 || cyc != cyc_q[0]) begin failures++; $display("output timing at %0d", cyc); end
      else void'(cyc_q.pop_front());
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (out_data[k] != expv[k][oi / OW][oi % OW]) begin
          failures++;
          if (failures < 20) $display("core %0d out %0d: %h vs %h", k, oi, out_data[k], expv[k][oi / OW][oi % OW]);
        end
      end
      oi++; n_out++;
      if (out_last) n_last++;
    end
  end

  initial begin
    num_ch = NCW'(CH); in_data = 0; w_tuple = 0; w_sel = 0;
    @(posedge go);
    for (int c = 0; c < CH; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) pix[c][r][x] = rnd_fix(19);
    @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < NKER / NK; pass++) begin
      for (int k = 0; k < NK; k++) for (int c = 0; c < CH; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        wts[k][c][i][j] = rnd_fix(18);
      for (int k = 0; k < nk_v; k++) for (int r = 0; r < oh_v; r++) for (int x = 0; x < ow_v; x++) begin
        expv[k][r][x] = 0;
        for (int c = 0; c < ch_v; c++) for (int i = 0; i < k_v; i++) for (int j = 0; j < k_v; j++)
          expv[k][r][x] += conv_prod(u128'(pix[c][r+i][x+j]), u128'(wts[k][c][i][j]), N, W, FRAC, ACC);
      end
      w_clear = 1; @(negedge clk); w_clear = 0;
      for (int k = 0; k < nk_v; k++) for (int c = 0; c < ch_v; c++) for (int i = 0; i < k_v; i++) for (int j = 0; j < k_v; j++) begin
        w_valid = 1; w_sel = SW'(k); w_tuple = TW'(ref_tuple(u128'(wts[k][c][i][j]), N, W)); @(negedge clk);
      end
      w_valid = 0;
      for (int k = 0; k < NK; k++) begin checks++; if (int'(w_count[k]) != CH * K * K) failures++; end
      oi = 0; n_out = 0; n_last = 0;
      start = 1; @(negedge clk); start = 0;
      for (int c = 0; c < CH; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) begin
        while ($urandom % 8 == 0) begin in_valid = 0; stalls++; @(negedge clk); end
        in_valid = 1; in_data = pix[c][r][x];
        if (c == CH - 1 && r >= K - 1 && x >= K - 1) cyc_q.push_back(cyc + 2);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (5) @(negedge clk);
      checks++;
      if (n_out != OH * OW || n_last != 1) begin failures++; $display("pass %0d: outputs %0d last %0d", pass, n_out, n_last); end
    end
    done = 1;
  end
endmodule
