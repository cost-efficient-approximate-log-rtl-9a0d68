// tb_conv_accel: runs a reduced accelerator (3 cores, 3x3 filters, 5x6 map,
// 2 channels) on raw Q16.16 pixels. Each core gets its own kernels through
// w_sel; all cores must produce their own convolution of the shared input on
// the same cycles, one cycle after each window's last pixel, with random
// stalls in the input stream.
module tb_conv_accel;
  import tb_ref_pkg::*;
  localparam int NK = 3, N = 32, W = 4, K = 3, H = 5, WD = 6, MAXCH = 2, FRAC = 16, ACC = 32;
  localparam int TW = 10, OH = H - K + 1, OW = WD - K + 1;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, w_clear = 0, w_valid = 0;
  logic [1:0] num_ch, w_sel;
  logic [N-1:0] in_data;
  logic [TW-1:0] w_tuple;
  logic [NK-1:0][$clog2(MAXCH*K*K+1)-1:0] w_count;
  logic out_valid, out_last;
  logic [NK-1:0][ACC-1:0] out_data;

  conv_accel #(.NK(NK), .N(N), .W(W), .K(K), .IMG_H(H), .IMG_W(WD), .MAX_CH(MAXCH),
               .FRAC(FRAC), .ACC_W(ACC)) dut (
    .clk, .rst_n, .start, .num_ch, .in_valid, .in_data, .w_clear, .w_valid, .w_sel,
    .w_tuple, .w_count, .out_valid, .out_data, .out_last);

  logic [31:0] pix [MAXCH][H][WD];
  logic [31:0] wts [NK][MAXCH][K][K];
  logic [31:0] expv [NK][OH][OW];
  int          cyc_q [$];
  int cyc = 0, n_out = 0, oi = 0, n_last = 0, n_stall = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      checks++;
      if (cyc_q.size() == 0 || cyc != cyc_q[0]) begin failures++; $display("output timing at %0d", cyc); end
      else void'(cyc_q.pop_front());
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (out_data[k] != expv[k][oi / OW][oi % OW]) begin
          failures++; $display("core %0d out %0d: %h vs %h", k, oi, out_data[k], expv[k][oi / OW][oi % OW]);
        end
      end
      oi++; n_out++;
      if (out_last) n_last++;
    end
  end

  initial begin
    num_ch = 2; in_data = 0; w_tuple = 0; w_sel = 0;
    for (int c = 0; c < MAXCH; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) pix[c][r][x] = rnd_fix(19);
    for (int k = 0; k < NK; k++) for (int c = 0; c < MAXCH; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
      wts[k][c][i][j] = rnd_fix(18);
    for (int k = 0; k < NK; k++) for (int r = 0; r < OH; r++) for (int x = 0; x < OW; x++) begin
      expv[k][r][x] = 0;
      for (int c = 0; c < MAXCH; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        expv[k][r][x] += conv_prod(u128'(pix[c][r+i][x+j]), u128'(wts[k][c][i][j]), N, W, FRAC, ACC);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    w_clear = 1; @(negedge clk); w_clear = 0;
    for (int k = 0; k < NK; k++) for (int c = 0; c < MAXCH; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
      w_valid = 1; w_sel = 2'(k); w_tuple = TW'(ref_tuple(u128'(wts[k][c][i][j]), N, W)); @(negedge clk);
    end
    w_valid = 0;
    for (int k = 0; k < NK; k++) begin checks++; if (int'(w_count[k]) != MAXCH * K * K) failures++; end
    start = 1; @(negedge clk); start = 0;
    for (int c = 0; c < MAXCH; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) begin
      while ($urandom % 4 == 0) begin in_valid = 0; n_stall++; @(negedge clk); end
      in_valid = 1; in_data = pix[c][r][x];
      if (c == MAXCH - 1 && r >= K - 1 && x >= K - 1) cyc_q.push_back(cyc + 2);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (n_out != OH * OW || n_last != 1) begin failures++; $display("outputs %0d last %0d", n_out, n_last); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
