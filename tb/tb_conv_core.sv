// tb_conv_core: runs a reduced core (3x3 filter, 6x7 map, up to 3 channels)
// through two maps: three channels with random stalls in the input stream,
// then, after a restart, one channel without stalls. Every output is compared
// with a convolution computed from the arithmetic multiplier model (valid
// convolution, stride 1, channels summed, Q16.16 products), and every output
// must appear exactly one cycle after the cycle that delivered the window's
// last pixel. Also checks the output count and out_last.
module tb_conv_core;
  import tb_ref_pkg::*;
  localparam int N = 32, W = 4, K = 3, H = 6, WD = 7, MAXCH = 3, FRAC = 16, ACC = 32;
  localparam int TW = 10, OH = H - K + 1, OW = WD - K + 1;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, w_clear = 0, w_valid = 0;
  logic [1:0] num_ch;
  logic [TW-1:0] in_tuple, w_tuple;
  logic [$clog2(MAXCH*K*K+1)-1:0] w_count;
  logic out_valid, out_last;
  logic [ACC-1:0] out_data;

  conv_core #(.N(N), .W(W), .K(K), .IMG_H(H), .IMG_W(WD), .MAX_CH(MAXCH), .FRAC(FRAC),
              .ACC_W(ACC)) dut (
    .clk, .rst_n, .start, .num_ch, .in_valid, .in_tuple, .w_clear, .w_valid, .w_tuple,
    .w_count, .out_valid, .out_data, .out_last);

  logic [31:0] pix [MAXCH][H][WD];
  logic [31:0] wts [MAXCH][K][K];
  logic [31:0] exp_q [$];
  int          cyc_q [$];
  int cyc = 0, n_out = 0, n_last = 0, n_stall = 0;

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
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output %h", out_data);
      end else begin
        if (out_data != exp_q[0] || cyc != cyc_q[0]) begin
          failures++;
          $display("output %0d: %h at cycle %0d, expected %h at %0d", n_out, out_data, cyc, exp_q[0], cyc_q[0]);
        end
        void'(exp_q.pop_front()); void'(cyc_q.pop_front());
      end
      if (out_last) n_last++;
    end
  end

  task automatic run_map(int nch, bit stalls);
    logic [31:0] acc [OH][OW];
    for (int c = 0; c < nch; c++) begin
      for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) pix[c][r][x] = rnd_fix(19);
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wts[c][i][j] = rnd_fix(18);
    end
    for (int r = 0; r < OH; r++) for (int x = 0; x < OW; x++) begin
      acc[r][x] = 0;
      for (int c = 0; c < nch; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        acc[r][x] += conv_prod(u128'(pix[c][r+i][x+j]), u128'(wts[c][i][j]), N, W, FRAC, ACC);
    end
    // load weights, channel-major, row by row
    @(negedge clk); w_clear = 1; @(negedge clk); w_clear = 0;
    for (int c = 0; c < nch; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
      w_valid = 1; w_tuple = TW'(ref_tuple(u128'(wts[c][i][j]), N, W)); @(negedge clk);
    end
    w_valid = 0;
    checks++; if (int'(w_count) != nch * K * K) begin failures++; $display("w_count %0d", w_count); end
    num_ch = 2'(nch);
    start = 1; @(negedge clk); start = 0;
    for (int c = 0; c < nch; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) begin
      if (stalls) while ($urandom % 3 == 0) begin in_valid = 0; n_stall++; @(negedge clk); end
      in_valid = 1;
      in_tuple = TW'(ref_tuple(u128'(pix[c][r][x]), N, W));
      if (c == nch - 1 && r >= K - 1 && x >= K - 1) begin
        exp_q.push_back(acc[r-K+1][x-K+1]);
        cyc_q.push_back(cyc + 2);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    num_ch = 1; in_tuple = 0; w_tuple = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_map(3, 1'b1);
    run_map(1, 1'b0);
    checks++; if (n_out != 2 * OH * OW) begin failures++; $display("outputs %0d", n_out); end
    checks++; if (n_last != 2 || exp_q.size() != 0) begin failures++; $display("last %0d left %0d", n_last, exp_q.size()); end
    checks++; if (n_stall == 0) failures++;
    $display("outputs %0d, stall cycles %0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
