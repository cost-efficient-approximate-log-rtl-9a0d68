// tb_approx_log_top: end-to-end test of the top level at a reduced size
// (4 cores, 8x9 map, 3 channels; filters, data width and multipliers at their
// defaults: 3x3 RMitch-w4, Q16.16), so that it builds and runs quickly.
// tb_approx_log_top_full runs the same test at the full default size.
// Part 1 fills every core's weight store (4 x 3 x 9 tuples), streams a
// 3-channel map with random input stalls and compares all 4 x 6 x 7
// outputs, and their timing, with a convolution computed from the arithmetic
// multiplier model. Part 2 restarts the accelerator on a new one-channel map.
// Part 3 drives the stand-alone Mitchell, Mitch-w6 (C1) and iterative
// multipliers with random operands and compares them with their models.
// It counts each mechanism (input stall, channel accumulation through the
// Delayer, full weight store, restart, zero and negative operands, parallel
// cores) and fails if one never occurred.
module tb_approx_log_top;
  import tb_ref_pkg::*;
  import alm_pkg::*;
  localparam int NK = 4, N = CNN_N, W = CNN_W, K = CNN_K, H = 8, WD = 9;
  localparam int CH = 3, FRAC = CNN_FRAC, ACC = CNN_N;
  localparam int TW = tuple_w(N, W), OH = H - K + 1, OW = WD - K + 1;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic cv_start = 0, cv_in_valid = 0, cv_w_clear = 0, cv_w_valid = 0;
  logic [$clog2(CH+1)-1:0] cv_num_ch;
  logic [N-1:0] cv_in_data;
  logic [$clog2(NK)-1:0] cv_w_sel;
  logic [TW-1:0] cv_w_tuple;
  logic [NK-1:0][$clog2(CH*K*K+1)-1:0] cv_w_count;
  logic cv_out_valid, cv_out_last;
  logic [NK-1:0][ACC-1:0] cv_out_data;
  logic [31:0] mm_a, mm_b, mw_a, mw_b; logic [63:0] mm_p, mw_p;
  logic [15:0] il_a, il_b; logic [31:0] il_p;

  approx_log_top #(.NK(NK), .IMG_H(H), .IMG_W(WD), .MAX_CH(CH)) dut (.*);

  logic [31:0] pix [CH][H][WD];
  logic [31:0] wts [NK][CH][K][K];
  logic [31:0] expv [NK][OH][OW];
  int          cyc_q [$];
  int cyc = 0, oi = 0, n_out = 0, n_last = 0;
  int n_stall = 0, n_accum = 0, n_full = 0, n_restart = 0, n_zero = 0, n_neg = 0, n_cores = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && cv_out_valid) begin
      checks++;
      if (cyc_q.size() == 0 || cyc != cyc_q[0]) begin failures++; $display("output timing at %0d", cyc); end
      else void'(cyc_q.pop_front());
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (cv_out_data[k] != expv[k][oi / OW][oi % OW]) begin
          failures++;
          if (failures < 20) $display("core %0d out %0d: %h vs %h", k, oi, cv_out_data[k], expv[k][oi / OW][oi % OW]);
        end
      end
      n_cores = NK;
      oi++; n_out++;
      if (cv_out_last) n_last++;
    end
  end

  task automatic make_expected(int nch);
    for (int k = 0; k < NK; k++) for (int r = 0; r < OH; r++) for (int x = 0; x < OW; x++) begin
      expv[k][r][x] = 0;
      for (int c = 0; c < nch; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        expv[k][r][x] += conv_prod(u128'(pix[c][r+i][x+j]), u128'(wts[k][c][i][j]), N, W, FRAC, ACC);
    end
  endtask

  task automatic stream(int nch, bit stalls);
    oi = 0;
    cv_num_ch = ($clog2(CH+1))'(nch);
    cv_start = 1; @(negedge clk); cv_start = 0;
    for (int c = 0; c < nch; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) begin
      if (stalls) while ($urandom % 4 == 0) begin cv_in_valid = 0; n_stall++; @(negedge clk); end
      cv_in_valid = 1; cv_in_data = pix[c][r][x];
      if (pix[c][r][x] == 0) n_zero++;
      if (pix[c][r][x][31]) n_neg++;
      if (c > 0) n_accum++;
      if (c == nch - 1 && r >= K - 1 && x >= K - 1) cyc_q.push_back(cyc + 2);
      @(negedge clk);
    end
    cv_in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int t0;
    cv_num_ch = 1; cv_in_data = 0; cv_w_sel = 0; cv_w_tuple = 0;
    mm_a = 0; mm_b = 0; mw_a = 0; mw_b = 0; il_a = 0; il_b = 0;
    for (int c = 0; c < CH; c++) for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) pix[c][r][x] = rnd_fix(19);
    for (int k = 0; k < NK; k++) for (int c = 0; c < CH; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
      wts[k][c][i][j] = rnd_fix(18);
    make_expected(CH);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- part 1: full-size 20-channel map on 16 cores ----
    cv_w_clear = 1; @(negedge clk); cv_w_clear = 0;
    for (int k = 0; k < NK; k++) for (int c = 0; c < CH; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
      cv_w_valid = 1; cv_w_sel = ($clog2(NK))'(k);
      cv_w_tuple = TW'(ref_tuple(u128'(wts[k][c][i][j]), N, W));
      @(negedge clk);
    end
    cv_w_valid = 0;
    for (int k = 0; k < NK; k++) begin
      checks++;
      if (int'(cv_w_count[k]) == CH * K * K) n_full++; else failures++;
    end
    t0 = cyc;
    stream(CH, 1'b1);
    $display("multi-channel map: %0d cycles for %0d pixels (%0d stall cycles)", cyc - t0, CH * H * WD, n_stall);
    checks++; if (n_out != OH * OW || n_last != 1) begin failures++; $display("outputs %0d last %0d", n_out, n_last); end
    // ---- part 2: restart on a one-channel map (channel-0 weights) ----
    for (int r = 0; r < H; r++) for (int x = 0; x < WD; x++) pix[0][r][x] = rnd_fix(19);
    make_expected(1);
    n_out = 0; n_last = 0;
    stream(1, 1'b0);
    n_restart++;
    checks++; if (n_out != OH * OW || n_last != 1) begin failures++; $display("restart outputs %0d last %0d", n_out, n_last); end
    // ---- part 3: stand-alone multipliers ----
    for (int i = 0; i < 3000; i++) begin
      mm_a = 32'(rnd_op(32)); mm_b = 32'(rnd_op(32));
      mw_a = rnd_fix(31); mw_b = rnd_fix(31);
      il_a = 16'($urandom); il_b = 16'(rnd_op(16));
      #1;
      checks++; if (u128'(mm_p) != ref_mitch(u128'(mm_a), u128'(mm_b), 32, 32, 1'b0, 1'b0)) failures++;
      checks++; if (u128'(mw_p) != ref_mitch(u128'(mw_a), u128'(mw_b), 32, 6, 1'b1, 1'b0)) failures++;
      checks++; if (u128'(il_p) != ref_iter(u128'(il_a), u128'(il_b), 16, 6, 2)) failures++;
    end
    $display("mechanisms: stalls %0d, accumulation beats %0d, full stores %0d, restarts %0d, zero px %0d, negative px %0d, cores %0d",
             n_stall, n_accum, n_full, n_restart, n_zero, n_neg, n_cores);
    checks++; if (n_stall == 0)   failures++;
    checks++; if (n_accum == 0)   failures++;
    checks++; if (n_full != NK)   failures++;
    checks++; if (n_restart == 0) failures++;
    checks++; if (n_zero == 0)    failures++;
    checks++; if (n_neg == 0)     failures++;
    checks++; if (n_cores != NK)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
