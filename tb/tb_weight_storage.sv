// tb_weight_storage: loads a full store (K = 3, 4 channels) with random
// tuples, checks that every channel presents its K*K tuples in arrival
// order (with gaps in the write stream), that count and full track the
// writes, and that clear empties the store.
module tb_weight_storage;
  localparam int K = 3, CH = 4, TW = 10, D = CH * K * K;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, w_valid = 0, full;
  logic [TW-1:0] w_tuple;
  logic [1:0] ch;
  logic [K*K-1:0][TW-1:0] kernel;
  logic [$clog2(D+1)-1:0] count;
  logic [TW-1:0] mem [D];

  weight_storage #(.K(K), .MAX_CH(CH), .TW(TW)) dut (
    .clk, .rst_n, .clear, .w_valid, .w_tuple, .ch, .kernel, .count, .full);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch = 0; w_tuple = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      mem[i] = TW'($urandom);
      @(negedge clk); w_valid = 1; w_tuple = mem[i];
      if (i % 5 == 4) begin @(negedge clk); w_valid = 0; end  // gaps in the FIFO stream
    end
    @(negedge clk); w_valid = 0;
    checks++; if (int'(count) != D || !full) begin failures++; $display("count=%0d full=%0d", count, full); end
    for (int c = 0; c < CH; c++) begin
      ch = 2'(c); #1;
      for (int i = 0; i < K * K; i++) begin
        checks++;
        if (kernel[i] != mem[c*K*K + i]) begin failures++; $display("ch %0d tap %0d: %h vs %h", c, i, kernel[i], mem[c*K*K + i]); end
      end
    end
    // clear empties the store; the next write lands in entry 0.
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++; if (count != 0 || full) failures++;
    @(negedge clk); w_valid = 1; w_tuple = 10'h155; @(negedge clk); w_valid = 0;
    ch = 0; #1;
    checks++; if (kernel[0] != 10'h155 || count != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
