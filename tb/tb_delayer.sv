// tb_delayer: streams random words with random enable gaps through a delay
// line of 13 words and checks that every enabled cycle, once the line is
// full, presents the word written 13 enabled cycles earlier.
module tb_delayer;
  localparam int D = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] din, dout;
  logic [31:0] hist [$];

  delayer #(.WIDTH(32), .DEPTH(D)) dut (.clk, .rst_n, .en, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = $urandom;
      #1;
      if (en) begin
        if (hist.size() == D) begin
          checks++;
          if (dout != hist[0]) begin failures++; $display("step %0d: %h vs %h", i, dout, hist[0]); end
          void'(hist.pop_front());
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
