// tb_antilog_w: checks the customizable antilogarithm: the output must be
// floor(2^charac * (1 + mant / 2^(W-1))) with the bits below N-W cleared.
// Exhaustive for N = 8, W = 4 and N = 16, W = 6; random for N = 32, W = 6
// (default).
module tb_antilog_w;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] l32; logic [63:0] d32;
  logic [6:0]  l8;  logic [15:0] d8;
  logic [9:0]  l16; logic [31:0] d16;

  antilog_w                 dut32 (.l(l32), .d(d32));
  antilog_w #(.N(8), .W(4))  dut8  (.l(l8),  .d(d8));
  antilog_w #(.N(16), .W(6)) dut16 (.l(l16), .d(d16));

  function automatic u128 expect_d(u128 l, int n, int w);
    int  c = int'(l >> (w - 1));
    u128 m = (u128'(1) << (w - 1)) | (l & mask(w - 1));
    return (((m << c) >> (w - 1)) & ~mask(n - w)) & mask(2 * n);
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      l8 = 7'(v); #1;
      checks++; if (u128'(d8) != expect_d(u128'(l8), 8, 4)) begin failures++; $display("8/4 l=%h d=%h", l8, d8); end
    end
    for (int v = 0; v < 1024; v++) begin
      l16 = 10'(v); #1;
      checks++; if (u128'(d16) != expect_d(u128'(l16), 16, 6)) begin failures++; $display("16/6 l=%h d=%h", l16, d16); end
    end
    for (int v = 0; v < 2048; v++) begin
      l32 = 11'(v); #1;
      checks++; if (u128'(d32) != expect_d(u128'(l32), 32, 6)) begin failures++; $display("32/6 l=%h d=%h", l32, d32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
