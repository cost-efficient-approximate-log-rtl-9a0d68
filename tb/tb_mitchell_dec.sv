// tb_mitchell_dec: checks the Mitchell decoder: for L = {charac, mant} the
// output must be floor(2^charac * (1 + mant / 2^(N-1))). Random L for N = 32
// (default) and exhaustive L for N = 8.
module tb_mitchell_dec;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [36:0] l32; logic [63:0] d32;
  logic [10:0] l8;  logic [15:0] d8;

  mitchell_dec          dut32 (.l(l32), .d(d32));
  mitchell_dec #(.N(8)) dut8  (.l(l8),  .d(d8));

  function automatic u128 expect_d(u128 l, int n);
    int  c = int'(l >> (n - 1));
    u128 m = (u128'(1) << (n - 1)) | (l & mask(n - 1));
    return ((m << c) >> (n - 1)) & mask(2 * n);
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      l8 = 11'(v); #1;
      checks++; if (u128'(d8) != expect_d(u128'(l8), 8)) begin failures++; $display("N=8 l=%h d=%h", l8, d8); end
    end
    for (int i = 0; i < 3000; i++) begin
      l32 = 37'({$urandom, $urandom}); #1;
      checks++; if (u128'(d32) != expect_d(u128'(l32), 32)) begin failures++; $display("N=32 l=%h d=%h", l32, d32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
