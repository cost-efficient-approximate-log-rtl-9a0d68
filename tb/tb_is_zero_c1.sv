// tb_is_zero_c1: checks the C1 zero detection against the truth table: an
// operand is non-zero when k > 0, its MSB is set or its LSB is set. All
// combinations of k, MSB and LSB for both operands (N = 8).
module tb_is_zero_c1;
  int checks = 0, failures = 0;
  logic [2:0] ak, bk; logic am, al, bm, bl; logic [15:0] d, p;

  is_zero_c1 #(.N(8)) dut (.a_k(ak), .a_msb(am), .a_lsb(al), .b_k(bk), .b_msb(bm), .b_lsb(bl),
                           .d(d), .p(p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      bit nza, nzb;
      {ak, am, al, bk, bm, bl} = 10'(v); d = 16'($urandom) | 16'h8000; #1;
      nza = (ak != 0) || am || al;
      nzb = (bk != 0) || bm || bl;
      checks++;
      if (p != ((nza && nzb) ? d : 16'h0)) begin failures++; $display("v=%0d p=%h", v, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
