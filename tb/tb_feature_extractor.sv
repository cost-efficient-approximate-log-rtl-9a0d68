// tb_feature_extractor: checks the operand tuple {A[0], A[N-1], k, mantissa}
// against the arithmetic encoding, for N = 32, W = 4 (default, 10-bit tuples)
// and N = 16, W = 6, with signed random operands of random magnitude.
module tb_feature_extractor;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a32; logic [9:0]  t32;
  logic [15:0] a16; logic [10:0] t16;

  feature_extractor                 dut32 (.a(a32), .t(t32));
  feature_extractor #(.N(16), .W(6)) dut16 (.a(a16), .t(t16));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a32 = 32'(rnd_op(32)); a16 = 16'(rnd_op(16));
      if (i % 2 == 1) begin a32 = -a32; a16 = ~a16; end
      #1;
      checks++; if (u128'(t32) != ref_tuple(u128'(a32), 32, 4)) begin failures++; $display("32 a=%h t=%h", a32, t32); end
      checks++; if (u128'(t16) != ref_tuple(u128'(a16), 16, 6)) begin failures++; $display("16 a=%h t=%h", a16, t16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
