// tb_error_term_calc: checks the second-stage operand: the residue when the
// first-stage mantissa sum has no carry, and (2^k - 1) - residue when it has.
module tb_error_term_calc;
  int checks = 0, failures = 0;
  logic [14:0] r, m, e; logic cy;

  error_term_calc dut (.res(r), .mask(m), .carry(cy), .e(e));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic int k = $urandom % 16;
      m  = 15'((32'(1) << k) - 1);
      r  = 15'($urandom) & m;
      cy = 1'($urandom);
      #1;
      checks++;
      if (int'(e) != (cy ? (int'(m) - int'(r)) : int'(r))) begin
        failures++; $display("r=%h m=%h cy=%0d e=%h", r, m, cy, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
