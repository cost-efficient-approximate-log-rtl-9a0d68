// tb_is_zero: checks zero forcing: the product passes unchanged unless an
// operand's encoded position and LSB are both zero, which means the operand
// is zero. All encodings and LSBs for N = 8, random data.
module tb_is_zero;
  int checks = 0, failures = 0;
  logic [2:0] ae, be; logic al, bl; logic [15:0] d, p;

  is_zero #(.N(8)) dut (.a_enc(ae), .a_lsb(al), .b_enc(be), .b_lsb(bl), .d(d), .p(p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {ae, al, be, bl} = 8'(v); d = 16'($urandom) | 16'h1; #1;
      checks++;
      if (p != (((ae == 0 && !al) || (be == 0 && !bl)) ? 16'h0 : d)) begin
        failures++; $display("ae=%0d al=%0d be=%0d bl=%0d p=%h", ae, al, be, bl, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
