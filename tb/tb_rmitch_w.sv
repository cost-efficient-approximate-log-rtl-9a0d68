// tb_rmitch_w: feeds the reduced multiplier with tuples encoded by the
// reference encoder and checks that its product equals the C1 Mitch-w product
// of the original operands. N = 32, W = 4 (default) and N = 16, W = 6.
module tb_rmitch_w;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [9:0]  ta32, tb32; logic [63:0] p32;
  logic [10:0] ta16, tb16; logic [31:0] p16;

  rmitch_w                 dut32 (.ta(ta32), .tb(tb32), .p(p32));
  rmitch_w #(.N(16), .W(6)) dut16 (.ta(ta16), .tb(tb16), .p(p16));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8000; i++) begin
      automatic u128 a = rnd_op(32), b = rnd_op(32), c = rnd_op(16), d = rnd_op(16);
      if (i % 3 == 0) a = (~a + 1) & mask(32);
      if (i % 4 == 1) b = (~b + 1) & mask(32);
      if (i % 5 == 2) c = ~c & mask(16);
      if (i % 7 == 0) d = 0;
      ta32 = 10'(ref_tuple(a, 32, 4)); tb32 = 10'(ref_tuple(b, 32, 4));
      ta16 = 11'(ref_tuple(c, 16, 6)); tb16 = 11'(ref_tuple(d, 16, 6));
      #1;
      checks++; if (u128'(p32) != ref_mitch(a, b, 32, 4, 1'b1, 1'b0)) begin failures++; $display("32 %h*%h -> %h", a, b, p32); end
      checks++; if (u128'(p16) != ref_mitch(c, d, 16, 6, 1'b1, 1'b0)) begin failures++; $display("16 %h*%h -> %h", c, d, p16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
