// tb_lod_enc: checks the OR-tree encoder on every one-hot input and on zero,
// for N = 32 (default) and N = 16.
module tb_lod_enc;
  int checks = 0, failures = 0;
  logic [31:0] h32; logic [4:0] k32;
  logic [15:0] h16; logic [3:0] k16;

  lod_enc           dut32 (.h(h32), .k(k32));
  lod_enc #(.N(16)) dut16 (.h(h16), .k(k16));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 32; j++) begin
      h32 = 32'(1) << j; h16 = 16'(1) << (j % 16); #1;
      checks++; if (int'(k32) != j)      begin failures++; $display("N=32 j=%0d k=%0d", j, k32); end
      checks++; if (int'(k16) != j % 16) begin failures++; $display("N=16 j=%0d k=%0d", j, k16); end
    end
    h32 = 0; h16 = 0; #1;
    checks++; if (k32 != 0 || k16 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
