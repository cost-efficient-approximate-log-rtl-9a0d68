// tb_lod: checks the parallel leading-one detector against the position of
// the highest set bit found by a loop. N = 8 is tested exhaustively, N = 32
// (default) and N = 12 (not a power of two) with random values of random
// magnitude, including zero.
module tb_lod;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] z32, h32;
  logic [7:0]  z8, h8;
  logic [11:0] z12, h12;

  lod           dut32 (.z(z32), .h(h32));
  lod #(.N(8))  dut8  (.z(z8),  .h(h8));
  lod #(.N(12)) dut12 (.z(z12), .h(h12));

  function automatic u128 onehot(u128 v);
    return (v == 0) ? u128'(0) : (u128'(1) << msb_pos(v));
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      z8 = 8'(v); #1;
      checks++; if (u128'(h8) != onehot(u128'(z8))) begin failures++; $display("N=8 z=%h h=%h", z8, h8); end
    end
    for (int i = 0; i < 4000; i++) begin
      z32 = 32'(rnd_op(32)); z12 = 12'(rnd_op(12)); #1;
      checks++; if (u128'(h32) != onehot(u128'(z32))) begin failures++; $display("N=32 z=%h h=%h", z32, h32); end
      checks++; if (u128'(h12) != onehot(u128'(z12))) begin failures++; $display("N=12 z=%h h=%h", z12, h12); end
    end
    z32 = 0; #1; checks++; if (h32 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
