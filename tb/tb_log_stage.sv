// tb_log_stage: checks one stage of the iterative multiplier (product,
// mantissa carry-out, residues, masks) against the arithmetic model, for
// N = 16 with 6 and 2 mantissa bits, and N = 8 with 4 bits exhaustively.
module tb_log_stage;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b; logic [31:0] c6, c2; logic cy6, cy2, nz6, nz2;
  logic [14:0] ra6, rb6, ma6, mb6, ra2, rb2, ma2, mb2;
  logic [7:0]  a8, b8; logic [15:0] c8; logic cy8, nz8; logic [6:0] ra8, rb8, ma8, mb8;

  log_stage                  dut6 (.a(a), .b(b), .c(c6), .carry(cy6), .res_a(ra6), .res_b(rb6),
                                   .mask_a(ma6), .mask_b(mb6), .nz(nz6));
  log_stage #(.N(16), .MB(2)) dut2 (.a(a), .b(b), .c(c2), .carry(cy2), .res_a(ra2), .res_b(rb2),
                                   .mask_a(ma2), .mask_b(mb2), .nz(nz2));
  log_stage #(.N(8), .MB(4))  dut8 (.a(a8), .b(b8), .c(c8), .carry(cy8), .res_a(ra8), .res_b(rb8),
                                   .mask_a(ma8), .mask_b(mb8), .nz(nz8));

  task automatic cmp(string nm, u128 a_, u128 b_, int n, int mb, u128 c, bit cy, u128 ra, u128 rb,
                     u128 ma, u128 mb_, bit nz);
    u128 ec, era, erb, ema, emb; bit ecy;
    ref_stage(a_, b_, n, mb, ec, ecy, era, erb, ema, emb);
    checks++;
    if (c != ec || (nz && cy != ecy) || ra != era || rb != erb || ma != ema || mb_ != emb ||
        nz != (a_ != 0 && b_ != 0)) begin
      failures++;
      if (failures < 20) $display("%s %h*%h c=%h/%h cy=%0d/%0d", nm, a_, b_, c, ec, cy, ecy);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i); #1;
      cmp("8/4", u128'(a8), u128'(b8), 8, 4, u128'(c8), cy8, u128'(ra8), u128'(rb8), u128'(ma8), u128'(mb8), nz8);
    end
    for (int i = 0; i < 5000; i++) begin
      a = 16'(rnd_op(16)); b = 16'(rnd_op(16)); #1;
      cmp("16/6", u128'(a), u128'(b), 16, 6, u128'(c6), cy6, u128'(ra6), u128'(rb6), u128'(ma6), u128'(mb6), nz6);
      cmp("16/2", u128'(a), u128'(b), 16, 2, u128'(c2), cy2, u128'(ra2), u128'(rb2), u128'(ma2), u128'(mb2), nz2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
