// tb_mitch_w: checks Mitch-w in five configurations against the arithmetic
// model: the default 32-bit Mitch-w6 with C1 signs, 16-bit unsigned w=8,
// 16-bit unsigned unbiased w=6, 32-bit C1 unbiased w=8 and 8-bit C1 w=4
// (exhaustive). It also checks statistics the document reports for uniform
// random 16-bit operands: mean error about -4.4 % for w = 8 and about +0.4 %
// for the unbiased w = 6, never a positive error for the biased design, and
// the C1 corner cases A = -1 and A = -2.
module tb_mitch_w;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a0, b0; logic [63:0] p0;
  logic [15:0] a1, b1; logic [31:0] p1;
  logic [15:0] a2, b2; logic [31:0] p2;
  logic [31:0] a3, b3; logic [63:0] p3;
  logic [7:0]  a4, b4; logic [15:0] p4;

  mitch_w dut0 (.a(a0), .b(b0), .p(p0));
  mitch_w #(.N(16), .W(8), .SIGNED(1'b0), .UNBIASED(1'b0)) dut1 (.a(a1), .b(b1), .p(p1));
  mitch_w #(.N(16), .W(6), .SIGNED(1'b0), .UNBIASED(1'b1)) dut2 (.a(a2), .b(b2), .p(p2));
  mitch_w #(.N(32), .W(8), .SIGNED(1'b1), .UNBIASED(1'b1)) dut3 (.a(a3), .b(b3), .p(p3));
  mitch_w #(.N(8),  .W(4), .SIGNED(1'b1), .UNBIASED(1'b0)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic chk(string nm, u128 got, u128 exp, u128 a, u128 b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: %h * %h -> %h, expected %h", nm, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum1 = 0.0, sum2 = 0.0;
    int  cnt = 0;
    for (int i = 0; i < 65536; i++) begin
      {a4, b4} = 16'(i); #1;
      chk("8/4/C1", u128'(p4), ref_mitch(u128'(a4), u128'(b4), 8, 4, 1'b1, 1'b0), u128'(a4), u128'(b4));
    end
    for (int i = 0; i < 20000; i++) begin
      a0 = 32'(rnd_op(32)); b0 = 32'(rnd_op(32));
      if (i % 3 == 0) a0 = -a0;
      if (i % 5 == 0) b0 = -b0;
      a3 = a0; b3 = b0;
      a1 = 16'($urandom); b1 = 16'($urandom);
      a2 = 16'($urandom); b2 = 16'($urandom);
      #1;
      chk("32/6/C1",     u128'(p0), ref_mitch(u128'(a0), u128'(b0), 32, 6, 1'b1, 1'b0), u128'(a0), u128'(b0));
      chk("16/8",        u128'(p1), ref_mitch(u128'(a1), u128'(b1), 16, 8, 1'b0, 1'b0), u128'(a1), u128'(b1));
      chk("16/6/unb",    u128'(p2), ref_mitch(u128'(a2), u128'(b2), 16, 6, 1'b0, 1'b1), u128'(a2), u128'(b2));
      chk("32/8/C1/unb", u128'(p3), ref_mitch(u128'(a3), u128'(b3), 32, 8, 1'b1, 1'b1), u128'(a3), u128'(b3));
      if (a1 != 0 && b1 != 0 && a2 != 0 && b2 != 0) begin
        automatic real e1 = real'(a1) * real'(b1), e2 = real'(a2) * real'(b2);
        sum1 += (real'(p1) - e1) / e1;
        sum2 += (real'(p2) - e2) / e2;
        cnt++;
        checks++;
        if (real'(p1) > e1) begin failures++; $display("positive error %0d*%0d", a1, b1); end
      end
    end
    $display("mean error 16/8 %f %%, unbiased 16/6 %f %%", 100.0 * sum1 / cnt, 100.0 * sum2 / cnt);
    checks++; if (sum1 / cnt > -0.038 || sum1 / cnt < -0.050) failures++;
    checks++; if (sum2 / cnt > 0.015 || sum2 / cnt < -0.015) failures++;
    // C1 corner cases: -1 acts as the neutral element of the log domain.
    // C1 corner case: -1 encodes like +1 (log-domain zero), so -1 * B is the
    // one's complement of 1 * B.
    a0 = 32'd1; b0 = 32'd1000 << 20; #1;
    begin
      automatic u128 pos = u128'(p0);
      a0 = 32'hFFFF_FFFF; #1;
      chk("-1*B", u128'(p0), ~pos & mask(64), u128'(a0), u128'(b0));
      checks++; if (pos == 0) failures++;
    end
    a0 = 32'hFFFF_FFFE; b0 = 32'd1000; #1;
    chk("-2*1000", u128'(p0), ref_mitch(u128'(a0), u128'(b0), 32, 6, 1'b1, 1'b0), u128'(a0), u128'(b0));
    a0 = 32'd0; b0 = 32'hFFFF_FF00; #1;
    chk("0*neg", u128'(p0), 0, u128'(a0), u128'(b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
