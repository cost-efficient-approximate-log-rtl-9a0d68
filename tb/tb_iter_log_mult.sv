// tb_iter_log_mult: checks the two-stage iterative log multiplier against the
// arithmetic model for n = 16, n1 = 6, n2 = 2 (default), n = 8, n1 = 4
// (exhaustive) and n = 32, n1 = 6. It also checks the relative-error
// statistics the document tabulates for uniform random operands with n2 = 2:
// for n = 16, n1 = 6 the error rerr = (exact - approx) / exact stays within
// [-2.5 %, 11.1 %] and its mean magnitude is about 0.46 %.
module tb_iter_log_mult;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b; logic [31:0] p;
  logic [7:0]  a8, b8; logic [15:0] p8;
  logic [31:0] a32, b32; logic [63:0] p32;

  iter_log_mult                         dut  (.a(a), .b(b), .p(p));
  iter_log_mult #(.N(8), .N1(4), .N2(2))  dut8 (.a(a8), .b(b8), .p(p8));
  iter_log_mult #(.N(32), .N1(6), .N2(2)) dut32 (.a(a32), .b(b32), .p(p32));

  initial begin : watchdog
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sabs = 0.0, rmin = 1.0, rmax = -1.0;
    int  cnt = 0;
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i); #1;
      checks++;
      if (u128'(p8) != ref_iter(u128'(a8), u128'(b8), 8, 4, 2)) begin
        failures++; if (failures < 20) $display("8: %0d*%0d -> %0d", a8, b8, p8);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      a32 = 32'(rnd_op(32)); b32 = 32'(rnd_op(32));
      #1;
      checks++;
      if (u128'(p) != ref_iter(u128'(a), u128'(b), 16, 6, 2)) begin
        failures++; if (failures < 20) $display("16: %0d*%0d -> %0d", a, b, p);
      end
      checks++;
      if (u128'(p32) != ref_iter(u128'(a32), u128'(b32), 32, 6, 2)) begin
        failures++; if (failures < 20) $display("32: %h*%h -> %h", a32, b32, p32);
      end
      if (a != 0 && b != 0) begin
        automatic real ex = real'(a) * real'(b);
        automatic real re = (ex - real'(p)) / ex;
        sabs += (re < 0.0) ? -re : re;
        if (re < rmin) rmin = re;
        if (re > rmax) rmax = re;
        cnt++;
      end
    end
    $display("n=16 n1=6: rerr min %f %% max %f %% mean |rerr| %f %%",
             100.0 * rmin, 100.0 * rmax, 100.0 * sabs / cnt);
    checks++; if (rmin < -0.0251 || rmax > 0.1112) failures++;
    checks++; if (sabs / cnt > 0.0075 || sabs / cnt < 0.002) failures++;
    a = 0; b = 16'd1234; #1; checks++; if (p != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
