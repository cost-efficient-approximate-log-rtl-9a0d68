// tb_mitchell_mult: checks the Mitchell log multiplier against the arithmetic
// model (N = 8 exhaustively, N = 32 randomly) and against Mitchell's error
// bounds: the product is never above the exact product and at most 11.1 %
// below it; zero operands give exactly zero.
module tb_mitchell_mult;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a32, b32; logic [63:0] p32;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  real worst = 0.0;

  mitchell_mult          dut32 (.a(a32), .b(b32), .p(p32));
  mitchell_mult #(.N(8)) dut8  (.a(a8),  .b(b8),  .p(p8));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i); #1;
      checks++;
      if (u128'(p8) != ref_mitch(u128'(a8), u128'(b8), 8, 8, 1'b0, 1'b0)) begin
        failures++; if (failures < 10) $display("N=8 %0d*%0d -> %0d", a8, b8, p8);
      end
    end
    for (int i = 0; i < 4000; i++) begin
      real ex, rel;
      a32 = 32'(rnd_op(32)); b32 = 32'(rnd_op(32));
      if (i < 20) a32 = 0;
      #1;
      ex = real'(a32) * real'(b32);
      checks++;
      if (u128'(p32) != ref_mitch(u128'(a32), u128'(b32), 32, 32, 1'b0, 1'b0)) begin
        failures++; $display("N=32 %h*%h -> %h", a32, b32, p32);
      end
      checks++;
      if (ex == 0.0) begin
        if (p32 != 0) failures++;
      end else begin
        rel = (real'(p32) - ex) / ex;
        if (rel < worst) worst = rel;
        if (rel > 1e-12 || rel < -0.1112) begin failures++; $display("bound %h*%h rel=%f", a32, b32, rel); end
      end
    end
    $display("worst relative error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
