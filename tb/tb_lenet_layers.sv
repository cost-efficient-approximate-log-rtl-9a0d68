// tb_lenet_layers: runs the two convolution layers of the MNIST LeNet
// through the accelerator, each on an accelerator instance sized for it:
//   conv1: 28x28x1 input, 20 kernels of 5x5 -> 24x24x20, in 10 passes of 2 cores
//   conv2: 12x12x20 input, 50 kernels of 5x5 -> 8x8x50, in 25 passes of 2 cores
// The layer shapes are those of the Caffe LeNet; the 5x5 filter size needs
// K = 5 instead of the core's default 3, and each layer needs its own map
// size, so the accelerator is instantiated with those parameters. Data are
// random Q16.16 values, not the trained network, so this checks that the
// hardware computes the layers exactly as the RMitch-w4 arithmetic model
// does; it does not measure classification accuracy.
// Each layer runner (lenet_layer_run) checks all outputs and their cycle;
// this testbench fails if either layer is not finished, if either saw no
// input stall, or on any mismatch.
module tb_lenet_layers;
  logic clk = 0, go1 = 0, go2 = 0;
  logic done1, done2;
  int c1, f1, s1, c2, f2, s2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lenet_layer_run #(.K(5), .H(28), .WD(28), .CH(1),  .NKER(20), .NK(2)) u_conv1 (
    .clk, .go(go1), .done(done1), .checks(c1), .failures(f1), .stalls(s1));
  lenet_layer_run #(.K(5), .H(12), .WD(12), .CH(20), .NKER(50), .NK(2)) u_conv2 (
    .clk, .go(go2), .done(done2), .checks(c2), .failures(f2), .stalls(s2));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    go1 = 1; @(negedge clk); go1 = 0;
    wait (done1);
    $display("conv1: %0d checks, %0d failures, %0d stall cycles", c1, f1, s1);
    go2 = 1; @(negedge clk); go2 = 0;
    wait (done2);
    $display("conv2: %0d checks, %0d failures, %0d stall cycles", c2, f2, s2);
    checks = c1 + c2 + 2;
    failures = f1 + f2;
    if (s1 == 0) failures++;
    if (s2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
