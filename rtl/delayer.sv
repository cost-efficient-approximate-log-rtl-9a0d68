// delayer: fixed-length delay line that returns the previous input channel's
// partial output map to the first adder row of the convolution core.
//
// It is a circular buffer of DEPTH words with a single pointer: on every
// enabled cycle the word at the pointer is presented on dout (the value
// written DEPTH enabled cycles earlier) and replaced by din, and the pointer
// advances. The core uses DEPTH = H*W - (K-1)*(W+1), the distance in input
// pixels between the cycle that completes a window and the cycle that starts
// the same window in the next channel. Contents are not reset; the core
// ignores dout while the first channel is processed. dout is combinational
// from the buffer, din is written on the clock edge.
module delayer #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 726,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ptr <= '0;
    else if (en)         ptr <= (ptr == PW'(DEPTH - 1)) ? '0 : ptr + PW'(1);
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end
endmodule
