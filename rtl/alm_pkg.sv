// alm_pkg: constants shared by the approximate log multipliers and the
// convolution accelerator.
//
// The defaults follow the main configurations: the convolution core works on
// 32-bit Q16.16 fixed-point data with the reduced multiplier RMitch-w4, and the
// stand-alone Mitch-w multiplier is the 32-bit Mitch-w6 with one's-complement
// (C1) sign handling used for the CNN experiments. The stand-alone two-stage
// iterative multiplier uses n = 16, n1 = 6, n2 = 2. The image size and the
// channel depth of the weight storage are this design's own choice (an MNIST
// sized 28x28 map and 20 input channels, as in the second LeNet layer).
package alm_pkg;
  localparam int unsigned CNN_N     = 32;  // operand width of the conv core
  localparam int unsigned CNN_W     = 4;   // RMitch-w truncation parameter
  localparam int unsigned CNN_FRAC  = 16;  // fractional bits of Q16.16
  localparam int unsigned CNN_K     = 3;   // filter size of the core
  localparam int unsigned CNN_NK    = 16;  // parallel cores (kernels)
  localparam int unsigned IMG_H_DEF = 28;
  localparam int unsigned IMG_W_DEF = 28;
  localparam int unsigned MAX_CH_DEF = 20;

  localparam int unsigned MW_N = 32;       // stand-alone Mitch-w width
  localparam int unsigned MW_W = 6;        // stand-alone Mitch-w truncation

  localparam int unsigned IT_N  = 16;      // two-stage iterative multiplier
  localparam int unsigned IT_N1 = 6;
  localparam int unsigned IT_N2 = 2;

  // Width of the encoded operand tuple {A[0], A[n-1], k, truncated mantissa}.
  function automatic int unsigned tuple_w(int unsigned n, int unsigned w);
    return $clog2(n) + w + 1;
  endfunction
endpackage
