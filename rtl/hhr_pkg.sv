// hhr_pkg: shared types and constants of the handwritten-Hangul CNN accelerator.
//
// All feature maps, weights and biases are 32-bit two's-complement fixed-point
// numbers with FRAC = 10 fractional bits (a real value v is stored as v * 2^10).
// The 32-bit word and F = 10 are the values the accelerator was tuned for; the
// rounding of a product (truncation toward minus infinity by an arithmetic shift)
// and the absence of saturation are choices of this implementation.
// The package also holds the default network shape (four convolution / max-pool
// pairs and two fully connected layers, 64x64 input, 2,350 classes) and the
// default unroll (= memory partition) factor of each layer.
package hhr_pkg;

  localparam int unsigned DW   = 32;  // data word width
  localparam int unsigned FRAC = 10;  // fractional bits F

  typedef logic signed [DW-1:0] fx_t;

  // Network shape (defaults of the top level)
  localparam int unsigned IMG  = 64;    // input image is IMG x IMG
  localparam int unsigned N1   = 64;    // output planes of C1
  localparam int unsigned N3   = 64;    // output planes of C3
  localparam int unsigned N5   = 128;   // output planes of C5
  localparam int unsigned N7   = 256;   // output planes of C7
  localparam int unsigned N9   = 512;   // nodes of F9
  localparam int unsigned N10  = 2350;  // nodes of F10 (classes)
  localparam int unsigned M1   = 5;     // mask sizes
  localparam int unsigned M3   = 5;
  localparam int unsigned M5   = 4;
  localparam int unsigned M7   = 4;

  // Unroll factor of the innermost loop = number of memory partitions
  localparam int unsigned U1   = 1;     // C1 has a single input plane
  localparam int unsigned U3   = 64;
  localparam int unsigned U5   = 64;
  localparam int unsigned U7   = 128;
  localparam int unsigned U9   = 256;
  localparam int unsigned U10  = 512;

  // Width of an index that counts 0 .. n-1 (at least one bit)
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  function automatic fx_t relu_f(fx_t a);
    return a[DW-1] ? '0 : a;
  endfunction

  function automatic fx_t max_f(fx_t a, fx_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
