// fx_mul: fixed-point multiplier of the convolution and fully connected
// datapaths.
//
// Both operands carry FRAC = 10 fractional bits, so their integer product
// carries 2*FRAC; the product is shifted right by FRAC to bring it back to the
// common format (out = a * b >> F). The full 64-bit product is formed and then
// shifted arithmetically, so the result is truncated toward minus infinity; the
// low 32 bits are kept without saturation. Purely combinational.
module fx_mul
  import hhr_pkg::*;
(
  input  fx_t a,   // operand, Q21.10
  input  fx_t b,   // operand, Q21.10
  output fx_t p    // a*b rescaled to Q21.10
);
  logic signed [2*DW-1:0] full;

  always_comb begin
    full = (2*DW)'(a) * (2*DW)'(b);
    p    = fx_t'(full >>> FRAC);
  end
endmodule
