// fp2fix: IEEE-754 single-precision to fixed-point converter.
//
// Implements FixedPoint = FloatingPoint * 2^F for the input image, which the
// host keeps as 32-bit floats in global memory. The float is unpacked into sign,
// exponent and 24-bit significand; the significand is shifted so that the
// result has FRAC fractional bits, dropping the bits below (the magnitude is
// truncated toward zero, as a C cast of v*2^F would). Zeros and subnormals give
// 0; magnitudes of 2^(31-FRAC) and above, infinities and NaNs saturate to the
// largest positive or negative code. Conversion by scaling with 2^F follows the
// accelerator's data-type scheme; the rounding and saturation rules are this
// design's. Purely combinational.
module fp2fix
  import hhr_pkg::*;
(
  input  logic [31:0] f,    // IEEE-754 binary32
  output fx_t         x     // value * 2^FRAC, Q21.10
);
  logic        sgn;
  logic [7:0]  ex;
  logic [23:0] sig;
  int          sh;          // left shift applied to the 24-bit significand
  logic [DW-1:0] mag;

  always_comb begin
    sgn = f[31];
    ex  = f[30:23];
    sig = {1'b1, f[22:0]};
    // value = sig * 2^(ex-127-23); scaled value = sig * 2^(ex-150+FRAC)
    sh  = int'(ex) - 150 + int'(FRAC);
    mag = '0;
    x   = '0;
    if (ex == 8'd0) begin
      x = '0;                                   // zero or subnormal
    end else if (ex == 8'hFF || sh > 7) begin
      // NaN, infinity or |value| >= 2^31 / 2^FRAC: saturate
      x = sgn ? fx_t'({1'b1, {(DW-1){1'b0}}}) : fx_t'({1'b0, {(DW-1){1'b1}}});
    end else begin
      if (sh >= 0) mag = DW'(sig) << sh;
      else if (sh > -24) mag = DW'(sig >> (-sh));
      else mag = '0;
      x = sgn ? -fx_t'(mag) : fx_t'(mag);
    end
  end
endmodule
