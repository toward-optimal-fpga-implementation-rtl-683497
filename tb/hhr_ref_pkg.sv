// hhr_ref_pkg: golden model of the recognizer network for the testbenches.
//
// Straight loop-nest evaluation of the layer equations on flat dynamic arrays,
// with the same number format as the hardware: 32-bit words, 10 fractional
// bits, each product taken at 64 bits and shifted right arithmetically by 10,
// sums wrapping at 32 bits. Layouts: feature maps [plane][row][col], conv
// weights [out][in][u][v], fc weights [out][in]. clips counts activations that
// ReLU set to zero.
package hhr_ref_pkg;
  typedef int arr_t[];

  int unsigned clips;

  function automatic int fxmul(int a, int b);
    longint p = longint'(a) * longint'(b);
    return int'(p >>> 10);
  endfunction

  function automatic int act(int s, bit relu);
    if (relu && s < 0) begin
      clips++;
      return 0;
    end
    return s;
  endfunction

  function automatic arr_t conv(const ref arr_t x, input int nin, input int isz,
                                const ref arr_t w, const ref arr_t b,
                                input int nout, input int msk);
    int osz = isz - msk + 1;
    arr_t y = new[nout * osz * osz];
    for (int p = 0; p < nout; p++)
      for (int i = 0; i < osz; i++)
        for (int j = 0; j < osz; j++) begin
          int s = b[p];
          for (int q = 0; q < nin; q++)
            for (int u = 0; u < msk; u++)
              for (int v = 0; v < msk; v++)
                s += fxmul(w[((p * nin + q) * msk + u) * msk + v],
                           x[(q * isz + i + u) * isz + j + v]);
          y[(p * osz + i) * osz + j] = act(s, 1'b1);
        end
    return y;
  endfunction

  function automatic arr_t pool(const ref arr_t x, input int npl, input int isz);
    int osz = isz / 2;
    arr_t y = new[npl * osz * osz];
    for (int p = 0; p < npl; p++)
      for (int i = 0; i < osz; i++)
        for (int j = 0; j < osz; j++) begin
          int m = x[(p * isz + 2 * i) * isz + 2 * j];
          for (int u = 0; u < 2; u++)
            for (int v = 0; v < 2; v++)
              if (x[(p * isz + 2 * i + u) * isz + 2 * j + v] > m)
                m = x[(p * isz + 2 * i + u) * isz + 2 * j + v];
          y[(p * osz + i) * osz + j] = act(m, 1'b1);
        end
    return y;
  endfunction

  function automatic arr_t fc(const ref arr_t x, input int nin, const ref arr_t w,
                              const ref arr_t b, input int nout, input bit relu);
    arr_t y = new[nout];
    for (int p = 0; p < nout; p++) begin
      int s = b[p];
      for (int q = 0; q < nin; q++) s += fxmul(w[p * nin + q], x[q]);
      y[p] = act(s, relu);
    end
    return y;
  endfunction

  // float bits -> value * 2^10, truncated toward zero, computed through a double
  function automatic int fix_of_float(logic [31:0] f);
    real v;
    if (f[30:23] == 8'h00) return 0;
    v = $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0}) * 1024.0;
    return $rtoi(v);
  endfunction

  // a value in [0,1) as single-precision bits (k / 2^16)
  function automatic logic [31:0] float_of_frac(int unsigned k);
    int e = 0;
    logic [31:0] m;
    if (k == 0) return 32'd0;
    m = k;
    while (m[16] == 1'b0) begin m = m << 1; e++; end   // normalise to 1.xxx * 2^16
    return {1'b0, 8'(127 - e), m[15:0], 7'd0};
  endfunction
endpackage
