// dct_ref_pkg: floating-point reference model of the 8x8 DCT used by the
// testbenches (the behavioural "DCT_BEH" role of the verification setup).
// dct1d computes the orthonormal 8-point DCT
//   y(0) = 1/sqrt(8) * sum x(m),  y(k) = 1/2 * sum x(m) cos((2m+1)k*pi/16),
// dct2d applies it to the rows and then to the columns of a block held in
// row order, aan_scale gives the factor s(k) that links the raw AAN
// butterfly output sa(k) to y(k) = sa(k) * s(k), and round12 rounds a real result to the nearest integer and
// clips it to the 12-bit two's complement range of the core output.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef real vec8_t [8];
  typedef int  blk_t [64];

  function automatic vec8_t dct1d(input vec8_t x);
    vec8_t y;
    for (int k = 0; k < 8; k++) begin
      real acc = 0.0;
      for (int m = 0; m < 8; m++) acc += x[m] * $cos((2.0 * m + 1.0) * k * PI / 16.0);
      y[k] = (k == 0) ? acc / $sqrt(8.0) : acc / 2.0;
    end
    return y;
  endfunction

  // AAN output scale factor s(k): y(k) = sa(k) * s(k)
  function automatic real aan_scale(input int k);
    return (k == 0) ? 0.5 / $sqrt(2.0) : 0.25 / $cos(k * PI / 16.0);
  endfunction

  function automatic int round12(input real v);
    int r;
    r = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  // Real-valued 2-D DCT of a block of integers in row order.
  function automatic void dct2d(input blk_t x, output real y [64]);
    vec8_t v, r;
    real   tmp [64];
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = real'(x[8*i+j]);
      r = dct1d(v);
      for (int j = 0; j < 8; j++) tmp[8*i+j] = r[j];
    end
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) v[i] = tmp[8*i+j];
      r = dct1d(v);
      for (int i = 0; i < 8; i++) y[8*i+j] = r[i];
    end
  endfunction

endpackage
