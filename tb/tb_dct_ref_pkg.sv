// tb_dct_ref_pkg: double-precision reference model for the testbenches.
// Orthonormal 8x8 DCT-II: X[u][v] = c(u)c(v)/4 * sum_ij x[i][j]
// cos((2i+1)u pi/16) cos((2j+1)v pi/16), c(0) = 1/sqrt(2), c(k>0) = 1; its
// inverse; the reordered index R = (0,4,2,6,1,5,3,7) used at the processor
// ports; and the pseudo-random generator of the IEEE 1180-1990 IDCT
// accuracy test (a 32-bit linear congruential generator).
package tb_dct_ref_pkg;

  typedef real   rblk_t [64];
  typedef int    iblk_t [64];

  localparam real PI = 3.14159265358979323846;

  function automatic int reorder(input int p);
    int r [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    return r[p];
  endfunction

  function automatic real cosk(input int n, input int k);
    real c;
    c = $cos((2.0 * n + 1.0) * k * PI / 16.0);
    if (k == 0) c = c / $sqrt(2.0);
    return c / 2.0;
  endfunction

  // forward 2-D DCT of x[i*8+j], result X[u*8+v]
  function automatic rblk_t fdct(input iblk_t x);
    rblk_t t, r;
    for (int i = 0; i < 8; i++)
      for (int v = 0; v < 8; v++) begin
        t[i*8+v] = 0.0;
        for (int j = 0; j < 8; j++) t[i*8+v] += cosk(j, v) * x[i*8+j];
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        r[u*8+v] = 0.0;
        for (int i = 0; i < 8; i++) r[u*8+v] += cosk(i, u) * t[i*8+v];
      end
    return r;
  endfunction

  // inverse 2-D DCT of X[u*8+v], result x[i*8+j]
  function automatic rblk_t idct(input iblk_t c);
    rblk_t t, r;
    for (int u = 0; u < 8; u++)
      for (int j = 0; j < 8; j++) begin
        t[u*8+j] = 0.0;
        for (int v = 0; v < 8; v++) t[u*8+j] += cosk(j, v) * c[u*8+v];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        r[i*8+j] = 0.0;
        for (int u = 0; u < 8; u++) r[i*8+j] += cosk(i, u) * t[u*8+j];
      end
    return r;
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // IEEE 1180 generator: returns an integer in [-l, h]
  class ieee_rng;
    int unsigned randx = 1;
    function int next(input int l, input int h);
      int unsigned i;
      real x;
      randx = randx * 1103515245 + 12345;
      i = randx & 32'h7ffffffe;
      x = real'(i) / real'(32'h7fffffff);
      x = x * (l + h + 1);
      return int'($floor(x)) - l;
    endfunction
  endclass

endpackage
