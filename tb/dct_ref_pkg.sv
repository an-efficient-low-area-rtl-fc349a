// dct_ref_pkg: reference arithmetic for the DCT testbenches.
//
// Everything here is computed from the definition, not from the RTL tables:
// weights are round(1024 * 0.5 * cos(k*(2j+1)*pi/16)) (k = 0 uses
// 0.5 * cos(pi/4)), rounding is floor((r + 512) / 1024) clipped at +2047, and
// the 1-D and 2-D transforms repeat the core's fixed-point steps so results
// can be compared bit for bit.  ideal_2d gives the exact real-valued
// orthonormal 2-D DCT for an accuracy check.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int round_real(real v);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else          return -int'($floor(-v + 0.5));
  endfunction

  // weight multiplying X_j (pair x_j, x_(7-j)) for coefficient k
  function automatic int ref_w(int k, int j);
    real c;
    if (k == 0) c = 0.5 * $cos(PI / 4.0);
    else        c = 0.5 * $cos(real'(k * (2 * j + 1)) * PI / 16.0);
    return round_real(1024.0 * c);
  endfunction

  // wrap an integer to 12-bit two's complement
  function automatic int wrap12(int v);
    int t;
    t = v & 32'h0000_0FFF;
    return (t >= 2048) ? t - 4096 : t;
  endfunction

  function automatic int ref_round(int r);
    int q;
    q = (r + 512) >>> 10;
    return (q > 2047) ? 2047 : q;
  endfunction

  typedef int vec8_t [8];

  function automatic int ref_1d(vec8_t x, int k);
    int s;
    s = 0;
    for (int j = 0; j < 4; j++) begin
      int xx;
      xx = (k % 2 == 1) ? wrap12(x[j] - x[7-j]) : wrap12(x[j] + x[7-j]);
      s += ref_round(xx * ref_w(k, j));
    end
    return wrap12(s);
  endfunction

  typedef int blk_t [64];   // index 8*r + c

  // Fixed-point 2-D result in the core's output order: out[8*c + k] = Z[k][c].
  function automatic blk_t ref_2d(blk_t p);
    blk_t y, z;
    vec8_t v;
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 8; i++) v[i] = p[8*r + i];
      for (int k = 0; k < 8; k++) y[8*r + k] = ref_1d(v, k);
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = y[8*i + c];
      for (int k = 0; k < 8; k++) z[8*c + k] = ref_1d(v, k);
    end
    return z;
  endfunction

  // Exact 2-D DCT value Z[u][v] (u vertical, v horizontal frequency).
  function automatic real ideal_2d(blk_t p, int u, int v);
    real s, cu, cv;
    s = 0.0;
    cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        s += real'(p[8*r + c]) * $cos(real'((2*r + 1) * u) * PI / 16.0)
                               * $cos(real'((2*c + 1) * v) * PI / 16.0);
    return 0.25 * cu * cv * s;
  endfunction

endpackage
