// bindct_ref_pkg: integer reference model of the BinDCT-C7 used by the
// testbenches. It evaluates the C7 lifting equations on 32-bit integers
// (so it cannot overflow) with arithmetic right shifts, independently of
// the stage timing and word widths of the RTL, and offers a 2D transform
// and a random-number helper.
package bindct_ref_pkg;

  typedef int vec8_t [8];

  typedef struct {
    int a [8];
    int z0, h, z1, z2;
    int b [4];
    int d [4];
    int y [8];
  } ref1d_t;

  function automatic ref1d_t ref_1d(input vec8_t x);
    ref1d_t r;
    r.a[0] = x[0] + x[7];  r.a[7] = x[0] - x[7];
    r.a[1] = x[1] + x[6];  r.a[6] = x[1] - x[6];
    r.a[2] = x[2] + x[5];  r.a[5] = x[2] - x[5];
    r.a[3] = x[3] + x[4];  r.a[4] = x[3] - x[4];
    r.z0 = r.a[5] - (r.a[6] >>> 1);
    r.h  = r.a[6] + (r.z0 >>> 1);
    r.z1 = r.h + (r.z0 >>> 2);
    r.z2 = (r.z1 >>> 1) - r.z0;
    r.b[0] = r.a[0] + r.a[3];  r.b[3] = r.a[0] - r.a[3];
    r.b[1] = r.a[1] + r.a[2];  r.b[2] = r.a[1] - r.a[2];
    r.d[0] = r.a[4] + r.z2;    r.d[1] = r.a[4] - r.z2;
    r.d[3] = r.a[7] + r.z1;    r.d[2] = r.a[7] - r.z1;
    r.y[0] = r.b[0] + r.b[1];
    r.y[7] = (r.d[3] >>> 2) - r.d[0];
    r.y[1] = r.d[3] - (r.y[7] >>> 2);
    r.y[6] = (r.b[3] >>> 1) - r.b[2];
    r.y[2] = (r.y[6] >>> 1) - r.b[3];
    r.y[5] = r.d[2] + r.d[1];
    r.y[3] = r.d[2] - (r.y[5] >>> 1);
    r.y[4] = (r.y[0] >>> 1) - r.b[1];
    return r;
  endfunction

  // 2D transform: rows first, then columns. Result c[v][u]: v vertical,
  // u horizontal frequency.
  typedef int mat8_t [8][8];

  function automatic mat8_t ref_2d(input mat8_t x);
    mat8_t t, c;
    vec8_t v;
    ref1d_t r;
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 8; i++) v[i] = x[n][i];
      r = ref_1d(v);
      for (int k = 0; k < 8; k++) t[n][k] = r.y[k];
    end
    for (int u = 0; u < 8; u++) begin
      for (int i = 0; i < 8; i++) v[i] = t[i][u];
      r = ref_1d(v);
      for (int k = 0; k < 8; k++) c[k][u] = r.y[k];
    end
    return c;
  endfunction

  // Random signed value of w bits; every fourth call returns an extreme.
  function automatic int rnd_s(input int w);
    int unsigned u;
    int lo, hi;
    lo = -(1 << (w - 1));
    hi = (1 << (w - 1)) - 1;
    u  = $urandom;
    if (u[1:0] == 2'd0) return u[2] ? lo : hi;
    return int'($urandom_range(hi - lo, 0)) + lo;
  endfunction

endpackage
