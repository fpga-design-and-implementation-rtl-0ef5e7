// tb_util_pkg: reference arithmetic shared by the detector testbenches.
//
// Integer helpers recompute the fixed-point results with 64-bit integers
// (independently of the RTL's functions), real-valued helpers give the
// floating-point values the fixed-point design approximates, and gauss()
// draws N(0,1) samples with the Box-Muller method for channel and noise.
package tb_util_pkg;

  localparam int  W    = 19;
  localparam int  FRAC = 10;
  localparam longint PMAX = (64'sd1 <<< (W-1)) - 1;
  localparam longint PMIN = -(64'sd1 <<< (W-1));

  typedef struct { real re; real im; } rc_t;

  function automatic longint clamp(input longint v);
    if (v > PMAX) return PMAX;
    if (v < PMIN) return PMIN;
    return v;
  endfunction

  // Floor division by 2^FRAC, then clamp: the rescale of a product.
  function automatic longint rescale(input longint v);
    return clamp(v >>> FRAC);
  endfunction

  function automatic longint to_fx(input real x);
    real s;
    s = x * real'(1 << FRAC);
    return clamp(longint'($floor(s + 0.5)));
  endfunction

  function automatic real to_real(input longint v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  function automatic longint rnd_part(input int range_bits);
    longint v;
    v = longint'($urandom) & ((64'sd1 <<< range_bits) - 1);
    return v - (64'sd1 <<< (range_bits - 1));
  endfunction

  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(6.283185307179586 * urand01());
  endfunction

  function automatic rc_t rc_mul(input rc_t a, input rc_t b);
    rc_t r;
    r.re = a.re * b.re - a.im * b.im;
    r.im = a.re * b.im + a.im * b.re;
    return r;
  endfunction

  function automatic rc_t rc_add(input rc_t a, input rc_t b);
    rc_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic rc_t rc_div(input rc_t a, input rc_t b);
    rc_t r;
    real d;
    d = b.re * b.re + b.im * b.im;
    r.re = (a.re * b.re + a.im * b.im) / d;
    r.im = (a.im * b.re - a.re * b.im) / d;
    return r;
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real rc_abs(input rc_t a);
    return $sqrt(a.re * a.re + a.im * a.im);
  endfunction

  // Floating-point weight matrix: (H^H H + s2 I)^-1 H^H, s2 = 0 gives ZF.
  function automatic void weight(input rc_t h [2][2], input real s2, output rc_t g [2][2]);
    rc_t hh [2][2], a [2][2], inv [2][2], det;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        hh[r][c].re = h[c][r].re;
        hh[r][c].im = -h[c][r].im;
      end
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        a[r][c] = rc_add(rc_mul(hh[r][0], h[0][c]), rc_mul(hh[r][1], h[1][c]));
        if (r == c) a[r][c].re += s2;
      end
    det = rc_mul(a[0][0], a[1][1]);
    det.re -= rc_mul(a[0][1], a[1][0]).re;
    det.im -= rc_mul(a[0][1], a[1][0]).im;
    inv[0][0] = rc_div(a[1][1], det);
    inv[1][1] = rc_div(a[0][0], det);
    inv[0][1] = rc_div('{-a[0][1].re, -a[0][1].im}, det);
    inv[1][0] = rc_div('{-a[1][0].re, -a[1][0].im}, det);
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++)
        g[r][c] = rc_add(rc_mul(inv[r][0], hh[0][c]), rc_mul(inv[r][1], hh[1][c]));
  endfunction

endpackage
