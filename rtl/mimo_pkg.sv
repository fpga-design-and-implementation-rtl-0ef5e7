// mimo_pkg: shared types, constants and small arithmetic helpers of the
// destination-node ZF/MMSE detectors for the two-way MIMO-SDM relay system
// with physical-layer network coding.
//
// Every matrix element travels as a 38-bit complex word a+bi: the real part
// sits in bits [37:19], the imaginary part in bits [18:0], both two's
// complement (this split and the 19-bit part width follow the document).
// The position of the binary point (FRAC fractional bits) is this design's
// choice. Products of two parts are kept at full precision (2*FRAC fraction
// bits) in cplx_acc_t until a stage rescales them back with rescale_sat(),
// which drops FRAC bits (floor) and saturates to the 19-bit range.
//
// The helpers here are the "Comp conj", "Comp add", "Comp sub", "Real add",
// "Real sub" and "Real mul" operations named next to Table I; they are
// functions because each is a single line of combinational logic that the
// pipeline stages instantiate many times. Additions saturate.
package mimo_pkg;

  parameter int unsigned W    = 19;  // bits per real/imaginary part
  parameter int unsigned FRAC = 10;  // fractional bits of a part
  parameter int unsigned AW   = 2*W + 2;  // full-precision accumulator part

  typedef logic signed [W-1:0]  part_t;
  typedef logic signed [AW-1:0] acc_t;

  typedef struct packed {
    part_t re;  // bits [37:19]
    part_t im;  // bits [18:0]
  } cplx_t;

  typedef struct packed {
    acc_t re;
    acc_t im;
  } cplx_acc_t;

  localparam part_t PART_MAX = part_t'({1'b0, {(W-1){1'b1}}});
  localparam part_t PART_MIN = part_t'({1'b1, {(W-1){1'b0}}});
  localparam part_t PART_ONE = part_t'(1 << FRAC);

  // Saturate a wide value (FRAC fraction bits) to a part.
  function automatic part_t sat_part(input acc_t v);
    if (v > acc_t'(PART_MAX)) return PART_MAX;
    if (v < acc_t'(PART_MIN)) return PART_MIN;
    return part_t'(v);
  endfunction

  // Rescale a full-precision product (2*FRAC fraction bits) to a part.
  function automatic part_t rescale_sat(input acc_t v);
    return sat_part(v >>> FRAC);
  endfunction

  // True when rescale_sat() has to clamp v.
  function automatic logic rescale_clamps(input acc_t v);
    return ((v >>> FRAC) > acc_t'(PART_MAX)) || ((v >>> FRAC) < acc_t'(PART_MIN));
  endfunction

  function automatic cplx_t crescale(input cplx_acc_t v);
    cplx_t r;
    r.re = rescale_sat(v.re);
    r.im = rescale_sat(v.im);
    return r;
  endfunction

  // Real add / sub with saturation.
  function automatic part_t radd(input part_t a, input part_t b);
    return sat_part(acc_t'(a) + acc_t'(b));
  endfunction

  function automatic part_t rsub(input part_t a, input part_t b);
    return sat_part(acc_t'(a) - acc_t'(b));
  endfunction

  // Real mul: full-precision product of two parts.
  function automatic acc_t rmul(input part_t a, input part_t b);
    return acc_t'(a) * acc_t'(b);
  endfunction

  // Complex conjugate; -PART_MIN saturates to PART_MAX.
  function automatic cplx_t cconj(input cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = rsub('0, a.im);
    return r;
  endfunction

  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = radd(a.re, b.re);
    r.im = radd(a.im, b.im);
    return r;
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = rsub(a.re, b.re);
    r.im = rsub(a.im, b.im);
    return r;
  endfunction

  // Full-precision complex add / sub (no saturation needed: AW has headroom
  // for the sum of two products).
  function automatic cplx_acc_t cadd_acc(input cplx_acc_t a, input cplx_acc_t b);
    cplx_acc_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_acc_t csub_acc(input cplx_acc_t a, input cplx_acc_t b);
    cplx_acc_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

endpackage
