// comp_mul: multiplication of two complex numbers ("Comp mul", Table I).
//
// (a.re + j a.im)(b.re + j b.im) = (a.re*b.re - a.im*b.im)
//                                 + j(a.re*b.im + a.im*b.re)
// Four real multipliers and an adder/subtractor, purely combinational. The
// result keeps full precision (2*FRAC fraction bits, 40-bit parts) so that
// the stage using it decides where to round; the enclosing stage registers
// it. Multipliers use the native '*' operator, as in the design option the
// document selects (only division is built from shifts and subtractions).
module comp_mul
  import mimo_pkg::*;
(
  input  cplx_t     a,
  input  cplx_t     b,
  output cplx_acc_t p
);

  always_comb begin
    p.re = rmul(a.re, b.re) - rmul(a.im, b.im);
    p.im = rmul(a.re, b.im) + rmul(a.im, b.re);
  end

endmodule
