// tb_mimo_pkg: checks the fixed-point helpers of mimo_pkg (saturating
// rescale, conjugate, add, subtract, real multiply) against a 64-bit
// integer model on random and corner-case operands.
module tb_mimo_pkg;
  import mimo_pkg::*;
  import tb_util_pkg::clamp;
  import tb_util_pkg::rescale;
  import tb_util_pkg::rnd_part;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t a, b, r;
    longint ar, ai, br, bi, p;
    // corner cases
    chk(sat_part(acc_t'(300000)) == PART_MAX, "sat high");
    chk(sat_part(-acc_t'(300000)) == PART_MIN, "sat low");
    a.re = PART_MIN; a.im = PART_MIN;
    r = cconj(a);
    chk(r.im == PART_MAX && r.re == PART_MIN, "conj of most negative");
    chk(PART_ONE == part_t'(1024), "one");
    for (int i = 0; i < 2000; i++) begin
      ar = rnd_part(19); ai = rnd_part(19); br = rnd_part(19); bi = rnd_part(19);
      a.re = part_t'(ar); a.im = part_t'(ai); b.re = part_t'(br); b.im = part_t'(bi);
      r = cadd(a, b);
      chk(longint'(r.re) == clamp(ar + br) && longint'(r.im) == clamp(ai + bi), "cadd");
      r = csub(a, b);
      chk(longint'(r.re) == clamp(ar - br) && longint'(r.im) == clamp(ai - bi), "csub");
      r = cconj(a);
      chk(longint'(r.re) == ar && longint'(r.im) == clamp(-ai), "cconj");
      p = longint'(rmul(a.re, b.re));
      chk(p == ar * br, "rmul");
      chk(longint'(rescale_sat(rmul(a.re, b.re))) == rescale(ar * br), "rescale_sat");
      chk(rescale_clamps(rmul(a.re, b.re)) == (rescale(ar * br) != ((ar * br) >>> 10)),
          "rescale_clamps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
