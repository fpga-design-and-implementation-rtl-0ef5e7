// tb_comp_mul: random complex products against a 64-bit integer model of
// (a.re*b.re - a.im*b.im) + j(a.re*b.im + a.im*b.re), including the
// extreme operands.
module tb_comp_mul;
  import mimo_pkg::*;
  import tb_util_pkg::rnd_part;

  int checks = 0, failures = 0;
  cplx_t a, b;
  cplx_acc_t p;

  comp_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ar, ai, br, bi;
    for (int i = 0; i < 3000; i++) begin
      if (i < 4) begin
        ar = (i[0]) ? -262144 : 262143; ai = -262144; br = (i[1]) ? -262144 : 262143; bi = 262143;
      end else begin
        ar = rnd_part(19); ai = rnd_part(19); br = rnd_part(19); bi = rnd_part(19);
      end
      a.re = part_t'(ar); a.im = part_t'(ai); b.re = part_t'(br); b.im = part_t'(bi);
      #1;
      checks++;
      if (longint'(p.re) != ar * br - ai * bi || longint'(p.im) != ar * bi + ai * br) begin
        failures++;
        $display("FAIL (%0d,%0d)*(%0d,%0d) -> (%0d,%0d)", ar, ai, br, bi, p.re, p.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
