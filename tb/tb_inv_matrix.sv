// tb_inv_matrix: 2x2 complex inverses of random matrices (general ones and
// Gram matrices H^H H as the detectors produce them) against a 64-bit
// integer model of the adjugate / determinant computation, plus a
// real-valued check that A * A^-1 is close to I for well-conditioned
// inputs, the clamp flag for near-singular inputs, and the 41-cycle latency.
module tb_inv_matrix;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0, n_sat = 0, n_real = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, sat;
  cplx_t a [2][2];
  cplx_t y [2][2];

  inv_matrix dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic longint div_part(input longint num, input longint den, inout bit s);
    longint m, mag;
    mag = (num < 0) ? -num : num;
    if (den == 0) begin
      m = PMAX; s = 1;
    end else begin
      m = (mag <<< FRAC) / den;
      if (m > PMAX) begin m = PMAX; s = 1; end
    end
    return (num < 0) ? -m : m;
  endfunction

  initial begin
    longint ar [2][2], ai [2][2], dr, di, fr, fi, nr, ni, er [2][2], ei [2][2];
    bit s;
    int cyc;
    for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) a[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      if (i % 2 == 0) begin
        // Gram matrix of a random channel, computed in real arithmetic
        rc_t h [2][2], g;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
          h[r][c] = '{gauss() * 0.7071, gauss() * 0.7071};
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
          g = rc_add(rc_mul('{h[0][r].re, -h[0][r].im}, h[0][c]),
                     rc_mul('{h[1][r].re, -h[1][r].im}, h[1][c]));
          ar[r][c] = to_fx(g.re); ai[r][c] = to_fx(g.im);
        end
        if (i % 50 == 0) begin  // make it singular
          ar[1][1] = 0; ai[1][1] = 0; ar[1][0] = 0; ai[1][0] = 0;
        end
      end else begin
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
          ar[r][c] = rnd_part(14 + (i % 5)); ai[r][c] = rnd_part(14 + (i % 5));
        end
      end
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        a[r][c].re = part_t'(ar[r][c]); a[r][c].im = part_t'(ai[r][c]);
      end
      // integer model
      fr = ar[0][0] * ar[1][1] - ai[0][0] * ai[1][1] - (ar[0][1] * ar[1][0] - ai[0][1] * ai[1][0]);
      fi = ar[0][0] * ai[1][1] + ai[0][0] * ar[1][1] - (ar[0][1] * ai[1][0] + ai[0][1] * ar[1][0]);
      s = (rescale(fr) != (fr >>> FRAC)) || (rescale(fi) != (fi >>> FRAC));
      dr = rescale(fr); di = rescale(fi);
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        // adjugate element
        if (r == c) begin
          nr = ar[1-r][1-c]; ni = ai[1-r][1-c];
        end else begin
          nr = clamp(-ar[r][c]); ni = clamp(-ai[r][c]);
        end
        er[r][c] = div_part(nr * dr + ni * di, dr * dr + di * di, s);
        ei[r][c] = div_part(ni * dr - nr * di, dr * dr + di * di, s);
      end
      @(negedge clk) in_valid = 1;
      @(posedge clk);
      #1 in_valid = 0;
      cyc = 1;
      while (!out_valid) begin
        @(posedge clk);
        #1 cyc++;
        if (cyc > 100) break;
      end
      chk(cyc == 41, $sformatf("latency %0d", cyc));
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
        chk(longint'(y[r][c].re) == er[r][c] && longint'(y[r][c].im) == ei[r][c],
            $sformatf("element %0d%0d of set %0d", r, c, i));
      chk(sat == s, "clamp flag");
      if (sat) n_sat++;
      // A * A^-1 ~ I when det is comfortably away from zero
      if (!s && (dr * dr + di * di) > (64'sd1 <<< (2 * FRAC))) begin
        n_real++;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
          rc_t acc;
          acc = '{0.0, 0.0};
          for (int k = 0; k < 2; k++)
            acc = rc_add(acc, rc_mul('{to_real(ar[r][k]), to_real(ai[r][k])},
                                     '{to_real(longint'(y[k][c].re)), to_real(longint'(y[k][c].im))}));
          chk(fabs(acc.re - ((r == c) ? 1.0 : 0.0)) < 0.05 && fabs(acc.im) < 0.05, "A*inv(A) = I");
        end
      end
    end
    chk(n_sat > 0, "clamping seen");
    chk(n_real > 50, "enough well-conditioned cases");
    $display("clamped: %0d  real-checked: %0d", n_sat, n_real);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
