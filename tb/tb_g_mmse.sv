// tb_g_mmse: MMSE weight matrices for random Rayleigh-fading 2x2 channels
// (entries CN(0,1)) and random noise variances against a floating-point
// computation of the same formula; for channels whose Gram determinant is
// above 0.25 every element must be within 3% (plus 0.03 absolute) of the
// reference. Also checks the 49-cycle latency and, for a singular channel,
// that the clamp flag rises.
module tb_g_mmse;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0, n_cmp = 0, n_sat = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, sat;
  cplx_t h [2][2];
  cplx_t g [2][2];
  part_t sigma2;

  g_mmse dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .h(h), .sigma2(sigma2),
            .out_valid(out_valid), .g(g), .sat(sat));

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

  initial begin
    rc_t hr [2][2], gr [2][2], dh;
    real s2, dg;
    int cyc;
    for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) h[r][c] = '0;
    sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
        hr[r][c] = '{gauss() * 0.7071, gauss() * 0.7071};
      if (i == 10) hr[1] = hr[0];  // rank-deficient channel
      s2 = ($urandom_range(0, 3) == 0) ? 0.0 : real'($urandom_range(1, 1000)) / 1000.0;
      sigma2 = part_t'(to_fx(s2));
      s2 = to_real(longint'(sigma2));
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        h[r][c].re = part_t'(to_fx(hr[r][c].re)); h[r][c].im = part_t'(to_fx(hr[r][c].im));
        hr[r][c] = '{to_real(longint'(h[r][c].re)), to_real(longint'(h[r][c].im))};
      end
      weight(hr, s2, gr);
      dh = rc_mul(hr[0][0], hr[1][1]);
      dh.re -= rc_mul(hr[0][1], hr[1][0]).re;
      dh.im -= rc_mul(hr[0][1], hr[1][0]).im;
      dg = dh.re * dh.re + dh.im * dh.im;  // det(H^H H)
      @(negedge clk) in_valid = 1;
      @(posedge clk);
      #1 in_valid = 0;
      cyc = 1;
      while (!out_valid) begin
        @(posedge clk);
        #1 cyc++;
        if (cyc > 200) break;
      end
      chk(cyc == 49, $sformatf("latency %0d", cyc));
      if (sat) n_sat++;
      if (i == 10) chk(sat || s2 > 0.0, "singular channel clamps");
      if (dg > 0.25 && !sat) begin
        n_cmp++;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
          chk(fabs(to_real(longint'(g[r][c].re)) - gr[r][c].re) < 0.03 + 0.03 * rc_abs(gr[r][c]) &&
              fabs(to_real(longint'(g[r][c].im)) - gr[r][c].im) < 0.03 + 0.03 * rc_abs(gr[r][c]),
              $sformatf("G element %0d%0d set %0d: got %f,%f want %f,%f", r, c, i,
                        to_real(longint'(g[r][c].re)), to_real(longint'(g[r][c].im)), gr[r][c].re, gr[r][c].im));
      end
    end
    chk(n_cmp > 100, "enough compared channels");
    $display("compared: %0d  clamped: %0d", n_cmp, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
