// tb_mmse_detector: end-to-end test of the MMSE destination-node detector.
//
// For each input set the test draws a Rayleigh 2x2 channel (entries
// CN(0,1)), the two nodes' BPSK bits, the network-coded bits the relay
// broadcasts, and complex Gaussian noise, and forms u = H x_r / sqrt(2) + n
// (eq. (10)). The expected decision statistics come from a floating-point
// evaluation of the weight matrix on the same quantized inputs. Checks:
//  - out_valid exactly 55 cycles after the set was accepted;
//  - with in_valid held high, one set accepted every 55 cycles;
//  - the decision statistics within 5% (+0.05) of the floating-point ones
//    for channels whose Gram determinant exceeds 0.25;
//  - the network-coded bits equal the floating-point decisions wherever
//    the decision is not marginal, and out_bits = out_nc XOR s;
//  - at high SNR on such channels, out_bits equal the other node's bits.
module tb_mmse_detector;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int NSETS = 400;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_sat;
  cplx_t in_h [2][2];
  cplx_t in_u [2];
  logic [1:0] in_s, out_bits, out_nc;
  cplx_t out_xhat [2];
  part_t sigma2;

  mmse_detector dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_h(in_h), .in_u(in_u), .in_s(in_s), .in_sigma2(sigma2),
    .out_valid(out_valid), .out_bits(out_bits), .out_nc(out_nc),
    .out_xhat(out_xhat), .out_sat(out_sat));

  always #5 clk = ~clk;

  initial begin
    repeat (NSETS * 55 * 3) @(posedge clk);
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

  // generated sets
  longint hq_re [NSETS][2][2], hq_im [NSETS][2][2], uq_re [NSETS][2], uq_im [NSETS][2];
  longint s2q [NSETS];
  logic [1:0] own [NSETS], other [NSETS];
  bit clean [NSETS];

  function automatic void gen(input int k);
    real s2, h_re [2][2], h_im [2][2], x [2];
    own[k]   = 2'($urandom);
    other[k] = 2'($urandom);
    clean[k] = (k % 2 == 0);
    s2 = clean[k] ? 0.001 : real'($urandom_range(10, 500)) / 1000.0;
    s2q[k] = to_fx(s2);
    for (int j = 0; j < 2; j++) x[j] = (own[k][j] ^ other[k][j]) ? -1.0 : 1.0;
    for (int r = 0; r < 2; r++) begin
      real acc_re, acc_im;
      for (int c = 0; c < 2; c++) begin
        h_re[r][c] = gauss() * 0.7071; h_im[r][c] = gauss() * 0.7071;
        hq_re[k][r][c] = to_fx(h_re[r][c]); hq_im[k][r][c] = to_fx(h_im[r][c]);
      end
      acc_re = gauss() * $sqrt(s2 / 2.0);
      acc_im = gauss() * $sqrt(s2 / 2.0);
      for (int c = 0; c < 2; c++) begin
        acc_re += h_re[r][c] * x[c] * 0.70710678;
        acc_im += h_im[r][c] * x[c] * 0.70710678;
      end
      uq_re[k][r] = to_fx(acc_re); uq_im[k][r] = to_fx(acc_im);
    end
  endfunction

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int acc_cycle [$];
  int n_in = 0, n_out = 0, n_b2b = 0, n_cmp = 0, n_err = 0, n_clean = 0, last_acc = -1;

  // driver
  initial begin
    for (int k = 0; k < NSETS; k++) gen(k);
    for (int r = 0; r < 2; r++) begin
      in_u[r] = '0;
      for (int c = 0; c < 2; c++) in_h[r][c] = '0;
    end
    in_s = '0; sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_in < NSETS) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++) begin
        in_u[r].re = part_t'(uq_re[n_in][r]); in_u[r].im = part_t'(uq_im[n_in][r]);
        for (int c = 0; c < 2; c++) begin
          in_h[r][c].re = part_t'(hq_re[n_in][r][c]); in_h[r][c].im = part_t'(hq_im[n_in][r][c]);
        end
      end
      in_s = own[n_in];
      sigma2 = part_t'(s2q[n_in]);
      in_valid = (n_in % 10 == 9) ? ($urandom_range(0, 7) == 0) : 1'b1;
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (last_acc >= 0 && cycle - last_acc == 55) n_b2b++;
        chk(last_acc < 0 || cycle - last_acc >= 55, "accepted before the previous set finished");
        last_acc = cycle;
        acc_cycle.push_back(cycle);
        n_in++;
      end
    end
    @(negedge clk) in_valid = 0;
    while (n_out < NSETS) @(posedge clk);
    repeat (3) @(posedge clk);
    chk(n_b2b > NSETS / 2, "back-to-back sets every 55 cycles");
    chk(n_cmp > NSETS / 4, "enough compared sets");
    chk(n_clean > NSETS / 8, "enough clean sets");
    $display("sets %0d back-to-back %0d compared %0d clean-checked %0d bit errors (all sets) %0d",
             n_out, n_b2b, n_cmp, n_clean, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      rc_t hr [2][2], g [2][2], xr [2], dh;
      real dg;
      int k;
      k = n_out;
      chk(acc_cycle.size() > 0 && cycle - acc_cycle.pop_front() == 55, "latency 55");
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) hr[r][c] = '{to_real(hq_re[k][r][c]), to_real(hq_im[k][r][c])};
      begin
        int idx;
        idx = k;
        weight(hr, to_real(s2q[idx]), g);
      end
      for (int r = 0; r < 2; r++)
        xr[r] = rc_add(rc_mul(g[r][0], '{to_real(uq_re[k][0]), to_real(uq_im[k][0])}),
                       rc_mul(g[r][1], '{to_real(uq_re[k][1]), to_real(uq_im[k][1])}));
      dh = rc_mul(hr[0][0], hr[1][1]);
      dh.re -= rc_mul(hr[0][1], hr[1][0]).re;
      dh.im -= rc_mul(hr[0][1], hr[1][0]).im;
      dg = dh.re * dh.re + dh.im * dh.im;
      chk(out_bits == (out_nc ^ own[k]), "out_bits = out_nc xor s");
      if (out_bits != other[k]) n_err++;
      if (dg > 0.25 && !out_sat) begin
        n_cmp++;
        for (int j = 0; j < 2; j++) begin
          chk(fabs(to_real(longint'(out_xhat[j].re)) - xr[j].re) < 0.05 + 0.05 * rc_abs(xr[j]) &&
              fabs(to_real(longint'(out_xhat[j].im)) - xr[j].im) < 0.05 + 0.05 * rc_abs(xr[j]),
              $sformatf("xhat %0d of set %0d: got %f,%f want %f,%f", j, k,
                        to_real(longint'(out_xhat[j].re)), to_real(longint'(out_xhat[j].im)), xr[j].re, xr[j].im));
          if (fabs(xr[j].re) > 0.1) chk(out_nc[j] == (xr[j].re < 0.0), "decision");
        end
        if (clean[k]) begin
          n_clean++;
          chk(out_bits == other[k], $sformatf("recovered bits of set %0d", k));
        end
      end
      n_out <= n_out + 1;
    end
  end
endmodule
