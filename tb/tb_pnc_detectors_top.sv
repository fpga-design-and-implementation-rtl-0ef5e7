// tb_pnc_detectors_top: runs both detectors of pnc_detectors_top, at their
// default sizes, on one stream of input sets (Rayleigh 2x2 channel, BPSK
// network-coded symbols, Gaussian noise; see tb_zf_detector), offering each
// set to both detectors at once and moving on when both have taken it.
//
// Checked for every set: each detector's latency (54 cycles ZF, 55 MMSE),
// out_bits = out_nc XOR s, agreement of the decisions with a floating-point
// reference on well-conditioned channels, and the recovered bits at high
// SNR. Counted, and required to happen at least once: results of each
// detector; a set held waiting because a detector was busy (the ZF detector
// takes the next set one cycle before the MMSE one is ready); a ZF inverse
// that clamps on a rank-deficient channel; the MMSE diagonal loading keeping
// that same channel's inverse from clamping.
module tb_pnc_detectors_top;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int NSETS = 1000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  cplx_t in_h [2][2];
  cplx_t in_u [2];
  logic [1:0] in_s;
  part_t in_sigma2;
  logic zf_in_valid = 0, zf_in_ready, zf_out_valid, zf_out_sat;
  logic mmse_in_valid = 0, mmse_in_ready, mmse_out_valid, mmse_out_sat;
  logic [1:0] zf_out_bits, zf_out_nc, mmse_out_bits, mmse_out_nc;
  cplx_t zf_out_xhat [2];
  cplx_t mmse_out_xhat [2];

  pnc_detectors_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NSETS * 60 * 3) @(posedge clk);
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

  longint hq_re [NSETS][2][2], hq_im [NSETS][2][2], uq_re [NSETS][2], uq_im [NSETS][2];
  longint s2q [NSETS];
  logic [1:0] own [NSETS], other [NSETS];
  bit clean [NSETS], singular [NSETS];

  function automatic void gen(input int k);
    real s2, h_re [2][2], h_im [2][2], x [2];
    own[k]      = 2'($urandom);
    other[k]    = 2'($urandom);
    singular[k] = (k % 25 == 7);
    clean[k]    = (k % 2 == 0) && !singular[k];
    s2 = singular[k] ? 0.1 : clean[k] ? 0.001 : real'($urandom_range(10, 500)) / 1000.0;
    s2q[k] = to_fx(s2);
    for (int j = 0; j < 2; j++) x[j] = (own[k][j] ^ other[k][j]) ? -1.0 : 1.0;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        h_re[r][c] = singular[k] && r == 1 ? h_re[0][c] : gauss() * 0.7071;
        h_im[r][c] = singular[k] && r == 1 ? h_im[0][c] : gauss() * 0.7071;
        hq_re[k][r][c] = to_fx(h_re[r][c]); hq_im[k][r][c] = to_fx(h_im[r][c]);
      end
    for (int r = 0; r < 2; r++) begin
      real acc_re, acc_im;
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

  int zf_acc [$], mmse_acc [$];
  int n_in = 0, zf_n = 0, mmse_n = 0, n_wait = 0, n_zf_clamp = 0, n_mmse_rescue = 0;
  int zf_err = 0, mmse_err = 0;

  initial begin
    bit zf_taken, mmse_taken;
    for (int k = 0; k < NSETS; k++) gen(k);
    for (int r = 0; r < 2; r++) begin
      in_u[r] = '0;
      for (int c = 0; c < 2; c++) in_h[r][c] = '0;
    end
    in_s = '0; in_sigma2 = '0;
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
      in_sigma2 = part_t'(s2q[n_in]);
      zf_taken = 0; mmse_taken = 0;
      zf_in_valid = 1; mmse_in_valid = 1;
      while (!(zf_taken && mmse_taken)) begin
        @(posedge clk);
        if (zf_in_valid && zf_in_ready) begin zf_taken = 1; zf_acc.push_back(cycle); end
        if (mmse_in_valid && mmse_in_ready) begin mmse_taken = 1; mmse_acc.push_back(cycle); end
        if ((zf_in_valid && !zf_in_ready) || (mmse_in_valid && !mmse_in_ready)) n_wait++;
        @(negedge clk);
        if (zf_taken) zf_in_valid = 0;
        if (mmse_taken) mmse_in_valid = 0;
      end
      n_in++;
    end
    while (zf_n < NSETS || mmse_n < NSETS) @(posedge clk);
    repeat (3) @(posedge clk);
    chk(zf_n == NSETS, "ZF results");
    chk(mmse_n == NSETS, "MMSE results");
    chk(n_wait > 0, "a set waited for a busy detector");
    chk(n_zf_clamp > 0, "ZF inverse clamped on a rank-deficient channel");
    chk(n_mmse_rescue > 0, "MMSE loading avoided the clamp");
    $display("sets %0d  zf results %0d  mmse results %0d  cycles a set waited %0d  zf clamps %0d  mmse unclamped on those %0d",
             n_in, zf_n, mmse_n, n_wait, n_zf_clamp, n_mmse_rescue);
    $display("bit errors over all sets: zf %0d  mmse %0d", zf_err, mmse_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Floating-point reference for set k; returns det(H^H H).
  function automatic real reference(input int k, input real s2, output rc_t xr [2]);
    rc_t hr [2][2], g [2][2], dh;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) hr[r][c] = '{to_real(hq_re[k][r][c]), to_real(hq_im[k][r][c])};
    weight(hr, s2, g);
    for (int r = 0; r < 2; r++)
      xr[r] = rc_add(rc_mul(g[r][0], '{to_real(uq_re[k][0]), to_real(uq_im[k][0])}),
                     rc_mul(g[r][1], '{to_real(uq_re[k][1]), to_real(uq_im[k][1])}));
    dh = rc_mul(hr[0][0], hr[1][1]);
    dh.re -= rc_mul(hr[0][1], hr[1][0]).re;
    dh.im -= rc_mul(hr[0][1], hr[1][0]).im;
    return dh.re * dh.re + dh.im * dh.im;
  endfunction

  task automatic check_out(input string tag, input int k, input int lat, input int acc,
                           input logic [1:0] bits, input logic [1:0] nc, input logic sat,
                           input real s2, inout int err);
    rc_t xr [2];
    real dg;
    dg = reference(k, s2, xr);
    chk(cycle - acc == lat, $sformatf("%s latency %0d", tag, cycle - acc));
    chk(bits == (nc ^ own[k]), $sformatf("%s out_bits = out_nc xor s", tag));
    if (bits != other[k]) err++;
    if (dg > 0.25 && !sat) begin
      for (int j = 0; j < 2; j++)
        if (fabs(xr[j].re) > 0.1) chk(nc[j] == (xr[j].re < 0.0), $sformatf("%s decision set %0d", tag, k));
      if (clean[k]) chk(bits == other[k], $sformatf("%s recovered bits set %0d", tag, k));
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && zf_out_valid) begin
      check_out("zf", zf_n, 54, zf_acc.pop_front(), zf_out_bits, zf_out_nc, zf_out_sat, 0.0, zf_err);
      // Rounding can leave a tiny nonzero determinant, so not every
      // rank-deficient channel clamps; most do.
      if (singular[zf_n] && zf_out_sat) n_zf_clamp++;
      zf_n <= zf_n + 1;
    end
    if (rst_n && mmse_out_valid) begin
      check_out("mmse", mmse_n, 55, mmse_acc.pop_front(), mmse_out_bits, mmse_out_nc, mmse_out_sat,
                to_real(s2q[mmse_n]), mmse_err);
      if (singular[mmse_n] && !mmse_out_sat) n_mmse_rescue++;
      mmse_n <= mmse_n + 1;
    end
  end
endmodule
