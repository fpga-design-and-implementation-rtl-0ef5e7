// tb_pnc_stream: throughput run of pnc_detectors_top at its default sizes,
// the streaming workload of the evaluation (random input sets, flat
// Rayleigh fading, BPSK, the same SNR at every node).
//
// Each detector gets its own never-ending stream: in_valid stays high and a
// fresh random set (channel, noise, bits) is presented as soon as the
// previous one is accepted. Over a window of CYCLES clock cycles the test
// counts the sets each detector accepted and requires the number the cycle
// counts of the design give: one per 54 cycles (ZF) and one per 55 (MMSE),
// i.e. 230/54 and 249/55 input bits per clock. At this SNR (Es/N0 = 20 dB)
// and on channels with det(H^H H) > 0.25 the recovered bits must equal the
// other node's bits.
//
// The detectors share one input bus in pnc_detectors_top, so the two streams
// are run one after the other, each while the other detector is idle.
module tb_pnc_stream;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  localparam int CYCLES = 55 * 2000;
  localparam real S2 = 0.01;

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
    repeat (CYCLES * 3) @(posedge clk);
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

  // the set on the bus, and what each detector should recover from it
  logic [1:0] other_q [$];
  bit         good_q [$];
  int n_good = 0, n_err_all = 0;

  task automatic new_set();
    real h_re [2][2], h_im [2][2], x [2], dre, dim;
    logic [1:0] own, other;
    own = 2'($urandom);
    other = 2'($urandom);
    for (int j = 0; j < 2; j++) x[j] = (own[j] ^ other[j]) ? -1.0 : 1.0;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        h_re[r][c] = gauss() * 0.7071; h_im[r][c] = gauss() * 0.7071;
        in_h[r][c].re = part_t'(to_fx(h_re[r][c])); in_h[r][c].im = part_t'(to_fx(h_im[r][c]));
      end
    for (int r = 0; r < 2; r++) begin
      real ar, ai;
      ar = gauss() * $sqrt(S2 / 2.0);
      ai = gauss() * $sqrt(S2 / 2.0);
      for (int c = 0; c < 2; c++) begin
        ar += h_re[r][c] * x[c] * 0.70710678;
        ai += h_im[r][c] * x[c] * 0.70710678;
      end
      in_u[r].re = part_t'(to_fx(ar)); in_u[r].im = part_t'(to_fx(ai));
    end
    dre = h_re[0][0] * h_re[1][1] - h_im[0][0] * h_im[1][1] - h_re[0][1] * h_re[1][0] + h_im[0][1] * h_im[1][0];
    dim = h_re[0][0] * h_im[1][1] + h_im[0][0] * h_re[1][1] - h_re[0][1] * h_im[1][0] - h_im[0][1] * h_re[1][0];
    in_s = own;
    other_q.push_back(other);
    good_q.push_back((dre * dre + dim * dim) > 0.25);
  endtask

  // Stream sets into one detector for CYCLES cycles; returns sets accepted.
  task automatic stream(input bit mmse, output int n_acc);
    n_acc = 0;
    other_q.delete();
    good_q.delete();
    @(negedge clk);
    new_set();
    if (mmse) mmse_in_valid = 1; else zf_in_valid = 1;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk);
      if (mmse ? mmse_in_ready : zf_in_ready) begin
        n_acc++;
        @(negedge clk);
        new_set();
      end else begin
        @(negedge clk);
      end
    end
    zf_in_valid = 0; mmse_in_valid = 0;
    repeat (60) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && (zf_out_valid || mmse_out_valid)) begin
      logic [1:0] other, bits;
      bit good;
      other = other_q.pop_front();
      good = good_q.pop_front();
      bits = zf_out_valid ? zf_out_bits : mmse_out_bits;
      if (bits != other) n_err_all++;
      if (good) begin
        n_good++;
        chk(bits == other, "recovered bits on a well-conditioned channel");
      end
    end
  end

  initial begin
    int n_zf, n_mmse;
    for (int r = 0; r < 2; r++) begin
      in_u[r] = '0;
      for (int c = 0; c < 2; c++) in_h[r][c] = '0;
    end
    in_s = '0;
    in_sigma2 = part_t'(to_fx(S2));
    repeat (3) @(posedge clk);
    rst_n = 1;
    stream(1'b0, n_zf);
    stream(1'b1, n_mmse);
    // the first set is accepted in the first cycle of the window
    chk(n_zf == (CYCLES - 1) / 54 + 1, $sformatf("ZF sets in window: %0d", n_zf));
    chk(n_mmse == (CYCLES - 1) / 55 + 1, $sformatf("MMSE sets in window: %0d", n_mmse));
    chk(n_good > (n_zf + n_mmse) / 2, "enough well-conditioned sets");
    $display("window %0d cycles: ZF %0d sets (%0.3f input bits/cycle), MMSE %0d sets (%0.3f input bits/cycle)",
             CYCLES, n_zf, 230.0 * n_zf / CYCLES, n_mmse, 249.0 * n_mmse / CYCLES);
    $display("bit errors over all %0d sets: %0d", n_zf + n_mmse, n_err_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
