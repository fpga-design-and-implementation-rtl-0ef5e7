// g_mmse: MMSE weight matrix G = (H^H H + sigma_n^2 I)^-1 H^H for a 2x2
// complex channel H (eq. (13), Fig. 5).
//
// Same chain as g_zf with the diagonal loading inserted before the inverse:
//   TRAN   H^H          1 cycle, in parallel with SIGMA  sigma_n^2 * I
//   MUL    H^H * H      3 cycles
//   ADD    + sigma_n^2 I 1 cycle
//   INV                41 cycles
//   MUL    inv * H^H    3 cycles
// out_valid is high for one cycle 49 cycles after the cycle in which
// in_valid is high. H and sigma2 (the noise variance, FRAC fraction bits) must stay
// stable until out_valid.
module g_mmse
  import mimo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t h [2][2],
  input  part_t sigma2,
  output logic  out_valid,
  output cplx_t g [2][2],
  output logic  sat
);

  cplx_t hh [2][2], gram [2][2], sig [2][2], loaded [2][2], inv [2][2];
  logic  v_tran, v_sig, v_gram, v_add, v_inv;

  herm_tran #(.ROWS(2), .COLS(2)) u_tran (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(h),
    .out_valid(v_tran), .y(hh));

  sigma u_sigma (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .sigma2(sigma2),
    .out_valid(v_sig), .y(sig));

  mul_matrix #(.ROWS(2), .INNER(2), .COLS(2)) u_gram (
    .clk(clk), .rst_n(rst_n), .in_valid(v_tran), .a(hh), .b(h),
    .out_valid(v_gram), .y(gram));

  add_matrix #(.ROWS(2), .COLS(2)) u_add (
    .clk(clk), .rst_n(rst_n), .in_valid(v_gram), .a(gram), .b(sig),
    .out_valid(v_add), .y(loaded));

  inv_matrix u_inv (
    .clk(clk), .rst_n(rst_n), .in_valid(v_add), .a(loaded),
    .out_valid(v_inv), .y(inv), .sat(sat));

  mul_matrix #(.ROWS(2), .INNER(2), .COLS(2)) u_g (
    .clk(clk), .rst_n(rst_n), .in_valid(v_inv), .a(inv), .b(hh),
    .out_valid(out_valid), .y(g));

  // SIGMA finishes together with TRAN; its result is held until ADD.
  a_sigma_in_step: assert property (@(posedge clk) disable iff (!rst_n) v_sig == v_tran)
    else $error("g_mmse: SIGMA and TRAN out of step");

endmodule
