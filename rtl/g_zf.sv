// g_zf: zero-forcing weight matrix G = (H^H H)^-1 H^H for a 2x2 complex
// channel H (eq. (12), Fig. 4).
//
// Chain of stages, each started by the previous one's valid pulse:
//   TRAN   H^H                       1 cycle   (herm_tran)
//   MUL    H^H * H                   3 cycles  (mul_matrix)
//   INV    (H^H H)^-1               41 cycles  (inv_matrix)
//   MUL    (H^H H)^-1 * H^H          3 cycles  (mul_matrix)
// out_valid is high for one cycle 48 cycles after the cycle in which
// in_valid is high. H must stay stable from in_valid until out_valid (the detector's
// input register holds it); one matrix is processed at a time. `sat` is the
// inverse's clamp flag for this result.
module g_zf
  import mimo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t h [2][2],
  output logic  out_valid,
  output cplx_t g [2][2],
  output logic  sat
);

  cplx_t hh [2][2], gram [2][2], inv [2][2];
  logic  v_tran, v_gram, v_inv;

  herm_tran #(.ROWS(2), .COLS(2)) u_tran (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(h),
    .out_valid(v_tran), .y(hh));

  mul_matrix #(.ROWS(2), .INNER(2), .COLS(2)) u_gram (
    .clk(clk), .rst_n(rst_n), .in_valid(v_tran), .a(hh), .b(h),
    .out_valid(v_gram), .y(gram));

  inv_matrix u_inv (
    .clk(clk), .rst_n(rst_n), .in_valid(v_gram), .a(gram),
    .out_valid(v_inv), .y(inv), .sat(sat));

  mul_matrix #(.ROWS(2), .INNER(2), .COLS(2)) u_g (
    .clk(clk), .rst_n(rst_n), .in_valid(v_inv), .a(inv), .b(hh),
    .out_valid(out_valid), .y(g));

endmodule
