// sigma: forms sigma_n^2 * I_2, the diagonal loading of the MMSE weight
// matrix ("SIGMA", Table I, Fig. 15).
//
// The document describes this block as the multiplication of the noise
// variance by the 2x2 identity matrix, so it is built from the MUL real
// block applied to a constant identity matrix (1.0 on the diagonal). The
// noise variance input is a real part word with FRAC fraction bits. One
// pipeline stage, like mul_real.
module sigma
  import mimo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  part_t sigma2,
  output logic  out_valid,
  output cplx_t y [2][2]
);

  cplx_t ident [2][2];
  always_comb begin
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        ident[r][c].re = (r == c) ? PART_ONE : '0;
        ident[r][c].im = '0;
      end
  end

  mul_real #(.ROWS(2), .COLS(2)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         (ident),
    .k         (sigma2),
    .out_valid (out_valid),
    .y         (y)
  );

endmodule
