// mul_real: multiplication of a ROWS x COLS complex matrix by a real number
// ("MUL real", Table I, Fig. 11): y[r][c] = k * a[r][c].
//
// Each part is multiplied by k at full precision, rescaled to FRAC fraction
// bits (floor) and saturated. One pipeline stage: the result is registered
// on the edge that samples in_valid and out_valid follows one cycle later.
module mul_real
  import mimo_pkg::*;
#(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a   [ROWS][COLS],
  input  part_t k,
  output logic  out_valid,
  output cplx_t y   [ROWS][COLS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          y[r][c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            y[r][c].re <= rescale_sat(rmul(a[r][c].re, k));
            y[r][c].im <= rescale_sat(rmul(a[r][c].im, k));
          end
    end
  end

endmodule
