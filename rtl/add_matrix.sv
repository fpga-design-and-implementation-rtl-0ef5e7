// add_matrix: addition of two ROWS x COLS complex matrices ("ADD",
// Table I, Fig. 13), part by part with saturation.
//
// One pipeline stage: y is registered on the edge that samples in_valid and
// out_valid is high for one cycle after it.
module add_matrix
  import mimo_pkg::*;
#(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a   [ROWS][COLS],
  input  cplx_t b   [ROWS][COLS],
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
          for (int c = 0; c < COLS; c++)
            y[r][c] <= cadd(a[r][c], b[r][c]);
    end
  end

endmodule
