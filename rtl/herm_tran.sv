// herm_tran: Hermitian transpose of a ROWS x COLS complex matrix ("TRAN",
// Table I, Fig. 10): out[c][r] = conj(in[r][c]).
//
// One pipeline stage: the result is registered on the edge that samples
// in_valid, and out_valid is high for one cycle after it. The output holds
// until the next in_valid. Conjugation saturates the one value that has no
// negative in 19 bits.
module herm_tran
  import mimo_pkg::*;
#(
  parameter int unsigned ROWS = 2,
  parameter int unsigned COLS = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a   [ROWS][COLS],
  output logic  out_valid,
  output cplx_t y   [COLS][ROWS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          y[c][r] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            y[c][r] <= cconj(a[r][c]);
    end
  end

endmodule
