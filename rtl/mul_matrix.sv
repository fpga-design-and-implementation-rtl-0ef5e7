// mul_matrix: product of a ROWS x INNER and an INNER x COLS complex matrix
// ("MUL matrix", Table I, Fig. 12), y = a * b, in three pipeline cycles as
// the document gives for its MUL state:
//   cycle 1: every complex product a[r][k]*b[k][c] (Comp mul) is registered
//            at full precision;
//   cycle 2: the INNER products of each element are summed (Comp add), still
//            at full precision;
//   cycle 3: each sum is rescaled to FRAC fraction bits and saturated.
// out_valid follows in_valid by three cycles; a new operand pair may enter
// every cycle. Outputs hold between results.
module mul_matrix
  import mimo_pkg::*;
#(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned INNER = 2,
  parameter int unsigned COLS  = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a   [ROWS][INNER],
  input  cplx_t b   [INNER][COLS],
  output logic  out_valid,
  output cplx_t y   [ROWS][COLS]
);

  cplx_acc_t prod   [ROWS][COLS][INNER];
  cplx_acc_t prod_q [ROWS][COLS][INNER];
  cplx_acc_t sum_q  [ROWS][COLS];
  logic [1:0] v_q;

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      for (genvar k = 0; k < INNER; k++) begin : g_k
        comp_mul u_cm (.a(a[r][k]), .b(b[k][c]), .p(prod[r][c][k]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= '0;
      out_valid <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          sum_q[r][c] <= '0;
          y[r][c]     <= '0;
          for (int k = 0; k < INNER; k++) prod_q[r][c][k] <= '0;
        end
    end else begin
      v_q       <= {v_q[0], in_valid};
      out_valid <= v_q[1];
      if (in_valid) prod_q <= prod;
      if (v_q[0])
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            cplx_acc_t s;
            s = '0;
            for (int k = 0; k < INNER; k++) s = cadd_acc(s, prod_q[r][c][k]);
            sum_q[r][c] <= s;
          end
      if (v_q[1])
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            y[r][c] <= crescale(sum_q[r][c]);
    end
  end

endmodule
