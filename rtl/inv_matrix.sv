// inv_matrix: inverse of a 2x2 complex matrix ("INV matrix", Table I,
// Fig. 14) in the 41 cycles the document gives for its INV state.
//
//   A = [a b; c d],  det = a*d - b*c,  A^-1 = [d -b; -c a] / det
//
// Edge 0 (the one that samples in_valid): det is formed with two Comp mul
// and a Comp sub, rescaled to FRAC fraction bits and registered together
// with the adjugate [d -b; -c a]. Edges 1-40: four comp_div units divide the
// adjugate elements by det in parallel (each 40 edges, see comp_div).
// out_valid is high for one cycle after edge 40, i.e. 41 cycles after the
// input was sampled; y holds until the next result. The block is sequential:
// a new in_valid must not arrive before out_valid. `sat` reports that some
// element (or det) had to be clamped, which happens for a (nearly)
// singular A. Computing the inverse by the adjugate and complex division is
// this design's reading of the block's function; the document does not list
// its insides.
module inv_matrix
  import mimo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a [2][2],
  output logic  out_valid,
  output cplx_t y [2][2],
  output logic  sat
);

  cplx_acc_t p_ad, p_bc;
  comp_mul u_ad (.a(a[0][0]), .b(a[1][1]), .p(p_ad));
  comp_mul u_bc (.a(a[0][1]), .b(a[1][0]), .p(p_bc));

  cplx_t det_q;
  cplx_t adj_q [2][2];
  logic  det_sat_q, go_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_q     <= '0;
      det_sat_q <= 1'b0;
      go_q      <= 1'b0;
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) adj_q[r][c] <= '0;
    end else begin
      go_q <= in_valid;
      if (in_valid) begin
        cplx_acc_t dfull;
        dfull     = csub_acc(p_ad, p_bc);
        det_q     <= crescale(dfull);
        det_sat_q <= rescale_clamps(dfull.re) || rescale_clamps(dfull.im);
        adj_q[0][0] <= a[1][1];
        adj_q[0][1] <= csub('0, a[0][1]);
        adj_q[1][0] <= csub('0, a[1][0]);
        adj_q[1][1] <= a[0][0];
      end
    end
  end

  logic [3:0] el_done, el_sat;
  for (genvar r = 0; r < 2; r++) begin : g_r
    for (genvar c = 0; c < 2; c++) begin : g_c
      comp_div u_div (
        .clk   (clk),
        .rst_n (rst_n),
        .start (go_q),
        .n     (adj_q[r][c]),
        .d     (det_q),
        .q     (y[r][c]),
        .done  (el_done[2*r+c]),
        .sat   (el_sat[2*r+c])
      );
    end
  end

  logic det_sat_hold_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) det_sat_hold_q <= 1'b0;
    else if (go_q) det_sat_hold_q <= det_sat_q;
  end

  assign out_valid = &el_done;  // the four dividers run in lockstep
  assign sat       = (|el_sat) || det_sat_hold_q;

endmodule
