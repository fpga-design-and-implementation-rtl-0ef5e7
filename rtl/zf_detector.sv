// zf_detector: zero-forcing detector of a destination node in the two-way
// MIMO-SDM relay system with physical-layer network coding (Fig. 2, Figs. 6 and 8, Table III).
//
// The relay broadcasts the two network-coded streams x_r over the 2x2
// channel H to this node, which receives u = H x_r / sqrt(2) + n. The
// detector computes the weight matrix G (g_zf), the decision statistics
// xhat = G u, a BPSK hard decision on each stream, and XORs the decisions
// with the node's own transmitted bits s to recover the other node's bits.
//
// Pipeline (cycles): IN 1 | g_zf 48 | MUL (G*u) 3 | Q 1 | XOR 1 = 54.
// One input set is processed at a time: in_ready is high while the detector
// is idle, an input set is accepted on a clock edge where in_valid and
// in_ready are both high, and out_valid is high for exactly one cycle 54
// cycles later. in_ready rises in that same cycle, so sets can follow each
// other every 54 cycles, the cycle count the document gives for this
// detector. Input set: H (4 complex words), u (2 complex words), s (2 bits), as in Table II. The valid/ready handshake is this
// design's choice; the document does not describe the interface protocol.
module zf_detector
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_h [2][2],  // channel from the relay to this node
  input  cplx_t      in_u [2],     // received signal vector
  input  logic [1:0] in_s,         // this node's transmitted bits
  output logic       out_valid,
  output logic [1:0] out_bits,     // recovered bits of the other node
  output logic [1:0] out_nc,       // estimated network-coded bits
  output cplx_t      out_xhat [2], // decision statistics G*u
  output logic       out_sat       // the 2x2 inverse was clamped
);

  // IN stage: input register, held while the set is processed.
  cplx_t      h_q [2][2];
  cplx_t      u_q [2][1];
  logic [1:0] s_q;
  logic       busy_q, start_q, dec_valid;

  // A set may enter in the cycle the previous result leaves.
  assign in_ready = !busy_q || dec_valid;
  wire accept = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      start_q <= 1'b0;
      s_q     <= '0;
      for (int r = 0; r < 2; r++) begin
        u_q[r][0] <= '0;
        for (int c = 0; c < 2; c++) h_q[r][c] <= '0;
      end
    end else begin
      start_q <= accept;
      if (accept) begin
        busy_q  <= 1'b1;
        h_q     <= in_h;
        s_q     <= in_s;
        for (int r = 0; r < 2; r++) u_q[r][0] <= in_u[r];
      end else if (dec_valid) begin
        busy_q  <= 1'b0;
      end
    end
  end

  cplx_t g [2][2];
  logic  g_valid, g_sat;
  g_zf u_g (
    .clk(clk), .rst_n(rst_n), .in_valid(start_q), .h(h_q),
    .out_valid(g_valid), .g(g), .sat(g_sat));

  cplx_t xh [2][1];
  logic  xh_valid;
  mul_matrix #(.ROWS(2), .INNER(2), .COLS(1)) u_gu (
    .clk(clk), .rst_n(rst_n), .in_valid(g_valid), .a(g), .b(u_q),
    .out_valid(xh_valid), .y(xh));

  cplx_t xh_vec [2];
  always_comb for (int r = 0; r < 2; r++) xh_vec[r] = xh[r][0];

  bpsk_decide u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(xh_valid), .xhat(xh_vec), .s(s_q),
    .out_valid(dec_valid), .nc_bits(out_nc), .rx_bits(out_bits));

  assign out_valid = dec_valid;
  assign out_xhat  = xh_vec;
  assign out_sat   = g_sat;

  // A result can only come out while a set is being processed.
  a_result_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !dec_valid || busy_q)
    else $error("detector: result without an input set");

endmodule
