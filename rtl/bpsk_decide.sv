// bpsk_decide: the last two pipeline stages of a destination-node detector
// (Sec. II after eq. (14)).
//   Q   (1 cycle): hard BPSK decision on each decision statistic; bit 0 is
//                  sent as +1 and bit 1 as -1, so the estimated network-coded
//                  bit is the sign bit of the real part.
//   XOR (1 cycle): the node XORs the estimated network-coded bits with its
//                  own transmitted bits s to recover the other node's bits.
// out_valid is high for one cycle two cycles after the cycle in which
// in_valid is high. s must stay stable until out_valid. The document names the
// quantizer Q() and the XOR; the BPSK bit mapping is this design's choice.
module bpsk_decide
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      xhat [2],
  input  logic [1:0] s,
  output logic       out_valid,
  output logic [1:0] nc_bits,  // estimated network-coded bits
  output logic [1:0] rx_bits   // recovered bits of the other node
);

  logic q_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid   <= 1'b0;
      out_valid <= 1'b0;
      nc_bits   <= '0;
      rx_bits   <= '0;
    end else begin
      q_valid   <= in_valid;
      out_valid <= q_valid;
      if (in_valid)
        for (int k = 0; k < 2; k++) nc_bits[k] <= xhat[k].re[W-1];
      if (q_valid) rx_bits <= nc_bits ^ s;
    end
  end

endmodule
