// pnc_detectors_top: the two destination-node detector architectures of the
// two-way MIMO-SDM relay system with physical-layer network coding, side by
// side: the zero-forcing detector (54 cycles per input set) and the MMSE
// detector (55 cycles per input set).
//
// Both detectors see the same input bus (channel H, received vector u,
// own transmitted bits s); the MMSE one also takes the noise variance.
// Each has its own valid/ready handshake and its own outputs, so a set is
// offered to each independently; a test that drives both with the same
// valid sees each one accept when it is ready. See zf_detector and
// mmse_detector for the pipelines.
module pnc_detectors_top
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      in_h [2][2],
  input  cplx_t      in_u [2],
  input  logic [1:0] in_s,
  input  part_t      in_sigma2,
  // ZF detector
  input  logic       zf_in_valid,
  output logic       zf_in_ready,
  output logic       zf_out_valid,
  output logic [1:0] zf_out_bits,
  output logic [1:0] zf_out_nc,
  output cplx_t      zf_out_xhat [2],
  output logic       zf_out_sat,
  // MMSE detector
  input  logic       mmse_in_valid,
  output logic       mmse_in_ready,
  output logic       mmse_out_valid,
  output logic [1:0] mmse_out_bits,
  output logic [1:0] mmse_out_nc,
  output cplx_t      mmse_out_xhat [2],
  output logic       mmse_out_sat
);

  zf_detector u_zf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(zf_in_valid), .in_ready(zf_in_ready),
    .in_h(in_h), .in_u(in_u), .in_s(in_s),
    .out_valid(zf_out_valid), .out_bits(zf_out_bits), .out_nc(zf_out_nc),
    .out_xhat(zf_out_xhat), .out_sat(zf_out_sat));

  mmse_detector u_mmse (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mmse_in_valid), .in_ready(mmse_in_ready),
    .in_h(in_h), .in_u(in_u), .in_s(in_s), .in_sigma2(in_sigma2),
    .out_valid(mmse_out_valid), .out_bits(mmse_out_bits), .out_nc(mmse_out_nc),
    .out_xhat(mmse_out_xhat), .out_sat(mmse_out_sat));

endmodule
