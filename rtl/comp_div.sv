// comp_div: division of two complex numbers ("Comp div", Table I, Fig. 17).
//
//   n / d = n * conj(d) / |d|^2
//         = (n.re*d.re + n.im*d.im) / |d|^2 + j (n.im*d.re - n.re*d.im) / |d|^2
//
// Timing (40 clock edges from the edge that samples `start` to the one that
// raises `done`):
//   edge 0      : the two numerators and |d|^2 are formed with the real
//                 multipliers (Comp conj + Comp mul) and registered as
//                 magnitudes with their signs; the numerators are pre-scaled
//                 by 2^FRAC so that the integer quotient has FRAC fraction bits
//   edges 1-19  : the real part is divided by one shared real_div
//   edges 20-38 : the imaginary part is divided by the same real_div
//   edge 39     : signs are applied, magnitudes clamp to the part range, and
//                 q is registered together with a one-cycle `done` pulse.
// Sharing one sequential divider between the two parts is this design's
// choice; it is what makes the inverse take the 41 cycles the document
// gives for it. `sat` is raised with `done` when a part had to be clamped
// (including division by zero). q holds its value until the next result.
module comp_div
  import mimo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t n,
  input  cplx_t d,
  output cplx_t q,
  output logic  done,
  output logic  sat
);

  localparam int unsigned NW = 2*W + FRAC + 1;  // |numerator| * 2^FRAC
  localparam int unsigned DW = 2*W + 1;         // |d|^2
  localparam int unsigned QW = W;               // quotient bits

  typedef enum logic [1:0] {S_IDLE, S_RE, S_IM} state_t;
  state_t state_q;

  logic [NW-1:0] num_re_q, num_im_q;
  logic          neg_re_q, neg_im_q;
  logic [DW-1:0] den_q;
  logic [QW-1:0] quot_re_q;
  logic          ovf_re_q;
  logic          go_re_q;

  // Setup arithmetic.
  acc_t num_re, num_im, den;
  always_comb begin
    num_re = rmul(n.re, d.re) + rmul(n.im, d.im);
    num_im = rmul(n.im, d.re) - rmul(n.re, d.im);
    den    = rmul(d.re, d.re) + rmul(d.im, d.im);
  end

  function automatic logic [NW-1:0] mag_scaled(input acc_t v);
    acc_t m;
    m = v[AW-1] ? -v : v;
    return NW'(m) << FRAC;
  endfunction

  // Shared real divider.
  logic          div_start, div_done, div_ovf, div_busy;
  logic [NW-1:0] div_n;
  logic [QW-1:0] div_q;

  assign div_start = go_re_q || (state_q == S_RE && div_done);
  assign div_n     = (state_q == S_RE && div_done) ? num_im_q : num_re_q;

  real_div #(.NW(NW), .DW(DW), .QW(QW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (div_n),
    .divisor  (den_q),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .ovf      (div_ovf)
  );

  // Clamp an unsigned quotient to the part range and apply the sign.
  localparam logic [QW-1:0] LIM = QW'(PART_MAX);

  function automatic part_t signed_part(input logic [QW-1:0] m, input logic neg);
    logic [QW-1:0] c;
    c = (m > LIM) ? LIM : m;
    return neg ? -part_t'(c) : part_t'(c);
  endfunction

  part_t fin_re, fin_im;
  logic  fin_sat;
  always_comb begin
    fin_re  = signed_part(quot_re_q, neg_re_q);
    fin_im  = signed_part(div_q, neg_im_q);
    fin_sat = ovf_re_q || div_ovf || (quot_re_q > LIM) || (div_q > LIM);
  end

  // A new division may only start when the previous one has finished.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) !(start && (state_q != S_IDLE || div_busy)))
    else $error("comp_div: start while busy");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      num_re_q  <= '0;
      num_im_q  <= '0;
      neg_re_q  <= 1'b0;
      neg_im_q  <= 1'b0;
      den_q     <= '0;
      quot_re_q <= '0;
      ovf_re_q  <= 1'b0;
      go_re_q   <= 1'b0;
      q         <= '0;
      done      <= 1'b0;
      sat       <= 1'b0;
    end else begin
      go_re_q <= 1'b0;
      done    <= 1'b0;
      if (start) begin
        num_re_q <= mag_scaled(num_re);
        num_im_q <= mag_scaled(num_im);
        neg_re_q <= num_re[AW-1];
        neg_im_q <= num_im[AW-1];
        den_q    <= den[DW-1:0];  // |d|^2 >= 0: the top bit is never set
        go_re_q  <= 1'b1;
        state_q  <= S_RE;
      end else if (div_done) begin
        if (state_q == S_RE) begin
          quot_re_q <= div_q;
          ovf_re_q  <= div_ovf;
          state_q   <= S_IM;
        end else if (state_q == S_IM) begin
          q.re    <= fin_re;
          q.im    <= fin_im;
          sat     <= fin_sat;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
      end
    end
  end

endmodule
