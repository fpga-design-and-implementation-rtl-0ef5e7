// real_div: sequential unsigned divider built from shifts and two's
// complement subtractions ("Real div"; the document's chosen design option
// optimises real division this way instead of using a divider core).
//
// Computes q = floor(dividend / divisor) with QW quotient bits, one bit per
// clock, most significant first: in step i the divisor shifted left by i is
// subtracted from the running remainder and the step keeps the difference
// when it is not negative. The first step runs on the clock edge that
// samples `start`, so the quotient and a one-cycle `done` pulse appear QW
// cycles after the cycle in which `start` is high.
// If the true quotient needs more than QW bits (or divisor is zero) the
// result saturates to all ones and `ovf` is raised with `done`.
// The operands are only read on the `start` edge. A start while busy
// restarts the division.
module real_div #(
  parameter int unsigned NW = 49,  // dividend width
  parameter int unsigned DW = 39,  // divisor width
  parameter int unsigned QW = 19   // quotient width = cycles per division
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [QW-1:0] quotient,
  output logic          ovf
);

  localparam int unsigned SW = (NW > DW + QW) ? NW : DW + QW;  // work width
  localparam int unsigned CW = $clog2(QW + 1);

  logic [SW-1:0] rem_q, dsh_q;   // remainder, divisor shifted left by step
  logic [QW-1:0] q_q;
  logic [CW-1:0] step_q;         // steps still to do after the current one
  logic          sat_q;

  // One restoring step on (r, d): subtract when it does not go negative.
  logic [SW-1:0] r_in, d_in, r_nxt;
  logic [SW:0]   diff;
  logic          take;

  always_comb begin
    if (start) begin
      r_in = SW'(dividend);
      d_in = SW'(divisor) << (QW - 1);
    end else begin
      r_in = rem_q;
      d_in = dsh_q;
    end
    diff  = {1'b0, r_in} - {1'b0, d_in};   // two's complement subtraction
    take  = ~diff[SW];
    r_nxt = take ? diff[SW-1:0] : r_in;
  end

  // Quotient overflow: dividend >= divisor * 2^QW, or divisor zero.
  logic start_ovf;
  always_comb begin
    start_ovf = (divisor == '0) ||
                ({{QW{1'b0}}, SW'(dividend)} >= ({{QW{1'b0}}, SW'(divisor)} << QW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q  <= '0;
      dsh_q  <= '0;
      q_q    <= '0;
      step_q <= '0;
      sat_q  <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem_q  <= r_nxt;
        dsh_q  <= d_in >> 1;
        q_q    <= {{(QW-1){1'b0}}, take};
        step_q <= CW'(QW - 1);
        sat_q  <= start_ovf;
        busy   <= (QW > 1);
        done   <= (QW == 1);
      end else if (busy) begin
        rem_q  <= r_nxt;
        dsh_q  <= dsh_q >> 1;
        q_q    <= {q_q[QW-2:0], take};
        step_q <= step_q - 1'b1;
        if (step_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = sat_q ? {QW{1'b1}} : q_q;
  assign ovf      = sat_q;

endmodule
