// tb_comp_div: random complex divisions against an integer model of
// n*conj(d)/|d|^2 with FRAC fraction bits (truncated magnitude, clamped to
// the 19-bit range, sign applied afterwards), plus a real-valued sanity
// check of well-scaled cases, division by zero, and the 40-cycle latency.
module tb_comp_div;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0, n_sat = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cplx_t n, d, q;
  logic done, sat;

  comp_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint div_part(input longint num, input longint den, output bit s);
    longint m;
    longint mag;
    mag = (num < 0) ? -num : num;
    s = 0;
    if (den == 0) begin
      m = PMAX; s = 1;
    end else begin
      m = (mag <<< FRAC) / den;
      if (m > PMAX) begin
        m = PMAX; s = 1;
      end
    end
    return (num < 0) ? -m : m;
  endfunction

  initial begin
    longint nr, ni, dr, di, er, ei;
    bit sr, si;
    int cyc;
    n = '0; d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      nr = rnd_part(19 - (i % 8)); ni = rnd_part(19 - (i % 8));
      dr = rnd_part(19 - (i % 11)); di = rnd_part(19 - (i % 11));
      if (i % 97 == 5) begin dr = 0; di = 0; end
      n.re = part_t'(nr); n.im = part_t'(ni); d.re = part_t'(dr); d.im = part_t'(di);
      er = div_part(nr * dr + ni * di, dr * dr + di * di, sr);
      ei = div_part(ni * dr - nr * di, dr * dr + di * di, si);
      @(negedge clk) start = 1;
      @(posedge clk);
      #1 start = 0;
      n = '0; d = '0;  // operands are only read at start
      cyc = 1;
      while (!done) begin
        @(posedge clk);
        #1 cyc++;
      end
      checks++;
      if (cyc != 40) begin
        failures++;
        $display("FAIL latency %0d", cyc);
      end
      checks++;
      if (longint'(q.re) != er || longint'(q.im) != ei || sat != (sr || si)) begin
        failures++;
        $display("FAIL (%0d,%0d)/(%0d,%0d): got (%0d,%0d) sat %0b want (%0d,%0d) sat %0b",
                 nr, ni, dr, di, q.re, q.im, sat, er, ei, sr || si);
      end
      if (sat) n_sat++;
      // real-valued check when nothing clamps and |d| is not tiny
      if (!(sr || si) && (dr * dr + di * di) > 64'd1000000) begin
        rc_t rn, rd, rq;
        rn = '{to_real(nr), to_real(ni)};
        rd = '{to_real(dr), to_real(di)};
        rq = rc_div(rn, rd);
        checks++;
        if (fabs(rq.re - to_real(longint'(q.re))) > 0.002 ||
            fabs(rq.im - to_real(longint'(q.im))) > 0.002) begin
          failures++;
          $display("FAIL real check");
        end
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("clamped results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
