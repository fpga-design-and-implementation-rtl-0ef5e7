// tb_mul_matrix: a 2x2 by 2x2 and a 2x2 by 2x1 multiplier, both fed a new
// random operand pair every cycle; every product is checked three cycles
// after it entered against a 64-bit integer model (full-precision sum of
// complex products, floor to FRAC fraction bits, clamp).
module tb_mul_matrix;
  import mimo_pkg::*;
  import tb_util_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask
  cplx_t a [2][2];
  cplx_t b [2][2];
  cplx_t bv [2][1];
  cplx_t y [2][2];
  cplx_t yv [2][1];
  logic  out_valid_v;

  mul_matrix #(.ROWS(2), .INNER(2), .COLS(2)) dut (.*);
  mul_matrix #(.ROWS(2), .INNER(2), .COLS(1)) dut_v (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(bv),
    .out_valid(out_valid_v), .y(yv));

  // expected results, queued as operands enter
  longint exp_q [$];  // 12 values per product, in (row, col, re/im) order

  function automatic longint elem(input longint ar [2], input longint ai [2],
                                  input longint br [2], input longint bi [2], input bit im);
    longint s;
    s = 0;
    for (int k = 0; k < 2; k++)
      s += im ? (ar[k] * bi[k] + ai[k] * br[k]) : (ar[k] * br[k] - ai[k] * bi[k]);
    return rescale(s);
  endfunction

  int n_out = 0;

  initial begin
    for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin a[r][c] = '0; b[r][c] = '0; bv[r][0] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      longint e [2][3][2];
      @(negedge clk);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          a[r][c].re = part_t'(rnd_part(19 - (i % 5))); a[r][c].im = part_t'(rnd_part(19 - (i % 5)));
          b[r][c].re = part_t'(rnd_part(19 - (i % 7))); b[r][c].im = part_t'(rnd_part(19 - (i % 7)));
        end
      for (int r = 0; r < 2; r++) begin
        bv[r][0].re = part_t'(rnd_part(17)); bv[r][0].im = part_t'(rnd_part(17));
      end
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 3; c++)
          for (int p = 0; p < 2; p++) begin
            longint ar [2], ai [2], br [2], bi [2];
            for (int k = 0; k < 2; k++) begin
              ar[k] = a[r][k].re; ai[k] = a[r][k].im;
              br[k] = (c < 2) ? longint'(b[k][c].re) : longint'(bv[k][0].re);
              bi[k] = (c < 2) ? longint'(b[k][c].im) : longint'(bv[k][0].im);
            end
            e[r][c][p] = elem(ar, ai, br, bi, p == 1);
          end
      in_valid = (i < 399) ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (in_valid)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 3; c++)
            for (int p = 0; p < 2; p++) exp_q.push_back(e[r][c][p]);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    chk(exp_q.size() == 0, "every product came out");
    chk(n_out > 250, "enough products");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: out_valid must follow in_valid by exactly three cycles
  logic [2:0] vhist = '0;
  always @(posedge clk) begin
    vhist <= {vhist[1:0], in_valid};
    if (rst_n) begin
      if (out_valid !== vhist[2] || out_valid_v !== vhist[2]) begin
        checks++; failures++;
        $display("FAIL latency");
      end
      if (out_valid) begin
        longint e [2][3][2];
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 3; c++)
            for (int p = 0; p < 2; p++) e[r][c][p] = exp_q.pop_front();
        n_out++;
        for (int r = 0; r < 2; r++) begin
          for (int c = 0; c < 2; c++)
            chk(longint'(y[r][c].re) == e[r][c][0] && longint'(y[r][c].im) == e[r][c][1], "2x2 element");
          chk(longint'(yv[r][0].re) == e[r][2][0] && longint'(yv[r][0].im) == e[r][2][1], "2x1 element");
        end
      end
    end
  end
endmodule
