// tb_mul_real: random complex matrices times a random real factor, checked
// part by part against floor(x*k / 2^FRAC) clamped to 19 bits, one cycle
// after in_valid.
module tb_mul_real;
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
  cplx_t y [2][2];
  part_t k;

  mul_real #(.ROWS(2), .COLS(2)) dut (.*);

  initial begin
    for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) a[r][c] = '0;
    k = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          a[r][c].re = part_t'(rnd_part(19 - (i % 6)));
          a[r][c].im = part_t'(rnd_part(19 - (i % 6)));
        end
      k = part_t'(rnd_part(19 - (i % 9)));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid");
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++)
          chk(longint'(y[r][c].re) == rescale(longint'(a[r][c].re) * longint'(k)) &&
              longint'(y[r][c].im) == rescale(longint'(a[r][c].im) * longint'(k)), "element");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
