// tb_sigma: random noise variances; the output must be the 2x2 matrix with
// the variance on the diagonal and zeros elsewhere, one cycle later.
module tb_sigma;
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
  part_t sigma2;
  cplx_t y [2][2];

  sigma dut (.*);

  initial begin
    sigma2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      sigma2 = part_t'(rnd_part(19));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid");
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++)
          chk(y[r][c].re == ((r == c) ? sigma2 : part_t'(0)) && y[r][c].im == '0, "element");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
