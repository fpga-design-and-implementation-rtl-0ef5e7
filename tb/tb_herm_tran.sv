// tb_herm_tran: random 2x3 matrices through the Hermitian transpose; each
// output element must equal the conjugate of the mirrored input element
// (with the most negative imaginary part saturating), one cycle later.
module tb_herm_tran;
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
  cplx_t a [2][3];
  cplx_t y [3][2];

  herm_tran #(.ROWS(2), .COLS(3)) dut (.*);

  initial begin
    for (int r = 0; r < 2; r++) for (int c = 0; c < 3; c++) a[r][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 3; c++) begin
          a[r][c].re = part_t'(rnd_part(19));
          a[r][c].im = (i == 7) ? PART_MIN : part_t'(rnd_part(19));
        end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid one cycle after in_valid");
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 3; c++)
          chk(y[c][r].re == a[r][c].re &&
              longint'(y[c][r].im) == clamp(-longint'(a[r][c].im)), "element");
      @(negedge clk);
      chk(!out_valid, "out_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
