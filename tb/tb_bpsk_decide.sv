// tb_bpsk_decide: random decision statistics and own bits; two cycles after
// in_valid the network-coded bits must be the signs of the real parts
// (negative -> 1) and the output bits their XOR with s.
module tb_bpsk_decide;
  import mimo_pkg::*;
  import tb_util_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t xhat [2];
  logic [1:0] s, nc_bits, rx_bits;

  bpsk_decide dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] e_nc;
    xhat[0] = '0; xhat[1] = '0; s = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        xhat[k].re = part_t'(rnd_part(19)); xhat[k].im = part_t'(rnd_part(19));
        e_nc[k] = (longint'(xhat[k].re) < 0);
      end
      s = 2'($urandom);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid) failures++;
      @(negedge clk);
      checks++;
      if (!out_valid || nc_bits != e_nc || rx_bits != (e_nc ^ s)) begin
        failures++;
        $display("FAIL nc %b want %b rx %b want %b", nc_bits, e_nc, rx_bits, e_nc ^ s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
