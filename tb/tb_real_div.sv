// tb_real_div: random divisions (with the default widths of the complex
// divider) against integer division, covering quotient overflow and a zero
// divisor, and checking that `done` is high exactly QW = 19 cycles after the
// cycle in which `start` is high.
module tb_real_div;
  localparam int NW = 49, DW = 39, QW = 19;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NW-1:0] dividend;
  logic [DW-1:0] divisor;
  logic busy, done, ovf;
  logic [QW-1:0] quotient;
  int n_ovf = 0;

  real_div #(.NW(NW), .DW(DW), .QW(QW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned n, d, q_exp;
    bit ovf_exp;
    int cyc;
    dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      n = {$urandom, $urandom} & ((64'd1 << (NW - 1)) - 1);
      case (i % 4)
        0: d = {$urandom, $urandom} & ((64'd1 << (DW - 1)) - 1);
        1: d = n >> ($urandom_range(10, 25));      // quotient near QW bits
        2: d = longint'($urandom_range(1, 1000));  // usually overflows
        default: d = (i % 64 == 3) ? 0 : longint'($urandom) & 64'hFFFFF;
      endcase
      n >>= $urandom_range(0, 30);
      dividend = NW'(n); divisor = DW'(d);
      ovf_exp = (d == 0) || (n / d >= (64'd1 << QW));
      q_exp = ovf_exp ? ((64'd1 << QW) - 1) : n / d;
      @(negedge clk) start = 1;
      @(posedge clk);
      #1 start = 0;
      dividend = '1;  // operands are only read at start
      divisor  = '1;
      cyc = 1;  // cycles since the cycle in which start was high
      while (!done) begin
        @(posedge clk);
        #1 cyc++;
      end
      checks++;
      if (cyc != QW) begin
        failures++;
        $display("FAIL latency %0d", cyc);
      end
      checks++;
      if (quotient != QW'(q_exp) || ovf != ovf_exp) begin
        failures++;
        $display("FAIL %0d / %0d: got %0d ovf %0b, want %0d ovf %0b", n, d, quotient, ovf, q_exp, ovf_exp);
      end
      if (ovf_exp) n_ovf++;
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("overflow cases: %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
