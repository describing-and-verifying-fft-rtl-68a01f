// tb_bit_reversal: random lists through the default (N=8) permutation and a
// N=16 one; output position rev(i) must hold input item i, with rev()
// computed bit by bit in the testbench. The N=8 order is also checked
// against the listed sequence 0,4,2,6,1,5,3,7.
module tb_bit_reversal;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  cplx_t x8 [8], y8 [8];
  cplx_t x16 [16], y16 [16];
  int checks = 0, failures = 0;
  int order8 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
  logic clk = 0;
  always #5 clk = ~clk;

  bit_reversal dut8 (.x(x8), .y(y8));
  bit_reversal #(.N(16)) dut16 (.x(x16), .y(y16));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      foreach (x8[i]) x8[i] = cplx_t'({$urandom(), $urandom()});
      foreach (x16[i]) x16[i] = cplx_t'({$urandom(), $urandom()});
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (y8[rev(i, 3)] != x8[i] || y8[i] != x8[order8[i]]) begin
          failures++;
          $display("FAIL N=8 i=%0d", i);
        end
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (y16[rev(i, 4)] != x16[i]) begin
          failures++;
          $display("FAIL N=16 i=%0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
