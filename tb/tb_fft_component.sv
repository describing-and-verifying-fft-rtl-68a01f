// tb_fft_component: random complex pairs through the butterfly; a+b and a-b
// are recomputed with integer arithmetic wrapped to the sample width.
module tb_fft_component;
  import fft_pkg::*;
  cplx_t a, b, s, d;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fft_component dut (.a(a), .b(b), .sum(s), .diff(d));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      a = cplx_t'({$urandom(), $urandom()});
      b = cplx_t'({$urandom(), $urandom()});
      if (t == 0) begin
        a = '{re: 16'sd3, im: -16'sd7};
        b = '{re: 16'sd5, im: 16'sd2};
      end
      @(posedge clk);
      checks++;
      if (s.re != DW'(int'(a.re) + int'(b.re)) || s.im != DW'(int'(a.im) + int'(b.im)) ||
          d.re != DW'(int'(a.re) - int'(b.re)) || d.im != DW'(int'(a.im) - int'(b.im))) begin
        failures++;
        $display("FAIL a=(%0d,%0d) b=(%0d,%0d) sum=(%0d,%0d) diff=(%0d,%0d)",
                 a.re, a.im, b.re, b.im, s.re, s.im, d.re, d.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
