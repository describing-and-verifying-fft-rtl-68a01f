// tb_mul_neg_j: (re + j*im) * (-j) must equal im - j*re; random operands plus
// a fixed one, compared with integer arithmetic wrapped to the sample width.
module tb_mul_neg_j;
  import fft_pkg::*;
  cplx_t x, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mul_neg_j dut (.x(x), .y(y));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      x = (t == 0) ? cplx_t'{re: 16'sd100, im: -16'sd30} : cplx_t'({$urandom(), $urandom()});
      @(posedge clk);
      checks++;
      if (y.re != x.im || y.im != DW'(-int'(x.re))) begin
        failures++;
        $display("FAIL x=(%0d,%0d) y=(%0d,%0d)", x.re, x.im, y.re, y.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
