// tb_twiddle_mult: every twiddle W_16^K, K = 0..15, plus the default
// instance (W_8^1), is driven with random samples and compared with the
// double-precision product x * (cos(2*pi*K/N) - j*sin(2*pi*K/N)). The trivial
// factors (K a multiple of N/4) must be exact; the others within 1 LSB.
module tb_twiddle_mult;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  localparam int NT = 16;
  cplx_t x;
  cplx_t y [NT];
  cplx_t y8;
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 0;
  always #5 clk = ~clk;

  for (genvar k = 0; k < NT; k++) begin : g_k
    twiddle_mult #(.N(NT), .K(k)) dut (.x(x), .y(y[k]));
  end
  twiddle_mult dut8 (.x(x), .y(y8));

  task automatic check(input cplx_t got, input int n, input int k);
    real c, s, er, ei, e, tol;
    c = $cos(2.0 * PI * k / n);
    s = $sin(2.0 * PI * k / n);
    er = x.re * c + x.im * s;
    ei = x.im * c - x.re * s;
    tol = ((4 * k) % n == 0) ? 0.0 : 1.0;
    e = absr(got.re - er);
    if (absr(got.im - ei) > e) e = absr(got.im - ei);
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > tol + 1e-9) begin
      failures++;
      $display("FAIL N=%0d K=%0d x=(%0d,%0d) got=(%0d,%0d) exp=(%f,%f)",
               n, k, x.re, x.im, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      x.re = sample_t'(srand(16000));
      x.im = sample_t'(srand(16000));
      if (t == 0) begin
        x.re = 16'sd10000;
        x.im = 16'sd0;
      end
      @(posedge clk);
      for (int k = 0; k < NT; k++) check(y[k], NT, k);
      check(y8, 8, 1);
    end
    $display("max error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
