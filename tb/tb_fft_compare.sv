// tb_fft_compare: pairs of 4-element lists that are identical or differ in
// one random part by -3..3 LSB. The default comparator (TOL = 0) must report
// equality only for identical lists; a TOL = 2 instance must accept
// differences up to 2 LSB. The expectation is formed in the testbench from
// the injected difference.
module tb_fft_compare;
  import fft_pkg::*;
  localparam int N = 4;
  cplx_t a [N], b [N];
  logic eq0, eq2;
  int checks = 0, failures = 0;
  int seen_ne = 0, seen_tol = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fft_compare dut0 (.a(a), .b(b), .equal(eq0));
  fft_compare #(.N(N), .TOL(2)) dut2 (.a(a), .b(b), .equal(eq2));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int d, idx, part;
      foreach (a[i]) a[i] = cplx_t'({$urandom(), $urandom()});
      b = a;
      d = (t % 3 == 0) ? 0 : int'($urandom_range(6, 0)) - 3;
      idx = int'($urandom_range(N - 1, 0));
      part = int'($urandom_range(1, 0));
      if (part == 0) b[idx].re = a[idx].re + sample_t'(d);
      else           b[idx].im = a[idx].im + sample_t'(d);
      @(posedge clk);
      checks += 2;
      if (eq0 !== (d == 0)) begin
        failures++;
        $display("FAIL TOL=0 d=%0d equal=%b", d, eq0);
      end
      if (eq2 !== (d >= -2 && d <= 2)) begin
        failures++;
        $display("FAIL TOL=2 d=%0d equal=%b", d, eq2);
      end
      if (!eq0) seen_ne++;
      if (eq2 && d != 0) seen_tol++;
    end
    if (seen_ne == 0 || seen_tol == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
