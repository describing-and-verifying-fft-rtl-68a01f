// tb_fft_equiv_top: end-to-end run of the full-size equivalence circuit with
// its default parameters (N = 16, TOL = 4). Phase 1 drives an impulse, a
// constant, every single tone and random lists in the non-overflowing range
// and checks both spectra against a double-precision DFT (2 LSB) and that
// the comparator reports equality. Phase 2 drives full-scale random lists,
// where the fixed-point networks wrap around and disagree; there the
// comparator output must match the testbench's own element-wise comparison.
// Phase 3 walks the half adder through its four input combinations.
// Mechanism counters: bit-identical spectra, spectra that differ only by
// rounding (accepted through TOL), comparator reporting a difference, and
// half-adder carry; each must occur at least once.
module tb_fft_equiv_top;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  localparam int N = 16;
  localparam int TOL = 4;
  cplx_t x [N], xr2 [N], xr22 [N];
  logic equal, ha_x, ha_y, ha_sum, ha_carry;
  int checks = 0, failures = 0;
  int n_exact = 0, n_round = 0, n_diff = 0, n_carry = 0;
  int maxdiff = 0;
  real maxerr = 0.0;
  logic clk = 0;
  always #5 clk = ~clk;

  fft_equiv_top dut (
    .x(x), .X_r2(xr2), .X_r22(xr22), .equal(equal),
    .ha_x(ha_x), .ha_y(ha_y), .ha_sum(ha_sum), .ha_carry(ha_carry)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Largest per-part difference between the two spectra.
  function automatic int spectra_diff();
    int m;
    m = 0;
    for (int k = 0; k < N; k++) begin
      if (iabs(int'(xr2[k].re) - int'(xr22[k].re)) > m) m = iabs(int'(xr2[k].re) - int'(xr22[k].re));
      if (iabs(int'(xr2[k].im) - int'(xr22[k].im)) > m) m = iabs(int'(xr2[k].im) - int'(xr22[k].im));
    end
    return m;
  endfunction

  initial begin
    ivec_t ir, ii;
    rvec_t er, ei;
    int amp;
    ha_x = 0;
    ha_y = 0;
    amp = 32768 / (2 * N) - 1;
    // phase 1: in range
    for (int t = 0; t < 3 + N + 500; t++) begin
      int d;
      for (int i = 0; i < N; i++) begin
        if (t == 0)      begin ir[i] = (i == 0) ? amp : 0; ii[i] = 0; end
        else if (t == 1) begin ir[i] = amp / 2; ii[i] = amp / 4; end
        else if (t < 3 + N) begin
          ir[i] = $rtoi($floor(amp * $cos(2.0 * PI * (((t - 3) * i) % N) / N) + 0.5));
          ii[i] = $rtoi($floor(amp * $sin(2.0 * PI * (((t - 3) * i) % N) / N) + 0.5));
        end else begin ir[i] = srand(amp); ii[i] = srand(amp); end
        x[i].re = sample_t'(ir[i]);
        x[i].im = sample_t'(ii[i]);
      end
      @(posedge clk);
      dft(N, ir, ii, er, ei);
      for (int k = 0; k < N; k++) begin
        real e;
        e = absr(xr2[k].re - er[k]);
        if (absr(xr2[k].im - ei[k]) > e) e = absr(xr2[k].im - ei[k]);
        if (absr(xr22[k].re - er[k]) > e) e = absr(xr22[k].re - er[k]);
        if (absr(xr22[k].im - ei[k]) > e) e = absr(xr22[k].im - ei[k]);
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 2.0) begin
          failures++;
          $display("FAIL t=%0d X(%0d) r2=(%0d,%0d) r22=(%0d,%0d) exp=(%f,%f)", t, k,
                   xr2[k].re, xr2[k].im, xr22[k].re, xr22[k].im, er[k], ei[k]);
        end
      end
      d = spectra_diff();
      if (d > maxdiff) maxdiff = d;
      if (d == 0) n_exact++;
      else n_round++;
      checks++;
      if (!equal) begin
        failures++;
        $display("FAIL t=%0d comparator reports a difference in range (max diff %0d)", t, d);
      end
    end
    // phase 2: full scale, wrap-around allowed
    for (int t = 0; t < 200; t++) begin
      int d;
      foreach (x[i]) x[i] = cplx_t'({$urandom(), $urandom()});
      @(posedge clk);
      d = spectra_diff();
      checks++;
      if (equal !== (d <= TOL)) begin
        failures++;
        $display("FAIL full-scale t=%0d diff=%0d equal=%b", t, d, equal);
      end
      if (!equal) n_diff++;
    end
    // phase 3: half adder
    for (int i = 0; i < 4; i++) begin
      ha_x = i[0];
      ha_y = i[1];
      @(posedge clk);
      checks++;
      if ({ha_carry, ha_sum} != 2'(int'(ha_x) + int'(ha_y))) begin
        failures++;
        $display("FAIL half adder x=%b y=%b", ha_x, ha_y);
      end
      if (ha_carry) n_carry++;
    end
    $display("max error vs DFT %f LSB, max difference between algorithms %0d LSB", maxerr, maxdiff);
    $display("mechanisms: exact=%0d rounding-only=%0d comparator-false=%0d carry=%0d",
             n_exact, n_round, n_diff, n_carry);
    if (n_exact == 0 || n_round == 0 || n_diff == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
