// tb_radix22_fft: the radix-2^2 DIF network at N = 4, 16 and 64
// (the default is 16) against a direct double-precision DFT. Stimuli are an
// impulse, a constant, single tones and random lists scaled so that no
// intermediate value can overflow. The N=4 network has only trivial
// twiddles and must be exact; larger sizes must stay within the listed LSB
// tolerance per part. A constant input must produce energy in X(0) only and
// a tone at bin b in X(b) only, which checks the output order.
module tb_radix22_fft;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  localparam int NA = 4, NB = 16, NC = 64;
  localparam real TOLA = 0.000001, TOLB = 2.0, TOLC = 8.0;
  cplx_t xa [NA], ya [NA];
  cplx_t xb [NB], yb [NB];
  cplx_t xc [NC], yc [NC];
  int checks = 0, failures = 0;
  real maxerr [3] = '{0.0, 0.0, 0.0};
  logic clk = 0;
  always #5 clk = ~clk;

  radix22_fft #(.N(NA)) dut_a (.x(xa), .X(ya));
  radix22_fft dut_b (.x(xb), .X(yb));
  radix22_fft #(.N(NC)) dut_c (.x(xc), .X(yc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind 0: impulse at 0, 1: constant, 2: tone at bin (t % n), 3: random
  function automatic void stim(input int n, input int kind, input int t,
                               output ivec_t xr, output ivec_t xi);
    int amp;
    amp = 32768 / (2 * n) - 1;
    for (int i = 0; i < n; i++) begin
      case (kind)
        0: begin xr[i] = (i == 0) ? amp : 0; xi[i] = 0; end
        1: begin xr[i] = amp / 2; xi[i] = -amp / 3; end
        2: begin
          xr[i] = $rtoi($floor(amp * $cos(2.0 * PI * ((t % n) * i % n) / n) + 0.5));
          xi[i] = $rtoi($floor(amp * $sin(2.0 * PI * ((t % n) * i % n) / n) + 0.5));
        end
        default: begin xr[i] = srand(amp); xi[i] = srand(amp); end
      endcase
    end
  endfunction

  task automatic check(input int sel, input int n, input real tol, input ivec_t xr,
                       input ivec_t xi, input ivec_t gr, input ivec_t gi);
    rvec_t er, ei;
    dft(n, xr, xi, er, ei);
    for (int k = 0; k < n; k++) begin
      real e;
      e = absr(gr[k] - er[k]);
      if (absr(gi[k] - ei[k]) > e) e = absr(gi[k] - ei[k]);
      if (e > maxerr[sel]) maxerr[sel] = e;
      checks++;
      if (e > tol) begin
        failures++;
        $display("FAIL N=%0d X(%0d) got=(%0d,%0d) exp=(%f,%f)", n, k, gr[k], gi[k], er[k], ei[k]);
      end
    end
  endtask

  initial begin
    ivec_t ar, ai, br, bi, cr, ci, gr, gi;
    for (int t = 0; t < 400; t++) begin
      int kind;
      kind = (t < 3) ? t : ((t < 3 + NC) ? 2 : 3);
      stim(NA, kind, t, ar, ai);
      stim(NB, kind, t, br, bi);
      stim(NC, kind, t, cr, ci);
      for (int i = 0; i < NA; i++) begin xa[i].re = sample_t'(ar[i]); xa[i].im = sample_t'(ai[i]); end
      for (int i = 0; i < NB; i++) begin xb[i].re = sample_t'(br[i]); xb[i].im = sample_t'(bi[i]); end
      for (int i = 0; i < NC; i++) begin xc[i].re = sample_t'(cr[i]); xc[i].im = sample_t'(ci[i]); end
      @(posedge clk);
      for (int i = 0; i < NA; i++) begin gr[i] = ya[i].re; gi[i] = ya[i].im; end
      check(0, NA, TOLA, ar, ai, gr, gi);
      for (int i = 0; i < NB; i++) begin gr[i] = yb[i].re; gi[i] = yb[i].im; end
      check(1, NB, TOLB, br, bi, gr, gi);
      for (int i = 0; i < NC; i++) begin gr[i] = yc[i].re; gi[i] = yc[i].im; end
      check(2, NC, TOLC, cr, ci, gr, gi);
    end
    $display("max error N=%0d: %f  N=%0d: %f  N=%0d: %f LSB",
             NA, maxerr[0], NB, maxerr[1], NC, maxerr[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
