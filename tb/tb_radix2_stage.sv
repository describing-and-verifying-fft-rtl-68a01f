// tb_radix2_stage: random lists through the last (M=8) and first (M=2)
// radix-2 stages of an 8-point network and a middle stage (M=4). The
// reference computes y[k] = x[k] + W_M^k x[k+M/2] and
// y[k+M/2] = x[k] - W_M^k x[k+M/2] in double precision per block; results
// must match within 1 LSB, and exactly where the twiddle is trivial.
module tb_radix2_stage;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  localparam int N = 8;
  cplx_t x [N];
  cplx_t y8 [N], y4 [N], y2 [N];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  radix2_stage dut8 (.x(x), .y(y8));
  radix2_stage #(.N(N), .M(4)) dut4 (.x(x), .y(y4));
  radix2_stage #(.N(N), .M(2)) dut2 (.x(x), .y(y2));

  task automatic check_stage(input cplx_t y [N], input int m);
    int h;
    h = m / 2;
    for (int b = 0; b < N / m; b++) begin
      for (int k = 0; k < h; k++) begin
        real c, s, tr, ti, er [2], ei [2], tol;
        int i0, i1;
        i0 = b * m + k;
        i1 = i0 + h;
        c = $cos(2.0 * PI * k / m);
        s = $sin(2.0 * PI * k / m);
        tr = x[i1].re * c + x[i1].im * s;
        ti = x[i1].im * c - x[i1].re * s;
        er[0] = x[i0].re + tr;  ei[0] = x[i0].im + ti;
        er[1] = x[i0].re - tr;  ei[1] = x[i0].im - ti;
        tol = ((4 * k) % m == 0) ? 0.0 : 1.0;
        for (int o = 0; o < 2; o++) begin
          cplx_t g;
          g = (o == 0) ? y[i0] : y[i1];
          checks++;
          if (absr(g.re - er[o]) > tol + 1e-9 || absr(g.im - ei[o]) > tol + 1e-9) begin
            failures++;
            $display("FAIL M=%0d out %0d got=(%0d,%0d) exp=(%f,%f)",
                     m, (o == 0) ? i0 : i1, g.re, g.im, er[o], ei[o]);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      foreach (x[i]) begin
        x[i].re = sample_t'(srand(8000));
        x[i].im = sample_t'(srand(8000));
      end
      @(posedge clk);
      check_stage(y8, 8);
      check_stage(y4, 4);
      check_stage(y2, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
