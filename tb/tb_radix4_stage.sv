// tb_radix4_stage: random lists through the first (M=16) and last (M=4)
// radix-2^2 steps of a 16-point network. The reference forms, per block and
// n < M/4, the four sums of the decimation-in-frequency split
//   X(4k)  : x0 + x1 + x2 + x3          times W_M^(0n)
//   X(4k+2): x0 - x1 + x2 - x3          times W_M^(2n)
//   X(4k+1): x0 - j x1 - x2 + j x3      times W_M^(1n)
//   X(4k+3): x0 + j x1 - x2 - j x3      times W_M^(3n)
// (xq = x(n + q*M/4)) in double precision and expects them in quarters
// 0, 1, 2, 3 of the block, within 1 LSB (exact for trivial twiddles).
module tb_radix4_stage;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  localparam int N = 16;
  cplx_t x [N];
  cplx_t y16 [N], y4 [N];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  radix4_stage dut16 (.x(x), .y(y16));
  radix4_stage #(.N(N), .M(4)) dut4 (.x(x), .y(y4));

  task automatic check_stage(input cplx_t y [N], input int m);
    int q;
    q = m / 4;
    for (int b = 0; b < N / m; b++) begin
      for (int n = 0; n < q; n++) begin
        real xr [4], xi [4], sr [4], si [4];
        int tk [4];
        for (int i = 0; i < 4; i++) begin
          xr[i] = x[b * m + n + i * q].re;
          xi[i] = x[b * m + n + i * q].im;
        end
        // quarter 0: X(4k), quarter 1: X(4k+2), quarter 2: X(4k+1), quarter 3: X(4k+3)
        sr[0] = xr[0] + xr[1] + xr[2] + xr[3];  si[0] = xi[0] + xi[1] + xi[2] + xi[3];
        sr[1] = xr[0] - xr[1] + xr[2] - xr[3];  si[1] = xi[0] - xi[1] + xi[2] - xi[3];
        // -j*(a + jb) = b - ja ; +j*(a + jb) = -b + ja
        sr[2] = xr[0] + xi[1] - xr[2] - xi[3];  si[2] = xi[0] - xr[1] - xi[2] + xr[3];
        sr[3] = xr[0] - xi[1] - xr[2] + xi[3];  si[3] = xi[0] + xr[1] - xi[2] - xr[3];
        tk = '{0, 2 * n, n, 3 * n};
        for (int o = 0; o < 4; o++) begin
          real c, s, er, ei, tol;
          cplx_t g;
          c = $cos(2.0 * PI * tk[o] / m);
          s = $sin(2.0 * PI * tk[o] / m);
          er = sr[o] * c + si[o] * s;
          ei = si[o] * c - sr[o] * s;
          tol = ((4 * tk[o]) % m == 0) ? 0.0 : 1.0;
          g = y[b * m + n + o * q];
          checks++;
          if (absr(g.re - er) > tol + 1e-9 || absr(g.im - ei) > tol + 1e-9) begin
            failures++;
            $display("FAIL M=%0d out %0d got=(%0d,%0d) exp=(%f,%f)",
                     m, b * m + n + o * q, g.re, g.im, er, ei);
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
        x[i].re = sample_t'(srand(4000));
        x[i].im = sample_t'(srand(4000));
      end
      @(posedge clk);
      check_stage(y16, 16);
      check_stage(y4, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
