// tb_equiv_n4: exhaustive equivalence of the two FFT algorithms at size 4.
// The top is built with N = 4 and an exact comparator (TOL = 0). Every
// real and imaginary input part takes each value of -2..1, i.e. all 65536
// input lists over that range. For each list the comparator must report
// equality, both spectra must be bit-identical, and both must equal the
// 4-point DFT computed with integer arithmetic (W_4^k is 1, -j, -1, j).
// A second phase repeats the checks for 20000 random full-range lists, where
// both networks must equal that DFT taken modulo 2^16 (wrap-around).
module tb_equiv_n4;
  import fft_pkg::*;
  localparam int N = 4;
  cplx_t x [N], xr2 [N], xr22 [N];
  logic equal, ha_sum, ha_carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fft_equiv_top #(.N(N), .TOL(0)) dut (
    .x(x), .X_r2(xr2), .X_r22(xr22), .equal(equal),
    .ha_x(1'b0), .ha_y(1'b0), .ha_sum(ha_sum), .ha_carry(ha_carry)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536 + 20000; v++) begin
      int re [N], im [N];
      for (int i = 0; i < N; i++) begin
        if (v < 65536) begin
          re[i] = int'((v >> (4 * i)) & 3) - 2;
          im[i] = int'((v >> (4 * i + 2)) & 3) - 2;
        end else begin
          re[i] = int'($urandom_range(65535, 0)) - 32768;
          im[i] = int'($urandom_range(65535, 0)) - 32768;
        end
        x[i].re = sample_t'(re[i]);
        x[i].im = sample_t'(im[i]);
      end
      @(posedge clk);
      for (int k = 0; k < N; k++) begin
        int er, ei;
        er = 0;
        ei = 0;
        for (int n = 0; n < N; n++) begin
          case ((k * n) % 4)
            0: begin er += re[n]; ei += im[n]; end  // * 1
            1: begin er += im[n]; ei -= re[n]; end  // * -j
            2: begin er -= re[n]; ei -= im[n]; end  // * -1
            default: begin er -= im[n]; ei += re[n]; end  // * j
          endcase
        end
        checks++;
        if (xr2[k].re != sample_t'(er) || xr2[k].im != sample_t'(ei) ||
            xr22[k] != xr2[k]) begin
          failures++;
          if (failures < 10)
            $display("FAIL v=%0h X(%0d) exp=(%0d,%0d) r2=(%0d,%0d) r22=(%0d,%0d)", v, k, er, ei,
                     xr2[k].re, xr2[k].im, xr22[k].re, xr22[k].im);
        end
      end
      checks++;
      if (!equal) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0h comparator reports a difference", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
