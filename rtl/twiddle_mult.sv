// twiddle_mult: multiplies a complex sample by the constant twiddle factor
// W_N^K = cos(2*pi*K/N) - j*sin(2*pi*K/N).
//
// When K is a multiple of N/4 the factor is 1, -j, -1 or +j and is applied
// exactly by swapping and negating parts (the -j case reuses mul_neg_j). Any
// other K uses four constant multiplications with TW-bit coefficients
// c = cos, s = sin (Q1.15 at TW=16):
//   re = x.re*c + x.im*s,  im = x.im*c - x.re*s,
// each rounded to nearest (half up) back to DW bits. The exact trivial cases
// keep the small networks free of rounding, so the two FFT algorithms give
// bit-identical results at N=4. Coefficient width and rounding are this
// design's choice. Combinational; N and K are elaboration-time constants.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 1
) (
  input  cplx_t x,
  output cplx_t y
);
  localparam int KM = ((K % N) + N) % N;

  if ((4 * KM) % N == 0) begin : g_trivial
    localparam int Q = (4 * KM) / N;  // factor is (-j)^Q
    if (Q == 0) begin : g_one
      assign y = x;
    end else if (Q == 1) begin : g_negj
      mul_neg_j u_negj (.x(x), .y(y));
    end else if (Q == 2) begin : g_neg
      always_comb begin
        y.re = -x.re;
        y.im = -x.im;
      end
    end else begin : g_j
      always_comb begin
        y.re = -x.im;
        y.im = x.re;
      end
    end
  end else begin : g_mult
    localparam int PW = DW + TW + 1;
    localparam logic signed [TW-1:0] C = TW'(tw_cos(KM, N));
    localparam logic signed [TW-1:0] S = TW'(tw_sin(KM, N));
    localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW - 2);
    logic signed [PW-1:0] pre, pim;
    always_comb begin
      pre = PW'(x.re * C) + PW'(x.im * S);
      pim = PW'(x.im * C) - PW'(x.re * S);
      y.re = DW'((pre + HALF) >>> (TW - 1));
      y.im = DW'((pim + HALF) >>> (TW - 1));
    end
  end
endmodule
