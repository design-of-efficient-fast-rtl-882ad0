// butterfly_r2 -- radix-2 butterfly without twiddle factor (butterfly unit III).
//
// Purely combinational: sum = a + b, diff = a - b, on both components. As the
// third and last stage of the 8-point decimation-in-frequency FFT it needs no
// multiplication (W2^0 = 1); units I and II reuse it and rotate diff
// afterwards. Inputs and outputs share the DW-bit word of fft_pkg, which is
// wide enough that the growth of all three stages never wraps.
module butterfly_r2
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);

  always_comb begin
    sum.re  = a.re + b.re;
    sum.im  = a.im + b.im;
    diff.re = a.re - b.re;
    diff.im = a.im - b.im;
  end

endmodule
