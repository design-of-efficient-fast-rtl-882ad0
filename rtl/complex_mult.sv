// complex_mult -- fixed-point complex multiply p = a * w by a twiddle factor.
//
// Four real products and two sums, all combinational:
//   p.re = a.re*w.re - a.im*w.im,  p.im = a.re*w.im + a.im*w.re,
// then rounded to nearest (add half an LSB, arithmetic shift right by
// TW_FRAC). Twiddles of 1, -1, j and -j give exact results. The published
// design only says that the butterfly performs the twiddle multiplication;
// the rounding and widths here are this implementation's choice.
module complex_mult
  import fft_pkg::*;
(
  input  cplx_t    a,
  input  twiddle_t w,
  output cplx_t    p
);

  localparam int PW = DW + TW_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  prod_t pre, pim;

  always_comb begin
    pre  = prod_t'(a.re) * prod_t'(w.re) - prod_t'(a.im) * prod_t'(w.im);
    pim  = prod_t'(a.re) * prod_t'(w.im) + prod_t'(a.im) * prod_t'(w.re);
    pre  = pre + prod_t'(2 ** (TW_FRAC - 1));
    pim  = pim + prod_t'(2 ** (TW_FRAC - 1));
    p.re = data_t'(pre >>> TW_FRAC);
    p.im = data_t'(pim >>> TW_FRAC);
  end

endmodule
