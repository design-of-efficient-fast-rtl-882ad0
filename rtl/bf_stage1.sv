// bf_stage1 -- butterfly unit I of the folded 8-point DIF FFT (nodes A0..A3).
//
// In node Ak it receives x(k) from the 4-cycle input delay on a and x(k+4)
// from the input on b, and produces
//   sum    = x(k) + x(k+4)
//   diff_w = (x(k) - x(k+4)) * W8^k
// all in the same cycle (no internal pipeline register, as in the folding
// derivation, which assumes zero pipeline stages in the butterflies). The
// controller supplies k; the twiddle comes from twiddle_rom and the product
// from complex_mult.
module bf_stage1
  import fft_pkg::*;
(
  input  cplx_t      a,
  input  cplx_t      b,
  input  logic [1:0] k,
  output cplx_t      sum,
  output cplx_t      diff_w
);

  cplx_t    diff;
  twiddle_t w;

  butterfly_r2 u_bf  (.a(a), .b(b), .sum(sum), .diff(diff));
  twiddle_rom  u_rom (.k(k), .w(w));
  complex_mult u_mul (.a(diff), .w(w), .p(diff_w));

endmodule
