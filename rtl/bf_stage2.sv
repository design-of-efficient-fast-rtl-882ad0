// bf_stage2 -- butterfly unit II of the folded 8-point DIF FFT (nodes B0..B3).
//
// sum = a + b; diff_w = a - b, multiplied by W4^1 = -j when rot_j is 1
// (nodes B1 and B3) and by W4^0 = 1 otherwise (B0 and B2). Multiplying by -j
// needs no multiplier: (re, im) * -j = (im, -re). Combinational, like all
// butterflies of the design.
module bf_stage2
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  logic  rot_j,
  output cplx_t sum,
  output cplx_t diff_w
);

  cplx_t diff;

  butterfly_r2 u_bf (.a(a), .b(b), .sum(sum), .diff(diff));

  always_comb begin
    if (rot_j) begin
      diff_w.re = diff.im;
      diff_w.im = -diff.re;
    end else begin
      diff_w = diff;
    end
  end

endmodule
