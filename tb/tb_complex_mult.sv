// tb_complex_mult -- checks the twiddle multiplier. Random samples over the
// range the first stage sees are multiplied by each W8^k (k = 0..3) and by
// random coefficients; the result must be within half an LSB plus the
// rounding of the product of the exact product a*w worked out in floating
// point, i.e. |error| <= 1 LSB, and exact for w = 1 and w = -j.
module tb_complex_mult;
  import fft_pkg::*;

  cplx_t a, p;
  twiddle_t w;
  int checks = 0, failures = 0;

  complex_mult dut (.a(a), .w(w), .p(p));

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(int ar, int ai, int wr, int wi, bit exact);
    real er, ei, sc;
    a.re = data_t'(ar); a.im = data_t'(ai);
    w.re = coef_t'(wr); w.im = coef_t'(wi);
    #1;
    sc = 2.0 ** TW_FRAC;
    er = (real'(ar) * wr - real'(ai) * wi) / sc;
    ei = (real'(ar) * wi + real'(ai) * wr) / sc;
    checks++;
    if (rabs(real'(p.re) - er) > (exact ? 0.0 : 0.51) || rabs(real'(p.im) - ei) > (exact ? 0.0 : 0.51)) begin
      failures++;
      $display("FAIL a=(%0d,%0d) w=(%0d,%0d): p=(%0d,%0d) exact=(%f,%f)", ar, ai, wr, wi, p.re, p.im, er, ei);
    end
  endtask

  initial begin
    int one, c, lim;
    one = 2 ** TW_FRAC;
    c   = 11585;                  // round(2^14 / sqrt(2))
    lim = 2 ** (IN_W + FRAC + 1); // magnitude of a first-stage difference
    for (int i = 0; i < 500; i++) begin
      int ar, ai;
      ar = $signed($urandom_range(0, 2 * lim)) - lim;
      ai = $signed($urandom_range(0, 2 * lim)) - lim;
      check(ar, ai, one, 0, 1);
      check(ar, ai, c, -c, 0);
      check(ar, ai, 0, -one, 1);
      check(ar, ai, -c, -c, 0);
      check(ar, ai, $signed($urandom_range(0, 2 * one)) - one, $signed($urandom_range(0, 2 * one)) - one, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
