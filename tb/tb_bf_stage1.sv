// tb_bf_stage1 -- checks butterfly unit I. For random (a, b) and each k the
// outputs must be a + b exactly and (a - b) * exp(-j*2*pi*k/8), computed in
// floating point, within 1 LSB.
module tb_bf_stage1;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  cplx_t a, b, sum, diff_w;
  logic [1:0] k;
  int checks = 0, failures = 0;

  bf_stage1 dut (.a(a), .b(b), .k(k), .sum(sum), .diff_w(diff_w));

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    int lim;
    lim = 2 ** (IN_W + FRAC - 1);
    for (int i = 0; i < 2000; i++) begin
      int ar, ai, br, bi, kk;
      real dr, di, er, ei;
      ar = $signed($urandom_range(0, 2 * lim - 1)) - lim;
      ai = $signed($urandom_range(0, 2 * lim - 1)) - lim;
      br = $signed($urandom_range(0, 2 * lim - 1)) - lim;
      bi = $signed($urandom_range(0, 2 * lim - 1)) - lim;
      kk = i % 4;
      a.re = data_t'(ar); a.im = data_t'(ai); b.re = data_t'(br); b.im = data_t'(bi);
      k = 2'(kk);
      #1;
      dr = ar - br; di = ai - bi;
      er = dr * $cos(2.0 * PI * kk / 8.0) + di * $sin(2.0 * PI * kk / 8.0);
      ei = di * $cos(2.0 * PI * kk / 8.0) - dr * $sin(2.0 * PI * kk / 8.0);
      checks++;
      if (int'(sum.re) != ar + br || int'(sum.im) != ai + bi ||
          rabs(real'(diff_w.re) - er) > 1.0 || rabs(real'(diff_w.im) - ei) > 1.0) begin
        failures++;
        $display("FAIL k=%0d a=(%0d,%0d) b=(%0d,%0d): sum=(%0d,%0d) diff_w=(%0d,%0d) expected (%f,%f)",
                 kk, ar, ai, br, bi, sum.re, sum.im, diff_w.re, diff_w.im, er, ei);
      end
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
