// tb_butterfly_r2 -- checks the plain radix-2 butterfly (unit III) on random
// and extreme operands: sum = a + b and diff = a - b on both components,
// worked out in 32-bit integers.
module tb_butterfly_r2;
  import fft_pkg::*;

  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;

  butterfly_r2 dut (.a(a), .b(b), .sum(sum), .diff(diff));

  task automatic check(int ar, int ai, int br, int bi);
    a.re = data_t'(ar); a.im = data_t'(ai);
    b.re = data_t'(br); b.im = data_t'(bi);
    #1;
    checks++;
    if (int'(sum.re) != ar + br || int'(sum.im) != ai + bi ||
        int'(diff.re) != ar - br || int'(diff.im) != ai - bi) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d): sum=(%0d,%0d) diff=(%0d,%0d)",
               ar, ai, br, bi, sum.re, sum.im, diff.re, diff.im);
    end
  endtask

  initial begin
    int lim;
    lim = 2 ** (DW - 2) - 1;      // operands that cannot overflow the word
    check(lim, -lim, -lim, lim);
    check(0, 0, 0, 0);
    for (int i = 0; i < 1000; i++)
      check($signed($urandom_range(0, 2 * lim)) - lim, $signed($urandom_range(0, 2 * lim)) - lim,
            $signed($urandom_range(0, 2 * lim)) - lim, $signed($urandom_range(0, 2 * lim)) - lim);
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
