// tb_bf_stage2 -- checks butterfly unit II: sum = a + b; diff_w = a - b, or
// (a - b) * (-j) = (im, -re) when rot_j is 1. Random operands, both modes.
module tb_bf_stage2;
  import fft_pkg::*;

  cplx_t a, b, sum, diff_w;
  logic rot_j;
  int checks = 0, failures = 0;

  bf_stage2 dut (.a(a), .b(b), .rot_j(rot_j), .sum(sum), .diff_w(diff_w));

  initial begin
    int lim;
    lim = 2 ** (DW - 3);
    for (int i = 0; i < 2000; i++) begin
      int ar, ai, br, bi, dr, di;
      ar = $signed($urandom_range(0, 2 * lim)) - lim;
      ai = $signed($urandom_range(0, 2 * lim)) - lim;
      br = $signed($urandom_range(0, 2 * lim)) - lim;
      bi = $signed($urandom_range(0, 2 * lim)) - lim;
      a.re = data_t'(ar); a.im = data_t'(ai); b.re = data_t'(br); b.im = data_t'(bi);
      rot_j = i[0];
      #1;
      if (rot_j) begin dr = ai - bi; di = -(ar - br); end
      else       begin dr = ar - br; di = ai - bi;    end
      checks++;
      if (int'(sum.re) != ar + br || int'(sum.im) != ai + bi ||
          int'(diff_w.re) != dr || int'(diff_w.im) != di) begin
        failures++;
        $display("FAIL rot=%0d a=(%0d,%0d) b=(%0d,%0d): sum=(%0d,%0d) diff_w=(%0d,%0d) expected (%0d,%0d)",
                 rot_j, ar, ai, br, bi, sum.re, sum.im, diff_w.re, diff_w.im, dr, di);
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
