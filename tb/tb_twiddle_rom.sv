// tb_twiddle_rom -- compares each of the four twiddle entries with
// round(2^TW_FRAC * cos(2*pi*k/8)) and round(-2^TW_FRAC * sin(2*pi*k/8)),
// computed here from the trigonometric functions.
module tb_twiddle_rom;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  logic [1:0] k;
  twiddle_t w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.k(k), .w(w));

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin
      int er, ei;
      k = 2'(i);
      #1;
      er = rnd($cos(2.0 * PI * i / 8.0) * (2.0 ** TW_FRAC));
      ei = rnd(-$sin(2.0 * PI * i / 8.0) * (2.0 ** TW_FRAC));
      checks++;
      if (int'(w.re) != er || int'(w.im) != ei) begin
        failures++;
        $display("FAIL k=%0d: got (%0d,%0d) expected (%0d,%0d)", i, w.re, w.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
