// twiddle_rom -- twiddle factors W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8), k = 0..3.
//
// Combinational look-up for butterfly unit I, which applies W8^k in node Ak.
// Entries, in TW_FRAC fixed point: k=0 -> (1, 0), k=1 -> (c, -c),
// k=2 -> (0, -1), k=3 -> (-c, -c), with c = round(2^TW_FRAC / sqrt(2)).
// The table is derived from the twiddle definition of the DFT; the word
// width is a choice of this implementation.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [1:0] k,
  output twiddle_t   w
);

  localparam int ONE = 2 ** TW_FRAC;
  // round(2^TW_FRAC * cos(pi/4))
  localparam int C45 = int'($floor(real'(ONE) * 0.7071067811865476 + 0.5));

  always_comb begin
    unique case (k)
      2'd0:    w = '{re: coef_t'(ONE),  im: coef_t'(0)};
      2'd1:    w = '{re: coef_t'(C45),  im: coef_t'(-C45)};
      2'd2:    w = '{re: coef_t'(0),    im: coef_t'(-ONE)};
      default: w = '{re: coef_t'(-C45), im: coef_t'(-C45)};
    endcase
  end

endmodule
