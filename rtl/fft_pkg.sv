// fft_pkg -- shared types and constants of the folded 8-point radix-2 DIF FFT.
//
// Number format. Input samples are IN_W-bit signed integers (real and imaginary
// part apart). Inside the datapath a sample is a DW-bit signed fixed-point
// number with FRAC fractional bits; the 16-bit outputs use the same FRAC, so an
// output word of 16'h0200 reads 8.0. DW leaves room for the growth of three
// butterfly stages (x8) and for the sqrt(2) a component can grow by in the
// twiddle product, so nothing inside the datapath overflows; only the final
// narrowing to OUT_W bits saturates.
//
// Twiddle factors W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8) are TW_W-bit signed
// numbers with TW_FRAC fractional bits. The transform size, the 8-bit inputs
// and the 16-bit outputs follow the published design; FRAC, DW, TW_FRAC and
// the saturation are choices of this implementation.
package fft_pkg;

  localparam int N       = 8;                 // transform size
  localparam int IN_W    = 8;                 // input word, per component
  localparam int OUT_W   = 16;                // output word, per component
  localparam int FRAC    = 6;                 // fractional bits of data words
  localparam int DW      = IN_W + FRAC + 4;   // internal word: x8 growth + sqrt(2)
  localparam int TW_FRAC = 14;                // fractional bits of twiddles
  localparam int TW_W    = TW_FRAC + 2;       // twiddle word (range -1..+1)

  typedef logic signed [DW-1:0]   data_t;
  typedef logic signed [TW_W-1:0] coef_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } twiddle_t;

endpackage
