// fft_pkg: types and constants shared by the radix-2 single-delay-feedback
// (R2SDF) FFT/IFFT pipeline.
//
// A sample is a complex number of two 16-bit two's-complement parts, so one
// word of the datapath and of every feedback FIFO is 2 x 16 = 32 bits, as the
// original architecture specifies. Twiddle factors use the same 16-bit width in Q2.14 format
// (14 fraction bits), a choice of this implementation that lets +1.0 be held
// exactly, so the trivial twiddle W^0 passes data unchanged.
package fft_pkg;

  localparam int DATA_W = 16;            // bits per real/imag part of a sample
  localparam int TW_W   = 16;            // bits per real/imag part of a twiddle
  localparam int TW_FRAC = TW_W - 2;     // Q2.14: 1.0 == 2**14

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [TW_W-1:0]   twiddle_t;

  // Complex sample: 32-bit word, real part in the upper half.
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Complex twiddle factor.
  typedef struct packed {
    twiddle_t re;
    twiddle_t im;
  } cplx_tw_t;

endpackage
