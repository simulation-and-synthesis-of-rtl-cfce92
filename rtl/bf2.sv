// bf2: two-point radix-2 butterfly of the R2SDF stage.
//
// Computes sum = (a + b) / 2 and diff = (a - b) / 2 on both the real and the
// imaginary part. The add/subtract is the butterfly of the original architecture; the
// halving is a choice of this implementation: every one of the log2(N) stages
// halves its results, so the 16-bit words cannot overflow and the pipeline
// delivers DFT/N (FFT) or IDFT (with its 1/N, for the inverse). The sum and
// difference are formed at 17 bits and shifted right by one (rounding toward
// minus infinity), which is exact to 16 bits.
//
// Interface: a is the word read from the feedback FIFO, b the word arriving at
// the stage input. Purely combinational, no clock.
module bf2
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);

  logic signed [DATA_W:0] s_re, s_im, d_re, d_im;

  always_comb begin
    s_re = {a.re[DATA_W-1], a.re} + {b.re[DATA_W-1], b.re};
    s_im = {a.im[DATA_W-1], a.im} + {b.im[DATA_W-1], b.im};
    d_re = {a.re[DATA_W-1], a.re} - {b.re[DATA_W-1], b.re};
    d_im = {a.im[DATA_W-1], a.im} - {b.im[DATA_W-1], b.im};
    sum.re  = DATA_W'(s_re >>> 1);
    sum.im  = DATA_W'(s_im >>> 1);
    diff.re = DATA_W'(d_re >>> 1);
    diff.im = DATA_W'(d_im >>> 1);
  end

endmodule
