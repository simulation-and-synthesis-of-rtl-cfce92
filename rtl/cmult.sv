// cmult: complex multiplier of an R2SDF stage.
//
// y = x * w, where x is a 16-bit complex sample and w a Q2.14 twiddle factor:
//   y.re = x.re*w.re - x.im*w.im,   y.im = x.re*w.im + x.im*w.re,
// using four real multipliers and two adders. The 33-bit results are rounded
// (add 2**13, shift right by 14) and saturated to 16 bits. Rounding and
// saturation are choices of this implementation: |w| <= 1, but one part of
// the product can still reach sqrt(2) times full scale, so saturation keeps
// a wrap-around from turning into a large error.
//
// Purely combinational; the stage registers the result.
module cmult
  import fft_pkg::*;
(
  input  cplx_t    x,
  input  cplx_tw_t w,
  output cplx_t    y
);

  localparam int PW = DATA_W + TW_W + 1;            // full precision sum
  localparam int SW = PW - TW_FRAC;                 // after the shift

  localparam logic signed [SW-1:0] MAXV = SW'((1 <<< (DATA_W-1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 <<< (DATA_W-1));

  function automatic sample_t round_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    logic signed [SW-1:0] s;
    r = v + PW'(1 <<< (TW_FRAC-1));
    s = SW'(r >>> TW_FRAC);
    if (s > MAXV)      return sample_t'(MAXV);
    else if (s < MINV) return sample_t'(MINV);
    else               return sample_t'(s);
  endfunction

  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    p_re = PW'(x.re * w.re) - PW'(x.im * w.im);
    p_im = PW'(x.re * w.im) + PW'(x.im * w.re);
    y.re = round_sat(p_re);
    y.im = round_sat(p_im);
  end

endmodule
