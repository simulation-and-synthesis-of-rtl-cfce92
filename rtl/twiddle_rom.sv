// twiddle_rom: local twiddle-factor ROM of one R2SDF stage.
//
// Every pipeline stage has its own ROM, as in the original architecture; the stage with an
// L-word FIFO needs only the L factors W_{2L}^k = exp(-j*pi*k/L), k = 0..L-1,
// and that table does not depend on the transform length selected at run
// time. The table (TW) is computed at elaboration:
//   re = round(2**14 * cos(pi*k/L)),  im = round(-2**14 * sin(pi*k/L)),
// in Q2.14 format so that W^0 = 1.0 is exact. For the inverse transform the
// conjugate block (COM) negates the imaginary part, giving W^-k, and a
// multiplexer picks TW or COM according to inverse.
//
// Read is combinational: w follows addr and inverse in the same cycle.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter  int L_LOG2 = 10,
  localparam int AW     = (L_LOG2 > 0) ? L_LOG2 : 1   // address width
) (
  input  logic [AW-1:0]  addr,
  input  logic           inverse,
  output cplx_tw_t       w
);

  localparam int L  = 1 << L_LOG2;
  localparam real PI = 3.14159265358979323846;

  typedef logic [2*TW_W-1:0] table_t [L];   // {re, im} per entry

  function automatic twiddle_t q14(real v);
    real s;
    s = v * real'(1 << TW_FRAC);
    return twiddle_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < L; k++) begin
      t[k] = {q14($cos(PI * real'(k) / real'(L))),
              q14(-$sin(PI * real'(k) / real'(L)))};
    end
    return t;
  endfunction

  localparam table_t TW = make_table();

  cplx_tw_t tw_val, com_val;

  always_comb begin
    tw_val      = cplx_tw_t'((L == 1) ? TW[0] : TW[addr]);
    com_val.re  = tw_val.re;
    com_val.im  = -tw_val.im;
    w           = inverse ? com_val : tw_val;
  end

endmodule
