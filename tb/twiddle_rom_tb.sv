// twiddle_rom_tb: self-checking test of the twiddle ROM.
// Every address of a 1024-entry (stage 1 of 2048 points) and an 8-entry
// table is read in both directions and compared with exp(-j*pi*k/L) (FFT)
// or exp(+j*pi*k/L) (IFFT), scaled by 2**14, allowing 1 LSB of rounding.
// W^0 = 1.0 and W^(L/2) = -j must be exact.
module twiddle_rom_tb;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic [9:0] addr_a;
  logic [2:0] addr_b;
  logic       inverse;
  cplx_tw_t   w_a, w_b;
  int checks = 0, failures = 0;

  twiddle_rom                dut_a (.addr(addr_a), .inverse, .w(w_a));
  twiddle_rom #(.L_LOG2(3))  dut_b (.addr(addr_b), .inverse, .w(w_b));

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic cmp(cplx_tw_t w, int k, int l, bit inv);
    real er, ei;
    er = 16384.0 * $cos(PI * k / l);
    ei = (inv ? 16384.0 : -16384.0) * $sin(PI * k / l);
    checks++;
    if (absr(real'(w.re) - er) > 1.0 || absr(real'(w.im) - ei) > 1.0) begin
      failures++;
      $display("FAIL L=%0d k=%0d inv=%0b got (%0d,%0d) exp (%f,%f)", l, k, inv, w.re, w.im, er, ei);
    end
  endtask

  initial begin
    for (int inv = 0; inv < 2; inv++) begin
      inverse = inv[0];
      for (int k = 0; k < 1024; k++) begin
        addr_a = 10'(k);
        addr_b = 3'(k);
        #1;
        cmp(w_a, k, 1024, inv[0]);
        if (k < 8) cmp(w_b, k, 8, inv[0]);
        if (k == 0) begin
          checks++;
          if (w_a.re != 16384 || w_a.im != 0) failures++;
        end
        if (k == 512) begin
          checks++;
          if (w_a.re != 0 || w_a.im != (inv[0] ? 16384 : -16384)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
