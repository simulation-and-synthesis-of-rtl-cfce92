// cmult_tb: self-checking test of the complex multiplier.
// Reference: the exact integer products, rounded (add 2**13, arithmetic
// shift by 14) and saturated to 16 bits, computed here in 64-bit integers.
// Also checks that multiplying by 1.0 (16384 + j0) returns the input exactly.
module cmult_tb;
  import fft_pkg::*;

  cplx_t    x, y;
  cplx_tw_t w;
  int checks = 0, failures = 0;

  cmult dut (.x, .w, .y);

  function automatic longint rs(longint v);
    longint r;
    r = (v + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic check_one(int xr, int xi, int wr, int wi);
    longint er, ei;
    x = '{re: sample_t'(xr), im: sample_t'(xi)};
    w = '{re: twiddle_t'(wr), im: twiddle_t'(wi)};
    #1;
    er = rs(longint'(xr) * wr - longint'(xi) * wi);
    ei = rs(longint'(xr) * wi + longint'(xi) * wr);
    checks++;
    if (longint'(y.re) != er || longint'(y.im) != ei) begin
      failures++;
      $display("FAIL x=(%0d,%0d) w=(%0d,%0d) y=(%0d,%0d) exp=(%0d,%0d)",
               xr, xi, wr, wi, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    // unit twiddle is exact
    for (int i = 0; i < 200; i++) begin
      int r, m;
      r = int'($signed(16'($urandom)));
      m = int'($signed(16'($urandom)));
      check_one(r, m, 16384, 0);
      if (y.re != sample_t'(r) || y.im != sample_t'(m)) failures++;
    end
    // saturation: (32767+j32767) * (0.7071 - j0.7071) -> real part too big
    check_one(32767, 32767, 11585, -11585);
    check_one(-32768, 32767, 11585, 11585);
    check_one(-32768, -32768, -16384, 0);
    for (int i = 0; i < 3000; i++) begin
      check_one(int'($signed(16'($urandom))), int'($signed(16'($urandom))),
                int'($signed(16'($urandom_range(0, 32767) - 16384))), int'($signed(16'($urandom_range(0, 32767) - 16384))));
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
