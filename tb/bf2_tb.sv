// bf2_tb: self-checking test of the two-point butterfly.
// Drives random and corner-case operand pairs and compares sum and diff with
// floor((a+b)/2) and floor((a-b)/2) computed here in integer arithmetic.
module bf2_tb;
  import fft_pkg::*;

  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;

  bf2 dut (.a, .b, .sum, .diff);

  function automatic int fl2(int v);   // floor(v/2)
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic check_one(int ar, int ai, int br, int bi);
    a = '{re: sample_t'(ar), im: sample_t'(ai)};
    b = '{re: sample_t'(br), im: sample_t'(bi)};
    #1;
    checks++;
    if (int'(sum.re) != fl2(ar + br) || int'(sum.im) != fl2(ai + bi) ||
        int'(diff.re) != fl2(ar - br) || int'(diff.im) != fl2(ai - bi)) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) sum=(%0d,%0d) diff=(%0d,%0d)",
               ar, ai, br, bi, sum.re, sum.im, diff.re, diff.im);
    end
  endtask

  initial begin
    check_one(32767, 32767, 32767, 32767);
    check_one(-32768, -32768, -32768, -32768);
    check_one(32767, -32768, -32768, 32767);
    check_one(1, -1, 0, 0);
    check_one(-3, 3, 0, 0);
    for (int i = 0; i < 2000; i++)
      check_one(int'($signed(16'($urandom))), int'($signed(16'($urandom))),
                int'($signed(16'($urandom))), int'($signed(16'($urandom))));
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
