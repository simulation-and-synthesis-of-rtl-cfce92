// agu_tb: self-checking test of the stage address generator.
// For L = 8 and L = 1024 words, random steps and occasional clears are
// applied; phase, ROM address and last must follow a reference position
// counter modulo 2L kept in the testbench.
module agu_tb;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic ph_a, last_a, ph_b, last_b;
  logic [2:0] addr_a;
  logic [9:0] addr_b;
  int checks = 0, failures = 0;
  int pos = 0, wraps = 0;

  always #5 clk = ~clk;

  agu #(.L_LOG2(3)) dut_a (.clk, .rst_n, .clear, .step, .phase(ph_a), .addr(addr_a), .last(last_a));
  agu               dut_b (.clk, .rst_n, .clear, .step, .phase(ph_b), .addr(addr_b), .last(last_b));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (ph_a != ((pos % 16) >= 8) || int'(addr_a) != (pos % 8) || last_a != ((pos % 16) == 15) ||
          ph_b != ((pos % 2048) >= 1024) || int'(addr_b) != (pos % 1024) || last_b != ((pos % 2048) == 2047)) begin
        failures++;
        $display("FAIL pos %0d: a %b %0d %b  b %b %0d %b", pos, ph_a, addr_a, last_a, ph_b, addr_b, last_b);
      end
      if (last_b && step) wraps++;
      clear = ($urandom_range(0, 4999) == 0);
      step  = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (clear) pos = 0;
      else if (step) pos++;
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL the 2048-sample counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
