// sdf_fifo_tb: self-checking test of the feedback delay line.
// Three depths (1024, 8 and 1 words) are shifted with random gaps; once a
// delay line has taken DEPTH words, its output must equal the word written
// DEPTH shifts before, kept here in a history array. A clear then restarts
// all three lines, which must again delay by exactly DEPTH shifts.
module sdf_fifo_tb;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  cplx_t din;
  cplx_t dout_a, dout_b, dout_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdf_fifo                    dut_a (.clk, .rst_n, .clear, .shift, .din, .dout(dout_a));
  sdf_fifo #(.DEPTH_LOG2(3))  dut_b (.clk, .rst_n, .clear, .shift, .din, .dout(dout_b));
  sdf_fifo #(.DEPTH_LOG2(0))  dut_c (.clk, .rst_n, .clear, .shift, .din, .dout(dout_c));

  cplx_t hist [$];
  int    base_b = 0;   // index of the first word written after the last clear

  task automatic check(cplx_t got, int depth, int from);
    int n = hist.size();
    if (n - from >= depth) begin
      checks++;
      if (got !== hist[n - depth]) begin
        failures++;
        $display("FAIL depth %0d after %0d shifts: got %h exp %h", depth, n, got, hist[n - depth]);
      end
    end
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (t == 3000) begin
        clear = 1; shift = 0;
        @(negedge clk);
        clear = 0;
        base_b = hist.size();
      end
      check(dout_a, 1024, base_b);
      check(dout_b, 8, base_b);
      check(dout_c, 1, base_b);
      shift = ($urandom_range(0, 3) != 0);
      din   = cplx_t'($urandom);
      if (shift) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
