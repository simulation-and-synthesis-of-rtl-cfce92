// sdf_stage_tb: self-checking test of one R2SDF stage (L = 8, blocks of 16).
//
// A random stream with random input gaps is fed through the stage. The
// reference, computed here block by block, is the radix-2 DIF step: for each
// block x[0..15] the stage must output floor((x[k]+x[k+8])/2), k = 0..7,
// followed (during the next block) by round_sat(floor((x[k]-x[k+8])/2) *
// W16^k), with W16^k = round(2**14 * exp(-+j*2*pi*k/16)). Timing: an output
// must appear exactly one clock after every accepted input once the first 8
// inputs (the start-up) have been taken. The run is repeated for the inverse
// direction, and then with enable low, when the stage must pass its input
// through unchanged, one clock later.
module sdf_stage_tb;
  import fft_pkg::*;

  localparam int LL = 3;
  localparam int L  = 1 << LL;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 0, rst_n = 0, clear = 0, enable = 1, inverse = 0, in_valid = 0;
  cplx_t in_data, out_data;
  logic  out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdf_stage #(.L_LOG2(LL)) dut (.clk, .rst_n, .clear, .enable, .inverse, .in_valid, .in_data,
                                .out_valid, .out_data);

  cplx_t exp_q [$];
  cplx_t blk [2*L];
  int    nin;          // inputs accepted since the last clear
  logic  exp_valid;    // out_valid expected in this cycle

  function automatic int fl2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  function automatic int q14(real v);
    real s = v * 16384.0;
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  function automatic int rsat(longint v);
    longint r = (v + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // Sum of pair k: leaves as soon as x[k+L] arrives.
  task automatic ref_sum(int k);
    cplx_t s;
    s.re = sample_t'(fl2(int'(blk[k].re) + int'(blk[k+L].re)));
    s.im = sample_t'(fl2(int'(blk[k].im) + int'(blk[k+L].im)));
    exp_q.push_back(s);
  endtask

  // Twiddled differences of a whole block: leave during the next block.
  task automatic ref_products(bit inv);
    for (int k = 0; k < L; k++) begin
      int dr, di, wr, wi;
      cplx_t p;
      dr = fl2(int'(blk[k].re) - int'(blk[k+L].re));
      di = fl2(int'(blk[k].im) - int'(blk[k+L].im));
      wr = q14($cos(PI * k / L));
      wi = q14((inv ? 1.0 : -1.0) * $sin(PI * k / L));
      p.re = sample_t'(rsat(longint'(dr) * wr - longint'(di) * wi));
      p.im = sample_t'(rsat(longint'(dr) * wi + longint'(di) * wr));
      exp_q.push_back(p);
    end
  endtask

  // Output checker
  cplx_t e;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("FAIL %0t: out_valid %b expected %b", $time, out_valid, exp_valid);
    end
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL %0t: unexpected output", $time);
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++;
          $display("FAIL %0t: got (%0d,%0d) exp (%0d,%0d)", $time, out_data.re, out_data.im, e.re, e.im);
        end
      end
    end
  end

  task automatic run_stream(int nblocks, bit inv);
    @(negedge clk);
    clear = 1; inverse = inv; in_valid = 0;
    @(posedge clk); #1 exp_valid = 0;
    @(negedge clk);
    clear = 0;
    exp_q.delete();
    nin = 0;
    while (nin < nblocks * 2 * L) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = cplx_t'($urandom);
      if (in_valid) begin
        if (enable) begin
          blk[nin % (2*L)] = in_data;
          if (nin % (2*L) >= L) ref_sum(nin % (2*L) - L);
          if (nin % (2*L) == 2*L - 1) ref_products(inv);
        end else begin
          exp_q.push_back(in_data);
        end
      end
      @(posedge clk);
      #1 exp_valid = in_valid && (!enable || nin >= L);
      if (in_valid) nin++;
      @(negedge clk);
    end
    in_valid = 0;
    @(posedge clk); #1 exp_valid = 0;
    @(negedge clk);
    // the products of the last block stay inside the stage
    if (enable) begin
      checks++;
      if (exp_q.size() != L) begin
        failures++;
        $display("FAIL %0d outputs left, expected %0d", exp_q.size(), L);
      end
    end
  endtask

  initial begin
    exp_valid = 0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_stream(40, 0);
    run_stream(40, 1);
    enable = 0;
    run_stream(4, 0);
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
