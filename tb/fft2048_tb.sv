// fft2048_tb: end-to-end test of the 2048-point R2SDF FFT/IFFT at its
// default size (no parameter overrides).
//
// For a list of configurations (direction x length, 128..2048 points) the
// testbench pulses cfg_load, streams several blocks of random complex data
// (amplitude below half scale) followed by one block of zeros that pushes the
// last block out, and compares every output with a double-precision DFT
// computed here: X[k] = (1/len) * sum_n x[n] * exp(-+j*2*pi*n*k/len). Each
// output part must be within TOL LSB of the reference, and out_index must
// be the bit-reversed output count. Some configurations insert random input
// gaps (stalls). Two configurations use near full-scale tones (amplitude
// 30000, one random bin per block) instead of random data. Per configuration the latency from the first input to the
// first output, with data streamed every clock, must be len + 11 clocks, and
// there must be no output during the start-up.
//
// Mechanism counters (each must be non-zero): forward blocks, inverse blocks,
// blocks of every length 128..2048 (the shorter ones bypass stages),
// configuration switches, stalled input cycles, full-scale tone blocks.
module fft2048_tb;
  import fft_pkg::*;

  localparam int  NL  = 11;
  localparam real PI  = 3.14159265358979323846;
  localparam real TOL = 5.0;

  logic       clk = 0, rst_n = 0, cfg_load = 0, cfg_inverse = 0, in_valid = 0;
  logic [3:0] cfg_len_log2 = 4'd11;
  cplx_t      in_data = '0, out_data;
  logic       out_valid, inverse;
  logic [NL-1:0] out_index;
  logic [3:0] len_log2;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_switch = 0, n_stall = 0, n_tone = 0;
  int n_len [NL+1];
  real max_err = 0.0;

  always #5 clk = ~clk;

  fft2048 dut (.clk, .rst_n, .cfg_load, .cfg_inverse, .cfg_len_log2, .in_valid, .in_data,
               .out_valid, .out_data, .out_index, .len_log2, .inverse);

  // stimulus and captured outputs of one configuration
  cplx_t x   [];
  cplx_t y   [];
  int    yi  [];
  int    n_out;
  longint cyc = 0, t_first_in, t_first_out;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (n_out == 0) t_first_out = cyc;
    if (n_out < y.size()) begin
      y[n_out]  = out_data;
      yi[n_out] = int'(out_index);
    end
    n_out++;
  end

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) if (v[b]) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run_config(bit inv, int lg, int nblk, bit gaps, bit tone = 0);
    int len = 1 << lg;
    real c [], s [];
    // switch configuration
    @(negedge clk);
    cfg_load = 1; cfg_inverse = inv; cfg_len_log2 = 4'(lg);
    @(negedge clk);
    cfg_load = 0;
    n_switch++;
    checks++;
    if (len_log2 != 4'(lg) || inverse != inv) begin
      failures++;
      $display("FAIL configuration not taken: len_log2 %0d inverse %b", len_log2, inverse);
    end
    x = new[(nblk + 1) * len];
    y = new[nblk * len];
    yi = new[nblk * len];
    n_out = 0;
    if (tone) begin
      // near full-scale complex exponential, a new bin per block
      for (int b = 0; b < nblk; b++) begin
        int k0 = $urandom_range(0, len - 1);
        for (int n = 0; n < len; n++) begin
          real ph = 2.0 * PI * real'((n * k0) % len) / real'(len);
          x[b*len + n].re = sample_t'($rtoi(30000.0 * $cos(ph)));
          x[b*len + n].im = sample_t'($rtoi(30000.0 * $sin(ph)));
        end
        n_tone++;
      end
    end else begin
      for (int i = 0; i < nblk * len; i++) begin
        x[i].re = sample_t'($urandom_range(0, 32766) - 16383);
        x[i].im = sample_t'($urandom_range(0, 32766) - 16383);
      end
    end
    for (int i = nblk * len; i < (nblk + 1) * len; i++) x[i] = '0;
    // stream
    for (int i = 0; i < x.size(); i++) begin
      if (gaps && i > 0) begin
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          n_stall++;
          @(negedge clk);
        end
      end
      in_valid = 1;
      in_data  = x[i];
      if (i == 0) t_first_in = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    // latency and start-up (only meaningful without gaps)
    if (!gaps) begin
      checks++;
      if (t_first_out - t_first_in != longint'(len) + 64'd11) begin
        failures++;
        $display("FAIL len %0d latency %0d, expected %0d", len, t_first_out - t_first_in, len + 11);
      end
    end
    checks++;
    if (n_out != nblk * len + 1) begin
      failures++;
      $display("FAIL len %0d: %0d outputs, expected %0d", len, n_out, nblk * len + 1);
    end
    // reference
    c = new[len];
    s = new[len];
    for (int i = 0; i < len; i++) begin
      c[i] = $cos(2.0 * PI * i / len);
      s[i] = (inv ? 1.0 : -1.0) * $sin(2.0 * PI * i / len);
    end
    for (int b = 0; b < nblk; b++) begin
      for (int m = 0; m < len; m++) begin
        int k = bitrev(m, lg);
        real er = 0.0, ei = 0.0, dr, di;
        for (int n = 0; n < len; n++) begin
          int p = (n * k) % len;
          real xr = real'(x[b*len + n].re), xi = real'(x[b*len + n].im);
          er += xr * c[p] - xi * s[p];
          ei += xr * s[p] + xi * c[p];
        end
        er /= len;
        ei /= len;
        dr = absr(real'(y[b*len + m].re) - er);
        di = absr(real'(y[b*len + m].im) - ei);
        if (dr > max_err) max_err = dr;
        if (di > max_err) max_err = di;
        checks++;
        if (dr > TOL || di > TOL || yi[b*len + m] != k) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s len %0d block %0d out %0d (bin %0d, index %0d): got (%0d,%0d) exp (%.1f,%.1f)",
                     inv ? "IFFT" : "FFT", len, b, m, k, yi[b*len + m], y[b*len + m].re, y[b*len + m].im, er, ei);
        end
      end
      if (inv) n_inv++; else n_fwd++;
      n_len[lg]++;
    end
  endtask

  initial begin
    for (int i = 0; i <= NL; i++) n_len[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_config(0, 11, 2, 0);
    run_config(1, 11, 1, 1);
    run_config(0, 7, 3, 0);
    run_config(1, 7, 2, 1);
    run_config(0, 8, 2, 1);
    run_config(1, 9, 2, 0);
    run_config(0, 10, 2, 0);
    run_config(1, 10, 1, 1);
    run_config(0, 11, 1, 1);
    run_config(0, 11, 2, 0, 1);
    run_config(1, 9, 2, 1, 1);
    // mechanism coverage
    checks += 5;
    if (n_tone == 0)   begin failures++; $display("FAIL no full-scale tone block"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL no forward block"); end
    if (n_inv == 0)    begin failures++; $display("FAIL no inverse block"); end
    if (n_switch < 2)  begin failures++; $display("FAIL no configuration switch"); end
    if (n_stall == 0)  begin failures++; $display("FAIL no stalled input cycle"); end
    for (int lg = 7; lg <= NL; lg++) begin
      checks++;
      if (n_len[lg] == 0) begin failures++; $display("FAIL no block of length %0d", 1 << lg); end
    end
    $display("tone blocks %0d, fwd blocks %0d, inv blocks %0d, switches %0d, stall cycles %0d, blocks per length 128..2048: %0d %0d %0d %0d %0d, max error %.2f LSB",
             n_tone, n_fwd, n_inv, n_switch, n_stall, n_len[7], n_len[8], n_len[9], n_len[10], n_len[11], max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
