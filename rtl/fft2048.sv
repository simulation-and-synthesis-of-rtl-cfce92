// fft2048: pipelined 2048-point FFT/IFFT in radix-2 single-delay-feedback
// (R2SDF) form, with run-time transform length 128..2048.
//
// log2(N) = 11 identical stages (sdf_stage) are chained; the stage i
// (i = 0..10) has a feedback FIFO of N/2**(i+1) words (1024, 512, ..., 1), its
// own AGU and twiddle ROM, and a complex multiplier on its output. Samples
// enter in natural order, one complex 2 x 16-bit word per clock with
// in_valid, and leave in bit-reversed order (decimation in frequency);
// out_index gives the frequency bin of each output word.
//
// Configuration: cfg_inverse selects the inverse transform (conjugated
// twiddles), cfg_len_log2 the length 2**cfg_len_log2 (7..11; values outside
// are clamped). Both are taken when cfg_load is high, which also flushes the
// pipeline; after reset the core does a forward 2048-point FFT. A length
// 2**m < N uses only the last m stages; the first ones are bypassed.
//
// Scaling: every butterfly halves its results, so the forward output is
// DFT(x)/len and the inverse output is IDFT(X) = (1/len) sum X e^{+j...}.
//
// Timing: the input is registered (FF), and each stage registers its result,
// so with data streamed every clock the first output of a block appears
// len + 11 clocks after its first input was presented (len - 1 clocks of
// feedback delay plus 12 registers). The pipeline moves only on in_valid; to
// push the last block out, keep feeding (for example zeros) for another len
// samples. Throughput is one sample per clock.
module fft2048
  import fft_pkg::*;
#(
  parameter int N_LOG2   = 11,           // 2048 points
  parameter int MIN_LOG2 = 7             // 128 points
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  logic              cfg_inverse,
  input  logic [3:0]        cfg_len_log2,
  input  logic              in_valid,
  input  cplx_t             in_data,
  output logic              out_valid,
  output cplx_t             out_data,
  output logic [N_LOG2-1:0] out_index,
  output logic [3:0]        len_log2,     // length in use
  output logic              inverse       // direction in use
);

  // ---------------- configuration ----------------
  logic [3:0] len_clamped;

  always_comb begin
    if (cfg_len_log2 > 4'(N_LOG2))         len_clamped = 4'(N_LOG2);
    else if (cfg_len_log2 < 4'(MIN_LOG2))  len_clamped = 4'(MIN_LOG2);
    else                                   len_clamped = cfg_len_log2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_log2 <= 4'(N_LOG2);
      inverse  <= 1'b0;
    end else if (cfg_load) begin
      len_log2 <= len_clamped;
      inverse  <= cfg_inverse;
    end
  end

  // ---------------- input register ----------------
  logic  in_valid_q;
  cplx_t in_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid_q <= 1'b0;
      in_data_q  <= '0;
    end else begin
      in_valid_q <= in_valid && !cfg_load;
      if (in_valid) in_data_q <= in_data;
    end
  end

  // ---------------- stage chain ----------------
  logic  st_valid [N_LOG2+1];
  cplx_t st_data  [N_LOG2+1];

  assign st_valid[0] = in_valid_q;
  assign st_data[0]  = in_data_q;

  for (genvar i = 0; i < N_LOG2; i++) begin : g_stage
    localparam int LL = N_LOG2 - 1 - i;
    sdf_stage #(.L_LOG2(LL)) u_stage (
      .clk, .rst_n,
      .clear     (cfg_load),
      .enable    (4'(LL) < len_log2),
      .inverse,
      .in_valid  (st_valid[i]),
      .in_data   (st_data[i]),
      .out_valid (st_valid[i+1]),
      .out_data  (st_data[i+1])
    );
  end

  assign out_valid = st_valid[N_LOG2];
  assign out_data  = st_data[N_LOG2];

  // ---------------- output bin index ----------------
  // Output m of a block is bin bitrev_len(m).
  logic [N_LOG2-1:0] out_cnt, len_mask, cnt_rev;

  assign len_mask = N_LOG2'((1 << len_log2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          out_cnt <= '0;
    else if (cfg_load)   out_cnt <= '0;
    else if (out_valid)  out_cnt <= (out_cnt + 1'b1) & len_mask;
  end

  always_comb begin
    for (int b = 0; b < N_LOG2; b++) cnt_rev[b] = out_cnt[N_LOG2-1-b];
    out_index = cnt_rev >> (4'(N_LOG2) - len_log2);
  end

  a_cfg_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_load |-> (cfg_len_log2 >= 4'(MIN_LOG2) && cfg_len_log2 <= 4'(N_LOG2)))
    else $warning("cfg_len_log2 %0d outside %0d..%0d, clamped", cfg_len_log2, MIN_LOG2, N_LOG2);

endmodule
