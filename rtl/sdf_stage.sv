// sdf_stage: one radix-2 single-delay-feedback (R2SDF) decimation-in-frequency
// stage with its own AGU, twiddle ROM and complex multiplier.
//
// The stage has a feedback FIFO of L = 2**L_LOG2 words and works on blocks of
// 2L samples, counted by the AGU:
//   phase 0 (samples 0..L-1 of a block): each input word is written into the
//     FIFO. The word leaving the FIFO is a butterfly difference stored during
//     the previous block; it is multiplied by the twiddle W_{2L}^k (k from the
//     AGU) and sent to the next stage.
//   phase 1 (samples L..2L-1): the butterfly takes the FIFO word x[k] as its
//     first operand and the input x[k+L] as its second. The sum goes straight
//     to the next stage without a multiplication; the difference is written
//     back into the FIFO, to be multiplied and sent out during the next
//     phase 0.
// This is the ordering of the original architecture (differences stored, sums passed
// on), which puts the stage outputs in the order of the radix-2 flow graph.
// The first block only fills the FIFO, so outputs start after L samples
// (the start-up time); a stage is "primed" once it has seen one whole block,
// and only then are its phase-0 outputs valid.
//
// Result register: the selected result (sum or product) is registered (REG);
// out_valid/out_data appear one clock after the accepted input. The pipeline
// moves only on in_valid: a cycle without in_valid changes nothing but
// out_valid, so input gaps simply stall the stage.
//
// enable = 0 bypasses the stage (shorter transform lengths): the input is
// passed through the result register unchanged and the stage state is held
// cleared. clear synchronously restarts the stage (new configuration).
module sdf_stage
  import fft_pkg::*;
#(
  parameter int L_LOG2 = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  enable,
  input  logic  inverse,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  localparam int AW = (L_LOG2 > 0) ? L_LOG2 : 1;

  logic          step, phase, last, primed;
  logic [AW-1:0] addr;
  cplx_t         fifo_out, fifo_in, bf_sum, bf_diff, product, result;
  cplx_tw_t      w;

  assign step = in_valid && enable;

  agu #(.L_LOG2(L_LOG2)) u_agu (
    .clk, .rst_n,
    .clear (clear || !enable),
    .step,
    .phase,
    .addr,
    .last
  );

  sdf_fifo #(.DEPTH_LOG2(L_LOG2)) u_fifo (
    .clk, .rst_n,
    .clear (clear || !enable),
    .shift (step),
    .din   (fifo_in),
    .dout  (fifo_out)
  );

  bf2 u_bf2 (
    .a    (fifo_out),
    .b    (in_data),
    .sum  (bf_sum),
    .diff (bf_diff)
  );

  twiddle_rom #(.L_LOG2(L_LOG2)) u_rom (
    .addr,
    .inverse,
    .w
  );

  cmult u_cmult (
    .x (fifo_out),
    .w,
    .y (product)
  );

  // Input/feedback selection (the MUX/DMUX pairs around the FIFO).
  always_comb begin
    fifo_in = phase ? bf_diff : in_data;
    result  = phase ? bf_sum  : product;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   primed <= 1'b0;
    else if (clear || !enable)    primed <= 1'b0;
    else if (step && last)        primed <= 1'b1;
  end

  // Result register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
    end else if (!enable) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end else begin
      out_valid <= step && (phase || primed);
      if (step) out_data <= result;
    end
  end

  // A stage leaves phase 1 only through the last sample of a block, so a
  // primed stage has always completed a block.
  a_primed_after_block: assert property (@(posedge clk) disable iff (!rst_n)
    (step && last && !clear) |=> primed);

endmodule
