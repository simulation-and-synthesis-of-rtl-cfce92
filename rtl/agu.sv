// agu: address generation unit of one R2SDF stage.
//
// A stage whose feedback FIFO holds L = 2**L_LOG2 words works on blocks of 2L
// samples. The AGU holds the counter that tracks the position of the current
// sample inside that block; it advances by one for every sample the stage
// accepts (step). The counter's top bit is the stage phase:
//   phase 0 (first L samples):  input goes into the FIFO, the FIFO's old
//                               contents (differences) leave through the
//                               complex multiplier;
//   phase 1 (last L samples):   the butterfly combines FIFO and input.
// The lower L_LOG2 bits are the read address k of the twiddle ROM: during
// phase 0 the difference leaving the FIFO belongs to butterfly pair k and
// must be multiplied by W_{2L}^k. last marks the final sample of a block.
// The FFT/IFFT choice is applied in the twiddle ROM (conjugation), so the
// address itself is the same for both directions.
//
// clear restarts the count synchronously (new configuration); rst_n is the
// asynchronous reset.
module agu #(
  parameter  int L_LOG2 = 10,
  localparam int AW     = (L_LOG2 > 0) ? L_LOG2 : 1   // address width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                step,
  output logic                phase,
  output logic [AW-1:0]       addr,
  output logic                last
);


  logic [L_LOG2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (clear)  cnt <= '0;
    else if (step)   cnt <= cnt + 1'b1;
  end

  assign phase = cnt[L_LOG2];
  assign last  = &cnt;

  if (L_LOG2 > 0) begin : g_addr
    assign addr = cnt[AW-1:0];
  end else begin : g_addr0
    assign addr = '0;
  end

endmodule
