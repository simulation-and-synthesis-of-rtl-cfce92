// sdf_fifo: feedback delay line of one R2SDF stage.
//
// The stage stores half a block in this FIFO: N/2 words in the first stage,
// N/4 in the second, down to one word in the last, each word 2 x 16 bits. The
// figures draw it as a shift register; it is built here as a circular buffer
// (a memory of DEPTH words and one pointer), which behaves the same as a
// DEPTH-long shift register but moves one word per step instead of all of them.
// Reading and writing happen in the same step: dout is the word at the pointer
// (read combinationally), and on a clock edge with shift high din is written
// there and the pointer advances. dout is therefore the din of DEPTH shifts
// earlier.
//
// The memory has no reset; the stage ignores its contents until it has
// written a full block (see sdf_stage). rst_n only resets the pointer.
module sdf_fifo
  import fft_pkg::*;
#(
  parameter int DEPTH_LOG2 = 10          // 2**10 = N/2 words for N = 2048
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,                   // synchronous pointer reset
  input  logic  shift,
  input  cplx_t din,
  output cplx_t dout
);

  localparam int DEPTH = 1 << DEPTH_LOG2;
  localparam int PW    = (DEPTH_LOG2 > 0) ? DEPTH_LOG2 : 1;

  cplx_t          mem [DEPTH];
  logic [PW-1:0]  ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (shift) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ptr <= '0;
    else if (clear)             ptr <= '0;
    else if (shift) begin
      if (DEPTH == 1)           ptr <= '0;
      else                      ptr <= ptr + 1'b1;
    end
  end

endmodule
