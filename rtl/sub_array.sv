// sub_array: parallel pixel subtractor of the motion-estimation engine.
//
// Every clock it takes the N pixels of NBLK current blocks and the N pixels of
// one reference candidate block, and forms all NBLK*N differences a - b at
// once. Following the published pipeline, the subtractor inputs are
// registered (stage 1) and the differences are registered (stage 2), so the
// subtractors sit alone between two flip-flop stages and a new candidate can
// enter every clock. The reference block is registered once and shared by all
// current blocks, which is how several blocks of a frame row are searched
// concurrently against the same candidate.
//
// Interface: a_in[k][i] is pixel i of current block k, b_in[i] pixel i of the
// candidate; c_out[k][i] = a_in[k][i] - b_in[i], two clocks later, as a
// signed PIX_W+1-bit value. There is no reset and no enable: the array is a
// free-running pipeline, and the valid/position tags that travel beside it
// are kept by the caller.
//
// From the original design: N = 4 (a 2x2 block), 8-bit pixels, input and
// output registers around each subtractor, three concurrent blocks sharing
// the reference input. This design's choice: a 9-bit signed difference
// instead of a wrapping 8-bit one.
module sub_array
  import me_pkg::*;
#(
  parameter int unsigned N    = 4,  // pixels per block (2x2)
  parameter int unsigned NBLK = 3   // current blocks searched concurrently
) (
  input  logic                         clk,
  input  pix_t  [NBLK-1:0][N-1:0]      a_in,
  input  pix_t            [N-1:0]      b_in,
  output diff_t [NBLK-1:0][N-1:0]      c_out
);

  pix_t  [NBLK-1:0][N-1:0] a_q;
  pix_t            [N-1:0] b_q;
  diff_t [NBLK-1:0][N-1:0] c_q;

  always_ff @(posedge clk) begin
    a_q <= a_in;
    b_q <= b_in;
    for (int k = 0; k < int'(NBLK); k++)
      for (int i = 0; i < int'(N); i++)
        c_q[k][i] <= diff_t'({1'b0, a_q[k][i]}) - diff_t'({1'b0, b_q[i]});
  end

  assign c_out = c_q;

endmodule
