// sad_tree: sum of absolute differences of one block.
//
// Takes the N signed pixel differences of one current block against one
// candidate, takes their absolute values and adds them, and registers the
// sum: sad = sum |d[i]|, one clock after d. A new set of differences can be
// taken every clock. The sum is the block's distance measure; divided by N
// (N a power of two, so a binary point clog2(N) places from the right) it is
// the per-pixel mean error used to report match quality.
//
// The original design states that the SAD of a block is formed from
// differences computed in parallel; the absolute-value stage and the single
// adder stage are this design's choice.
module sad_tree
  import me_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned SAD_W = sad_width(N)
) (
  input  logic               clk,
  input  diff_t [N-1:0]      d,
  output logic  [SAD_W-1:0]  sad
);

  // |d| of a difference of two PIX_W-bit pixels fits in PIX_W bits.
  function automatic pix_t abs_diff(diff_t v);
    return pix_t'(v < 0 ? -v : v);
  endfunction

  logic [SAD_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(N); i++)
      sum += SAD_W'(abs_diff(d[i]));
  end

  always_ff @(posedge clk) sad <= sum;

endmodule
