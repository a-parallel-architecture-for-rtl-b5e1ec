// me_top: parallel full-search motion-estimation engine.
//
// The engine finds, for NBLK blocks of the current frame at once, the block
// of the reference search area with the smallest sum of absolute differences
// (SAD) and reports its position. The host holds the NBLK current blocks on
// cur_blk for the whole search and streams the candidate blocks of the search
// area on ref_blk, one per clock, in raster order of their top-left position
// (x fastest). Every candidate is compared with all NBLK current blocks in
// the same clock: all BLK_W*BLK_H pixel subtractions of all blocks happen in
// parallel, so a search over an x by y area takes x*y clocks plus the
// pipeline latency, whatever the block size.
//
// Pipeline (one candidate per clock, ref_valid may have gaps):
//   clock 0  search_ctrl tags the accepted candidate with (x, y, first, last)
//   clock 1  sub_array input registers (current and candidate pixels)
//   clock 2  sub_array difference registers
//   clock 3  sad_tree SAD registers, one per current block
//   clock 4  best_match result registers; done pulses for the last candidate
// The tags ride a 3-stage shift register beside the data so that each SAD
// meets its own position in best_match.
//
// Interface: pulse start (while busy is low) with search_w/search_h, then
// present candidates with ref_valid high while busy is high; busy falls after
// the last one is accepted. done pulses 4 clocks after the last candidate;
// best_sad[k], best_x[k], best_y[k] then hold the result for current block k
// until the next search. cur_blk must not change from the first candidate
// until 1 clock after the last one. Pixel i of a block is pixel
// (i % BLK_W, i / BLK_W) of it.
//
// From the original design: the parallel subtractor with registered inputs
// and outputs, the 2x2 block of its smallest configuration, three blocks
// searched concurrently against one shared candidate, a full search of one
// candidate per clock. This design's choices: the SAD adder, the best-match
// tracker, the start/busy/done handshake, the raster order and the default
// search area of a whole 1024x768 frame.
module me_top
  import me_pkg::*;
#(
  parameter int unsigned BLK_W = 2,     // block width in pixels
  parameter int unsigned BLK_H = 2,     // block height in pixels
  parameter int unsigned NBLK  = 3,     // current blocks searched concurrently
  parameter int unsigned X_MAX = 1024,  // widest search area
  parameter int unsigned Y_MAX = 768,   // tallest search area
  localparam int unsigned N     = BLK_W * BLK_H,
  localparam int unsigned SAD_W = sad_width(N),
  localparam int unsigned X_W   = $clog2(X_MAX),
  localparam int unsigned Y_W   = $clog2(Y_MAX)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [X_W:0]                  search_w,
  input  logic [Y_W:0]                  search_h,
  input  pix_t [NBLK-1:0][N-1:0]        cur_blk,
  input  logic                          ref_valid,
  input  pix_t           [N-1:0]        ref_blk,
  output logic                          busy,
  output logic                          done,
  output logic [NBLK-1:0][SAD_W-1:0]    best_sad,
  output logic [NBLK-1:0][X_W-1:0]      best_x,
  output logic [NBLK-1:0][Y_W-1:0]      best_y
);

  localparam int unsigned LAT = 3;  // sub_array (2) + sad_tree (1)

  typedef struct packed {
    logic           valid;
    logic           first;
    logic           last;
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
  } tag_t;

  tag_t                       tag0;
  tag_t  [LAT-1:0]            tag_q;
  diff_t [NBLK-1:0][N-1:0]    diff;
  logic  [NBLK-1:0][SAD_W-1:0] sad;
  logic  [NBLK-1:0]           done_v;

  search_ctrl #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_ctrl (
    .clk, .rst_n, .start, .search_w, .search_h, .ref_valid,
    .busy,
    .tag_valid(tag0.valid), .tag_first(tag0.first), .tag_last(tag0.last),
    .tag_x(tag0.x), .tag_y(tag0.y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_q <= '0;
    else        tag_q <= {tag_q[LAT-2:0], tag0};
  end

  sub_array #(.N(N), .NBLK(NBLK)) u_sub (
    .clk, .a_in(cur_blk), .b_in(ref_blk), .c_out(diff)
  );

  for (genvar k = 0; k < int'(NBLK); k++) begin : g_blk
    sad_tree #(.N(N), .SAD_W(SAD_W)) u_sad (
      .clk, .d(diff[k]), .sad(sad[k])
    );
    best_match #(.SAD_W(SAD_W), .X_W(X_W), .Y_W(Y_W)) u_best (
      .clk, .rst_n,
      .in_valid(tag_q[LAT-1].valid), .in_first(tag_q[LAT-1].first),
      .in_last(tag_q[LAT-1].last),   .in_sad(sad[k]),
      .in_x(tag_q[LAT-1].x),         .in_y(tag_q[LAT-1].y),
      .done(done_v[k]), .best_sad(best_sad[k]), .best_x(best_x[k]), .best_y(best_y[k])
    );
  end

  assign done = &done_v;

endmodule
