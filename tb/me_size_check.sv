// me_size_check: drives one me_top built for a given block size.
//
// Helper of tb_me_sizes. Runs NSEARCH searches over the whole X_MAX x Y_MAX
// area of a random reference frame, with NBLK current blocks that are exact
// copies, noisy copies or random blocks, and compares each block's best SAD
// and position with a full-search model (earliest candidate wins among equal
// SADs) and the clock count with one candidate per clock plus 3 clocks.
// Reports its check and failure counts when finished is high.
module me_size_check
  import me_pkg::*;
#(
  parameter int unsigned BLK_W = 4,
  parameter int unsigned BLK_H = 4,
  parameter int unsigned NBLK = 3,
  parameter int unsigned X_MAX = 6,
  parameter int unsigned Y_MAX = 4,
  parameter int unsigned NSEARCH = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned N = BLK_W * BLK_H;
  localparam int unsigned SAD_W = sad_width(N);
  localparam int unsigned X_W = $clog2(X_MAX), Y_W = $clog2(Y_MAX);
  localparam int unsigned FW = X_MAX + BLK_W - 1, FH = Y_MAX + BLK_H - 1;

  logic start = 0, ref_valid = 0;
  logic [X_W:0] search_w = (X_W+1)'(X_MAX);
  logic [Y_W:0] search_h = (Y_W+1)'(Y_MAX);
  pix_t [NBLK-1:0][N-1:0] cur_blk;
  pix_t           [N-1:0] ref_blk;
  logic busy, done;
  logic [NBLK-1:0][SAD_W-1:0] best_sad;
  logic [NBLK-1:0][X_W-1:0]   best_x;
  logic [NBLK-1:0][Y_W-1:0]   best_y;

  me_top #(.BLK_W(BLK_W), .BLK_H(BLK_H), .NBLK(NBLK), .X_MAX(X_MAX), .Y_MAX(Y_MAX)) dut (
    .clk, .rst_n, .start, .search_w, .search_h, .cur_blk, .ref_valid, .ref_blk,
    .busy, .done, .best_sad, .best_x, .best_y);

  pix_t frame [FH][FW];

  initial begin
    int m_sad [NBLK], m_x [NBLK], m_y [NBLK];
    int px, py, cyc;
    finished = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int s = 0; s < NSEARCH; s++) begin
      for (int y = 0; y < FH; y++)
        for (int x = 0; x < FW; x++) frame[y][x] = pix_t'($urandom);
      for (int k = 0; k < NBLK; k++) begin
        px = $urandom_range(0, X_MAX - 1); py = $urandom_range(0, Y_MAX - 1);
        for (int i = 0; i < N; i++) begin
          automatic int v = int'(frame[py + i / BLK_W][px + i % BLK_W]);
          case ((s + k) % 3)
            0: cur_blk[k][i] = pix_t'(v);
            1: cur_blk[k][i] = pix_t'(v > 250 ? v - 5 : v + int'($urandom_range(0, 5)));
            default: cur_blk[k][i] = pix_t'($urandom);
          endcase
        end
        m_sad[k] = 0;
        for (int y = 0; y < Y_MAX; y++)
          for (int x = 0; x < X_MAX; x++) begin
            automatic int sum = 0;
            for (int i = 0; i < N; i++) begin
              automatic int d = int'(cur_blk[k][i]) - int'(frame[y + i / BLK_W][x + i % BLK_W]);
              sum += (d < 0) ? -d : d;
            end
            if ((x == 0 && y == 0) || sum < m_sad[k]) begin m_sad[k] = sum; m_x[k] = x; m_y[k] = y; end
          end
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      for (int y = 0; y < Y_MAX; y++)
        for (int x = 0; x < X_MAX; x++) begin
          ref_valid = 1;
          for (int i = 0; i < N; i++) ref_blk[i] = frame[y + i / BLK_W][x + i % BLK_W];
          @(negedge clk); cyc++;
        end
      ref_valid = 0;
      while (!done && cyc < X_MAX * Y_MAX + 50) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != X_MAX * Y_MAX + 3) begin
        failures++;
        $display("ERROR %0dx%0d: done after %0d clocks", BLK_W, BLK_H, cyc);
      end
      for (int k = 0; k < NBLK; k++) begin
        checks++;
        if (int'(best_sad[k]) != m_sad[k] || int'(best_x[k]) != m_x[k] || int'(best_y[k]) != m_y[k]) begin
          failures++;
          $display("ERROR %0dx%0d search %0d blk %0d: got %0d at (%0d,%0d), exp %0d at (%0d,%0d)",
                   BLK_W, BLK_H, s, k, best_sad[k], best_x[k], best_y[k], m_sad[k], m_x[k], m_y[k]);
        end
      end
    end
    finished = 1;
  end
endmodule
