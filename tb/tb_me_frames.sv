// tb_me_frames: ten-block frame-pair workload at the default size.
//
// Models the evaluation of ten 2x2 blocks of a current frame against a
// whole 1024x768 reference frame. The reference frame is a pseudo-random
// image from a coordinate hash; the current frame is the reference moved by
// (DX, DY) with noise of up to +-NOISE per pixel. Ten neighbouring blocks of
// one row of the current frame are searched, three at a time (the engine's
// concurrent blocks; the last search carries one block twice), each over
// all 786,432 positions. Each result is compared with a full-search model
// computed here, and the mean error per pixel (SAD / 4) of every block is
// printed with the candidate found.
module tb_me_frames;
  import me_pkg::*;
  localparam int unsigned N = 4, NBLK = 3, SW = 1024, SH = 768;
  localparam int NB = 10, DX = 5, DY = 3, NOISE = 2, ROW = 400, COL0 = 300;

  logic clk = 0, rst_n = 0, start = 0, ref_valid = 0;
  logic [10:0] search_w = 11'(SW);
  logic [10:0] search_h = 11'(SH);
  pix_t [NBLK-1:0][N-1:0] cur_blk = '0;
  pix_t           [N-1:0] ref_blk = '0;
  logic busy, done;
  logic [NBLK-1:0][9:0] best_sad;
  logic [NBLK-1:0][9:0] best_x;
  logic [NBLK-1:0][9:0] best_y;
  int checks = 0, failures = 0;

  me_top dut (.*);

  always #5 clk = ~clk;

  function automatic pix_t fpix(int x, int y);
    int unsigned h = (x * 32'h9E3779B1) ^ (y * 32'h85EBCA77) ^ 32'h51ED270B;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12;
    return pix_t'(h >> 8);
  endfunction

  function automatic pix_t clamp(int v);
    return pix_t'(v < 0 ? 0 : v > 255 ? 255 : v);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_t blocks [NB][N];
    int m_sad [NBLK], m_x [NBLK], m_y [NBLK], idx [NBLK];
    automatic int total = 0;
    // Current-frame blocks: block j sits at (COL0 + 2j, ROW) and shows the
    // reference content at (COL0 + 2j + DX, ROW + DY), plus noise.
    for (int j = 0; j < NB; j++)
      for (int i = 0; i < N; i++)
        blocks[j][i] = clamp(int'(fpix(COL0 + 2 * j + DX + i % 2, ROW + DY + i / 2)) +
                             int'($urandom_range(0, 2 * NOISE)) - NOISE);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b0 = 0; b0 < NB; b0 += NBLK) begin
      for (int k = 0; k < NBLK; k++) begin
        idx[k] = (b0 + k < NB) ? b0 + k : NB - 1;
        for (int i = 0; i < N; i++) cur_blk[k][i] = blocks[idx[k]][i];
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int y = 0; y < SH; y++)
        for (int x = 0; x < SW; x++) begin
          ref_valid = 1;
          for (int i = 0; i < N; i++) ref_blk[i] = fpix(x + i % 2, y + i / 2);
          for (int k = 0; k < NBLK; k++) begin
            automatic int s = 0;
            for (int i = 0; i < N; i++) begin
              automatic int d = int'(cur_blk[k][i]) - int'(ref_blk[i]);
              s += (d < 0) ? -d : d;
            end
            if ((x == 0 && y == 0) || s < m_sad[k]) begin m_sad[k] = s; m_x[k] = x; m_y[k] = y; end
          end
          @(negedge clk);
        end
      ref_valid = 0;
      while (!done) @(negedge clk);
      for (int k = 0; k < NBLK; k++) begin
        if (b0 + k < NB) begin
          $display("block %0d: best (%0d,%0d), moved from (%0d,%0d), SAD %0d, mean error %0d.%02d",
                   idx[k] + 1, best_x[k], best_y[k], COL0 + 2 * idx[k], ROW, best_sad[k],
                   best_sad[k] / 4, 25 * (best_sad[k] % 4));
          total += int'(best_sad[k]);
        end
        check(int'(best_sad[k]) == m_sad[k] && int'(best_x[k]) == m_x[k] && int'(best_y[k]) == m_y[k],
              $sformatf("block %0d: got %0d at (%0d,%0d), exp %0d at (%0d,%0d)", idx[k] + 1,
                        best_sad[k], best_x[k], best_y[k], m_sad[k], m_x[k], m_y[k]));
      end
    end
    $display("average mean error over %0d blocks: %0d/%0d", NB, total, 4 * NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
