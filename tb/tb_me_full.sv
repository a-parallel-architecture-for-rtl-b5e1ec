// tb_me_full: one complete search at the engine's default size.
//
// The engine is built with its defaults (2x2 blocks, three concurrent
// blocks, search area up to 1024 x 768 positions). The host side searches
// the whole area: 786,432 candidates, one per clock. The reference frame is
// a pseudo-random image computed from a hash of the pixel coordinates, so no
// frame has to be stored. Current block 0 is an exact copy of the reference
// block at (700, 500), block 1 a copy of the block at (3, 767) with noise of
// up to +-3 per pixel, block 2 a random block. The expected result of each is
// computed here while the candidates are streamed (earliest candidate wins
// among equal SADs), and the clock count is checked against one candidate per
// clock plus the 3-clock pipeline latency seen at done.
module tb_me_full;
  import me_pkg::*;
  localparam int unsigned N = 4, NBLK = 3, SW = 1024, SH = 768;

  logic clk = 0, rst_n = 0, start = 0, ref_valid = 0;
  logic [10:0] search_w = '0;
  logic [10:0] search_h = '0;
  pix_t [NBLK-1:0][N-1:0] cur_blk = '0;
  pix_t           [N-1:0] ref_blk = '0;
  logic busy, done;
  logic [NBLK-1:0][9:0] best_sad;
  logic [NBLK-1:0][9:0] best_x;
  logic [NBLK-1:0][9:0] best_y;
  int checks = 0, failures = 0;

  me_top dut (.*);

  always #5 clk = ~clk;

  // Pseudo-random reference pixel at (x, y).
  function automatic pix_t fpix(int x, int y);
    int unsigned h = (x * 32'h9E3779B1) ^ (y * 32'h85EBCA77) ^ 32'h1234567;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_sad [NBLK], m_x [NBLK], m_y [NBLK];
    int cyc;
    for (int i = 0; i < N; i++) begin
      cur_blk[0][i] = fpix(700 + i % 2, 500 + i / 2);
      cur_blk[1][i] = clamp(int'(fpix(3 + i % 2, 767 + i / 2)) + int'($urandom_range(0, 6)) - 3);
      cur_blk[2][i] = pix_t'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; search_w = 11'(SW); search_h = 11'(SH);
    @(negedge clk);
    start = 0;
    cyc = 0;
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
        @(negedge clk); cyc++;
      end
    ref_valid = 0;
    while (!done && cyc < SW * SH + 100) begin @(negedge clk); cyc++; end
    check(cyc == SW * SH + 3, $sformatf("done after %0d clocks, exp %0d", cyc, SW * SH + 3));
    check(m_sad[0] == 0, "model lost the planted exact match");
    for (int k = 0; k < NBLK; k++) begin
      $display("block %0d: best SAD %0d at (%0d,%0d), expected %0d at (%0d,%0d)",
               k, best_sad[k], best_x[k], best_y[k], m_sad[k], m_x[k], m_y[k]);
      check(int'(best_sad[k]) == m_sad[k] && int'(best_x[k]) == m_x[k] && int'(best_y[k]) == m_y[k],
            $sformatf("block %0d mismatch", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
