// tb_me_top: end-to-end test of the motion-estimation engine.
//
// Acts as the host: for each search it generates a reference frame, picks
// NBLK current blocks (copies of reference blocks at random places, with or
// without noise, or random blocks), streams every candidate of the search
// area in raster order, and compares the engine's best SAD and position for
// each block with a full-search model computed here (earliest candidate wins
// among equal SADs). It also checks the timing: without gaps, done comes
// P + 3 clocks after the first candidate is presented, P the number of
// candidates, i.e. one candidate per clock plus the pipeline latency.
//
// Mechanisms that must each happen at least once (a failure is counted
// otherwise): gaps in the candidate stream, a later candidate replacing the
// best one, an equal SAD that must not replace it, a start while busy that
// must be ignored, a search started right after the previous one ends, the
// concurrent blocks of one search ending at different positions, an exact
// match (SAD 0), and a search over the largest area of this instance.
module tb_me_top;
  import me_pkg::*;
  localparam int unsigned BLK_W = 2, BLK_H = 2, NBLK = 3;
  localparam int unsigned X_MAX = 24, Y_MAX = 12;
  localparam int unsigned N = BLK_W * BLK_H;
  localparam int unsigned SAD_W = sad_width(N);
  localparam int unsigned X_W = $clog2(X_MAX), Y_W = $clog2(Y_MAX);
  localparam int unsigned FW = X_MAX + BLK_W - 1, FH = Y_MAX + BLK_H - 1;
  localparam int unsigned NSEARCH = 80;

  logic clk = 0, rst_n = 0, start = 0, ref_valid = 0;
  logic [X_W:0] search_w = '0;
  logic [Y_W:0] search_h = '0;
  pix_t [NBLK-1:0][N-1:0] cur_blk = '0;
  pix_t           [N-1:0] ref_blk = '0;
  logic busy, done;
  logic [NBLK-1:0][SAD_W-1:0] best_sad;
  logic [NBLK-1:0][X_W-1:0]   best_x;
  logic [NBLK-1:0][Y_W-1:0]   best_y;

  me_top #(.BLK_W(BLK_W), .BLK_H(BLK_H), .NBLK(NBLK), .X_MAX(X_MAX), .Y_MAX(Y_MAX)) dut (.*);

  always #5 clk = ~clk;

  pix_t frame [FH][FW];
  int checks = 0, failures = 0;
  int n_gap = 0, n_replace = 0, n_tie = 0, n_start_busy = 0, n_b2b = 0;
  int n_diverse = 0, n_exact = 0, n_full = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("ERROR %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sad_at(int k, int x, int y);
    int s = 0;
    for (int i = 0; i < N; i++) begin
      int d = int'(cur_blk[k][i]) - int'(frame[y + i / BLK_W][x + i % BLK_W]);
      s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  initial begin
    int sw, sh, p, cyc, n_presented, px, py;
    int m_sad [NBLK], m_x [NBLK], m_y [NBLK];
    bit gaps, lowent, b2b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    b2b = 0;
    for (int s = 0; s < NSEARCH; s++) begin
      // --- choose the search ---
      if (s % 10 == 0) begin sw = X_MAX; sh = Y_MAX; end
      else begin sw = $urandom_range(1, X_MAX); sh = $urandom_range(1, Y_MAX); end
      gaps   = (s % 3 == 1);
      lowent = (s % 4 == 2);  // few pixel values: many equal SADs
      for (int y = 0; y < FH; y++)
        for (int x = 0; x < FW; x++)
          frame[y][x] = lowent ? pix_t'($urandom_range(0, 1) * 64) : pix_t'($urandom);
      for (int k = 0; k < NBLK; k++) begin
        px = $urandom_range(0, sw - 1); py = $urandom_range(0, sh - 1);
        for (int i = 0; i < N; i++) begin
          automatic int v = int'(frame[py + i / BLK_W][px + i % BLK_W]);
          case ((s + k) % 3)
            0: cur_blk[k][i] = pix_t'(v);                                  // exact copy
            1: cur_blk[k][i] = pix_t'(v + int'($urandom_range(0, 8)) - 4 < 0 ? 0 :
                                      v + int'($urandom_range(0, 8)) - 4 > 255 ? 255 :
                                      v + int'($urandom_range(0, 8)) - 4);  // noisy copy
            default: cur_blk[k][i] = pix_t'($urandom);                     // unrelated
          endcase
        end
      end
      // --- model ---
      for (int k = 0; k < NBLK; k++) begin
        automatic bit first_seen = 0;
        for (int y = 0; y < sh; y++)
          for (int x = 0; x < sw; x++) begin
            automatic int v = sad_at(k, x, y);
            if (!first_seen || v < m_sad[k]) begin
              if (first_seen) n_replace++;
              first_seen = 1; m_sad[k] = v; m_x[k] = x; m_y[k] = y;
            end else if (v == m_sad[k]) n_tie++;
          end
      end
      if (m_x[0] != m_x[1] || m_y[0] != m_y[1] || m_x[1] != m_x[2] || m_y[1] != m_y[2]) n_diverse++;
      for (int k = 0; k < NBLK; k++) if (m_sad[k] == 0) n_exact++;
      if (sw == X_MAX && sh == Y_MAX) n_full++;

      // --- start ---
      if (!b2b) @(negedge clk);
      check(!busy, "busy before start");
      start = 1; search_w = (X_W+1)'(sw); search_h = (Y_W+1)'(sh);
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      // --- stream candidates ---
      p = sw * sh; cyc = 0; n_presented = 0;
      for (int y = 0; y < sh; y++)
        for (int x = 0; x < sw; x++) begin
          while (gaps && $urandom_range(0, 3) == 0) begin
            ref_valid = 0;
            for (int i = 0; i < N; i++) ref_blk[i] = pix_t'($urandom);  // junk in a gap
            if (n_presented > 0 && $urandom_range(0, 1) == 0) begin
              start = 1; search_w = 1; search_h = 1; n_start_busy++;
            end
            n_gap++;
            @(negedge clk); cyc++;
            start = 0;
          end
          ref_valid = 1;
          for (int i = 0; i < N; i++) ref_blk[i] = frame[y + i / BLK_W][x + i % BLK_W];
          n_presented++;
          @(negedge clk); cyc++;
        end
      ref_valid = 0;
      check(!busy, "busy after last candidate");
      // --- wait for done ---
      while (!done && cyc < p + 1000) begin
        check(!done, "early done");
        @(negedge clk); cyc++;
      end
      if (!gaps) check(cyc == p + 3, $sformatf("search %0d: done after %0d clocks, exp %0d", s, cyc, p + 3));
      for (int k = 0; k < NBLK; k++)
        check(int'(best_sad[k]) == m_sad[k] && int'(best_x[k]) == m_x[k] && int'(best_y[k]) == m_y[k],
              $sformatf("search %0d blk %0d (%0dx%0d): got sad %0d at (%0d,%0d), exp %0d at (%0d,%0d)",
                        s, k, sw, sh, best_sad[k], best_x[k], best_y[k], m_sad[k], m_x[k], m_y[k]));
      // Next search starts in this same cycle half the time (back to back).
      b2b = (s % 2 == 0);
      if (b2b) n_b2b++;
    end
    @(negedge clk);
    $display("gaps=%0d replacements=%0d ties=%0d start_while_busy=%0d back_to_back=%0d",
             n_gap, n_replace, n_tie, n_start_busy, n_b2b);
    $display("diverse_results=%0d exact_matches=%0d full_area=%0d", n_diverse, n_exact, n_full);
    check(n_gap > 0, "no gap exercised");
    check(n_replace > 0, "no replacement exercised");
    check(n_tie > 0, "no tie exercised");
    check(n_start_busy > 0, "no start while busy exercised");
    check(n_b2b > 0, "no back-to-back search exercised");
    check(n_diverse > 0, "no search with differing results");
    check(n_exact > 0, "no exact match");
    check(n_full > 0, "no full-area search");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
