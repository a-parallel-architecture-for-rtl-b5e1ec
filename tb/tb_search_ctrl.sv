// tb_search_ctrl: self-checking test of the full-search sequencer.
//
// Runs searches of random sizes (including 1x1, a single row, a single
// column and the largest size of this instance) with random gaps in
// ref_valid, and checks every tag against a raster-order model: x counts
// fastest, first on (0,0), last on (w-1,h-1), busy falls after the last
// accepted candidate. Checks that a search without gaps takes exactly w*h
// clocks and that start while busy and candidates while idle are ignored.
module tb_search_ctrl;
  localparam int unsigned X_MAX = 16, Y_MAX = 12;
  localparam int unsigned X_W = $clog2(X_MAX), Y_W = $clog2(Y_MAX);

  logic clk = 0, rst_n = 0, start = 0, ref_valid = 0;
  logic [X_W:0] search_w = '0;
  logic [Y_W:0] search_h = '0;
  logic busy, tag_valid, tag_first, tag_last;
  logic [X_W-1:0] tag_x;
  logic [Y_W-1:0] tag_y;
  int checks = 0, failures = 0;

  search_ctrl #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("ERROR %s", msg); end
  endtask

  initial begin
    int w, h, cyc;
    bit gaps;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Candidates while idle produce no tags.
    ref_valid = 1; #1;
    check(!tag_valid && !busy, "tag while idle");
    for (int s = 0; s < 60; s++) begin
      case (s)
        0: begin w = 1; h = 1; end
        1: begin w = X_MAX; h = 1; end
        2: begin w = 1; h = Y_MAX; end
        3: begin w = X_MAX; h = Y_MAX; end
        default: begin w = $urandom_range(1, X_MAX); h = $urandom_range(1, Y_MAX); end
      endcase
      gaps = (s % 2 == 1);
      @(negedge clk);
      ref_valid = 0; start = 1; search_w = (X_W+1)'(w); search_h = (Y_W+1)'(h);
      @(negedge clk);
      start = 0; search_w = '0; search_h = '0;
      check(busy, "busy after start");
      cyc = 0;
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          while (gaps && $urandom_range(0, 2) == 0) begin
            ref_valid = 0; #1;
            check(!tag_valid && busy, "gap handling");
            // a start while busy must be ignored
            start = 1; search_w = 1; search_h = 1;
            @(negedge clk); cyc++;
            start = 0;
          end
          ref_valid = 1; #1;
          check(tag_valid && int'(tag_x) == x && int'(tag_y) == y &&
                tag_first == (x == 0 && y == 0) && tag_last == (x == w-1 && y == h-1),
                $sformatf("tag at (%0d,%0d) of %0dx%0d: got v%0b (%0d,%0d) f%0b l%0b",
                          x, y, w, h, tag_valid, tag_x, tag_y, tag_first, tag_last));
          @(negedge clk); cyc++;
        end
      ref_valid = $urandom_range(0, 1); #1;
      check(!busy && !tag_valid, "busy after last candidate");
      if (!gaps) check(cyc == w * h, $sformatf("search took %0d clocks, exp %0d", cyc, w * h));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
