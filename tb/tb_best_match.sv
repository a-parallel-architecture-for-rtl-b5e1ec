// tb_best_match: self-checking test of the best-candidate tracker.
//
// Feeds searches of random length with random gaps, small random SADs (so
// equal SADs are common) and random positions. A model here keeps the
// minimum with the earliest-wins tie rule; at each done pulse the outputs
// are compared with it. Also checks that done comes exactly one clock after
// the last beat and never otherwise.
module tb_best_match;
  localparam int unsigned SAD_W = 10, X_W = 10, Y_W = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [SAD_W-1:0] in_sad = '0;
  logic [X_W-1:0] in_x = '0;
  logic [Y_W-1:0] in_y = '0;
  logic done;
  logic [SAD_W-1:0] best_sad;
  logic [X_W-1:0] best_x;
  logic [Y_W-1:0] best_y;
  int checks = 0, failures = 0, ties = 0;

  best_match #(.SAD_W(SAD_W), .X_W(X_W), .Y_W(Y_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_sad, m_x, m_y, len;
    logic exp_done;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      len = $urandom_range(1, 40);
      for (int j = 0; j < len; j++) begin
        // optional gap
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0; in_first = 0; in_last = 0;
          @(posedge clk); #1;
          checks++; if (done) begin failures++; $display("ERROR spurious done"); end
        end
        in_valid = 1; in_first = (j == 0); in_last = (j == len - 1);
        in_sad = SAD_W'((s % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 1023));
        in_x = X_W'($urandom); in_y = Y_W'($urandom);
        if (j == 0 || int'(in_sad) < m_sad) begin
          m_sad = in_sad; m_x = in_x; m_y = in_y;
        end else if (int'(in_sad) == m_sad) ties++;
        exp_done = in_last;
        @(posedge clk); #1;
        checks++;
        if (done !== exp_done) begin failures++; $display("ERROR done=%0b exp %0b", done, exp_done); end
        if (exp_done) begin
          checks++;
          if (int'(best_sad) != m_sad || int'(best_x) != m_x || int'(best_y) != m_y) begin
            failures++;
            $display("ERROR search %0d: got sad %0d (%0d,%0d) exp %0d (%0d,%0d)",
                     s, best_sad, best_x, best_y, m_sad, m_x, m_y);
          end
        end
      end
      in_valid = 0; in_first = 0; in_last = 0;
    end
    checks++;
    if (ties == 0) begin failures++; $display("ERROR no ties exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
