// tb_sub_array: self-checking test of the parallel subtractor.
//
// Drives random current and candidate pixels every clock (including the
// extreme values 0 and 255) and checks that each output difference equals
// a - b of the inputs applied exactly two clocks earlier, as a signed 9-bit
// value. The expected values are computed here from a history of the inputs.
module tb_sub_array;
  import me_pkg::*;
  localparam int unsigned N = 4, NBLK = 3, CYC = 400;

  logic clk = 0;
  pix_t  [NBLK-1:0][N-1:0] a;
  pix_t            [N-1:0] b;
  diff_t [NBLK-1:0][N-1:0] c;
  pix_t  [NBLK-1:0][N-1:0] a_h [1];
  pix_t            [N-1:0] b_h [1];
  int checks = 0, failures = 0;

  sub_array #(.N(N), .NBLK(NBLK)) dut (.clk, .a_in(a), .b_in(b), .c_out(c));

  always #5 clk = ~clk;

  function automatic pix_t rpix();
    case ($urandom_range(0, 3))
      0:       return 8'd0;
      1:       return 8'd255;
      default: return pix_t'($urandom);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < CYC; t++) begin
      for (int k = 0; k < NBLK; k++) for (int i = 0; i < N; i++) a[k][i] = rpix();
      for (int i = 0; i < N; i++) b[i] = rpix();
      @(posedge clk);
      #1;
      // c now holds the differences of the inputs applied before the previous
      // edge: one edge into the input registers, one into the output ones.
      if (t >= 1) begin
        for (int k = 0; k < NBLK; k++)
          for (int i = 0; i < N; i++) begin
            int exp_d;
            exp_d = int'(a_h[0][k][i]) - int'(b_h[0][i]);
            checks++;
            if (int'(c[k][i]) != exp_d) begin
              failures++;
              if (failures < 10)
                $display("ERROR t=%0d blk %0d pix %0d: got %0d exp %0d", t, k, i, int'(c[k][i]), exp_d);
            end
          end
      end
      a_h[0] = a;      b_h[0] = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
