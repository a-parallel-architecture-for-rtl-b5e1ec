// tb_sad_tree: self-checking test of the SAD adder.
//
// Applies random signed differences (including the extremes -255 and +255)
// every clock and checks, one clock later, that the output equals the sum of
// their absolute values computed here. Runs a 4-pixel (2x2) and a 16-pixel
// (4x4) instance.
module tb_sad_tree;
  import me_pkg::*;
  localparam int unsigned CYC = 500;

  logic clk = 0;
  diff_t [3:0]  d4;
  diff_t [15:0] d16;
  logic [9:0]   s4;
  logic [11:0]  s16;
  int checks = 0, failures = 0;

  sad_tree #(.N(4))  dut4  (.clk, .d(d4),  .sad(s4));
  sad_tree #(.N(16)) dut16 (.clk, .d(d16), .sad(s16));

  always #5 clk = ~clk;

  function automatic diff_t rdiff();
    case ($urandom_range(0, 4))
      0:       return diff_t'(-255);
      1:       return diff_t'(255);
      2:       return diff_t'(0);
      default: return diff_t'(int'($urandom_range(0, 510)) - 255);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e4, e16;
    for (int t = 0; t < CYC; t++) begin
      e4 = 0; e16 = 0;
      // Alternate all-extreme vectors with random ones.
      for (int i = 0; i < 4; i++)  begin d4[i]  = (t % 7 == 0) ? diff_t'(-255) : rdiff(); e4  += (d4[i]  < 0) ? -int'(d4[i])  : int'(d4[i]);  end
      for (int i = 0; i < 16; i++) begin d16[i] = (t % 7 == 0) ? diff_t'(255)  : rdiff(); e16 += (d16[i] < 0) ? -int'(d16[i]) : int'(d16[i]); end
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(s4) != e4)   begin failures++; $display("ERROR N=4 t=%0d got %0d exp %0d", t, s4, e4); end
      if (int'(s16) != e16) begin failures++; $display("ERROR N=16 t=%0d got %0d exp %0d", t, s16, e16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
