// tb_me_sizes: the engine built for the larger block sizes.
//
// The engine's block size is an elaboration parameter. This test builds it
// for 4x4, 8x4, 16x16, 64x32 and 64x64 blocks (three concurrent blocks
// each, small search areas), and for 4x4 and 8x8 blocks over a 55 x 55
// search area, and checks every search against a full-search model.
module tb_me_sizes;
  logic clk = 0, rst_n = 0;
  logic [6:0] fin;
  int c [7], f [7];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_size_check #(.BLK_W(4),  .BLK_H(4),  .X_MAX(8), .Y_MAX(6), .NSEARCH(4)) u0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  me_size_check #(.BLK_W(8),  .BLK_H(4),  .X_MAX(8), .Y_MAX(4), .NSEARCH(3)) u1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  me_size_check #(.BLK_W(16), .BLK_H(16), .X_MAX(4), .Y_MAX(4), .NSEARCH(3)) u2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  me_size_check #(.BLK_W(64), .BLK_H(32), .X_MAX(2), .Y_MAX(2), .NSEARCH(3)) u3 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  me_size_check #(.BLK_W(64), .BLK_H(64), .X_MAX(2), .Y_MAX(2), .NSEARCH(3)) u4 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]));
  me_size_check #(.BLK_W(4),  .BLK_H(4),  .X_MAX(55), .Y_MAX(55), .NSEARCH(2)) u5 (.clk, .rst_n, .finished(fin[5]), .checks(c[5]), .failures(f[5]));
  me_size_check #(.BLK_W(8),  .BLK_H(8),  .X_MAX(55), .Y_MAX(55), .NSEARCH(2)) u6 (.clk, .rst_n, .finished(fin[6]), .checks(c[6]), .failures(f[6]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    for (int i = 0; i < 7; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
