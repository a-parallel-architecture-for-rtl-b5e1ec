// best_match: keeps the best candidate of a full search for one block.
//
// Each valid beat brings the SAD of one candidate and the candidate's (x, y)
// position in the search area. The first beat of a search (in_first) loads
// the registers unconditionally; later beats replace them only when their SAD
// is strictly smaller, so among equal SADs the earliest candidate in raster
// order wins. On the beat that carries in_last, done pulses high one clock
// later with best_sad/best_x/best_y holding the search's result; they stay
// valid until the next search begins.
//
// The original design only states that the most similar block is kept; the
// strict-less tie rule and the first/last tagging are this design's choices.
module best_match #(
  parameter int unsigned SAD_W = 10,
  parameter int unsigned X_W   = 10,
  parameter int unsigned Y_W   = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [SAD_W-1:0] in_sad,
  input  logic [X_W-1:0]   in_x,
  input  logic [Y_W-1:0]   in_y,
  output logic             done,
  output logic [SAD_W-1:0] best_sad,
  output logic [X_W-1:0]   best_x,
  output logic [Y_W-1:0]   best_y
);

  logic take;
  assign take = in_valid && (in_first || in_sad < best_sad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      best_sad <= '1;
      best_x   <= '0;
      best_y   <= '0;
    end else begin
      done <= in_valid && in_last;
      if (take) begin
        best_sad <= in_sad;
        best_x   <= in_x;
        best_y   <= in_y;
      end
    end
  end

endmodule
