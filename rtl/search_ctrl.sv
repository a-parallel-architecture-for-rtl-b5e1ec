// search_ctrl: full-search sequencer.
//
// A search covers search_w x search_h candidate positions, one candidate
// block per clock, so a search with no gaps takes search_w*search_h clocks,
// as in the time formula of the original design (number of candidates times
// the clock period). A start pulse while idle latches the search size and
// raises busy. While busy, every clock with ref_valid high accepts one
// candidate: the controller tags it with its position (x, y), counting x
// fastest, and with first/last flags. After the last candidate busy falls.
// A clock with ref_valid low is a gap: nothing is tagged and the position
// holds. Start while busy, and candidates while idle, are ignored.
//
// Interface timing: tag_* are combinational from the current position and
// ref_valid, i.e. they belong to the candidate presented in the same clock.
// search_w and search_h must be at least 1 and at most X_MAX and Y_MAX.
//
// The raster order, the start/busy handshake and the gap handling are this
// design's choices; the original design gives only the one-candidate-per-
// clock rate.
module search_ctrl #(
  parameter int unsigned X_MAX = 1024,  // widest search area (frame width)
  parameter int unsigned Y_MAX = 768,   // tallest search area (frame height)
  parameter int unsigned X_W   = $clog2(X_MAX),
  parameter int unsigned Y_W   = $clog2(Y_MAX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [X_W:0]   search_w,
  input  logic [Y_W:0]   search_h,
  input  logic           ref_valid,
  output logic           busy,
  output logic           tag_valid,
  output logic           tag_first,
  output logic           tag_last,
  output logic [X_W-1:0] tag_x,
  output logic [Y_W-1:0] tag_y
);

  logic [X_W-1:0] x_q, x_end;
  logic [Y_W-1:0] y_q, y_end;
  logic           last_x, last_y;

  assign last_x    = (x_q == x_end);
  assign last_y    = (y_q == y_end);
  assign tag_valid = busy && ref_valid;
  assign tag_first = (x_q == '0) && (y_q == '0);
  assign tag_last  = last_x && last_y;
  assign tag_x     = x_q;
  assign tag_y     = y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      x_q   <= '0;
      y_q   <= '0;
      x_end <= '0;
      y_end <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        x_q   <= '0;
        y_q   <= '0;
        x_end <= X_W'(search_w - 1'b1);
        y_end <= Y_W'(search_h - 1'b1);
      end
    end else if (ref_valid) begin
      if (last_x) begin
        x_q <= '0;
        if (last_y) busy <= 1'b0;
        else        y_q  <= y_q + 1'b1;
      end else begin
        x_q <= x_q + 1'b1;
      end
    end
  end

  // A search size outside the supported range is a caller error.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !busy) |-> (search_w != '0 && 32'(search_w) <= X_MAX &&
                                         search_h != '0 && 32'(search_h) <= Y_MAX))
    else $error("search_ctrl: search size %0d x %0d out of range", search_w, search_h);

endmodule
