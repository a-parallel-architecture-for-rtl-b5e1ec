// me_pkg: types and constants shared by the motion-estimation engine.
//
// Pixels are 8-bit unsigned luma samples, as in the original design's data
// width. A pixel difference needs one more bit and is kept signed, so that
// |a-b| is exact for every pair of pixels (the original subtractor kept only
// 8 bits; the extra bit is this design's choice). A block's sum of absolute
// differences (SAD) over N pixels needs PIX_W + clog2(N) bits.
package me_pkg;
  localparam int unsigned PIX_W  = 8;
  localparam int unsigned DIFF_W = PIX_W + 1;

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [DIFF_W-1:0] diff_t;

  // Width of a SAD over n pixels: n * (2**PIX_W - 1) < 2**(PIX_W + clog2(n)).
  function automatic int unsigned sad_width(int unsigned n);
    return PIX_W + $clog2(n);
  endfunction
endpackage
