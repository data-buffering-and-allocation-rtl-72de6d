// internal_buffer_k2 -- two window pipelines (even and odd) on one 2-pixel
// memory word: the k = 2 form of the small internal buffer.
//
// Each memory word holds an even pixel and the following odd one.  For
// active point o, window 2t needs pixel 2t+o and window 2t+1 pixel 2t+o+1.
// The word read for group t is the one holding pixel 2t+o.  One control bit
// per point, c = o mod 2, steers it:
//   even buffer  <- c ? odd half : even half     (pixel 2t+o)
//   odd buffer   <- odd half                      (pixel 2t+o+1 when c = 0)
// Both buffers are read one pass (W cycles) later, while the same point is
// fetched for group t+1:
//   even window  <- even buffer
//   odd window   <- c ? even half of the word now arriving : odd buffer
// (for c = 1, pixel 2t+o+1 is the even half of the word of group t+1).
// The buffers hold one entry per active point.
//
// Interface: while `en` is high, `idx` names the active point whose word is
// on `d_even`/`d_odd` and `c` is its control bit.  `w_even`/`w_odd` are
// combinational; entries are overwritten at the clock edge.
//
// The multiplexer positions (even buffer: 0 = even half, 1 = odd half; odd
// window: 1 = even half of the memory word, 0 = odd buffer) and the per-point
// control bits follow the source design; the depth of 64 is this design's
// choice (one entry per active point, at least the 60 points of a pair).
module internal_buffer_k2
  import gtm_pkg::*;
#(
  parameter int unsigned DEPTH = R0_DEPTH
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] idx,
  input  logic                     c,
  input  pix_t                     d_even,
  input  pix_t                     d_odd,
  output pix_t                     w_even,
  output pix_t                     w_odd
);

  pix_t even_buf [DEPTH];
  pix_t odd_buf  [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      even_buf[idx] <= c ? d_odd : d_even;
      odd_buf[idx]  <= d_odd;
    end
  end

  assign w_even = even_buf[idx];
  assign w_odd  = c ? d_even : odd_buf[idx];

endmodule
