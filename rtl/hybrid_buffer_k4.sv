// hybrid_buffer_k4 -- four windows on a 4-pixel port whose memory stores the
// image twice over: word a holds pixels 2a .. 2a+3 (consecutive words
// overlap by two pixels).  Two small 2-pixel buffers complete the scheme.
//
// For active point o and window group N (windows 4N .. 4N+3) the word read
// is a = (4N+o)/2, holding pixels 4N+o-c .. 4N+o-c+3 with c = o mod 2.
//   left buffer  (windows 4N, 4N+1):   c = 0 -> lanes 0,1;  c = 1 -> lanes 1,2
//   right buffer (windows 4N+2, 4N+3): c = 0 -> lanes 2,3;  c = 1 -> lane 3 and
//                 pixel 4N+o+3, which is lane 0 of the word read for the same
//                 point in the next group's pass.
// As in the single-copy scheme, every buffer entry is consumed one pass later,
// so all four windows of group N are served during the pass of group N+1.
// The redundant storage halves the control needed per point to one bit.
//
// Interface: while `en` is high, `idx` names the active point whose word is
// on `d` and `c` is its control bit.  `w` is combinational; entries are
// overwritten at the clock edge.  Depth: one entry per active point.
//
// The memory layout and the two internal buffers follow the source design's
// hybrid scheme; the lane assignment above is derived from it here, since
// the source shows only the block level.
module hybrid_buffer_k4
  import gtm_pkg::*;
#(
  parameter int unsigned DEPTH = R0_DEPTH
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] idx,
  input  logic                     c,
  input  pix_t                     d [K],
  output pix_t                     w [K]
);

  pix_t left_buf  [DEPTH][2];
  pix_t right_buf [DEPTH][2];

  always_ff @(posedge clk) begin
    if (en) begin
      left_buf[idx][0]  <= c ? d[1] : d[0];
      left_buf[idx][1]  <= c ? d[2] : d[1];
      right_buf[idx][0] <= c ? d[3] : d[2];
      right_buf[idx][1] <= d[3];
    end
  end

  assign w[0] = left_buf[idx][0];
  assign w[1] = left_buf[idx][1];
  assign w[2] = right_buf[idx][0];
  assign w[3] = c ? d[0] : right_buf[idx][1];

endmodule
