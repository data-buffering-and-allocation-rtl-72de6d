// internal_buffer_k4 -- lets four window pipelines share one 4-pixel memory word.
//
// Four computation copies work on windows 4t, 4t+1, 4t+2 and 4t+3 of a
// row-major image.  For active point o, window 4t+j needs pixel 4t+o+j.  The
// word fetched for group t at that point holds pixels 4t+o-s .. 4t+o-s+3,
// where s = o mod 4.  Windows j < 4-s find their pixel in this word.  The
// rest need the next word, which is fetched anyway one pass later for group
// t+1.  So the buffer keeps, for every active point, the lanes d[s+j] of the
// word (lane m[j]) and hands group t its pixels during the pass of group t+1:
//   w[j] = m_old[j]        if j < 4-s
//   w[j] = d_now[s+j-4]    otherwise
// The buffer therefore delays the computation by one pass of W cycles and
// holds DEPTH >= W entries, one per active point.
//
// Interface: while `en` is high, `idx` names the active point whose memory
// word is on `d`, and `s` is its offset modulo 4.  `w` is combinational from
// the stored entry and `d`; the entry is overwritten at the clock edge.
// Storage is an array with asynchronous read (distributed RAM).
//
// Follows the source design: the lane alignment, the 2-bit per-point control
// and the depth of 64.  The selection is written as indexed lane selects, not
// as the source's particular multiplexer tree; it has the same function.
module internal_buffer_k4
  import gtm_pkg::*;
#(
  parameter int unsigned DEPTH = R0_DEPTH
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] idx,
  input  logic [1:0]               s,
  input  pix_t                     d [K],
  output pix_t                     w [K]
);

  pix_t m_mem [DEPTH][K];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int j = 0; j < K; j++) begin
        // lanes beyond the word are not used later; keep the top lane
        m_mem[idx][j] <= (int'(s) + j < K) ? d[int'(s) + j] : d[K-1];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < K; j++) begin
      if (j < K - int'(s)) w[j] = m_mem[idx][j];
      else                 w[j] = d[int'(s) + j - K];
    end
  end

endmodule
