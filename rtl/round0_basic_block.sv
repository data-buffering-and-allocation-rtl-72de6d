// round0_basic_block -- applies one template pair to one pixel location.
//
// The block takes one pixel per clock cycle, one per active point of the
// pair, and adds it (target point) or subtracts it (background point) into
// a signed accumulator.  After the pass's last point it presents the score
// of that window for one cycle.  A pair of W points therefore yields a
// window every W cycles, as in the source design (60 points, 60 cycles).
//
// Interface: `en` marks a valid pixel, `first` the pair's first point (the
// accumulator restarts), `last` its final point.  `score`/`score_valid`
// follow one cycle after `last`.
//
// The source design gives the block's rate and input width but not its
// arithmetic; the target-minus-background sum is this design's choice of the
// simplest correlation between a window and a target/background pair.
module round0_basic_block
  import gtm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  pix_t                    pix,
  input  logic                    tgt,
  output logic signed [ACC_W-1:0] score,
  output logic                    score_valid
);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] acc_next;

  always_comb acc_next = (first ? '0 : acc) + signed_pix(pix, tgt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      score       <= '0;
      score_valid <= 1'b0;
    end else begin
      score_valid <= en && last;
      if (en) begin
        acc <= acc_next;
        if (last) score <= acc_next;
      end
    end
  end

endmodule
