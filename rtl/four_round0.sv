// four_round0 -- four Round 0 basic blocks fed from one 32-bit memory port.
//
// The unit sweeps one strip of the image (STRIP_PIX consecutive pixels of the
// row-major frame) with the template pair held in its active-point list.
// Four basic blocks evaluate the four windows 4t..4t+3 of group t together.
// No image rows are buffered: for each active point the controller reads the
// memory word at pixel strip_base + 4t + offset, one word per cycle, and the
// k = 4 internal buffer shifts the lanes into place.  Because the buffer
// completes group t only while group t+1 is fetched, the sweep makes G+1
// fetch passes for G = STRIP_PIX/4 groups; the extra pass reads the pixels
// that follow the strip.
//
// After each pass (from the second on) the finished scores of the previous
// group are merged into the Round 0 summary in the same memory: two result
// words (two pixels each) are read, each pixel keeps the higher of its stored
// score and the new saturated score, the winning pair index is the pixel's
// target super-group, and both words are written back.  With pair = 0 the
// stored values are overwritten.  A sweep with W active points therefore takes
// (G+1)*W + 4*G cycles plus a few cycles of start and end.
//
// Timing: `start` (with `pair` and `strip_base`) begins a sweep when idle;
// `busy` stays high until the one-cycle `done`.  Memory reads return data on
// the cycle after the request.  The list is loaded through tpl_clear/tpl_push
// while idle; it must hold at least one point.
//
// From the source design: four basic blocks per 32-bit port, one pixel per
// block per cycle, the internal buffer scheme, strip-wise partitioning.  This
// design's own choices: the read-modify-write summary across pairs, the
// result word layout, the strip-end pass and the treatment of windows that run
// past a row or frame end (their addresses simply continue in memory).
module four_round0
  import gtm_pkg::*;
#(
  parameter int unsigned STRIP_PIX = 76800,   // 120 rows x 640 columns
  parameter int unsigned RES_BASE  = 76800 + GUARD_WORDS, // first summary word
  parameter int unsigned DEPTH     = R0_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  // active-point list load
  input  logic               tpl_clear,
  input  logic               tpl_push,
  input  apoint_t            tpl_point,
  // control
  input  logic               start,
  input  logic [SG_W-1:0]    pair,
  input  logic [PADDR_W-1:0] strip_base,
  output logic               busy,
  output logic               done,
  // memory port
  output mem_req_t           mem_req,
  input  word_t              mem_rdata
);

  localparam int unsigned G   = STRIP_PIX / K;
  localparam int unsigned TW  = $clog2(G + 1);
  localparam int unsigned IW  = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_RMW, S_DONE} state_e;
  state_e state;

  logic [TW-1:0]      t;
  logic [1:0]         rmw;
  logic [SG_W-1:0]    pair_q;
  logic [PADDR_W-1:0] base_q;

  // active point list
  apoint_t          pt;
  logic [IW-1:0]    pt_idx;
  logic             pt_first, pt_last;
  logic [IW:0]      pt_count;
  logic             pop;

  assign pop = (state == S_FETCH);

  active_point_fifo #(.DEPTH(DEPTH)) u_points (
    .clk, .rst_n,
    .clear    (tpl_clear && state == S_IDLE),
    .push     (tpl_push && state == S_IDLE),
    .wr_point (tpl_point),
    .rewind   (start && state == S_IDLE),
    .pop,
    .rd_point (pt),
    .rd_idx   (pt_idx),
    .rd_first (pt_first),
    .rd_last  (pt_last),
    .count    (pt_count)
  );

  // fetch address of the current point
  logic [PADDR_W-1:0] fetch_pix;
  assign fetch_pix = base_q + PADDR_W'({t, 2'b00}) + PADDR_W'(pt.off);

  // data phase: one cycle after a fetch
  logic          dv, d_first, d_last, d_tgt, d_use;
  logic [IW-1:0] d_idx;
  logic [1:0]    d_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv <= 1'b0; d_first <= 1'b0; d_last <= 1'b0; d_tgt <= 1'b0;
      d_use <= 1'b0; d_idx <= '0; d_s <= '0;
    end else begin
      dv      <= (state == S_FETCH);
      d_first <= pt_first;
      d_last  <= pt_last;
      d_tgt   <= pt.tgt;
      d_idx   <= pt_idx;
      d_s     <= fetch_pix[1:0];
      d_use   <= (t != '0);
    end
  end

  pix_t d_lane [K];
  pix_t w_lane [K];
  always_comb
    for (int i = 0; i < K; i++) d_lane[i] = mem_rdata[i*PIX_W +: PIX_W];

  internal_buffer_k4 #(.DEPTH(DEPTH)) u_buf (
    .clk, .en(dv), .idx(d_idx), .s(d_s), .d(d_lane), .w(w_lane)
  );

  logic signed [ACC_W-1:0] score [K];
  logic                    score_valid [K];

  for (genvar j = 0; j < K; j++) begin : g_bb
    round0_basic_block u_bb (
      .clk, .rst_n,
      .en          (dv && d_use),
      .first       (d_first),
      .last        (d_last),
      .pix         (w_lane[j]),
      .tgt         (d_tgt),
      .score       (score[j]),
      .score_valid (score_valid[j])
    );
  end

  // summary merge of two pixels into one result word
  word_t old_a, old_b;

  function automatic word_t merge(input word_t old, input logic signed [ACC_W-1:0] s0,
                                  input logic signed [ACC_W-1:0] s1, input logic [SG_W-1:0] p);
    r0_res_t o [2];
    r0_res_t n [2];
    word_t   r;
    o[0] = old[15:0];
    o[1] = old[31:16];
    n[0] = '{sg: p, score: sat_score(s0)};
    n[1] = '{sg: p, score: sat_score(s1)};
    for (int i = 0; i < 2; i++)
      if (p != '0 && o[i].score >= n[i].score) n[i] = o[i];
    r = {n[1], n[0]};
    return r;
  endfunction

  waddr_t res_addr;
  assign res_addr = waddr_t'(RES_BASE) + waddr_t'({t - 1'b1, 1'b0}) + waddr_t'(rmw[0]);

  always_comb begin
    mem_req = '0;
    unique case (state)
      S_FETCH: begin
        mem_req.req  = 1'b1;
        mem_req.addr = fetch_pix[PADDR_W-1:2];
      end
      S_RMW: begin
        mem_req.req  = 1'b1;
        mem_req.we   = rmw[1];
        mem_req.addr = res_addr;
        mem_req.wdata = rmw[0] ? merge(old_b, score[2], score[3], pair_q)
                               : merge(old_a, score[0], score[1], pair_q);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      t      <= '0;
      rmw    <= '0;
      pair_q <= '0;
      base_q <= '0;
      old_a  <= '0;
      old_b  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && pt_count != '0) begin
          state  <= S_FETCH;
          t      <= '0;
          pair_q <= pair;
          base_q <= {strip_base[PADDR_W-1:2], 2'b00};
        end
        S_FETCH: if (pt_last) begin
          if (t == '0) t <= TW'(1);
          else begin
            state <= S_RMW;
            rmw   <= '0;
          end
        end
        S_RMW: begin
          rmw <= rmw + 1'b1;
          if (rmw == 2'd1) old_a <= mem_rdata;
          if (rmw == 2'd2) old_b <= mem_rdata;
          if (rmw == 2'd3) begin
            if (t == TW'(G)) state <= S_DONE;
            else begin
              state <= S_FETCH;
              t     <= t + 1'b1;
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // all four blocks finish a window together
  property p_scores_together;
    @(posedge clk) disable iff (!rst_n) score_valid[0] |-> (score_valid[1] && score_valid[2] && score_valid[3]);
  endproperty
  assert property (p_scores_together);

endmodule
