// starfire_gtm_top -- Round 0 and Round 1 of an infrared target recognizer on
// one FPGA with four 32-bit SRAM ports.
//
// The host loads an 8-bit image frame (IMG_ROWS x IMG_COLS, row-major, four
// pixels per 32-bit word) through an input block-RAM FIFO; every word is
// written to the same address of all four memories, so each memory holds a
// full copy.  Round 0 then runs one template pair at a time on the whole
// frame: the frame is cut into four strips of equal size and strip s is
// swept by the four_round0 unit on memory s, sixteen windows in flight in
// all.  Each sweep folds its scores into a per-pixel summary (best score and
// best pair) kept after the frame in the same memory.  Round 1 then scans
// that summary, takes the pixels above a threshold as regions of interest and
// applies the templates of each one's super-group, reading one byte from each
// of the four memories per cycle.  Its results go to an output block-RAM FIFO
// that the host drains.
//
// Port ownership: a multiplexer in front of each memory gives it to the host
// load path while nothing runs, to the Round 0 units during a Round 0 sweep
// and to the Round 1 unit during Round 1.  A start command is taken only when
// the design is idle and the input FIFO is empty, so a sweep never sees a
// half-loaded frame.  Ownership returns to the host as soon as no unit of the
// round is busy, which also covers a Round 0 start with an empty point list
// (the units then refuse to start).
//
// Beside this datapath, and sharing nothing with it, the top carries the
// other buffering schemes of the same design space as independent blocks
// with their own ports (alt_*): the k = 2 internal buffer, the hybrid k = 4
// buffer for doubly stored words, and full row buffering for an RB_P x RB_Q
// mask over IMG_COLS-pixel rows, with and without mask shift registers.
// They are not used by Round 0 or Round 1.
//
// Interface timing: memories are single-ported, synchronous, one cycle of
// read latency.  Commands are single-cycle pulses; `r0_done`/`r1_done` pulse
// when a round ends.  Templates and tables are written while idle.
//
// From the source design: the block diagram (two block-RAM buffers, four
// Round 0 units of four windows each, one Round 1 unit, four memories behind
// multiplexers), 32-bit use of every port, the 480x640 frame, the strip
// partitioning, and the internal buffer scheme.  This design's own: the host
// command set, the per-pixel summary in memory, the threshold test and the
// memory map (frame at word 0, an unused guard of GUARD_WORDS words, then
// the summary, two pixels per word).
module starfire_gtm_top
  import gtm_pkg::*;
#(
  parameter int unsigned IMG_ROWS  = 480,
  parameter int unsigned IMG_COLS  = 640,
  parameter int unsigned IN_DEPTH  = 512,
  parameter int unsigned OUT_DEPTH = 512,
  parameter int unsigned RB_P      = 3,     // row-buffer mask rows
  parameter int unsigned RB_Q      = 4      // row-buffer mask columns
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host -> image load
  input  logic                      host_in_push,
  input  load_word_t                host_in_word,
  output logic                      host_in_full,
  // Round 0 active-point list (same pair for all four units)
  input  logic                      r0_tpl_clear,
  input  logic                      r0_tpl_push,
  input  apoint_t                   r0_tpl_point,
  // Round 1 tables
  input  logic                      r1_tpl_we,
  input  logic [$clog2(R1_TPL_MAX*R1_ROWS)-1:0] r1_tpl_addr,
  input  apoint_t                   r1_tpl_row [N_MEM],
  input  logic                      r1_sg_we,
  input  logic [SG_W-1:0]           r1_sg_idx,
  input  logic [4:0]                r1_sg_first,
  input  logic [2:0]                r1_sg_count,
  input  logic signed [SCORE_W-1:0] r1_threshold,
  // commands and status
  input  logic                      cmd_r0_start,
  input  logic [SG_W-1:0]           cmd_r0_pair,
  input  logic                      cmd_r1_start,
  output logic                      busy,
  output logic                      r0_done,
  output logic                      r1_done,
  // results -> host
  input  logic                      host_out_pop,
  output r1_res_t                   host_out_data,
  output logic                      host_out_empty,
  // external memories (Left_Mem, Left_Mezz, Right_Mezz, Right_Mem)
  output mem_req_t                  mem_req [N_MEM],
  input  word_t                     mem_rdata [N_MEM],
  // alternative buffering schemes, independent of the datapath above
  input  logic                      alt_k2_en,
  input  logic [$clog2(R0_DEPTH)-1:0] alt_k2_idx,
  input  logic                      alt_k2_c,
  input  pix_t                      alt_k2_d_even,
  input  pix_t                      alt_k2_d_odd,
  output pix_t                      alt_k2_w_even,
  output pix_t                      alt_k2_w_odd,
  input  logic                      alt_hy_en,
  input  logic [$clog2(R0_DEPTH)-1:0] alt_hy_idx,
  input  logic                      alt_hy_c,
  input  pix_t                      alt_hy_d [K],
  output pix_t                      alt_hy_w [K],
  input  logic                      alt_rb_valid,
  input  pix_t                      alt_rb_pix,
  output pix_t                      alt_rb_win [RB_P][RB_Q],
  output logic                      alt_rb_win_valid,
  input  logic                      alt_bk_valid,
  input  pix_t                      alt_bk_pix,
  output pix_t                      alt_bk_win [RB_P][RB_Q],
  output logic                      alt_bk_win_valid
);

  localparam int unsigned FRAME_PIX = IMG_ROWS * IMG_COLS;
  localparam int unsigned STRIP_PIX = FRAME_PIX / N_MEM;
  localparam int unsigned RES_BASE  = FRAME_PIX / K + GUARD_WORDS;

  owner_e owner;
  logic   can_start;

  // ---------------- host input buffer ----------------
  load_word_t in_word;
  logic       in_empty, in_pop;

  blockram_fifo #(.WIDTH($bits(load_word_t)), .DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .push  (host_in_push),
    .wdata (host_in_word),
    .pop   (in_pop),
    .rdata (in_word),
    .full  (host_in_full),
    .empty (in_empty),
    .count ()
  );

  assign in_pop = (owner == OWN_HOST) && !in_empty;

  mem_req_t host_req;
  always_comb begin
    host_req       = '0;
    host_req.req   = in_pop;
    host_req.we    = in_pop;
    host_req.addr  = in_word.addr;
    host_req.wdata = in_word.data;
  end

  // ---------------- Round 0 ----------------
  mem_req_t          r0_req [N_MEM];
  logic [N_MEM-1:0]  r0_busy, r0_done_v;
  logic              r0_start;

  assign can_start = (owner == OWN_HOST) && in_empty;
  assign r0_start  = cmd_r0_start && can_start;

  for (genvar s = 0; s < N_MEM; s++) begin : g_r0
    four_round0 #(.STRIP_PIX(STRIP_PIX), .RES_BASE(RES_BASE)) u_four_round0 (
      .clk, .rst_n,
      .tpl_clear  (r0_tpl_clear),
      .tpl_push   (r0_tpl_push),
      .tpl_point  (r0_tpl_point),
      .start      (r0_start),
      .pair       (cmd_r0_pair),
      .strip_base (PADDR_W'(s * STRIP_PIX)),
      .busy       (r0_busy[s]),
      .done       (r0_done_v[s]),
      .mem_req    (r0_req[s]),
      .mem_rdata  (mem_rdata[s])
    );
  end

  // ---------------- Round 1 ----------------
  mem_req_t r1_req [N_MEM];
  logic     r1_busy, r1_done_p, r1_start;
  logic     res_valid, out_full;
  r1_res_t  res_data;

  assign r1_start = cmd_r1_start && !cmd_r0_start && can_start;

  one_round1 #(.STRIP_PIX(STRIP_PIX), .RES_BASE(RES_BASE)) u_one_round1 (
    .clk, .rst_n,
    .tpl_we    (r1_tpl_we),
    .tpl_addr  (r1_tpl_addr),
    .tpl_row   (r1_tpl_row),
    .sg_we     (r1_sg_we),
    .sg_idx    (r1_sg_idx),
    .sg_first  (r1_sg_first),
    .sg_count  (r1_sg_count),
    .threshold (r1_threshold),
    .start     (r1_start),
    .busy      (r1_busy),
    .done      (r1_done_p),
    .mem_req   (r1_req),
    .mem_rdata (mem_rdata),
    .res_valid (res_valid),
    .res_data  (res_data),
    .res_ready (!out_full)
  );

  blockram_fifo #(.WIDTH($bits(r1_res_t)), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .push  (res_valid && !out_full),
    .wdata (res_data),
    .pop   (host_out_pop),
    .rdata (host_out_data),
    .full  (out_full),
    .empty (host_out_empty),
    .count ()
  );

  // ---------------- port ownership ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= OWN_HOST;
    else begin
      unique case (owner)
        OWN_HOST: if (r0_start) owner <= OWN_R0;
                  else if (r1_start) owner <= OWN_R1;
        OWN_R0:   if (!(|r0_busy)) owner <= OWN_HOST;  // done, or never started
        OWN_R1:   if (!r1_busy) owner <= OWN_HOST;
        default:  owner <= OWN_HOST;
      endcase
    end
  end

  for (genvar s = 0; s < N_MEM; s++) begin : g_mux
    mem_port_mux u_mux (
      .owner    (owner),
      .host_req (host_req),
      .r0_req   (r0_req[s]),
      .r1_req   (r1_req[s]),
      .mem_req  (mem_req[s])
    );
  end

  assign busy    = (owner != OWN_HOST) || (|r0_busy) || r1_busy;
  assign r0_done = r0_done_v[0];
  assign r1_done = r1_done_p;

  // ---------------- alternative buffering schemes ----------------
  // Stand-alone datapaths for the other ways of feeding a mask from memory:
  // k = 2 internal buffer, hybrid k = 4 buffer over doubly stored words, and
  // full row buffering with and without mask shift registers.  They share
  // nothing with the Round 0 / Round 1 datapath.
  internal_buffer_k2 u_alt_k2 (
    .clk, .en(alt_k2_en), .idx(alt_k2_idx), .c(alt_k2_c),
    .d_even(alt_k2_d_even), .d_odd(alt_k2_d_odd), .w_even(alt_k2_w_even), .w_odd(alt_k2_w_odd)
  );

  hybrid_buffer_k4 u_alt_hybrid (
    .clk, .en(alt_hy_en), .idx(alt_hy_idx), .c(alt_hy_c), .d(alt_hy_d), .w(alt_hy_w)
  );

  row_buffer #(.P(RB_P), .Q(RB_Q), .COLS(IMG_COLS)) u_alt_row_buffer (
    .clk, .rst_n, .in_valid(alt_rb_valid), .in_pix(alt_rb_pix),
    .win(alt_rb_win), .win_valid(alt_rb_win_valid)
  );

  banked_row_buffer #(.P(RB_P), .Q(RB_Q), .COLS(IMG_COLS)) u_alt_banked (
    .clk, .rst_n, .in_valid(alt_bk_valid), .in_pix(alt_bk_pix),
    .win(alt_bk_win), .win_valid(alt_bk_win_valid)
  );

  // the four strips are swept in lock step
  property p_r0_lockstep;
    @(posedge clk) disable iff (!rst_n) r0_done_v[0] |-> (&r0_done_v);
  endproperty
  assert property (p_r0_lockstep);

endmodule
