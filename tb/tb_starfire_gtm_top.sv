// tb_starfire_gtm_top -- end-to-end run of the whole accelerator on a small
// frame (8 x 64 pixels, four strips of 128 pixels): the host loads the frame
// through the input FIFO, runs Round 0 with six template pairs, then Round 1,
// and drains the results.  The Round 0 summary in all four memories and the
// Round 1 result list are compared with a software model of the same
// arithmetic.  The run counts each mechanism of the design and fails if one
// never happened: input FIFO full, a start refused while a load is pending,
// all four word alignments of the internal buffer, summary kept and replaced,
// score saturation, pixels below and above the threshold, 2- and 5-template
// super-groups, output FIFO back-pressure, both control values of the k = 2
// and hybrid buffers, and windows from both row buffers.  Every Round 0 sweep length
// is checked against (G+1)*W + 4*G + 1 cycles.
module tb_starfire_gtm_top;
  import gtm_pkg::*;

  localparam int ROWS  = 8;
  localparam int COLS  = 64;
  localparam int FRAME = ROWS * COLS;
  localparam int STRIP = FRAME / N_MEM;
  localparam int G     = STRIP / K;
  localparam int RESB  = FRAME / K + GUARD_WORDS;
  localparam int NTPL  = 21;
  localparam int TA_W  = $clog2(R1_TPL_MAX*R1_ROWS);
  localparam int WDOG  = 400000;
  localparam int THRESH  = 900;   // Round 1 threshold
  localparam int REQUEUE = 40;    // words queued during the first sweep
  localparam int POP_DIV = 64;    // host pops one result in POP_DIV cycles

  localparam int RB_P  = 3;      // row-buffer mask of the top (default)
  localparam int RB_Q  = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, host_in_push, host_in_full, r0_tpl_clear, r0_tpl_push;
  load_word_t host_in_word;
  apoint_t r0_tpl_point;
  logic r1_tpl_we, r1_sg_we, cmd_r0_start, cmd_r1_start, busy, r0_done, r1_done;
  logic [TA_W-1:0] r1_tpl_addr;
  apoint_t r1_tpl_row [N_MEM];
  logic [SG_W-1:0] r1_sg_idx, cmd_r0_pair;
  logic [4:0] r1_sg_first;
  logic [2:0] r1_sg_count;
  logic signed [SCORE_W-1:0] r1_threshold;
  logic host_out_pop, host_out_empty;
  r1_res_t host_out_data;
  mem_req_t mem_req [N_MEM];
  word_t mem_rdata [N_MEM];
  logic alt_k2_en, alt_k2_c, alt_hy_en, alt_hy_c, alt_rb_valid, alt_rb_win_valid, alt_bk_valid, alt_bk_win_valid;
  logic [$clog2(R0_DEPTH)-1:0] alt_k2_idx, alt_hy_idx;
  pix_t alt_k2_d_even, alt_k2_d_odd, alt_k2_w_even, alt_k2_w_odd, alt_rb_pix, alt_bk_pix;
  pix_t alt_hy_d [K];
  pix_t alt_hy_w [K];
  pix_t alt_rb_win [RB_P][RB_Q];
  pix_t alt_bk_win [RB_P][RB_Q];

  starfire_gtm_top #(.IMG_ROWS(ROWS), .IMG_COLS(COLS), .IN_DEPTH(16), .OUT_DEPTH(4)) dut (.*);

  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    sram_model u_mem (.clk, .req(mem_req[m]), .rdata(mem_rdata[m]));
  end

  `include "tb_gtm_top_body.svh"

endmodule
